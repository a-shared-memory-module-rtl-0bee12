// tb_smm_system: end-to-end test of the shared memory system at its default
// size (8K x 16 SRAM, 32-entry FIFOs, 555 MHz memory clock), driven only
// through the four processors' memory ports and the configuration bus.
//
// Each processor is modelled by a driver that executes a queue of DCmem
// accesses (writes to locations 28..31, reads from 28) on its own clock,
// holding an access while the port stalls. The processor clocks run at 1,
// 1.33, 2 and 4 times the memory clock period. The phases are:
//   A  clock pause after reset and wake-up on the first token
//   B  block workload: 1024 words written then read back by processor 0,
//      write phase timed against one token per processor cycle
//   C  c = a + 2b over 1024 points split over the four processors
//   D  priority bit on port 3 while all four processors read
//   E  address generator: burst write of 200 words into a block of 100 with
//      stride 7 (wraps), then a burst read of the block
//   F  address-only port 2 taking write data from data-only port 3, and read
//      data routed to processor 3
//   G  40 outstanding reads without reading the output FIFO (output FIFO
//      reserve blocks the port, the input FIFO fills and the processor stalls)
//   H  two processors incrementing a shared counter under mutex 0
//   I  read latency with the clock running, against 10 processor plus 13
//      memory cycles; memory clock period after a frequency change
// Every returned word is compared with a shadow memory. Counters record that
// each mechanism happened; any mechanism that never happened is a failure.
//
// Command encodings, register meanings and the latency bound follow the
// described module; the programs and clock periods are the testbench's own.
module tb_smm_system;
  import smm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic rst_n = 1, ext_clk = 0, cfg_clk = 0, cfg_we = 0;
  logic [15:0] cfg_addr = '0, cfg_data = '0;
  logic [3:0] proc_clk = '0, proc_wr_en, proc_rd_en, proc_stall;
  logic [3:0][4:0]  proc_wr_addr, proc_rd_addr;
  logic [3:0][15:0] proc_wr_data, proc_rd_data;
  logic [3:0][2:0]  connect_in, connect_out;
  logic mem_clk;

  smm_system dut (.rst_n(rst_n), .ext_clk(ext_clk), .cfg_clk(cfg_clk), .cfg_we(cfg_we),
    .cfg_addr(cfg_addr), .cfg_data(cfg_data), .proc_clk(proc_clk), .proc_wr_en(proc_wr_en),
    .proc_wr_addr(proc_wr_addr), .proc_wr_data(proc_wr_data), .proc_rd_en(proc_rd_en),
    .proc_rd_addr(proc_rd_addr), .proc_rd_data(proc_rd_data), .proc_stall(proc_stall),
    .connect_in(connect_in), .connect_out(connect_out), .mem_clk(mem_clk));

  localparam realtime TMEM = 1.8ns;
  localparam realtime HALF [4] = '{0.9ns, 1.2ns, 1.8ns, 3.6ns};
  always #5ns cfg_clk = ~cfg_clk;
  always #10ns ext_clk = ~ext_clk;

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ processors
  typedef struct { bit rd; logic [4:0] a; logic [15:0] d; } op_t;
  op_t          ops [4][$];
  logic [15:0]  res [4][$];
  bit           busy [4];
  int           wr_stalls = 0, rd_stalls = 0;
  int           pcycles [4];
  logic         wr_en_u [4], rd_en_u [4];
  logic [4:0]   wr_a_u [4];
  logic [15:0]  wr_d_u [4];

  for (genvar p = 0; p < 4; p++) begin : g_cpu
    assign proc_wr_en[p]   = wr_en_u[p];
    assign proc_rd_en[p]   = rd_en_u[p];
    assign proc_wr_addr[p] = wr_a_u[p];
    assign proc_wr_data[p] = wr_d_u[p];
    assign proc_rd_addr[p] = 5'd28;
    always #(HALF[p]) proc_clk[p] = ~proc_clk[p];
    always @(posedge proc_clk[p]) pcycles[p]++;
    initial begin
      wr_en_u[p] = 0; rd_en_u[p] = 0; wr_a_u[p] = '0; wr_d_u[p] = '0; busy[p] = 0;
      forever begin
        @(negedge proc_clk[p]);
        wr_en_u[p] = 0; rd_en_u[p] = 0;
        if (ops[p].size() != 0) begin
          op_t o;
          busy[p] = 1;
          o = ops[p].pop_front();
          if (o.rd) rd_en_u[p] = 1;
          else begin wr_en_u[p] = 1; wr_a_u[p] = o.a; wr_d_u[p] = o.d; end
          #0.1ns;
          while (proc_stall[p]) begin
            if (o.rd) rd_stalls++; else wr_stalls++;
            @(negedge proc_clk[p]); #0.1ns;
          end
          if (o.rd) res[p].push_back(proc_rd_data[p]);
          @(posedge proc_clk[p]);
          busy[p] = 0;
        end
      end
    end
  end

  function automatic void pw(int p, logic [4:0] a, logic [15:0] d);
    ops[p].push_back('{rd: 0, a: a, d: d});
  endfunction
  function automatic void pr(int p);
    ops[p].push_back('{rd: 1, a: 5'd28, d: '0});
  endfunction
  task automatic wait_idle(int p);
    while (ops[p].size() != 0 || busy[p]) @(negedge proc_clk[p]);
  endtask
  task automatic get(int p, output logic [15:0] d);
    pr(p);
    while (res[p].size() == 0) @(negedge proc_clk[p]);
    d = res[p].pop_front();
  endtask

  // shadow memory
  logic [15:0] shadow [int];
  function automatic void mem_write(int p, logic [15:0] a, logic [15:0] d);
    pw(p, 5'd29, a); pw(p, 5'd28, d);
    shadow[int'(a)] = d;
  endfunction
  // read n words starting at a list of addresses, checking against the shadow
  task automatic read_check(int p, logic [15:0] addrs [$], string what);
    int n_bad = 0;
    for (int i = 0; i < addrs.size(); i += 8) begin
      int k = (addrs.size() - i < 8) ? addrs.size() - i : 8;
      for (int j = 0; j < k; j++) pw(p, 5'd28, addrs[i + j]);
      for (int j = 0; j < k; j++) begin
        logic [15:0] d;
        get(p, d);
        checks++;
        if (!shadow.exists(int'(addrs[i + j])) || d !== shadow[int'(addrs[i + j])]) begin
          failures++;
          if (n_bad++ < 5) $display("FAIL %s: addr %h read %h expected %h", what, addrs[i + j], d,
                                    shadow.exists(int'(addrs[i + j])) ? shadow[int'(addrs[i + j])] : 16'hxxxx);
        end
      end
    end
  endtask

  task automatic cfg_write(logic [7:0] r, logic [15:0] d);
    @(negedge cfg_clk);
    cfg_we = 1; cfg_addr = {8'h80, r}; cfg_data = d;
    @(negedge cfg_clk);
    cfg_we = 0;
  endtask

  // ------------------------------------------------------------ mechanism monitors
  int n_conflict = 0, n_grant = 0, n_req_cycles = 0, n_prio_win = 0, n_full_block = 0;
  int n_burst_step = 0, n_partner = 0, n_ext_pop = 0, n_mx_contend = 0, n_mx_grant = 0;
  int n_wrap = 0, n_pause = 0, n_wake = 0, n_pcfg = 0, n_agcfg = 0, n_no_grant = 0;

  always @(posedge mem_clk) if (rst_n) begin
    if (|dut.u_mem.mem_req) n_req_cycles++;
    if (|dut.u_mem.mem_grant) n_grant++;
    if ($countones(dut.u_mem.mem_req) > 1) n_conflict++;
    if (|dut.u_mem.mem_req && !(|dut.u_mem.mem_grant)) n_no_grant++;
    if (dut.u_mem.prio[3] && dut.u_mem.mem_req[3] && |dut.u_mem.mem_req[2:0]) begin
      checks++;
      if (dut.u_mem.mem_grant[3]) n_prio_win++;
      else begin failures++; $display("FAIL priority port 3 not served"); end
    end
    if ($countones(dut.u_mem.g_mutex[0].req) > 1) n_mx_contend++;
    n_mx_grant += $countones(dut.u_mem.g_mutex[0].gnt);
    if (|dut.u_mem.ext_pop) n_ext_pop++;
    if (dut.u_mem.g_agen[2].step && dut.u_mem.g_agen[2].u_agen.count > dut.u_mem.g_agen[2].u_agen.next_count)
      n_wrap++;
  end

  for (genvar p = 0; p < 4; p++) begin : g_mon
    always @(posedge mem_clk) if (rst_n) begin
      if (dut.u_mem.g_port[p].u_port.hv && dut.u_mem.g_port[p].u_port.ps == PS_INIT &&
          !dut.u_mem.g_port[p].u_port.tok.cfgen && !dut.u_mem.g_port[p].u_port.tok.wren &&
          dut.u_mem.g_port[p].u_port.addr_mode && dut.u_mem.g_port[p].u_port.dest_full)
        n_full_block++;
      if (dut.u_mem.g_port[p].u_port.agen_step) n_burst_step++;
      if (|dut.u_mem.g_port[p].u_port.partner_pop) n_partner++;
      if (dut.u_mem.g_port[p].u_port.cfg0_we || dut.u_mem.g_port[p].u_port.cfg1_we) n_pcfg++;
      if (dut.u_mem.g_port[p].u_port.agen_cfg_we) n_agcfg++;
    end
  end

  // memory clock pause detection
  realtime last_edge = 0;
  bit      paused = 0;
  always @(posedge mem_clk) begin
    last_edge = $realtime;
    if (paused) begin n_wake++; paused = 0; end
  end
  always #5ns if (rst_n && !paused && $realtime - last_edge > 20ns) begin paused = 1; n_pause++; end

  // per-processor programs for the phases where all processors run at once
  int phase = 0;
  int done [4] = '{0, 0, 0, 0};

  task automatic run_c(int p);
    logic [15:0] a, b;
    for (int j = p * 256; j < p * 256 + 256; j++) mem_write(p, 16'(1024 + j), 16'(j) ^ 16'h1234);
    for (int j = p * 256; j < p * 256 + 256; j++) begin
      pw(p, 5'd28, 16'(j)); pw(p, 5'd28, 16'(1024 + j));
      get(p, a); get(p, b);
      mem_write(p, 16'(2048 + j), a + 16'(2 * b));
    end
    wait_idle(p);
  endtask

  task automatic run_d(int p);
    logic [15:0] ad [$];
    for (int j = 0; j < 96; j++) ad.push_back(16'(p * 256 + j));
    read_check(p, ad, "priority phase");
  endtask

  task automatic run_h(int p);
    logic [15:0] v;
    for (int k = 0; k < 10; k++) begin
      pw(p, 5'd30, 16'hF011);
      pw(p, 5'd28, 16'h1F00);
      get(p, v);
      pw(p, 5'd29, 16'h1F00); pw(p, 5'd28, v + 16'd1);
      pw(p, 5'd30, 16'hF021);
    end
    wait_idle(p);
  endtask

  for (genvar p = 0; p < 4; p++) begin : g_prog
    initial begin
      wait (phase == 3); run_c(p); done[p] = 3;
      wait (phase == 4); run_d(p); done[p] = 4;
      if (p < 2) begin wait (phase == 8); run_h(p); done[p] = 8; end
    end
  end

  // ------------------------------------------------------------ phases
  initial begin
    logic [15:0] addrs [$];
    logic [15:0] d;
    int t0;
    #0.1ns rst_n = 0;
    #30ns rst_n = 1;

    // A: nothing to do, so the memory clock must stop
    #100ns;
    chk(paused, "memory clock paused while idle");

    // B: block workload on processor 0
    t0 = pcycles[0];
    for (int i = 0; i < 1024; i++) mem_write(0, 16'(i), 16'(i * 7 + 3) ^ 16'h5A5A);
    wait_idle(0);
    $display("block write: 1024 writes in %0d processor cycles", pcycles[0] - t0);
    chk(pcycles[0] - t0 <= 2048 + 64, "block write streams one token per processor cycle");
    addrs = {};
    for (int i = 0; i < 1024; i++) addrs.push_back(16'(i));
    t0 = pcycles[0];
    read_check(0, addrs, "block read");
    $display("block read: 1024 reads in %0d processor cycles", pcycles[0] - t0);

    // C: c_j = a_j + 2 b_j; a = words 0..1023, b at 1024.., c at 2048..
    phase = 3;
    wait (done[0] == 3 && done[1] == 3 && done[2] == 3 && done[3] == 3);
    addrs = {};
    for (int j = 0; j < 1024; j++) begin
      addrs.push_back(16'(2048 + j));
      shadow[2048 + j] = shadow[j] + 16'(2 * shadow[1024 + j]);
    end
    read_check(2, addrs, "c = a + 2b");

    // D: priority on port 3 (p=1, out_port 3, address-data)
    pw(3, 5'd30, 16'h008F);
    wait_idle(3);
    phase = 4;
    wait (done[0] == 4 && done[1] == 4 && done[2] == 4 && done[3] == 4);
    pw(3, 5'd30, 16'h000F);
    wait_idle(3);

    // E: address generator 2 (select 0100): block 100, stride 7, offset 0x1800
    pw(1, 5'd31, 16'h8401); pw(1, 5'd28, 16'd100);
    pw(1, 5'd31, 16'h8402); pw(1, 5'd28, 16'd7);
    pw(1, 5'd31, 16'h8400); pw(1, 5'd28, 16'h1800);
    pw(1, 5'd31, 16'hC4C8);                       // burst write of 200
    begin
      int c = 0;
      for (int i = 0; i < 200; i++) begin
        pw(1, 5'd28, 16'hE000 + 16'(i));
        shadow[16'h1800 + c] = 16'hE000 + 16'(i);
        c = (c + 7) % 100;
      end
      wait_idle(1);
      pw(1, 5'd31, 16'h8400); pw(1, 5'd28, 16'h1800);   // offset write restarts the count
      pw(1, 5'd30, 16'hC464);                           // burst read of 100
      c = 0;
      for (int i = 0; i < 100; i++) begin
        get(1, d);
        checks++;
        if (d !== shadow[16'h1800 + c]) begin
          failures++;
          $display("FAIL burst read %0d: %h expected %h", i, d, shadow[16'h1800 + c]);
        end
        c = (c + 7) % 100;
      end
    end

    // F: port 2 address-only (data from port 3, reads to port 3); port 3 data-only
    pw(2, 5'd30, 16'h011B);
    pw(2, 5'd30, 16'h000A);
    pw(3, 5'd30, 16'h000D);
    wait_idle(2); wait_idle(3);
    fork
      for (int i = 0; i < 32; i++) pw(3, 5'd28, 16'hD000 + 16'(i));
      for (int i = 0; i < 32; i++) begin
        pw(2, 5'd29, 16'h1C00 + 16'(i));
        shadow[16'h1C00 + i] = 16'hD000 + 16'(i);
      end
    join
    wait_idle(2); wait_idle(3);
    for (int i = 0; i < 32; i++) pw(2, 5'd28, 16'h1C00 + 16'(i));
    for (int i = 0; i < 32; i++) begin
      get(3, d);
      chk(d === 16'hD000 + 16'(i), $sformatf("address-only/data-only word %0d = %h", i, d));
    end
    pw(2, 5'd30, 16'h000B);
    pw(3, 5'd30, 16'h000F);
    wait_idle(2); wait_idle(3);

    // G: 40 reads outstanding before processor 1 reads any result
    addrs = {};
    for (int i = 0; i < 40; i++) begin
      addrs.push_back(16'(2048 + 256 + i));
      pw(1, 5'd28, 16'(2048 + 256 + i));
    end
    wait_idle(1);
    #300ns;
    for (int i = 0; i < 40; i++) begin
      get(1, d);
      chk(d === shadow[int'(addrs[i])], $sformatf("held-back read %0d", i));
    end

    // H: shared counter at 0x1F00 under mutex 0
    mem_write(0, 16'h1F00, 16'd0);
    wait_idle(0);
    phase = 8;
    wait (done[0] == 8 && done[1] == 8);
    pw(2, 5'd28, 16'h1F00);
    get(2, d);
    chk(d == 16'd20, $sformatf("shared counter = %0d, expected 20", d));

    // I: latency with the clock running (stall disabled), then frequency change
    cfg_write(8'h00, 16'h0006);
    #50ns;
    begin
      int c0, lat;
      wait_idle(0);
      @(negedge proc_clk[0]);
      c0 = pcycles[0];
      pw(0, 5'd28, 16'd5);
      get(0, d);
      lat = pcycles[0] - c0;
      $display("read latency: %0d processor cycles at equal clocks", lat);
      chk(d === shadow[5], "latency read data");
      chk(lat <= 23, $sformatf("read latency %0d cycles within 10 + 13", lat));
    end
    cfg_write(8'h01, 16'h007F);
    #50ns;
    begin
      realtime ta, tb;
      @(posedge mem_clk); ta = $realtime;
      repeat (10) @(posedge mem_clk);
      tb = $realtime;
      $display("memory clock period at freq 0x7F: %0.3f ns", (tb - ta) / 10.0);
      chk((tb - ta) / 10.0 > 3.5ns && (tb - ta) / 10.0 < 3.7ns, "memory clock period doubles");
    end
    cfg_write(8'h01, 16'h00FF);
    cfg_write(8'h00, 16'h0002);
    #100ns;

    // ------------------------------------------------------------ summary
    $display("mechanisms: wr_stall=%0d rd_stall=%0d full_block=%0d burst_step=%0d partner=%0d ext_pop=%0d",
             wr_stalls, rd_stalls, n_full_block, n_burst_step, n_partner, n_ext_pop);
    $display("            mutex_contend=%0d mutex_grant=%0d prio_win=%0d conflict=%0d wrap=%0d pause=%0d wake=%0d pcfg=%0d agcfg=%0d",
             n_mx_contend, n_mx_grant, n_prio_win, n_conflict, n_wrap, n_pause, n_wake, n_pcfg, n_agcfg);
    $display("            memory cycles with a request=%0d, with a grant=%0d", n_req_cycles, n_grant);
    chk(wr_stalls > 0,      "processor write stall happened");
    chk(rd_stalls > 0,      "processor read stall happened");
    chk(n_full_block > 0,   "read held by output FIFO reserve happened");
    chk(n_burst_step > 0,   "burst access happened");
    chk(n_partner > 0,      "address-only write with partner data happened");
    chk(n_ext_pop > 0,      "data-only token taken happened");
    chk(n_mx_contend > 0,   "mutex contention happened");
    chk(n_mx_grant >= 20,   "mutex granted 20 times");
    chk(n_prio_win > 0,     "priority override happened");
    chk(n_conflict > 0,     "memory arbitration conflict happened");
    chk(n_wrap > 0,         "address generator wrap happened");
    chk(n_pause > 0,        "memory clock pause happened");
    chk(n_wake > 0,         "memory clock wake happened");
    chk(n_pcfg > 0,         "port configuration happened");
    chk(n_agcfg > 0,        "address generator configuration happened");
    chk(n_no_grant == 0,    "one access every memory cycle while any port requests");
    chk(n_grant == n_req_cycles, "grants equal requesting cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
