// tb_workloads: the two performance workloads, run on the full-size system
// (default parameters) through the processors' memory ports.
//
// Single-element workload: a 1024-element source array is written with
// address generator bursts (4 x 255 + 4), copied one element per iteration
// (read request, a number of idle cycles standing for computation, take the
// word, write it to the destination array), and the destination is read back
// with bursts and checked. It runs
//   - on one processor clocked at 1, 1.33, 2 and 4 times the memory period,
//   - on 1, 2 and 4 processors clocked like the memory, the copies split
//     evenly; processor 0 writes the source and the last one reads back,
//   - on one processor clocked like the memory with 0, 8, 16, 32 and 64 idle
//     cycles per iteration.
// Checked: data; a slower processor takes longer; more processors take less
// time; 4 processors at least 2.5 times faster than 1 with no computation;
// computation shorter than the read latency is hidden behind it (under 0.25
// cycles per element per idle cycle from 0 to 8), computation longer than
// the latency adds one cycle per element per idle cycle (0.9 to 1.1 from 32
// to 64).
//
// Block workload: 1024 words written, then read back, in three codings at
// equal clocks with no computation: one processor in address-data mode
// (one read or write per iteration, each read waiting for its word), one
// processor using address generator bursts, and an address-only processor
// paired with a data-only processor. Checked: data; both decoupled codings
// beat address-data, and are within 25 % of each other. Then, with 0 or 16
// idle cycles per iteration for address and for data computation, the
// address-only/data-only pair is compared with the work split between two
// address-data processors. Checked: data; with no computation the pair wins;
// either load slows the pair, and its time is set by the larger load (adding
// the smaller one costs under 15 %); with unequal loads the two address-data
// processors win.
//
// Phase sequencing between processors is done by the testbench.
//
// The workloads and the comparisons made follow the described evaluation;
// the sizes, clock ratios and measured cycle counts are this design's own.
module tb_workloads;
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
  realtime half [4] = '{0.9ns, 0.9ns, 0.9ns, 0.9ns};
  always #5ns cfg_clk = ~cfg_clk;
  always #10ns ext_clk = ~ext_clk;

  initial begin
    #3ms;
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
  // op kinds: 0 write DCmem, 1 read DCmem 28, 2 idle cycle
  typedef struct { int kind; logic [4:0] a; logic [15:0] d; } op_t;
  op_t          ops [4][$];
  logic [15:0]  res [4][$];
  bit           busy [4];
  logic         wr_en_u [4], rd_en_u [4];
  logic [4:0]   wr_a_u [4];
  logic [15:0]  wr_d_u [4];

  for (genvar p = 0; p < 4; p++) begin : g_cpu
    assign proc_wr_en[p]   = wr_en_u[p];
    assign proc_rd_en[p]   = rd_en_u[p];
    assign proc_wr_addr[p] = wr_a_u[p];
    assign proc_wr_data[p] = wr_d_u[p];
    assign proc_rd_addr[p] = 5'd28;
    always #(half[p]) proc_clk[p] = ~proc_clk[p];
    initial begin
      wr_en_u[p] = 0; rd_en_u[p] = 0; wr_a_u[p] = '0; wr_d_u[p] = '0; busy[p] = 0;
      forever begin
        @(negedge proc_clk[p]);
        wr_en_u[p] = 0; rd_en_u[p] = 0;
        if (ops[p].size() != 0) begin
          op_t o;
          busy[p] = 1;
          o = ops[p].pop_front();
          if (o.kind == 1) rd_en_u[p] = 1;
          else if (o.kind == 0) begin wr_en_u[p] = 1; wr_a_u[p] = o.a; wr_d_u[p] = o.d; end
          #0.1ns;
          while (o.kind != 2 && proc_stall[p]) begin @(negedge proc_clk[p]); #0.1ns; end
          if (o.kind == 1) res[p].push_back(proc_rd_data[p]);
          @(posedge proc_clk[p]);
          busy[p] = 0;
        end
      end
    end
  end

  function automatic void pw(int p, logic [4:0] a, logic [15:0] d);
    ops[p].push_back('{kind: 0, a: a, d: d});
  endfunction
  function automatic void nop(int p, int n);
    for (int i = 0; i < n; i++) ops[p].push_back('{kind: 2, a: '0, d: '0});
  endfunction
  task automatic wait_idle(int p);
    while (ops[p].size() != 0 || busy[p]) @(negedge proc_clk[p]);
  endtask
  task automatic get(int p, output logic [15:0] d);
    ops[p].push_back('{kind: 1, a: 5'd28, d: '0});
    while (res[p].size() == 0) @(negedge proc_clk[p]);
    d = res[p].pop_front();
  endtask

  // address generator g (0..3): block at 'base', block size 1024, stride 1
  function automatic void agen_setup(int p, int g, logic [15:0] base);
    logic [15:0] sel = 16'(1) << (8 + g);
    pw(p, 5'd31, 16'h8001 | sel); pw(p, 5'd28, 16'd1024);
    pw(p, 5'd31, 16'h8002 | sel); pw(p, 5'd28, 16'd1);
    pw(p, 5'd31, 16'h8000 | sel); pw(p, 5'd28, base);
  endfunction
  // 1024 accesses as bursts of 255, 255, 255, 255, 4
  function automatic void bursts(int p, int g, bit write, ref logic [15:0] data [1024]);
    int done = 0;
    while (done < 1024) begin
      int n = (1024 - done > 255) ? 255 : 1024 - done;
      pw(p, write ? 5'd31 : 5'd30, 16'hC000 | (16'(1) << (8 + g)) | 16'(n));
      if (write) for (int i = 0; i < n; i++) pw(p, 5'd28, data[done + i]);
      done += n;
    end
  endfunction

  logic [15:0] src [1024];
  localparam logic [15:0] SRC = 16'h0000, DST = 16'h0800, BLK = 16'h1000;

  // ------------------------------------------------------------ single element
  int copy_p [4];          // processors taking part
  int n_copy_p = 1, load = 0;
  int phase = 0;
  int done [4] = '{0, 0, 0, 0};

  task automatic copy_part(int p, int idx);
    int per = 1024 / n_copy_p;
    logic [15:0] v;
    for (int i = idx * per; i < (idx + 1) * per; i++) begin
      pw(p, 5'd28, SRC + 16'(i));
      nop(p, load);
      get(p, v);
      pw(p, 5'd29, DST + 16'(i)); pw(p, 5'd28, v);
    end
    wait_idle(p);
  endtask

  for (genvar p = 0; p < 4; p++) begin : g_prog
    initial forever begin
      int k;
      wait (phase != 0 && done[p] != phase);
      k = -1;
      for (int i = 0; i < n_copy_p; i++) if (copy_p[i] == p) k = i;
      if (k >= 0) copy_part(p, k);
      done[p] = phase;
    end
  end

  task automatic single_element(int first, int nproc, output realtime t);
    realtime t0;
    logic [15:0] d;
    int last, bad;
    n_copy_p = nproc;
    for (int i = 0; i < nproc; i++) copy_p[i] = first + i;
    last = first + nproc - 1;
    for (int i = 0; i < 1024; i++) src[i] = 16'($urandom);
    t0 = $realtime;
    agen_setup(first, 0, SRC);
    bursts(first, 0, 1, src);
    wait_idle(first);
    phase++;
    for (int i = 0; i < 4; i++) wait (done[i] == phase);
    agen_setup(last, 1, DST);
    bursts(last, 1, 0, src);
    bad = 0;
    for (int i = 0; i < 1024; i++) begin
      get(last, d);
      if (d !== src[i]) bad++;
    end
    t = $realtime - t0;
    chk(bad == 0, $sformatf("single-element copy data (%0d wrong)", bad));
  endtask

  // ------------------------------------------------------------ block workload
  task automatic block_addr_data(output realtime t);
    realtime t0;
    logic [15:0] d;
    int bad = 0;
    for (int i = 0; i < 1024; i++) src[i] = 16'($urandom);
    t0 = $realtime;
    for (int i = 0; i < 1024; i++) begin pw(0, 5'd29, BLK + 16'(i)); pw(0, 5'd28, src[i]); end
    for (int i = 0; i < 1024; i++) begin
      pw(0, 5'd28, BLK + 16'(i));
      get(0, d);
      if (d !== src[i]) bad++;
    end
    t = $realtime - t0;
    chk(bad == 0, $sformatf("block address-data data (%0d wrong)", bad));
  endtask

  task automatic block_agen(output realtime t);
    realtime t0;
    logic [15:0] d;
    int bad = 0;
    for (int i = 0; i < 1024; i++) src[i] = 16'($urandom);
    t0 = $realtime;
    agen_setup(0, 2, BLK);
    bursts(0, 2, 1, src);
    agen_setup(0, 2, BLK);
    bursts(0, 2, 0, src);
    for (int i = 0; i < 1024; i++) begin
      get(0, d);
      if (d !== src[i]) bad++;
    end
    t = $realtime - t0;
    chk(bad == 0, $sformatf("block address-generator data (%0d wrong)", bad));
  endtask

  // la / ld: idle cycles per iteration for address and for data computation
  task automatic block_addr_only(int la, int ld, output realtime t);
    realtime t0;
    logic [15:0] d;
    int bad = 0;
    // port 0 address-only, data from port 1, reads to port 1; port 1 data-only
    pw(0, 5'd30, 16'h0109); pw(0, 5'd30, 16'h0002);
    pw(1, 5'd30, 16'h0005);
    wait_idle(0); wait_idle(1);
    for (int i = 0; i < 1024; i++) src[i] = 16'($urandom);
    t0 = $realtime;
    for (int i = 0; i < 1024; i++) begin nop(0, la); pw(0, 5'd29, BLK + 16'(i)); end
    for (int i = 0; i < 1024; i++) begin nop(0, la); pw(0, 5'd28, BLK + 16'(i)); end
    for (int i = 0; i < 1024; i++) begin nop(1, ld); pw(1, 5'd28, src[i]); end
    for (int i = 0; i < 1024; i++) begin
      nop(1, ld);
      get(1, d);
      if (d !== src[i]) bad++;
    end
    t = $realtime - t0;
    chk(bad == 0, $sformatf("block address-only/data-only data (%0d wrong)", bad));
    pw(0, 5'd30, 16'h0003); pw(1, 5'd30, 16'h0007);
    wait_idle(0); wait_idle(1);
  endtask

  // the same work split between two address-data processors, 512 words each
  task automatic ad_half(int p, int la, int ld, ref int bad);
    logic [15:0] d;
    for (int i = p * 512; i < p * 512 + 512; i++) begin
      nop(p, la); pw(p, 5'd29, BLK + 16'(i)); nop(p, ld); pw(p, 5'd28, src[i]);
    end
    for (int i = p * 512; i < p * 512 + 512; i++) begin
      nop(p, la); pw(p, 5'd28, BLK + 16'(i)); nop(p, ld);
      get(p, d);
      if (d !== src[i]) bad++;
    end
    wait_idle(p);
  endtask

  task automatic block_addr_data2(int la, int ld, output realtime t);
    realtime t0;
    int bad0 = 0, bad1 = 0;
    for (int i = 0; i < 1024; i++) src[i] = 16'($urandom);
    t0 = $realtime;
    fork
      ad_half(0, la, ld, bad0);
      ad_half(1, la, ld, bad1);
    join
    t = $realtime - t0;
    chk(bad0 + bad1 == 0, $sformatf("block on two address-data processors data (%0d wrong)", bad0 + bad1));
  endtask

  initial begin
    realtime t_ratio [4], t_np [3], t_ad, t_ag, t_ao;
    const realtime halves [4] = '{0.9ns, 1.2ns, 1.8ns, 3.6ns};
    #0.1ns rst_n = 0;
    #30ns rst_n = 1;
    #100ns;

    // single processor at four clock ratios; processor p runs at ratio p
    for (int p = 0; p < 4; p++) half[p] = halves[p];
    #20ns;
    for (int p = 0; p < 4; p++) begin
      single_element(p, 1, t_ratio[p]);
      $display("single-element, 1 processor at %0.2f x memory period: %0.0f memory cycles",
               halves[p] / 0.9ns, t_ratio[p] / TMEM);
    end
    for (int p = 1; p < 4; p++)
      chk(t_ratio[p] > t_ratio[p - 1], $sformatf("slower processor %0d takes longer", p));

    // 1, 2 and 4 processors at the memory's clock
    for (int p = 0; p < 4; p++) half[p] = 0.9ns;
    #20ns;
    single_element(0, 1, t_np[0]);
    single_element(0, 2, t_np[1]);
    single_element(0, 4, t_np[2]);
    $display("single-element, 1/2/4 processors: %0.0f / %0.0f / %0.0f memory cycles",
             t_np[0] / TMEM, t_np[1] / TMEM, t_np[2] / TMEM);
    chk(t_np[1] < t_np[0] && t_np[2] < t_np[1], "more processors take less time");
    chk(t_np[0] / t_np[2] > 2.5, "four processors at least 2.5 times faster");

    // computation load on one processor at the memory's clock
    begin
      const int loads [5] = '{0, 8, 16, 32, 64};
      realtime t_ld [5];
      real slope_lo, slope_hi;
      for (int i = 0; i < 5; i++) begin
        load = loads[i];
        single_element(0, 1, t_ld[i]);
        $display("single-element, 1 processor, %0d idle cycles per element: %0.0f memory cycles",
                 loads[i], t_ld[i] / TMEM);
      end
      load = 0;
      slope_lo = (t_ld[1] - t_ld[0]) / TMEM / 1024.0 / 8.0;
      slope_hi = (t_ld[4] - t_ld[3]) / TMEM / 1024.0 / 32.0;
      $display("cycles per element per idle cycle: %0.2f below the latency, %0.2f above", slope_lo, slope_hi);
      chk(slope_lo < 0.25, "computation shorter than the read latency is hidden");
      chk(slope_hi > 0.9 && slope_hi < 1.1, "computation longer than the read latency adds one cycle each");
    end

    // block workload, three codings, equal clocks
    block_addr_data(t_ad);
    block_agen(t_ag);
    block_addr_only(0, 0, t_ao);
    $display("block workload: address-data %0.0f, address generator %0.0f, address-only/data-only %0.0f memory cycles",
             t_ad / TMEM, t_ag / TMEM, t_ao / TMEM);
    chk(t_ag < t_ad, "address generator coding beats address-data");
    chk(t_ao < t_ad, "address-only/data-only coding beats address-data");
    chk(t_ag < 1.25 * t_ao && t_ao < 1.25 * t_ag, "address generator and address-only within 25 %");

    // address and data computation loads: address-only/data-only against two
    // address-data processors (equal processor count)
    begin
      const int la [4] = '{0, 16, 0, 16};
      const int ld [4] = '{0, 0, 16, 16};
      realtime t_ao_l [4], t_ad2 [4];
      for (int i = 0; i < 4; i++) begin
        block_addr_only(la[i], ld[i], t_ao_l[i]);
        block_addr_data2(la[i], ld[i], t_ad2[i]);
        $display("block, address load %0d, data load %0d: address-only/data-only %0.0f, two address-data %0.0f memory cycles",
                 la[i], ld[i], t_ao_l[i] / TMEM, t_ad2[i] / TMEM);
      end
      chk(t_ao_l[0] < t_ad2[0], "with no computation address-only/data-only beats two address-data processors");
      chk(t_ao_l[1] > 3 * t_ao_l[0] && t_ao_l[2] > 3 * t_ao_l[0], "either load slows address-only/data-only");
      chk(t_ao_l[3] < 1.15 * t_ao_l[1] && t_ao_l[3] < 1.15 * t_ao_l[2],
          "address-only/data-only time is set by the larger of the two loads");
      chk(t_ad2[1] < t_ao_l[1] && t_ad2[2] < t_ao_l[2],
          "with unequal loads two address-data processors beat address-only/data-only");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
