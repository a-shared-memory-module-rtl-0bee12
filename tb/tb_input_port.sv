// tb_input_port: one input port, fed through a real dual-clock FIFO, with an
// address generator, a randomly granting memory arbiter model, a mutex model
// and a data-only partner model. Every memory request the port issues is
// compared, in order, with the expected list. Covered: memory read and
// write (address-data), port configuration, address generator configuration,
// burst read and burst write, a read blocked by a full output FIFO, a mutex
// request that holds back the following read until granted, mutex release,
// address-only mode with data from a partner port, data-only mode, the
// disabled mode, and one read per cycle when the arbiter always grants.
//
// Command encodings and issue rules follow the described port; the stimulus
// and the simple mutex and partner models are the testbench's own.
module tb_input_port;
  import smm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // FIFO
  logic   f_wr_en = 0, f_full, f_rd_en, f_rd_valid, f_empty;
  token_t f_wr_data = '0, f_rd_data;
  dc_fifo #(.W(18)) u_fifo (.rst_n(rst_n), .wr_clk(clk), .wr_en(f_wr_en), .wr_data(f_wr_data),
    .rsrv(6'd0), .full(f_full), .rd_clk(clk), .rd_en(f_rd_en), .rd_data(f_rd_data),
    .rd_valid(f_rd_valid), .empty(f_empty), .rd_inflight(), .nonempty_async());

  // environment signals
  logic [15:0] head_data;
  logic head_is_data, ext_pop = 0;
  logic [3:0][15:0] partner_data = '0;
  logic [3:0] partner_valid = '0, partner_pop, out_full = '0;
  logic [3:0][15:0] agen_addr;
  logic [3:0] agen_last, agen_sel;
  logic agen_step, agen_load, agen_cfg_we, mem_req, mem_grant, prio, idle;
  logic [7:0] agen_len, agen_cfg_addr;
  logic [15:0] agen_cfg_data;
  request_t s2;
  logic [3:0] mutex_req, mutex_rel, mutex_grant = '0;
  port_state_e state;
  logic grant_en = 1;

  input_port #(.PORT_ID(0)) dut (.clk(clk), .rst_n(rst_n), .srst(1'b0),
    .fifo_rd_en(f_rd_en), .fifo_rd_data(f_rd_data), .fifo_rd_valid(f_rd_valid),
    .head_data(head_data), .head_is_data(head_is_data), .ext_pop(ext_pop),
    .partner_data(partner_data), .partner_valid(partner_valid), .partner_pop(partner_pop),
    .out_full(out_full), .agen_addr(agen_addr), .agen_last(agen_last), .agen_sel(agen_sel),
    .agen_step(agen_step), .agen_load(agen_load), .agen_len(agen_len),
    .agen_cfg_we(agen_cfg_we), .agen_cfg_addr(agen_cfg_addr), .agen_cfg_data(agen_cfg_data),
    .mem_req(mem_req), .mem_grant(mem_grant), .s2(s2), .mutex_req(mutex_req),
    .mutex_rel(mutex_rel), .mutex_grant(mutex_grant), .prio(prio), .idle(idle), .state(state));

  // address generator 0 is real; 1..3 are not used
  addr_gen u_ag0 (.clk(clk), .rst_n(rst_n), .srst(1'b0),
    .cfg_we(agen_cfg_we && agen_sel[0]), .cfg_addr(agen_cfg_addr), .cfg_data(agen_cfg_data),
    .step(agen_step && agen_sel[0]), .burst_load(agen_load && agen_sel[0]), .burst_len(agen_len),
    .addr(agen_addr[0]), .burst_cnt(), .burst_last(agen_last[0]));
  assign agen_addr[3:1] = '0;
  assign agen_last[3:1] = '0;

  assign mem_grant = mem_req && grant_en;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  typedef struct { req_kind_e kind; logic [15:0] addr; logic [15:0] wdata; logic [1:0] dest; } exp_t;
  exp_t exp_q [$];
  int   n_granted = 0, mutex_wait_cycles = 0, rel_pulses = 0, full_block_cycles = 0;
  logic mutex_held = 0;

  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_grant) begin
      checks++;
      n_granted++;
      if (s2.kind == RQ_MEM_RD && s2.addr == 16'h0101 && !mutex_held) begin
        failures++; $display("FAIL memory request issued before mutex grant");
      end
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected request %p", s2); end
      else begin
        exp_t e;
        e = exp_q.pop_front();
        if (s2.kind != e.kind || s2.addr != e.addr ||
            (e.kind == RQ_MEM_WR && s2.wdata != e.wdata) ||
            (e.kind == RQ_MEM_RD && s2.dest != e.dest)) begin
          failures++;
          $display("FAIL got kind %0d addr %h wdata %h dest %0d; expected kind %0d addr %h wdata %h dest %0d",
                   s2.kind, s2.addr, s2.wdata, s2.dest, e.kind, e.addr, e.wdata, e.dest);
        end
      end
    end
    if (mem_req && out_full != 0) full_block_cycles++;
  end

  int n_ppop = 0;
  always @(posedge clk) if (rst_n && partner_pop[1] && partner_valid[1]) n_ppop++;

  // mutex model: grant a request after it has been held for 3 cycles
  int mreq_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    mutex_grant <= '0;
    if (mutex_req != 0 && mutex_grant == 0) begin
      mreq_cycles <= mreq_cycles + 1;
      mutex_wait_cycles <= mutex_wait_cycles + 1;
      if (mreq_cycles == 3) begin mutex_grant <= mutex_req; mutex_held <= 1; mreq_cycles <= 0; end
    end
    if (mutex_rel != 0) begin rel_pulses <= rel_pulses + 1; mutex_held <= 0; end
  end

  // ---------------------------------------------------------------- stimulus
  task automatic push(input logic cfgen, input logic wren, input logic [15:0] d);
    @(negedge clk);
    while (f_full) @(negedge clk);
    f_wr_en = 1; f_wr_data = '{cfgen: cfgen, wren: wren, data: d};
    @(negedge clk);
    f_wr_en = 0;
  endtask

  task automatic expect_rd(input logic [15:0] a, input logic [1:0] dest);
    exp_q.push_back('{kind: RQ_MEM_RD, addr: a, wdata: '0, dest: dest});
  endtask
  task automatic expect_wr(input logic [15:0] a, input logic [15:0] d);
    exp_q.push_back('{kind: RQ_MEM_WR, addr: a, wdata: d, dest: '0});
  endtask

  task automatic drain(input int max_cycles);
    int n;
    n = 0;
    while ((exp_q.size() != 0 || !idle) && n < max_cycles) begin @(negedge clk); n++; end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d requests never issued", exp_q.size()); end
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #12 rst_n = 1;
    // random grants for the first part
    fork
      forever begin @(negedge clk); grant_en = ($urandom_range(0, 2) != 0); end
    join_none
    // 1. memory read and write in address-data mode
    expect_rd(16'h1234, 2'd0);
    push(0, 0, 16'h1234);
    expect_wr(16'h0042, 16'hBEEF);
    push(0, 1, 16'h0042); push(0, 0, 16'hBEEF);
    // 2. port configuration: out_port = 2
    push(1, 0, 16'h000B);
    expect_rd(16'h0010, 2'd2);
    push(0, 0, 16'h0010);
    // 3. address generator 0: block size 10, stride 3, offset 100
    push(1, 1, 16'h8101); push(0, 0, 16'd10);
    push(1, 1, 16'h8102); push(0, 0, 16'd3);
    push(1, 1, 16'h8100); push(0, 0, 16'd100);
    // 4. burst read of 5: 100 103 106 109 102
    expect_rd(16'd100, 2); expect_rd(16'd103, 2); expect_rd(16'd106, 2);
    expect_rd(16'd109, 2); expect_rd(16'd102, 2);
    push(1, 0, 16'hC105);
    // 5. burst write of 3: 105 108 101
    expect_wr(16'd105, 16'hA000); expect_wr(16'd108, 16'hA001); expect_wr(16'd101, 16'hA002);
    push(1, 1, 16'hC103); push(0, 0, 16'hA000); push(0, 0, 16'hA001); push(0, 0, 16'hA002);
    drain(200);
    chk(dut.ps == PS_INIT, "FSM back in init after bursts");
    // 6. read blocked by a full destination FIFO
    out_full[2] = 1;
    push(0, 0, 16'h0777);
    repeat (10) @(negedge clk);
    chk(n_granted == 11, "read held while destination full");
    expect_rd(16'h0777, 2);
    out_full[2] = 0;
    drain(50);
    // 7. mutex request holds back the following read
    push(1, 0, 16'hF012);
    expect_rd(16'h0101, 2);
    push(0, 0, 16'h0101);
    drain(50);
    chk(mutex_wait_cycles >= 3, "mutex request waited for its grant");
    push(1, 0, 16'hF022);
    repeat (10) @(negedge clk);
    chk(rel_pulses == 1, "one mutex release pulse");
    // 8. address-only mode: data_out = 3, data_in = 1; mode 10
    push(1, 0, 16'h0119);
    push(1, 0, 16'h000A);
    push(0, 1, 16'h0077);
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0 && dut.s2.valid == 0, "address-only write waits for partner data");
    expect_wr(16'h0077, 16'hCAFE);
    @(negedge clk); partner_valid[1] = 1; partner_data[1] = 16'hCAFE;
    while (exp_q.size() != 0) @(negedge clk);
    partner_valid[1] = 0;
    chk(n_ppop == 1, "exactly one partner data token taken");
    expect_rd(16'h0055, 3);
    push(0, 0, 16'h0055);
    drain(50);
    // 9. data-only mode: tokens are offered as data, taken by ext_pop
    push(1, 0, 16'h0001);
    push(0, 0, 16'h1111);
    push(1, 1, 16'h2222);
    repeat (8) @(negedge clk);
    chk(head_is_data && head_data == 16'h1111, "data-only head offered");
    ext_pop = 1; @(negedge clk); ext_pop = 0;
    repeat (2) @(negedge clk);
    chk(head_is_data && head_data == 16'h2222, "data-only next token");
    ext_pop = 1; @(negedge clk); ext_pop = 0;
    // 10. disabled mode drops requests, then address-data again
    push(1, 0, 16'h0000);
    push(0, 0, 16'h0999);
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0 && !mem_req, "disabled port drops requests");
    push(1, 0, 16'h000F);          // mode 11, out_port 3
    // 11. throughput: 8 reads, arbiter always grants
    disable fork;
    grant_en = 1;
    for (int i = 0; i < 8; i++) expect_rd(16'(16'h0200 + i), 3);
    for (int i = 0; i < 8; i++) push(0, 0, 16'(16'h0200 + i));
    drain(50);
    // back-to-back: fill the FIFO first, then let the port run
    begin
      int g0, cyc;
      out_full[3] = 1;
      for (int i = 0; i < 10; i++) expect_rd(16'(16'h0300 + i), 3);
      for (int i = 0; i < 10; i++) push(0, 0, 16'(16'h0300 + i));
      repeat (5) @(negedge clk);
      g0 = n_granted;
      out_full[3] = 0;
      cyc = 0;
      while (n_granted - g0 < 10 && cyc < 40) begin @(negedge clk); cyc++; end
      chk(cyc <= 12, $sformatf("10 reads issued in %0d cycles", cyc));
    end
    drain(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
