// tb_mem_port: a processor model drives the memory port (one pipe stage each
// way) against real dual-clock FIFOs whose far sides run on a second clock.
//  - writes to DCmem 28..31 arrive as tokens whose cfgen/wren are the two low
//    address bits; writes elsewhere are ignored
//  - with the far side not reading, the port stalls instead of losing words
//  - reads return the output FIFO's words in order, stall while nothing is
//    buffered, and once the five-word buffer is primed the processor reads one
//    word per cycle without a stall
//  - a second port with no pipe stage (three-word buffer) reads a filled
//    output FIFO one word per cycle without a stall, in order, and stalls
//    once the FIFO is empty; its write side is left idle
//
// The buffer depth of 2L+1 follows the described processor port; the far-side
// model and traffic are the testbench's own.
module tb_mem_port;
  import smm_pkg::*;
  int checks = 0, failures = 0;
  logic pclk = 0, mclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, stall;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic fifo_wr_en, fifo_full, fifo_rd_en, fifo_rd_valid;
  token_t fifo_wr_data;
  logic [15:0] fifo_rd_data;
  // far sides
  logic in_rd_en = 0, in_rd_valid, in_empty;
  token_t in_rd_data;
  logic out_wr_en = 0, out_full;
  logic [15:0] out_wr_data = 0;

  mem_port #(.STAGES(1)) dut (.clk(pclk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_data(wr_data), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data), .stall(stall),
    .fifo_wr_en(fifo_wr_en), .fifo_wr_data(fifo_wr_data), .fifo_full(fifo_full),
    .fifo_rd_en(fifo_rd_en), .fifo_rd_data(fifo_rd_data), .fifo_rd_valid(fifo_rd_valid));

  dc_fifo #(.W(18)) u_in (.rst_n(rst_n), .wr_clk(pclk), .wr_en(fifo_wr_en), .wr_data(fifo_wr_data),
    .rsrv(6'd2), .full(fifo_full), .rd_clk(mclk), .rd_en(in_rd_en), .rd_data(in_rd_data),
    .rd_valid(in_rd_valid), .empty(in_empty), .rd_inflight(), .nonempty_async());

  dc_fifo #(.W(16)) u_out (.rst_n(rst_n), .wr_clk(mclk), .wr_en(out_wr_en), .wr_data(out_wr_data),
    .rsrv(6'd0), .full(out_full), .rd_clk(pclk), .rd_en(fifo_rd_en), .rd_data(fifo_rd_data),
    .rd_valid(fifo_rd_valid), .empty(), .rd_inflight(), .nonempty_async());

  // port with no pipe stage, read side only
  logic rd_en0 = 0, stall0, f0_rd_en, f0_rd_valid, out0_wr_en = 0;
  logic [15:0] rd_data0, f0_rd_data, out0_wr_data = 0;

  mem_port #(.STAGES(0)) dut0 (.clk(pclk), .rst_n(rst_n), .wr_en(1'b0), .wr_addr(5'd0),
    .wr_data(16'd0), .rd_en(rd_en0), .rd_addr(5'd28), .rd_data(rd_data0), .stall(stall0),
    .fifo_wr_en(), .fifo_wr_data(), .fifo_full(1'b0),
    .fifo_rd_en(f0_rd_en), .fifo_rd_data(f0_rd_data), .fifo_rd_valid(f0_rd_valid));

  dc_fifo #(.W(16)) u_out0 (.rst_n(rst_n), .wr_clk(mclk), .wr_en(out0_wr_en), .wr_data(out0_wr_data),
    .rsrv(6'd0), .full(), .rd_clk(pclk), .rd_en(f0_rd_en), .rd_data(f0_rd_data),
    .rd_valid(f0_rd_valid), .empty(), .rd_inflight(), .nonempty_async());

  always #5 pclk = ~pclk;
  always #4 mclk = ~mclk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  token_t exp_q [$];
  int     got = 0, stalls = 0;
  always @(posedge mclk) if (rst_n && in_rd_valid) begin
    token_t e;
    checks++;
    got++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected token %h at %t", in_rd_data, $time); end
    else begin
      e = exp_q.pop_front();
      if (in_rd_data !== e) begin failures++; $display("FAIL token %h expected %h", in_rd_data, e); end
    end
  end

  // processor write: hold until not stalled
  task automatic pwrite(input logic [4:0] a, input logic [15:0] d);
    @(negedge pclk);
    wr_en = 1; wr_addr = a; wr_data = d;
    if (a[4:2] == 3'b111) exp_q.push_back('{cfgen: a[1], wren: a[0], data: d});
    #1;
    while (stall) begin stalls++; @(negedge pclk); #1; end
    @(negedge pclk);
    wr_en = 0;
  endtask

  initial begin
    int n;
    #22 rst_n = 1;
    in_rd_en = 1;
    for (int i = 0; i < 40; i++) pwrite(5'(27 + (i % 5)), 16'($urandom));   // 27 is not the port
    repeat (30) @(negedge mclk);
    checks++;
    if (got != 32) begin failures++; $display("FAIL %0d tokens arrived, expected 32", got); end
    // far side stops reading: port must stall, no token lost
    in_rd_en = 0;
    stalls = 0;
    fork
      for (int i = 0; i < 45; i++) pwrite(5'(28 + (i % 4)), 16'(i));
      begin repeat (200) @(negedge mclk); in_rd_en = 1; end
    join
    repeat (40) @(negedge mclk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no write stall seen"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d tokens missing", exp_q.size()); end
    // reads: nothing available -> stall
    @(negedge pclk);
    rd_en = 1; rd_addr = 5'd30;
    repeat (3) begin @(negedge pclk); #1; checks++; if (!stall) begin failures++; $display("FAIL no read stall"); end end
    @(negedge pclk); rd_en = 0;
    // fill output FIFO with a counter sequence
    for (int i = 0; i < 30; i++) begin
      @(negedge mclk); out_wr_en = 1; out_wr_data = 16'(100 + i);
    end
    @(negedge mclk); out_wr_en = 0;
    @(negedge pclk); rd_en = 1;
    n = 0;
    while (n < 30) begin
      #1;
      if (!stall) begin
        checks++;
        if (rd_data !== 16'(100 + n)) begin failures++; $display("FAIL read %0d expected %0d", rd_data, 100 + n); end
        n++;
      end
      @(negedge pclk);
    end
    @(negedge pclk); rd_en = 0;
    // throughput: fill, let the buffer prime, then 25 back-to-back reads
    for (int i = 0; i < 30; i++) begin
      @(negedge mclk); out_wr_en = 1; out_wr_data = 16'(500 + i);
    end
    @(negedge mclk); out_wr_en = 0;
    repeat (20) @(negedge pclk);
    rd_en = 1; rd_addr = 5'd28;
    begin
      int st;
      st = 0;
      for (int i = 0; i < 25; i++) begin
        #1;
        if (stall) st++;
        else begin
          checks++;
          if (rd_data !== 16'(500 + i - st)) begin failures++; $display("FAIL burst read %0d", rd_data); end
        end
        @(negedge pclk);
      end
      checks++;
      if (st != 0) begin failures++; $display("FAIL %0d stalls during back-to-back reads", st); end
    end
    @(negedge pclk); rd_en = 0;
    // no pipe stage: 30 words, prime, 25 back-to-back reads, 5 more, then empty
    for (int i = 0; i < 30; i++) begin
      @(negedge mclk); out0_wr_en = 1; out0_wr_data = 16'(700 + i);
    end
    @(negedge mclk); out0_wr_en = 0;
    repeat (20) @(negedge pclk);
    rd_en0 = 1;
    begin
      int st;
      st = 0;
      n = 0;
      for (int i = 0; i < 25; i++) begin
        #1;
        if (stall0) st++;
        else begin
          checks++;
          if (rd_data0 !== 16'(700 + n)) begin failures++; $display("FAIL no-stage read %0d expected %0d", rd_data0, 700 + n); end
          n++;
        end
        @(negedge pclk);
      end
      checks++;
      if (st != 0) begin failures++; $display("FAIL %0d stalls during back-to-back no-stage reads", st); end
      while (n < 30) begin
        #1;
        if (!stall0) begin
          checks++;
          if (rd_data0 !== 16'(700 + n)) begin failures++; $display("FAIL no-stage read %0d expected %0d", rd_data0, 700 + n); end
          n++;
        end
        @(negedge pclk);
      end
      repeat (3) begin #1; checks++; if (!stall0) begin failures++; $display("FAIL no stall on empty no-stage port"); end @(negedge pclk); end
    end
    rd_en0 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
