// tb_dc_fifo: streams random words between two unrelated clocks with random
// write and read enables, checking order, that nothing is lost or duplicated,
// that every read returns two read-clock cycles after it was accepted, and that
// the full flag honours the reserve space. A second phase fills the FIFO with
// a stopped reader to check the depth and the reserve.
//
// The reserve-space full flag and the two-cycle read latency come from the
// described FIFO; the clock ratios and traffic are the testbench's own.
module tb_dc_fifo;
  int checks = 0, failures = 0;
  logic rst_n = 0, wclk = 0, rclk = 0;
  logic wr_en = 0, rd_en = 0, full, empty, rd_valid, nonempty_async, rd_inflight;
  logic [17:0] wr_data = 0, rd_data;
  logic [5:0]  rsrv = 0;
  logic [17:0] q [$];
  int sent = 0, got = 0;

  dc_fifo #(.W(18), .DEPTH(32)) dut (.rst_n(rst_n), .wr_clk(wclk), .wr_en(wr_en),
    .wr_data(wr_data), .rsrv(rsrv), .full(full), .rd_clk(rclk), .rd_en(rd_en),
    .rd_data(rd_data), .rd_valid(rd_valid), .empty(empty), .rd_inflight(rd_inflight),
    .nonempty_async(nonempty_async));

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side: push when not full
  bit phase2 = 0;
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) begin q.push_back(wr_data); sent++; end
  end

  // read side: a read accepted (rd_en && !empty) must return 2 cycles later
  logic [1:0] acc_pipe = 0;
  always @(posedge rclk) if (rst_n) begin
    acc_pipe <= {acc_pipe[0], rd_en && !empty};
    if (rd_valid) begin
      checks++;
      if (!acc_pipe[1]) begin failures++; $display("FAIL rd_valid without a read 2 cycles before"); end
      if (q.size() == 0) begin failures++; $display("FAIL read from empty model"); end
      else begin
        logic [17:0] e;
        e = q.pop_front();
        if (rd_data !== e) begin failures++; $display("FAIL data %h expected %h", rd_data, e); end
      end
      got++;
    end else if (acc_pipe[1]) begin
      checks++; failures++; $display("FAIL accepted read did not return");
    end
  end

  initial begin
    #22 rst_n = 1;
    // phase 1: random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_data = 18'($urandom);
      rd_en   = ($urandom_range(0, 2) != 0);
    end
    wr_en = 0;
    repeat (200) @(negedge rclk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    // phase 2: reader stopped; count how many writes fit with reserve 5
    rd_en = 0; rsrv = 6'd5;
    repeat (20) @(negedge wclk);
    begin
      int fit;
      fit = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge wclk);
        if (!full) fit++;
        wr_en = !full; wr_data = 18'($urandom);
      end
      @(negedge wclk); wr_en = 0;
      checks++;
      if (fit != 27) begin failures++; $display("FAIL with reserve 5, %0d words fit (expected 27)", fit); end
      checks++;
      if (!nonempty_async) begin failures++; $display("FAIL nonempty_async low"); end
    end
    rd_en = 1;
    repeat (100) @(negedge rclk);
    checks++;
    if (got != sent || !empty) begin failures++; $display("FAIL drain sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
