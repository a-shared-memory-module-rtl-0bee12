// tb_addr_gen: configures offset, block size and stride through the
// configuration port and steps the generator, comparing every address with
// count[n] = (count[n-1] + stride) mod blocksize, address = count + offset.
// Also checks that writing the offset clears the count and the burst counter.
//
// The expected addresses follow the described generator law; the register
// values and step pattern are the testbench's own.
module tb_addr_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, srst = 0;
  logic cfg_we = 0, step = 0, burst_load = 0;
  logic [7:0] cfg_addr = 0, burst_len = 0, burst_cnt;
  logic [15:0] cfg_data = 0, addr;
  logic burst_last;

  addr_gen dut (.clk(clk), .rst_n(rst_n), .srst(srst), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .step(step), .burst_load(burst_load), .burst_len(burst_len),
    .addr(addr), .burst_cnt(burst_cnt), .burst_last(burst_last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int off, bs, st, cnt, len;
      off = $urandom_range(0, 60000);
      bs  = $urandom_range(1, 5000);
      st  = $urandom_range(0, bs);
      len = $urandom_range(1, 40);
      if (t == 0) begin off = 100; bs = 10; st = 3; end
      cfg(8'd1, 16'(bs));
      cfg(8'd2, 16'(st));
      cfg(8'd0, 16'(off));
      cnt = 0;
      @(negedge clk);
      burst_load = 1; burst_len = 8'(len);
      @(negedge clk);
      burst_load = 0;
      checks++;
      if (burst_cnt != 8'(len)) begin failures++; $display("FAIL burst load"); end
      for (int n = 0; n < len; n++) begin
        checks++;
        if (addr !== 16'(cnt + off)) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d n%0d addr %0d expected %0d", t, n, addr, 16'(cnt + off));
        end
        checks++;
        if (burst_last !== (n == len - 1)) begin failures++; $display("FAIL burst_last n=%0d", n); end
        step = 1;
        @(negedge clk);
        step = 0;
        cnt = (cnt + st) % bs;
      end
      checks++;
      if (burst_cnt != 0) begin failures++; $display("FAIL burst count end"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
