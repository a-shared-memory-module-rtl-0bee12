// tb_sram_sp: writes random words to random addresses of the full 8K array and
// reads them back, checking the one-cycle read latency and that idle cycles
// hold the read data.
//
// The size and one-cycle read latency follow the described memory core; the
// access pattern is the testbench's own.
module tb_sram_sp;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [12:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [8192];
  bit          written [8192];

  sram_sp dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wdata = '0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 13'(i); wdata = 16'($urandom);
      model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom_range(0, 8191);
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        en = 1; we = 1; addr = 13'(a); wdata = 16'($urandom); model[a] = wdata;
      end else begin
        en = 1; we = 0; addr = 13'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
        end
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
