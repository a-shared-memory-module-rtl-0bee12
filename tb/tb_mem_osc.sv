// tb_mem_osc: measures the oscillator period at two frequency words against
// the model's law (half period = 0.9 ns * 256 / (freq + 1)), checks that the
// clock stops while paused, restarts on wake, follows the external clock when
// selected, and stops when the oscillator is disabled.
//
// The period law is this design's model of the described ring oscillator,
// not a figure measured on silicon.
module tb_mem_osc;
  int checks = 0, failures = 0;
  logic en = 1, ext = 0, ext_sel = 0, pause = 0, wake = 0, clk;
  logic [7:0] freq = 8'hFF;

  mem_osc dut (.osc_enable(en), .freq(freq), .ext_clk(ext), .ext_sel(ext_sel),
    .pause_req(pause), .wake(wake), .clk(clk));

  always #3 ext = ~ext;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  int n;
  always @(posedge clk) n++;

  task automatic measure(input realtime exp_period);
    realtime t0, t1;
    @(posedge clk); t0 = $realtime;
    repeat (10) @(posedge clk); t1 = $realtime;
    chk((t1 - t0) / 10.0 > exp_period * 0.99 && (t1 - t0) / 10.0 < exp_period * 1.01,
        $sformatf("period %f expected %f", (t1 - t0) / 10.0, exp_period));
  endtask

  initial begin
    int n0;
    #5;
    measure(1.8);                           // 555 MHz
    freq = 8'd127;
    #10;
    measure(3.6);
    pause = 1;
    #10; n0 = n; #50;
    chk(n == n0, "clock stopped while paused");
    wake = 1;
    #20;
    chk(n > n0 + 3, "clock restarted on wake");
    wake = 0; pause = 0;
    ext_sel = 1;
    #10;
    measure(6.0);
    ext_sel = 0; en = 0;
    #10; n0 = n; #50;
    chk(n == n0, "disabled oscillator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
