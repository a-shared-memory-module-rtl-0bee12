// tb_lrs_tracker: the priority order after random serve events is compared with
// a list model in which the served position moves to the end.
//
// The move-to-end rule follows the described tracking circuit; the random
// serve events are the testbench's own.
module tb_lrs_tracker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [2:0]      sp;
  logic [3:0][1:0] pos;
  int model [4];

  lrs_tracker #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .srst(srst), .sp(sp), .pos(pos));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    for (int k = 0; k < 4; k++) if (pos[k] != 2'(model[k])) begin
      failures++;
      $display("FAIL order %0d%0d%0d%0d expected %0d%0d%0d%0d",
               pos[0], pos[1], pos[2], pos[3], model[0], model[1], model[2], model[3]);
      break;
    end
  endtask

  initial begin
    sp = '0;
    model = '{0, 1, 2, 3};
    #12 rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 3);     // 3 means no serve at positions 0..2
      sp = (k < 3) ? 3'(1 << k) : 3'b000;
      @(negedge clk);
      if (k < 3) begin
        int v;
        v = model[k];
        for (int j = k; j < 3; j++) model[j] = model[j+1];
        model[3] = v;
      end
      compare();
    end
    sp = 3'b001; srst = 1;
    @(negedge clk);
    srst = 0; sp = '0;
    model = '{0, 1, 2, 3};
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
