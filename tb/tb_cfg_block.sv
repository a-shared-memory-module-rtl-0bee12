// tb_cfg_block: checks the reset values of the static configuration space,
// writes every register through the bus and reads back the fields, and checks
// that a write to another node leaves the registers alone.
//
// The register fields checked follow the described configuration map; the
// reset values checked are this design's own choices.
module tb_cfg_block;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] addr = 0, data = 0;
  logic halt, clk_en, stall_dis, rst_cfg, rst_fifo, clk_ext;
  logic [7:0] freq;
  logic [3:0][2:0] cin, cout;
  logic [4:0] rsrv_in, rsrv_out;

  cfg_block #(.NODE_ID(8'h80)) dut (.cfg_clk(clk), .rst_n(rst_n), .cfg_we(we), .cfg_addr(addr),
    .cfg_data(data), .cfg_halt(halt), .cfg_clk_enable(clk_en), .cfg_stall_disable(stall_dis),
    .cfg_reset(rst_cfg), .cfg_reset_fifo(rst_fifo), .cfg_freq(freq), .cfg_clk_ext(clk_ext),
    .cfg_connect_in(cin), .cfg_connect_out(cout), .cfg_fifo_rsrv_in(rsrv_in),
    .cfg_fifo_rsrv_out(rsrv_out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] node, input logic [7:0] r, input logic [15:0] d);
    @(negedge clk); we = 1; addr = {node, r}; data = d;
    @(negedge clk); we = 0;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    chk(clk_en && !stall_dis && !rst_cfg && !rst_fifo && !clk_ext && freq == 8'hFF, "reset values");
    chk(rsrv_in == 5'd2 && rsrv_out == 5'd6, "reset reserve");
    for (int i = 0; i < 4; i++) chk(cin[i] == 3'(i) && cout[i] == 3'(i), "reset connections");
    wr(8'h80, 8'h00, 16'h004D);    // halt, stall_disable, reset, reset_fifo (bits 0,2,3,6)
    chk(halt && !clk_en && stall_dis && rst_cfg && rst_fifo, "register 0 fields");
    wr(8'h80, 8'h00, 16'h0002);
    chk(!halt && clk_en && !stall_dis && !rst_cfg && !rst_fifo, "register 0 cleared");
    wr(8'h80, 8'h01, 16'h0037); chk(freq == 8'h37, "frequency");
    wr(8'h80, 8'h04, 16'h0001); chk(clk_ext, "external clock");
    for (int i = 0; i < 4; i++) begin
      wr(8'h80, 8'(8'h10 + i), 16'(7 - i));
      wr(8'h80, 8'(8'h14 + i), 16'(4 + i));
    end
    for (int i = 0; i < 4; i++) chk(cin[i] == 3'(7 - i) && cout[i] == 3'(4 + i), "connections");
    wr(8'h80, 8'h18, 16'h0011); wr(8'h80, 8'h19, 16'h001F);
    chk(rsrv_in == 5'h11 && rsrv_out == 5'h1F, "reserve registers");
    wr(8'h12, 8'h01, 16'h00AA);
    chk(freq == 8'h37, "other node ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
