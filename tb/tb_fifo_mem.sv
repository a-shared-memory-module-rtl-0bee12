// tb_fifo_mem: token-level test of the memory module at its default size
// (8K x 16 SRAM, 32-entry FIFOs, 555 MHz oscillator setting). The testbench
// writes 18-bit tokens straight into the four input FIFOs and reads the four
// output FIFOs, with each side on its own clock.
// Checked:
//   - writes and reads through every port, data compared with a shadow copy
//   - with all four input FIFOs preloaded with reads, the SRAM performs one
//     access per memory clock cycle (96 reads in at most 96 + 4 cycles)
//   - every read result comes back on the requesting port, in order
//   - the clock pauses when there is no work and wakes on a token
//   - stall_disable keeps the clock running while idle; clearing clk_enable
//     stops it, and work written meanwhile completes once it is set again;
//     the halt bit changes nothing
//   - reset_fifo empties the input FIFOs (queued reads are lost)
//
// Register meanings and the one-request-per-cycle rate follow the described
// module; clock periods and traffic are the testbench's own.
module tb_fifo_mem;
  import smm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst_n = 1, ext_clk = 0, cfg_clk = 0, cfg_we = 0;
  logic [15:0] cfg_addr = '0, cfg_data = '0;
  logic [3:0] in_clk = '0, in_wr_en = '0, in_full, out_clk = '0, out_rd_en = '0, out_rd_valid;
  token_t [3:0] in_wr_data = '0;
  logic [3:0][15:0] out_rd_data;
  logic [3:0][2:0] connect_in, connect_out;
  logic clk_out;

  fifo_mem dut (.rst_n(rst_n), .ext_clk(ext_clk), .cfg_clk(cfg_clk), .cfg_we(cfg_we),
    .cfg_addr(cfg_addr), .cfg_data(cfg_data), .in_clk(in_clk), .in_wr_en(in_wr_en),
    .in_wr_data(in_wr_data), .in_full(in_full), .out_clk(out_clk), .out_rd_en(out_rd_en),
    .out_rd_data(out_rd_data), .out_rd_valid(out_rd_valid), .connect_in(connect_in),
    .connect_out(connect_out), .clk_out(clk_out));

  localparam realtime HALF [4] = '{1.0ns, 1.3ns, 2.1ns, 3.3ns};
  for (genvar p = 0; p < 4; p++) begin : g_clk
    always #(HALF[p]) in_clk[p] = ~in_clk[p];
    always #(HALF[3 - p]) out_clk[p] = ~out_clk[p];
  end
  always #5ns cfg_clk = ~cfg_clk;
  always #10ns ext_clk = ~ext_clk;

  initial begin
    #500us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // token writers, one queue per port
  token_t tq [4][$];
  logic [15:0] expq [4][$];
  int got [4] = '{0, 0, 0, 0};
  for (genvar p = 0; p < 4; p++) begin : g_io
    always @(negedge in_clk[p]) begin
      in_wr_en[p] <= 1'b0;
      if (rst_n && tq[p].size() != 0 && !in_full[p]) begin
        in_wr_en[p]   <= 1'b1;
        in_wr_data[p] <= tq[p].pop_front();
      end
    end
    always @(negedge out_clk[p]) out_rd_en[p] <= rst_n;
    always @(posedge out_clk[p]) if (rst_n && out_rd_valid[p]) begin
      got[p]++;
      checks++;
      if (expq[p].size() == 0) begin
        failures++; $display("FAIL port %0d unexpected word %h", p, out_rd_data[p]);
      end else begin
        logic [15:0] e;
        e = expq[p].pop_front();
        if (out_rd_data[p] !== e) begin
          failures++; $display("FAIL port %0d read %h expected %h", p, out_rd_data[p], e);
        end
      end
    end
  end

  logic [15:0] shadow [int];
  function automatic void wr(int p, logic [15:0] a, logic [15:0] d);
    tq[p].push_back('{cfgen: 1'b0, wren: 1'b1, data: a});
    tq[p].push_back('{cfgen: 1'b0, wren: 1'b0, data: d});
    shadow[int'(a)] = d;
  endfunction
  function automatic void rd(int p, logic [15:0] a);
    tq[p].push_back('{cfgen: 1'b0, wren: 1'b0, data: a});
    expq[p].push_back(shadow[int'(a)]);
  endfunction
  task automatic settle();
    int n = 0;
    while ((tq[0].size() + tq[1].size() + tq[2].size() + tq[3].size() +
            expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size()) != 0 && n < 5000) begin
      #10ns; n++;
    end
    #200ns;
    chk(expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size() == 0, "all reads returned");
  endtask
  task automatic cfg_write(logic [7:0] r, logic [15:0] d);
    @(negedge cfg_clk);
    cfg_we = 1; cfg_addr = {8'h80, r}; cfg_data = d;
    @(negedge cfg_clk);
    cfg_we = 0;
  endtask

  // memory-side counters
  int mem_cycles = 0, grants = 0;
  always @(posedge clk_out) begin
    mem_cycles++;
    if (|dut.mem_grant) grants++;
  end

  initial begin
    int c0, g0, cfirst, clast, e0;
    #0.1ns rst_n = 0;
    #30ns rst_n = 1;
    // idle after reset: clock must stop
    #100ns;
    e0 = mem_cycles; #100ns;
    chk(mem_cycles == e0, "memory clock paused while idle");

    // fill words 0..255 from all four ports, then read them back on every port
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < 64; i++) wr(p, 16'(p * 64 + i), 16'($urandom));
    settle();
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < 64; i++) rd(p, 16'((p * 64 + i * 5) % 256));
    settle();
    chk(got[0] == 64 && got[1] == 64 && got[2] == 64 && got[3] == 64, "64 words on each port");

    // throughput: load 24 reads into every input FIFO while the memory clock is disabled
    cfg_write(8'h00, 16'h0003);              // halt: no effect
    for (int i = 0; i < 4; i++) rd(i, 16'(i));
    settle();
    chk(got[0] == 65 && got[3] == 65, "halt bit has no effect");
    cfg_write(8'h00, 16'h0000);              // clk_enable cleared
    #50ns;
    e0 = mem_cycles; #100ns;
    chk(mem_cycles == e0, "clearing clk_enable stops the memory clock");
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < 24; i++) rd(p, 16'(i * 4 + p));
    #300ns;
    g0 = grants; c0 = mem_cycles;
    chk(mem_cycles == e0, "no memory cycles while disabled with work queued");
    cfg_write(8'h00, 16'h0002);              // clk_enable set again
    cfirst = -1;
    while (grants - g0 < 96 && mem_cycles - c0 < 1000) begin
      @(posedge clk_out);
      if (cfirst < 0 && grants > g0) cfirst = mem_cycles;
    end
    clast = mem_cycles;
    $display("96 preloaded reads took %0d memory cycles", clast - cfirst + 1);
    chk(clast - cfirst + 1 <= 100, "one access per memory cycle with all ports loaded");
    settle();

    // stall_disable keeps the clock running
    cfg_write(8'h00, 16'h0006);
    #100ns;
    e0 = mem_cycles; #90ns;
    chk(mem_cycles - e0 >= 45, "clock runs while idle with stall_disable");
    cfg_write(8'h00, 16'h0002);
    #100ns;

    // reset_fifo: reads queued while the clock is disabled are discarded
    cfg_write(8'h00, 16'h0000);
    for (int i = 0; i < 8; i++) tq[1].push_back('{cfgen: 1'b0, wren: 1'b0, data: 16'(i)});
    #200ns;
    cfg_write(8'h00, 16'h0040);              // reset_fifo while disabled
    cfg_write(8'h00, 16'h0002);
    #300ns;
    chk(got[1] == 65 + 24, "reset_fifo dropped queued reads");
    // the module still works afterwards
    rd(1, 16'd7);
    settle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
