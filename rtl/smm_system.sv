// smm_system: a shared memory module with the memory ports of the four
// processors that use it.
//
// Each processor p has its own clock proc_clk[p] and reaches the module
// through the memory port in its tile: writing DCmem locations 28..31 sends a
// request token, reading any of them returns the next result, and 'stall'
// tells the processor to hold its access. The memory module runs on its own
// clock (local oscillator, or ext_clk when selected in the configuration
// space) and is configured over the global configuration bus.
//
// The processors themselves are outside this design: their DCmem access
// signals are the ports of this module. Processor p is wired to input and
// output port p of the module; the configured interconnect selections are
// brought out on connect_in/connect_out for an array with a reconfigurable
// interconnect. PORT_STAGES is the number of pipe stages on the wires between
// a processor and the module in each direction (0 or 1).
module smm_system
  import smm_pkg::*;
#(
  parameter int unsigned SRAM_WORDS  = 8192,
  parameter int unsigned FIFO_DEPTH  = 32,
  parameter int unsigned PORT_STAGES = 1,
  parameter int unsigned DCMEM_AW    = 5,
  parameter logic [7:0]  NODE_ID     = 8'h80
) (
  input  logic                        rst_n,
  input  logic                        ext_clk,
  input  logic                        cfg_clk,
  input  logic                        cfg_we,
  input  logic [15:0]                 cfg_addr,
  input  logic [15:0]                 cfg_data,
  input  logic [NPORTS-1:0]           proc_clk,
  input  logic [NPORTS-1:0]           proc_wr_en,
  input  logic [NPORTS-1:0][DCMEM_AW-1:0] proc_wr_addr,
  input  logic [NPORTS-1:0][DW-1:0]   proc_wr_data,
  input  logic [NPORTS-1:0]           proc_rd_en,
  input  logic [NPORTS-1:0][DCMEM_AW-1:0] proc_rd_addr,
  output logic [NPORTS-1:0][DW-1:0]   proc_rd_data,
  output logic [NPORTS-1:0]           proc_stall,
  output logic [NPORTS-1:0][2:0]      connect_in,
  output logic [NPORTS-1:0][2:0]      connect_out,
  output logic                        mem_clk
);

  logic   [NPORTS-1:0]         in_wr_en, in_full, out_rd_en, out_rd_valid;
  token_t [NPORTS-1:0]         in_wr_data;
  logic   [NPORTS-1:0][DW-1:0] out_rd_data;

  for (genvar p = 0; p < NPORTS; p++) begin : g_proc
    mem_port #(.STAGES(PORT_STAGES), .DCMEM_AW(DCMEM_AW)) u_port (
      .clk(proc_clk[p]), .rst_n(rst_n),
      .wr_en(proc_wr_en[p]), .wr_addr(proc_wr_addr[p]), .wr_data(proc_wr_data[p]),
      .rd_en(proc_rd_en[p]), .rd_addr(proc_rd_addr[p]), .rd_data(proc_rd_data[p]),
      .stall(proc_stall[p]),
      .fifo_wr_en(in_wr_en[p]), .fifo_wr_data(in_wr_data[p]), .fifo_full(in_full[p]),
      .fifo_rd_en(out_rd_en[p]), .fifo_rd_data(out_rd_data[p]),
      .fifo_rd_valid(out_rd_valid[p]));
  end

  fifo_mem #(.SRAM_WORDS(SRAM_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .NODE_ID(NODE_ID)) u_mem (
    .rst_n(rst_n), .ext_clk(ext_clk),
    .cfg_clk(cfg_clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .in_clk(proc_clk), .in_wr_en(in_wr_en), .in_wr_data(in_wr_data), .in_full(in_full),
    .out_clk(proc_clk), .out_rd_en(out_rd_en), .out_rd_data(out_rd_data),
    .out_rd_valid(out_rd_valid),
    .connect_in(connect_in), .connect_out(connect_out), .clk_out(mem_clk));

endmodule
