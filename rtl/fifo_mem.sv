// fifo_mem: the FIFO-buffered shared memory module.
//
// Up to four processors, each in its own clock domain, share one SRAM. Each
// processor writes 18-bit request tokens into an input FIFO and reads results
// from an output FIFO; both FIFOs cross into the module's own clock, which
// comes from a local pausable oscillator (or an external clock).
//
// Structure:
//   4 input FIFOs (18 bit) -> 4 input ports (decode, issue, 2 stages)
//   memory arbiter (least recently served, priority override), same-cycle grant
//   SRAM core, 8K x 16, single port, addressed with the low address bits
//   output register -> decoder -> 4 output FIFOs (16 bit)
//   4 address generators and 4 mutexes, shared by the ports through muxes
//   configuration block on the global bus, oscillator with stall control
// Pipe stages from an input FIFO to an output FIFO: the prefetch buffer head,
// the port's stage-2 register, the SRAM input, and the memory output register.
// Reads are issued only when the destination output FIFO has more free entries
// than its reserve space (configuration register 0x19, reset value 6), which
// covers the reads that can be in flight: four stage-2 registers, the SRAM
// stage and the output register.
//
// Address generators and mutex releases are not arbitrated: if two ports drive
// the same generator in one cycle, the lower-numbered port wins. Keeping ports
// from sharing a generator is the programmer's job.
//
// Clock stall: when every input FIFO and prefetch buffer is empty, no port has
// a request open and the memory pipeline is empty, the module asks the
// oscillator to pause (unless stall_disable is set). Any input FIFO that is no
// longer empty restarts the clock asynchronously. Clearing clk_enable stops the
// oscillator outright. The halt bit is stored but, as the register map
// defines it, has no effect.
//
// Resets: rst_n is asynchronous and global. Configuration bit reset is a
// synchronous reset of the module's blocks, reset_fifo resets the input FIFOs.
// The routing between processors and ports (connect_in/out) is brought out
// for the array's interconnect; here port i always serves processor i.
module fifo_mem
  import smm_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = 8192,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter logic [7:0]  NODE_ID    = 8'h80
) (
  input  logic                      rst_n,
  input  logic                      ext_clk,
  // global configuration bus
  input  logic                      cfg_clk,
  input  logic                      cfg_we,
  input  logic [15:0]               cfg_addr,
  input  logic [15:0]               cfg_data,
  // input FIFO write sides, one per processor
  input  logic [NPORTS-1:0]         in_clk,
  input  logic [NPORTS-1:0]         in_wr_en,
  input  token_t [NPORTS-1:0]       in_wr_data,
  output logic [NPORTS-1:0]         in_full,
  // output FIFO read sides, one per processor
  input  logic [NPORTS-1:0]         out_clk,
  input  logic [NPORTS-1:0]         out_rd_en,
  output logic [NPORTS-1:0][DW-1:0] out_rd_data,
  output logic [NPORTS-1:0]         out_rd_valid,
  // to the array interconnect
  output logic [NPORTS-1:0][2:0]    connect_in,
  output logic [NPORTS-1:0][2:0]    connect_out,
  output logic                      clk_out
);

  localparam int unsigned SAW = $clog2(SRAM_WORDS);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------ configuration
  logic       c_halt, c_clk_en, c_stall_dis, c_reset, c_reset_fifo, c_clk_ext;
  logic [7:0] c_freq;
  logic [4:0] c_rsrv_in, c_rsrv_out;

  cfg_block #(.NODE_ID(NODE_ID), .NPORTS(NPORTS)) u_cfg (
    .cfg_clk(cfg_clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .cfg_halt(c_halt), .cfg_clk_enable(c_clk_en),
    .cfg_stall_disable(c_stall_dis), .cfg_reset(c_reset),
    .cfg_reset_fifo(c_reset_fifo), .cfg_freq(c_freq), .cfg_clk_ext(c_clk_ext),
    .cfg_connect_in(connect_in), .cfg_connect_out(connect_out),
    .cfg_fifo_rsrv_in(c_rsrv_in), .cfg_fifo_rsrv_out(c_rsrv_out));

  // ------------------------------------------------------------ clock
  logic clk;
  logic pause_req, wake;
  logic [NPORTS-1:0] in_nonempty_async;

  assign wake = |in_nonempty_async;

  mem_osc u_osc (
    .osc_enable(c_clk_en), .freq(c_freq), .ext_clk(ext_clk), .ext_sel(c_clk_ext),
    .pause_req(pause_req), .wake(wake), .clk(clk));

  assign clk_out = clk;

  // synchronous block reset from the configuration space
  logic [1:0] srst_sync;
  logic       srst;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) srst_sync <= 2'b00;
    else        srst_sync <= {srst_sync[0], c_reset};
  end
  assign srst = srst_sync[1];

  // ------------------------------------------------------------ input FIFOs
  logic              fifo_rst_n;
  logic [NPORTS-1:0] in_rd_en, in_rd_valid, in_empty, in_inflight;
  token_t [NPORTS-1:0] in_rd_data;

  assign fifo_rst_n = rst_n && !c_reset_fifo;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in_fifo
    dc_fifo #(.W($bits(token_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .rst_n(fifo_rst_n),
      .wr_clk(in_clk[p]), .wr_en(in_wr_en[p]), .wr_data(in_wr_data[p]),
      .rsrv((FAW+1)'(c_rsrv_in)), .full(in_full[p]),
      .rd_clk(clk), .rd_en(in_rd_en[p]), .rd_data(in_rd_data[p]),
      .rd_valid(in_rd_valid[p]), .empty(in_empty[p]), .rd_inflight(in_inflight[p]),
      .nonempty_async(in_nonempty_async[p]));
  end

  // ------------------------------------------------------------ input ports
  logic [NPORTS-1:0][DW-1:0]    head_data;
  logic [NPORTS-1:0]            head_is_data, ext_pop, prio, port_idle;
  logic [NPORTS-1:0][NPORTS-1:0] partner_pop;
  logic [NPORTS-1:0]            out_full;
  logic [NAGEN-1:0][DW-1:0]     ag_addr;
  logic [NAGEN-1:0]             ag_last;
  logic [NPORTS-1:0][NAGEN-1:0] p_ag_sel;
  logic [NPORTS-1:0]            p_ag_step, p_ag_load, p_ag_cfg_we;
  logic [NPORTS-1:0][7:0]       p_ag_len, p_ag_cfg_addr;
  logic [NPORTS-1:0][DW-1:0]    p_ag_cfg_data;
  logic [NPORTS-1:0]            mem_req, mem_grant;
  request_t [NPORTS-1:0]        s2;
  logic [NPORTS-1:0][NMUTEX-1:0] p_mx_req, p_mx_rel, p_mx_grant;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    input_port #(.PORT_ID(p)) u_port (
      .clk(clk), .rst_n(rst_n), .srst(srst),
      .fifo_rd_en(in_rd_en[p]), .fifo_rd_data(in_rd_data[p]),
      .fifo_rd_valid(in_rd_valid[p]),
      .head_data(head_data[p]), .head_is_data(head_is_data[p]), .ext_pop(ext_pop[p]),
      .partner_data(head_data), .partner_valid(head_is_data),
      .partner_pop(partner_pop[p]), .out_full(out_full),
      .agen_addr(ag_addr), .agen_last(ag_last), .agen_sel(p_ag_sel[p]),
      .agen_step(p_ag_step[p]), .agen_load(p_ag_load[p]), .agen_len(p_ag_len[p]),
      .agen_cfg_we(p_ag_cfg_we[p]), .agen_cfg_addr(p_ag_cfg_addr[p]),
      .agen_cfg_data(p_ag_cfg_data[p]),
      .mem_req(mem_req[p]), .mem_grant(mem_grant[p]), .s2(s2[p]),
      .mutex_req(p_mx_req[p]), .mutex_rel(p_mx_rel[p]), .mutex_grant(p_mx_grant[p]),
      .prio(prio[p]), .idle(port_idle[p]), .state());
  end

  always_comb begin
    ext_pop = '0;
    for (int p = 0; p < int'(NPORTS); p++) ext_pop |= partner_pop[p];
  end

  // ------------------------------------------------------------ address generators
  for (genvar g = 0; g < NAGEN; g++) begin : g_agen
    logic          step, load, cwe;
    logic [7:0]    len, caddr;
    logic [DW-1:0] cdata;
    always_comb begin
      step = 1'b0; load = 1'b0; cwe = 1'b0; len = '0; caddr = '0; cdata = '0;
      for (int p = int'(NPORTS) - 1; p >= 0; p--) begin
        if (p_ag_sel[p][g]) begin
          step |= p_ag_step[p];
          if (p_ag_load[p])   begin load = 1'b1; len = p_ag_len[p]; end
          if (p_ag_cfg_we[p]) begin cwe = 1'b1; caddr = p_ag_cfg_addr[p]; cdata = p_ag_cfg_data[p]; end
        end
      end
    end
    addr_gen u_agen (
      .clk(clk), .rst_n(rst_n), .srst(srst),
      .cfg_we(cwe), .cfg_addr(caddr), .cfg_data(cdata),
      .step(step), .burst_load(load), .burst_len(len),
      .addr(ag_addr[g]), .burst_cnt(), .burst_last(ag_last[g]));
  end

  // ------------------------------------------------------------ mutexes
  for (genvar m = 0; m < NMUTEX; m++) begin : g_mutex
    logic [NPORTS-1:0] req, rel, gnt;
    for (genvar p = 0; p < NPORTS; p++) begin : g_bits
      assign req[p] = p_mx_req[p][m];
      assign rel[p] = p_mx_rel[p][m];
      assign p_mx_grant[p][m] = gnt[p];
    end
    mutex_prim #(.N(NPORTS)) u_mutex (
      .clk(clk), .rst_n(rst_n), .srst(srst), .req(req), .rel(rel),
      .priority_bits(prio), .grant(gnt), .owner());
  end

  // ------------------------------------------------------------ memory arbiter
  lrs_arbiter #(.N(NPORTS)) u_mem_arb (
    .clk(clk), .rst_n(rst_n), .srst(srst), .request(mem_req),
    .priority_bits(prio), .update(1'b1), .grant(mem_grant));

  request_t sel;
  always_comb begin
    sel = '0;
    for (int p = 0; p < int'(NPORTS); p++) if (mem_grant[p]) sel = s2[p];
  end

  // ------------------------------------------------------------ SRAM core
  logic          sram_en, sram_we;
  logic [DW-1:0] sram_rdata;
  assign sram_en = |mem_grant;
  assign sram_we = sel.kind == RQ_MEM_WR;

  sram_sp #(.WORDS(SRAM_WORDS), .DW(DW)) u_sram (
    .clk(clk), .en(sram_en), .we(sram_we), .addr(sel.addr[SAW-1:0]),
    .wdata(sel.wdata), .rdata(sram_rdata));

  // read in flight through the SRAM stage, then the memory output register
  logic          rd_q, out_q;
  logic [1:0]    dest_q, out_dest_q;
  logic [DW-1:0] out_data_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0; out_q <= 1'b0; dest_q <= '0; out_dest_q <= '0; out_data_q <= '0;
    end else if (srst) begin
      rd_q <= 1'b0; out_q <= 1'b0;
    end else begin
      rd_q       <= sram_en && !sram_we;
      dest_q     <= sel.dest;
      out_q      <= rd_q;
      out_dest_q <= dest_q;
      out_data_q <= sram_rdata;
    end
  end

  // ------------------------------------------------------------ output FIFOs
  for (genvar p = 0; p < NPORTS; p++) begin : g_out_fifo
    dc_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .rst_n(rst_n),
      .wr_clk(clk), .wr_en(out_q && out_dest_q == 2'(p)), .wr_data(out_data_q),
      .rsrv((FAW+1)'(c_rsrv_out)), .full(out_full[p]),
      .rd_clk(out_clk[p]), .rd_en(out_rd_en[p]), .rd_data(out_rd_data[p]),
      .rd_valid(out_rd_valid[p]), .empty(), .rd_inflight(), .nonempty_async());
  end

  // ------------------------------------------------------------ clock stall
  logic idle_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idle_q <= 1'b0;
    else        idle_q <= (&port_idle) && (&in_empty) && !(|in_inflight) && !rd_q && !out_q;
  end
  assign pause_req = idle_q && !c_stall_dis;

  a_single_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(mem_grant));

endmodule
