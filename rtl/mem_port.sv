// mem_port: the memory port inside an AsAP processor.
//
// The processor sees the memory module through four locations of its dynamic
// configuration memory, 28 to 31. Writing one of them sends the result word to
// the module's input FIFO as a token whose cfgen and wren flags are the two low
// address bits (28: read request, 29: write request, 30: configuration,
// 31: configuration with data). Reading any of them returns the next word from
// the module's output FIFO. A write while the input FIFO is full, or a read
// while no word is buffered, raises 'stall' for as long as the condition lasts;
// the processor holds its access during a stall.
//
// A prefetch buffer keeps reading ahead from the output FIFO, so that reads
// proceed at one word per cycle in spite of the round trip to the FIFO.
// STAGES pipe registers (0 or 1) may sit on the wires to the module in each
// direction. The round trip is then 2 + 2*STAGES cycles (the FIFO's own read
// latency is 2) and the buffer holds one more word than that: five words for
// one stage. On the write side the FIFO's reserve space covers the stages.
// The DCmem address width is this design's assumption.
module mem_port
  import smm_pkg::*;
#(
  parameter int unsigned STAGES   = 1,
  parameter int unsigned DCMEM_AW = 5,
  parameter logic [DCMEM_AW-1:0] BASE = DCMEM_AW'(28)
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  logic                wr_en,
  input  logic [DCMEM_AW-1:0] wr_addr,
  input  logic [DW-1:0]       wr_data,
  input  logic                rd_en,
  input  logic [DCMEM_AW-1:0] rd_addr,
  output logic [DW-1:0]       rd_data,
  output logic                stall,
  // to the module's input FIFO (write side)
  output logic                fifo_wr_en,
  output token_t              fifo_wr_data,
  input  logic                fifo_full,
  // from the module's output FIFO (read side)
  output logic                fifo_rd_en,
  input  logic [DW-1:0]       fifo_rd_data,
  input  logic                fifo_rd_valid
);

  localparam int unsigned LAT   = 2 + 2 * STAGES;
  localparam int unsigned DEPTH = LAT + 1;

  logic   wr_hit, rd_hit, wr_go;
  logic   full_seen;
  token_t tok;
  logic   pf_req, pf_valid, pf_ack;
  logic [DW-1:0] pf_data;
  logic [DW-1:0] rsp_data;
  logic          rsp_valid;

  assign wr_hit = wr_en && (wr_addr[DCMEM_AW-1:2] == BASE[DCMEM_AW-1:2]);
  assign rd_hit = rd_en && (rd_addr[DCMEM_AW-1:2] == BASE[DCMEM_AW-1:2]);
  assign tok    = '{cfgen: wr_addr[1], wren: wr_addr[0], data: wr_data};
  assign wr_go  = wr_hit && !full_seen;
  assign pf_ack = rd_hit;
  assign stall  = (wr_hit && full_seen) || (rd_hit && !pf_valid);
  assign rd_data = pf_data;

  if (STAGES == 0) begin : g_direct
    assign fifo_wr_en   = wr_go;
    assign fifo_wr_data = tok;
    assign full_seen    = fifo_full;
    assign fifo_rd_en   = pf_req;
    assign rsp_data     = fifo_rd_data;
    assign rsp_valid    = fifo_rd_valid;
  end else begin : g_staged
    logic          wr_en_q, full_q, rd_en_q, rsp_valid_q;
    token_t        wr_tok_q;
    logic [DW-1:0] rsp_data_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wr_en_q <= 1'b0; full_q <= 1'b1; rd_en_q <= 1'b0; rsp_valid_q <= 1'b0;
        wr_tok_q <= '0; rsp_data_q <= '0;
      end else begin
        wr_en_q     <= wr_go;
        wr_tok_q    <= tok;
        full_q      <= fifo_full;
        rd_en_q     <= pf_req;
        rsp_valid_q <= fifo_rd_valid;
        rsp_data_q  <= fifo_rd_data;
      end
    end
    assign fifo_wr_en   = wr_en_q;
    assign fifo_wr_data = wr_tok_q;
    assign full_seen    = full_q;
    assign fifo_rd_en   = rd_en_q;
    assign rsp_data     = rsp_data_q;
    assign rsp_valid    = rsp_valid_q;
  end

  prefetch_buf #(.W(DW), .DEPTH(DEPTH), .LAT(LAT)) u_pf (
    .clk(clk), .rst_n(rst_n), .srst(1'b0),
    .src_req(pf_req), .src_data(rsp_data), .src_valid(rsp_valid),
    .data_out(pf_data), .valid(pf_valid), .ack(pf_ack), .none_held());

endmodule
