// dc_fifo: dual-clock FIFO used on every clock boundary of the memory module.
//
// The write side runs on wr_clk and the read side on rd_clk. Pointers cross the
// boundary in Gray code through SYNC-flop synchronizers, so both flags are
// conservative: 'full' may stay high and 'empty' may stay high a few cycles
// longer than necessary, never the other way round.
//
// Write side: a word is stored when wr_en is high and full is low. 'full' is
// raised while the free space is at or below 'rsrv' entries (the reserve
// space), which lets a writer with 'rsrv' words in flight stop in time.
// Read side: rd_en asks for one word; if the FIFO is not empty the word appears
// on rd_data with rd_valid two rd_clk cycles later (read latency 2). A request
// while empty is ignored and comes back with rd_valid low, so a reader may
// request every cycle and check rd_valid.
// 'nonempty_async' compares the two Gray pointers without a clock; it is meant
// only to restart a paused clock.
//
// Depth 32 matches the processor input FIFOs; the reserve input and the read
// latency follow the description of the existing FIFO, the Gray-pointer
// structure is this design's own.
module dc_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SYNC  = 3,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         rst_n,
  // write side
  input  logic         wr_clk,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic [AW:0]  rsrv,
  output logic         full,
  // read side
  input  logic         rd_clk,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  output logic         empty,
  output logic         rd_inflight,   // a popped word is still on its way out
  // asynchronous status
  output logic         nonempty_async
);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_sync [SYNC];
  logic [AW:0] wr_gray_sync [SYNC];
  logic [AW:0] rd_bin_w, wr_bin_r, used_w, free_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side
  logic do_wr;
  assign rd_bin_w = gray2bin(rd_gray_sync[SYNC-1]);
  assign used_w   = wr_bin - rd_bin_w;
  assign free_w   = (AW+1)'(DEPTH) - used_w;
  assign full     = (free_w <= rsrv) || (free_w == '0);
  assign do_wr    = wr_en && (free_w != '0);

  always_ff @(posedge wr_clk) if (do_wr) mem[wr_bin[AW-1:0]] <= wr_data;

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bin  <= '0;
      wr_gray <= '0;
      for (int i = 0; i < SYNC; i++) rd_gray_sync[i] <= '0;
    end else begin
      if (do_wr) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
      rd_gray_sync[0] <= rd_gray;
      for (int i = 1; i < SYNC; i++) rd_gray_sync[i] <= rd_gray_sync[i-1];
    end
  end

  // ---------------- read side
  logic         do_rd;
  logic [W-1:0] data_q1;
  logic         valid_q1;
  assign wr_bin_r = gray2bin(wr_gray_sync[SYNC-1]);
  assign empty    = (wr_bin_r == rd_bin);
  assign do_rd    = rd_en && !empty;

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bin   <= '0;
      rd_gray  <= '0;
      valid_q1 <= 1'b0;
      rd_valid <= 1'b0;
      data_q1  <= '0;
      rd_data  <= '0;
      for (int i = 0; i < SYNC; i++) wr_gray_sync[i] <= '0;
    end else begin
      if (do_rd) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
        data_q1 <= mem[rd_bin[AW-1:0]];
      end
      valid_q1 <= do_rd;
      rd_valid <= valid_q1;
      rd_data  <= data_q1;
      wr_gray_sync[0] <= wr_gray;
      for (int i = 1; i < SYNC; i++) wr_gray_sync[i] <= wr_gray_sync[i-1];
    end
  end

  assign rd_inflight    = valid_q1 || rd_valid;
  assign nonempty_async = (wr_gray != rd_gray);

endmodule
