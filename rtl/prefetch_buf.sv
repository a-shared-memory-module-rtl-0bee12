// prefetch_buf: small circular buffer that reads ahead from a FIFO with a fixed
// read latency, so that its consumer sees a word at the head every cycle.
//
// The buffer asks the source FIFO for a word (src_req) whenever the number of
// empty slots exceeds the number of requests still in flight, or when the
// consumer frees a slot in the same cycle (ack). Requests in flight are kept in
// a LAT-bit shift register; when a request's reply arrives LAT cycles later,
// src_valid says whether the FIFO actually had a word, and a valid word is
// written at the tail. Head and tail are one-hot rings, each slot has a valid
// bit, and the head slot is presented on data_out/valid. The consumer takes it
// with ack, and may do so every cycle.
//
// Depth must be at least LAT + 1 to sustain one word per cycle. With LAT = 2
// and DEPTH = 3 it hides the input FIFO read latency inside the memory module;
// with LAT = 4 and DEPTH = 5 it is the processor memory port buffer for one
// pipe stage each way between processor and module.
//
// The circular buffer with one-hot pointers and a depth one above the latency
// follows the described prefetch buffer; the in-flight shift register used to
// count outstanding requests is this design's own.
module prefetch_buf #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 3,
  parameter int unsigned LAT   = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  output logic         src_req,
  input  logic [W-1:0] src_data,
  input  logic         src_valid,
  output logic [W-1:0] data_out,
  output logic         valid,
  input  logic         ack,
  output logic         none_held   // no word in the buffer
);

  localparam int unsigned CW = $clog2(DEPTH + LAT + 1);

  logic [W-1:0]     regs [DEPTH];
  logic [DEPTH-1:0] slot_valid;
  logic [DEPTH-1:0] head, tail;
  logic [LAT-1:0]   pending;
  logic [CW-1:0]    n_free, n_pend;
  logic             take;

  always_comb begin
    n_free = '0;
    for (int i = 0; i < DEPTH; i++) n_free += CW'(!slot_valid[i]);
    n_pend = '0;
    for (int i = 0; i < LAT; i++) n_pend += CW'(pending[i]);
    data_out = '0;
    for (int i = 0; i < DEPTH; i++) if (head[i]) data_out = regs[i];
  end

  assign valid     = |(head & slot_valid);
  assign take      = ack && valid;
  assign src_req   = take || (n_free > n_pend);
  assign none_held = (slot_valid == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      head       <= DEPTH'(1);
      tail       <= DEPTH'(1);
      pending    <= '0;
    end else if (srst) begin
      slot_valid <= '0;
      head       <= DEPTH'(1);
      tail       <= DEPTH'(1);
      pending    <= '0;
    end else begin
      if (LAT > 1) pending <= {pending[LAT-2:0], src_req};
      else         pending <= LAT'(src_req);
      for (int i = 0; i < DEPTH; i++) begin
        if (take && head[i])                                 slot_valid[i] <= 1'b0;
        if (pending[LAT-1] && src_valid && tail[i])          slot_valid[i] <= 1'b1;
      end
      if (take) head <= {head[DEPTH-2:0], head[DEPTH-1]};
      if (pending[LAT-1] && src_valid) tail <= {tail[DEPTH-2:0], tail[DEPTH-1]};
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (pending[LAT-1] && src_valid && tail[i]) regs[i] <= src_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (pending[LAT-1] && src_valid) |-> !(|(tail & slot_valid)) || take && (head == tail));

endmodule
