// lrs_tracker: priority tracking circuit of the least-recently-served arbiter.
//
// N registers F0..F(N-1) each hold a port number; F0 is the highest priority.
// When the port at position k (k < N-1) is served, positions k..N-2 take the
// value of the position below them and the served port drops to the last
// position. Serving the port already in the last position changes nothing.
// The register enables are the OR of sp[0..k], as in the tracking circuit of
// the design; the port count is a parameter here.
//
// Reset puts port k in position k. Interface: sp[] is the one-hot served
// position from the resolution network; pos[] is the current order.
// Timing: the order changes at the clock edge after a grant.
//
// The shifting register chain and its enables follow the described circuit;
// the reset order is this design's own choice.
module lrs_tracker #(
  parameter int unsigned N  = 4,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,    // asynchronous, active low
  input  logic                 srst,     // synchronous, active high
  input  logic [N-2:0]         sp,
  output logic [N-1:0][IW-1:0] pos
);

  logic [N-2:0]  en;
  logic [IW-1:0] served;

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int k = 0; k < N-1; k++) begin
      acc   = acc | sp[k];
      en[k] = acc;
    end
    served = '0;
    for (int k = 0; k < N-1; k++) if (sp[k]) served = pos[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) pos[k] <= IW'(k);
    end else if (srst) begin
      for (int k = 0; k < N; k++) pos[k] <= IW'(k);
    end else begin
      for (int k = 0; k < N-1; k++) if (en[k]) pos[k] <= pos[k+1];
      if (en[N-2]) pos[N-1] <= served;
    end
  end

endmodule
