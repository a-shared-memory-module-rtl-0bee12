// prio_resolve: combinational priority resolution network of the
// least-recently-served arbiter.
//
// The tracker supplies, for every priority position k, the number of the port
// that holds it (pos[0] is the highest priority). The network reorders the
// request lines by position, keeps the first asserted one (a one-hot fixed
// priority chain), and shuffles the result back to port order. The one-hot
// position vector sp[] tells the tracker which position was served; the lowest
// position needs no bit because serving it leaves the order unchanged. This is
// the three-phase mux / priority chain / demux network of the design, written
// as loops so that the port count is a parameter.
//
// Timing: purely combinational, so a request is granted in the cycle it is
// raised.
//
// The reorder / chain / reorder structure follows the described network; the
// loop form is this design's own.
module prio_resolve #(
  parameter int unsigned N  = 4,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         request,
  input  logic [N-1:0][IW-1:0] pos,      // pos[k] = port at priority position k
  output logic [N-1:0]         grant,    // one-hot, port order
  output logic [N-2:0]         sp        // one-hot served position (0..N-2)
);

  logic [N-1:0] req_by_pos;
  logic [N-1:0] gnt_by_pos;

  always_comb begin
    for (int k = 0; k < N; k++) req_by_pos[k] = request[pos[k]];
    gnt_by_pos = '0;
    for (int k = 0; k < N; k++) begin
      logic higher;
      higher = 1'b0;
      for (int j = 0; j < k; j++) higher |= req_by_pos[j];
      gnt_by_pos[k] = req_by_pos[k] & ~higher;
    end
    grant = '0;
    for (int k = 0; k < N; k++)
      if (gnt_by_pos[k]) grant[pos[k]] = 1'b1;
    sp = gnt_by_pos[N-2:0];
  end

endmodule
