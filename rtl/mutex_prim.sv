// mutex_prim: one hardware test-and-set lock shared by the input ports.
//
// A port asks for the lock by holding req[i] high and waits for a one-cycle
// grant[i] pulse; it gives the lock back by pulsing rel[i]. The current owner is
// kept one-hot in owner_ps. Simultaneous requests are resolved by the same
// least-recently-served arbiter (with priority override) as the memory. The lock
// can be handed over when nobody holds it, or in the very cycle its owner
// releases it, so a waiting port takes over without a free cycle in between.
// A release from a port that is not the owner is ignored.
//
// Timing: the grant is registered (two-stage grant), so a request raised in
// cycle c sees grant in cycle c+1 at the earliest; the requester must drop req
// after it sees grant. Only grants that are taken update the arbiter order.
module mutex_prim #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic [N-1:0] req,
  input  logic [N-1:0] rel,
  input  logic [N-1:0] priority_bits,
  output logic [N-1:0] grant,
  output logic [N-1:0] owner
);

  logic [N-1:0] sel;
  logic         avail;
  logic [N-1:0] owner_ps;

  // Arbitrate only among ports that do not already own the lock.
  lrs_arbiter #(.N(N)) u_arb (
    .clk(clk), .rst_n(rst_n), .srst(srst),
    .request(req & ~owner_ps), .priority_bits(priority_bits),
    .update(avail), .grant(sel));

  assign avail = ~|owner_ps | |(rel & owner_ps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_ps <= '0;
      grant    <= '0;
    end else if (srst) begin
      owner_ps <= '0;
      grant    <= '0;
    end else begin
      if (avail) owner_ps <= sel;
      grant <= avail ? sel : '0;
    end
  end

  assign owner = owner_ps;

  a_single_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(owner_ps));

endmodule
