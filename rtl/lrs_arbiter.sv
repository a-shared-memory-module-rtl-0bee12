// lrs_arbiter: least-recently-served arbiter with priority override.
//
// Each port has a request line and a priority bit (the 'p' bit of its port
// configuration register). If any requesting port has its priority bit set,
// only those ports compete; otherwise all requesters do. Among the competitors,
// the port served least recently wins. Two resolution networks run in parallel,
// one on the masked and one on the unmasked requests, and the result is
// selected at their outputs, so detecting the override does not lengthen the
// path. Both networks share one priority tracker, which is updated with the
// selected network's served position whenever 'update' is high.
//
// Timing: grant is combinational from request (same-cycle grant); the
// least-recently-served order changes at the next clock edge. The memory
// arbiter ties 'update' high; a mutex updates only when its grant is taken.
//
// The dual resolution networks and the shared tracker follow the described
// arbiter; the 'update' input, which lets a mutex reuse it, is this design's own.
module lrs_arbiter #(
  parameter int unsigned N  = 4,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic [N-1:0] request,
  input  logic [N-1:0] priority_bits,
  input  logic         update,
  output logic [N-1:0] grant
);

  logic [N-1:0][IW-1:0] pos;
  logic [N-1:0]         masked;
  logic                 use_masked;
  logic [N-1:0]         grant_plain, grant_masked;
  logic [N-2:0]         sp_plain, sp_masked, sp_sel;

  assign masked     = request & priority_bits;
  assign use_masked = |masked;

  prio_resolve #(.N(N), .IW(IW)) u_net_plain (
    .request(request), .pos(pos), .grant(grant_plain), .sp(sp_plain));

  prio_resolve #(.N(N), .IW(IW)) u_net_masked (
    .request(masked), .pos(pos), .grant(grant_masked), .sp(sp_masked));

  assign grant  = use_masked ? grant_masked : grant_plain;
  assign sp_sel = update ? (use_masked ? sp_masked : sp_plain) : '0;

  lrs_tracker #(.N(N), .IW(IW)) u_tracker (
    .clk(clk), .rst_n(rst_n), .srst(srst), .sp(sp_sel), .pos(pos));

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~request) == '0);

endmodule
