// mem_arbiter: round-robin arbiter of load/store requests from N cores onto
// one memory-controller port, with response routing.
//
// Requests use valid/ready; a requester keeps its request valid and stable
// until it sees ready. The rr_arbiter winner is forwarded combinationally
// and its grant is frozen while the port is not ready, so the request on
// the port stays stable. On the way out the tag is shifted left and the
// requester number is put into its low bits; a response's low tag bits
// select the requester and the tag is shifted back before the response is
// handed on. Responses have no back-pressure: a requester accepts a
// response in the cycle it arrives. Round-robin arbitration of core
// requests onto the memory-controller ports is the described
// architecture; the tag scheme and the handshake are this design's choice.
module mem_arbiter
  import ocl_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // requesters
  input  logic     [N-1:0]    in_req_valid,
  input  mem_req_t [N-1:0]    in_req,
  output logic     [N-1:0]    in_req_ready,
  output logic     [N-1:0]    in_rsp_valid,
  output mem_rsp_t [N-1:0]    in_rsp,
  // memory-controller port
  output logic                out_req_valid,
  output mem_req_t            out_req,
  input  logic                out_req_ready,
  input  logic                out_rsp_valid,
  input  mem_rsp_t            out_rsp
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  grant;
  logic [SW-1:0] grant_idx;

  rr_arbiter #(.N(N)) u_rr (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (in_req_valid),
    .advance  (out_req_valid && out_req_ready),
    .hold     (out_req_valid && !out_req_ready),
    .grant    (grant),
    .grant_idx(grant_idx)
  );

  always_comb begin
    out_req_valid = |(in_req_valid & grant);
    out_req       = in_req[grant_idx];
    if (N > 1) out_req.tag = TAG_W'({in_req[grant_idx].tag, grant_idx});
    in_req_ready  = grant & {N{out_req_ready}};
  end

  // Response demultiplexer.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      in_rsp[i]       = out_rsp;
      in_rsp_valid[i] = out_rsp_valid && (N == 1 || out_rsp.tag[SW-1:0] == SW'(i));
      if (N > 1) in_rsp[i].tag = TAG_W'(out_rsp.tag >> SW);
    end
  end

  a_hold_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_req_valid && !out_req_ready |=> out_req_valid && $stable(out_req));
endmodule
