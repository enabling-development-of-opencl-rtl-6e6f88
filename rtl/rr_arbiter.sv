// rr_arbiter: round-robin grant among N requesters.
//
// The requester at the priority pointer wins if it requests, otherwise the
// next requesting one in ascending (wrapping) order. 'advance' says the
// current winner is served this cycle: the pointer then moves to the
// requester after it, so a requester that has just been served has the
// lowest priority next. 'hold' says the winner is waiting (its request was
// not accepted): the grant is then frozen until 'advance', so a request
// presented downstream cannot change while it waits. Grant is
// combinational in the cycle a new arbitration happens. The pointer starts
// at requester 0 after reset. Round-robin order follows the arbiters of the
// described architecture; hold, reset value and interface are this
// design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // winner is served this cycle
  input  logic         hold,      // winner waits: keep the grant
  output logic [N-1:0] grant,     // one-hot, zero when no request
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] grant_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic          locked;
  logic [N-1:0]  lock_grant;
  logic [IW-1:0] lock_idx;
  logic [N-1:0]  new_grant;
  logic [IW-1:0] new_idx;

  always_comb begin
    new_grant = '0;
    new_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned cand;
      cand = (int'(ptr) + k) % N;
      if (req[cand] && new_grant == '0) begin
        new_grant[cand] = 1'b1;
        new_idx         = IW'(cand);
      end
    end
  end

  assign grant     = locked ? lock_grant : new_grant;
  assign grant_idx = locked ? lock_idx   : new_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr        <= '0;
      locked     <= 1'b0;
      lock_grant <= '0;
      lock_idx   <= '0;
    end else if (advance && grant != '0) begin
      ptr    <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
      locked <= 1'b0;
    end else if (hold && grant != '0) begin
      locked     <= 1'b1;
      lock_grant <= grant;
      lock_idx   <= grant_idx;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
