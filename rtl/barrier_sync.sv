// barrier_sync: work-group barrier for kernel cores.
//
// A core that reaches a barrier pulses its barrier_hit bit and waits for
// barrier_done. Arrivals are remembered in a register; in the cycle the
// last core of the work-group arrives (all N bits set, counting hits that
// arrive in that cycle) barrier_done pulses for every core one cycle later
// and the arrival register clears, so the same barrier can be used again.
// 'passed' counts completed barriers. The hit/done signalling follows the
// described core interface; taking barrier_hit as a pulse and the release
// timing are this design's choice.
module barrier_sync #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] barrier_hit,
  output logic [N-1:0] barrier_done,
  output logic [15:0]  passed
);
  logic [N-1:0] arrived;
  logic         release_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arrived   <= '0;
      release_q <= 1'b0;
      passed    <= '0;
    end else if ((arrived | barrier_hit) == '1) begin
      arrived   <= '0;
      release_q <= 1'b1;
      passed    <= passed + 1'b1;
    end else begin
      arrived   <= arrived | barrier_hit;
      release_q <= 1'b0;
    end
  end

  assign barrier_done = {N{release_q}};
endmodule
