// wi_dispatch: work-item ID generation and dispatch for one work-group.
//
// The work-group has LOCAL_SIZE_0 x LOCAL_SIZE_1 work-items and there is
// one physical core per work-item. Core c holds local ID
// (c mod LOCAL_SIZE_0, c div LOCAL_SIZE_0). On 'start' the module latches
// the work-group ID, registers every core's global ID
// (group_id * local_size + local_id, per dimension) and one cycle later
// pulses 'core_start' to all cores at once. Local IDs and the latched
// work-group ID are provided as well, for kernels that read them. It then collects the cores'
// ap_done pulses; when every core has finished it pulses 'done' and
// returns to idle ('busy' low). Dispatch of IDs and start signals to the
// cores follows the described architecture; the local-ID order and the
// timing are this design's choice.
module wi_dispatch
  import ocl_pkg::*;
#(
  parameter int unsigned LOCAL_SIZE_0 = 16,
  parameter int unsigned LOCAL_SIZE_1 = 1,
  localparam int unsigned NUM_CORES   = LOCAL_SIZE_0 * LOCAL_SIZE_1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  logic [IDX_W-1:0]                     group_id_0,
  input  logic [IDX_W-1:0]                     group_id_1,
  output logic                                 busy,
  output logic                                 done,
  output logic [NUM_CORES-1:0]                 core_start,
  output logic [NUM_CORES-1:0][IDX_W-1:0]      global_id_0,
  output logic [NUM_CORES-1:0][IDX_W-1:0]      global_id_1,
  output logic [NUM_CORES-1:0][IDX_W-1:0]      local_id_0,
  output logic [NUM_CORES-1:0][IDX_W-1:0]      local_id_1,
  output logic [IDX_W-1:0]                     group_id_q_0,
  output logic [IDX_W-1:0]                     group_id_q_1,
  input  logic [NUM_CORES-1:0]                 core_done
);
  typedef enum logic [1:0] {D_IDLE, D_LAUNCH, D_RUN, D_DONE} dstate_e;
  dstate_e state;
  logic [NUM_CORES-1:0] finished;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= D_IDLE;
      finished    <= '0;
      global_id_0 <= '0;
      global_id_1 <= '0;
      group_id_q_0 <= '0;
      group_id_q_1 <= '0;
    end else begin
      case (state)
        D_IDLE: if (start) begin
          for (int unsigned c = 0; c < NUM_CORES; c++) begin
            global_id_0[c] <= group_id_0 * IDX_W'(LOCAL_SIZE_0) + IDX_W'(c % LOCAL_SIZE_0);
            global_id_1[c] <= group_id_1 * IDX_W'(LOCAL_SIZE_1) + IDX_W'(c / LOCAL_SIZE_0);
          end
          group_id_q_0 <= group_id_0;
          group_id_q_1 <= group_id_1;
          finished <= '0;
          state    <= D_LAUNCH;
        end
        D_LAUNCH: state <= D_RUN;
        D_RUN: begin
          finished <= finished | core_done;
          if ((finished | core_done) == '1) state <= D_DONE;
        end
        D_DONE:  state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

  always_comb
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      local_id_0[c] = IDX_W'(c % LOCAL_SIZE_0);
      local_id_1[c] = IDX_W'(c / LOCAL_SIZE_0);
    end

  assign core_start = {NUM_CORES{state == D_LAUNCH}};
  assign busy       = (state != D_IDLE);
  assign done       = (state == D_DONE);
endmodule
