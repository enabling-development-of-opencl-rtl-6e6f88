// aeg_regs: application engine registers (AEGs) of one compute unit.
//
// NUM_AEG 64-bit registers the host writes through the management port.
// Registers 0..9 belong to the device: AEG_GRID holds the work-group
// number of the next start, AEG_DONE reads the 'done' status input and
// ignores writes. Kernel arguments are written from AEG_ARG0 (10) on.
// Writes take effect at the clock edge; reads are combinational. All
// registers are visible to the AE on 'regs'. The reserved range and the
// argument base follow the described host library; the register numbers of
// AEG_GRID and AEG_DONE, the count and reset to zero are this design's.
module aeg_regs
  import ocl_pkg::*;
#(
  parameter int unsigned NREGS = NUM_AEG
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              we,
  input  logic [AEG_IDX_W-1:0]              wr_idx,
  input  logic [AEG_W-1:0]                  wr_data,
  input  logic [AEG_IDX_W-1:0]              rd_idx,
  output logic [AEG_W-1:0]                  rd_data,
  input  logic                              status_done,
  output logic [NREGS-1:0][AEG_W-1:0]       regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else if (we && wr_idx < AEG_IDX_W'(NREGS) && wr_idx != AEG_IDX_W'(AEG_DONE))
      regs[wr_idx] <= wr_data;
  end

  always_comb begin
    if (rd_idx == AEG_IDX_W'(AEG_DONE)) rd_data = AEG_W'(status_done);
    else if (rd_idx < AEG_IDX_W'(NREGS)) rd_data = regs[rd_idx];
    else rd_data = '0;
  end
endmodule
