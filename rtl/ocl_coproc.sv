// ocl_coproc: the OpenCL compute device, NUM_AE application engines.
//
// Each application engine (ocl_ae) is an OpenCL compute unit that runs one
// work-group at a time on LOCAL_SIZE_0 x LOCAL_SIZE_1 kernel cores. The
// host schedules work-groups: it broadcasts the kernel arguments into every
// AE's AEGs (aeg_wr_bcast), writes a work-group number into one AE's
// AEG_GRID, pulses that AE's ae_start bit and polls AEG_DONE, which on this
// device reads as a mask with bit n set while AE n is free. Every AE has
// NUM_MC_PORTS memory-controller ports, two per memory controller (even
// and odd), brought out here as arrays indexed ae * NUM_MC_PORTS + port;
// the memory controllers, the crossbar and global memory lie outside.
// AEG writes take effect at the clock edge, reads are combinational.
// The split into four compute units, one work-group per unit, host-side
// scheduling by polling and arguments in AEGs follow the described
// system; the port formats are this design's choice.
module ocl_coproc
  import ocl_pkg::*;
#(
  parameter int unsigned NUM_AE       = 4,
  parameter kernel_e     KERNEL       = K_VADD,
  parameter int unsigned LOCAL_SIZE_0 = 16,
  parameter int unsigned LOCAL_SIZE_1 = 1,
  parameter int unsigned NUM_MC_PORTS = 16,
  localparam int unsigned AW          = (NUM_AE > 1) ? $clog2(NUM_AE) : 1,
  localparam int unsigned NP          = NUM_AE * NUM_MC_PORTS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host management port
  input  logic                   aeg_we,
  input  logic                   aeg_wr_bcast,
  input  logic [AW-1:0]          aeg_wr_ae,
  input  logic [AEG_IDX_W-1:0]   aeg_wr_idx,
  input  logic [AEG_W-1:0]       aeg_wr_data,
  input  logic [AW-1:0]          aeg_rd_ae,
  input  logic [AEG_IDX_W-1:0]   aeg_rd_idx,
  output logic [AEG_W-1:0]       aeg_rd_data,
  // host dispatch
  input  logic [NUM_AE-1:0]      ae_start,
  output logic [NUM_AE-1:0]      ae_done,
  // memory-controller ports of all AEs
  output logic     [NP-1:0]      mc_req_valid,
  output mem_req_t [NP-1:0]      mc_req,
  input  logic     [NP-1:0]      mc_req_ready,
  input  logic     [NP-1:0]      mc_rsp_valid,
  input  mem_rsp_t [NP-1:0]      mc_rsp
);
  logic [NUM_AE-1:0][AEG_W-1:0] rd_data;

  for (genvar a = 0; a < NUM_AE; a++) begin : g_ae
    ocl_ae #(
      .KERNEL      (KERNEL),
      .LOCAL_SIZE_0(LOCAL_SIZE_0),
      .LOCAL_SIZE_1(LOCAL_SIZE_1),
      .NUM_MC_PORTS(NUM_MC_PORTS)
    ) u_ae (
      .clk         (clk),
      .rst_n       (rst_n),
      .aeg_we      (aeg_we && (aeg_wr_bcast || aeg_wr_ae == AW'(a))),
      .aeg_wr_idx  (aeg_wr_idx),
      .aeg_wr_data (aeg_wr_data),
      .aeg_rd_idx  (aeg_rd_idx),
      .aeg_rd_data (rd_data[a]),
      .start       (ae_start[a]),
      .done        (ae_done[a]),
      .mc_req_valid(mc_req_valid[a*NUM_MC_PORTS +: NUM_MC_PORTS]),
      .mc_req      (mc_req[a*NUM_MC_PORTS +: NUM_MC_PORTS]),
      .mc_req_ready(mc_req_ready[a*NUM_MC_PORTS +: NUM_MC_PORTS]),
      .mc_rsp_valid(mc_rsp_valid[a*NUM_MC_PORTS +: NUM_MC_PORTS]),
      .mc_rsp      (mc_rsp[a*NUM_MC_PORTS +: NUM_MC_PORTS])
    );
  end

  // AE_DONE reads as the free mask of all AEs; other registers per AE.
  always_comb begin
    if (aeg_rd_idx == AEG_IDX_W'(AEG_DONE)) aeg_rd_data = AEG_W'(ae_done);
    else                                    aeg_rd_data = rd_data[aeg_rd_ae];
  end
endmodule
