// ocl_ae: one application engine, i.e. one OpenCL compute unit.
//
// It runs one work-group at a time. The host writes the kernel arguments
// (pointer arguments first, from AEG 10) and the work-group number
// (AEG_GRID) into the AEGs, then pulses 'start'. The AE drops 'done', the
// dispatch unit hands every core its global ID and starts them all
// together, and when the last core has finished 'done' rises again; the
// host polls it through AEG_DONE. There is one kernel core per work-item of
// the group (LOCAL_SIZE_0 x LOCAL_SIZE_1). Each core talks to memory
// through its own core_wrapper; core c uses memory-controller port
// c mod NUM_MC_PORTS, and every port with more than one core has a
// round-robin mem_arbiter. Ports with no core stay idle. A barrier unit is
// present for kernels with barriers; the two supported kernels have none,
// so its inputs are constant zero.
//
// KERNEL selects the replicated core: K_VADD (args a, b, c, iNumElements)
// or K_MATMUL (args C, B, A, wA, wB). For 2-D kernels AE_GRID carries
// group_id_1 in bits 63:32 and group_id_0 in bits 31:0. The block structure
// (dispatch, cores, memory access modules, round-robin arbiters, one work-
// group per AE) follows the described architecture; the core-to-port
// mapping, the AEG numbers of AE_GRID/AE_DONE and the 2-D group encoding
// are this design's choices.
module ocl_ae
  import ocl_pkg::*;
#(
  parameter kernel_e     KERNEL       = K_VADD,
  parameter int unsigned LOCAL_SIZE_0 = 16,
  parameter int unsigned LOCAL_SIZE_1 = 1,
  parameter int unsigned NUM_MC_PORTS = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // management: AEG access
  input  logic                              aeg_we,
  input  logic [AEG_IDX_W-1:0]              aeg_wr_idx,
  input  logic [AEG_W-1:0]                  aeg_wr_data,
  input  logic [AEG_IDX_W-1:0]              aeg_rd_idx,
  output logic [AEG_W-1:0]                  aeg_rd_data,
  // dispatch: start one work-group, done = AE free
  input  logic                              start,
  output logic                              done,
  // memory-controller ports
  output logic     [NUM_MC_PORTS-1:0]       mc_req_valid,
  output mem_req_t [NUM_MC_PORTS-1:0]       mc_req,
  input  logic     [NUM_MC_PORTS-1:0]       mc_req_ready,
  input  logic     [NUM_MC_PORTS-1:0]       mc_rsp_valid,
  input  mem_rsp_t [NUM_MC_PORTS-1:0]       mc_rsp
);
  localparam int unsigned NC = LOCAL_SIZE_0 * LOCAL_SIZE_1;
  localparam int unsigned P  = NUM_MC_PORTS;

  // ---------------- registers and AE state ----------------
  logic [NUM_AEG-1:0][AEG_W-1:0] regs;
  logic free_q, wg_done, disp_busy;

  aeg_regs u_aeg (
    .clk        (clk),
    .rst_n      (rst_n),
    .we         (aeg_we),
    .wr_idx     (aeg_wr_idx),
    .wr_data    (aeg_wr_data),
    .rd_idx     (aeg_rd_idx),
    .rd_data    (aeg_rd_data),
    .status_done(free_q),
    .regs       (regs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               free_q <= 1'b1;
    else if (start && free_q) free_q <= 1'b0;
    else if (wg_done)         free_q <= 1'b1;
  end
  assign done = free_q;

  // ---------------- dispatch ----------------
  logic [NC-1:0]            core_start, core_done;
  logic [NC-1:0][IDX_W-1:0] gid0, gid1, lid0, lid1;
  logic [IDX_W-1:0]         grp0, grp1;   // for kernels that read their IDs

  wi_dispatch #(.LOCAL_SIZE_0(LOCAL_SIZE_0), .LOCAL_SIZE_1(LOCAL_SIZE_1)) u_disp (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && free_q),
    .group_id_0 (regs[AEG_GRID][IDX_W-1:0]),
    .group_id_1 (regs[AEG_GRID][2*IDX_W-1:IDX_W]),
    .busy       (disp_busy),
    .done       (wg_done),
    .core_start (core_start),
    .global_id_0(gid0),
    .global_id_1(gid1),
    .local_id_0 (lid0),
    .local_id_1 (lid1),
    .group_id_q_0(grp0),
    .group_id_q_1(grp1),
    .core_done  (core_done)
  );

  // ---------------- barrier unit ----------------
  logic [NC-1:0] barrier_hit, barrier_done;
  logic [15:0]   barriers_passed;
  assign barrier_hit = '0;   // the supported kernels contain no barrier

  barrier_sync #(.N(NC)) u_barrier (
    .clk         (clk),
    .rst_n       (rst_n),
    .barrier_hit (barrier_hit),
    .barrier_done(barrier_done),
    .passed      (barriers_passed)
  );

  // ---------------- kernel cores and memory access modules ----------------
  logic     [NUM_BUS-1:0][ADDR_W-1:0] base_addr;
  always_comb
    for (int unsigned p = 0; p < NUM_BUS; p++)
      base_addr[p] = regs[AEG_ARG0 + p][ADDR_W-1:0];

  logic     [NC-1:0] cm_req_valid, cm_req_ready, cm_rsp_valid;
  mem_req_t [NC-1:0] cm_req;
  mem_rsp_t [NC-1:0] cm_rsp;

  for (genvar c = 0; c < NC; c++) begin : g_core
    logic     [NUM_BUS-1:0]             b_req_valid, b_req_ready, b_rsp_valid;
    bus_req_t [NUM_BUS-1:0]             b_req;
    logic     [NUM_BUS-1:0][DATA_W-1:0] b_rsp_data;
    logic                               idle, ready;

    if (KERNEL == K_VADD) begin : g_vadd
      vadd_core u_core (
        .clk          (clk),
        .rst_n        (rst_n),
        .ap_start     (core_start[c]),
        .ap_done      (core_done[c]),
        .ap_idle      (idle),
        .ap_ready     (ready),
        .global_id_0  (gid0[c]),
        .arg_n        (regs[AEG_ARG0 + 3][IDX_W-1:0]),
        .bus_req_valid(b_req_valid),
        .bus_req      (b_req),
        .bus_req_ready(b_req_ready),
        .bus_rsp_valid(b_rsp_valid),
        .bus_rsp_data (b_rsp_data)
      );
    end else begin : g_matmul
      matmul_core u_core (
        .clk          (clk),
        .rst_n        (rst_n),
        .ap_start     (core_start[c]),
        .ap_done      (core_done[c]),
        .ap_idle      (idle),
        .ap_ready     (ready),
        .global_id_0  (gid0[c]),
        .global_id_1  (gid1[c]),
        .arg_wa       (regs[AEG_ARG0 + 3][IDX_W-1:0]),
        .arg_wb       (regs[AEG_ARG0 + 4][IDX_W-1:0]),
        .bus_req_valid(b_req_valid),
        .bus_req      (b_req),
        .bus_req_ready(b_req_ready),
        .bus_rsp_valid(b_rsp_valid),
        .bus_rsp_data (b_rsp_data)
      );
    end

    core_wrapper u_wrap (
      .clk          (clk),
      .rst_n        (rst_n),
      .bus_req_valid(b_req_valid),
      .bus_req      (b_req),
      .bus_req_ready(b_req_ready),
      .bus_rsp_valid(b_rsp_valid),
      .bus_rsp_data (b_rsp_data),
      .base_addr    (base_addr),
      .mem_req_valid(cm_req_valid[c]),
      .mem_req      (cm_req[c]),
      .mem_req_ready(cm_req_ready[c]),
      .mem_rsp_valid(cm_rsp_valid[c]),
      .mem_rsp      (cm_rsp[c])
    );
  end

  // ---------------- round-robin arbiters onto the MC ports ----------------
  for (genvar j = 0; j < P; j++) begin : g_port
    localparam int unsigned NJ = (j < NC) ? (NC - j + P - 1) / P : 0;
    if (NJ == 0) begin : g_unused
      assign mc_req_valid[j] = 1'b0;
      assign mc_req[j]       = '0;
    end else begin : g_arb
      logic     [NJ-1:0] a_req_valid, a_req_ready, a_rsp_valid;
      mem_req_t [NJ-1:0] a_req;
      mem_rsp_t [NJ-1:0] a_rsp;
      for (genvar m = 0; m < NJ; m++) begin : g_map
        assign a_req_valid[m]            = cm_req_valid[j + m * P];
        assign a_req[m]                  = cm_req[j + m * P];
        assign cm_req_ready[j + m * P]   = a_req_ready[m];
        assign cm_rsp_valid[j + m * P]   = a_rsp_valid[m];
        assign cm_rsp[j + m * P]         = a_rsp[m];
      end
      mem_arbiter #(.N(NJ)) u_arb (
        .clk          (clk),
        .rst_n        (rst_n),
        .in_req_valid (a_req_valid),
        .in_req       (a_req),
        .in_req_ready (a_req_ready),
        .in_rsp_valid (a_rsp_valid),
        .in_rsp       (a_rsp),
        .out_req_valid(mc_req_valid[j]),
        .out_req      (mc_req[j]),
        .out_req_ready(mc_req_ready[j]),
        .out_rsp_valid(mc_rsp_valid[j]),
        .out_rsp      (mc_rsp[j])
      );
    end
  end

  a_start_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> free_q);
  a_busy_not_free: assert property (@(posedge clk) disable iff (!rst_n)
    disp_busy |-> !free_q);
endmodule
