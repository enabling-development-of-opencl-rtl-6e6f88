// tb_ocl_coproc_matmul: end-to-end test of the compute device running the
// matrixMul kernel on 4x4 work-groups (16 cores per AE, four AEs).
//
// The host model writes A and B into global memory, broadcasts the
// arguments C, B, A, wA, wB into AEG 10..14 and schedules the 2-D
// work-groups with the same polling scheme as for vector addition: the
// linear work-group number g is sent as AE_GRID = {gy, gx} with
// gx = g mod (width/4), gy = g div (width/4). Square matrices of width 4,
// 8, 12 and 16 are multiplied and every element of C is compared with the
// product computed here (64-bit wrap-around). Counted mechanisms:
// polling re-dispatch, the small-group path and memory stalls.
module tb_ocl_coproc_matmul;
  import ocl_pkg::*;

  localparam int unsigned NUM_AE = 4, L = 4, PORTS = 16, NP = NUM_AE * PORTS;
  localparam int unsigned WORDS = 4096;
  localparam int unsigned C_W = 0, B_W = 1024, A_W = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 aeg_we = 0, aeg_wr_bcast = 0;
  logic [1:0]           aeg_wr_ae = '0, aeg_rd_ae = '0;
  logic [AEG_IDX_W-1:0] aeg_wr_idx = '0, aeg_rd_idx = '0;
  logic [AEG_W-1:0]     aeg_wr_data = '0, aeg_rd_data;
  logic [NUM_AE-1:0]    ae_start = '0, ae_done;
  logic     [NP-1:0]    mc_req_valid, mc_req_ready, mc_rsp_valid;
  mem_req_t [NP-1:0]    mc_req;
  mem_rsp_t [NP-1:0]    mc_rsp;

  ocl_coproc #(.KERNEL(K_MATMUL), .LOCAL_SIZE_0(L), .LOCAL_SIZE_1(L)) dut (.*);

  global_mem_model #(.PORTS(NP), .WORDS(WORDS), .LAT(10), .STALL_PCT(20)) u_mem (
    .clk(clk), .req_valid(mc_req_valid), .req(mc_req), .req_ready(mc_req_ready),
    .rsp_valid(mc_rsp_valid), .rsp(mc_rsp));

  int checks = 0, failures = 0, n_redispatch = 0, n_small_path = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic aeg_write(input bit bcast, input int ae, input int idx, input logic [63:0] data);
    @(negedge clk);
    aeg_we = 1; aeg_wr_bcast = bcast; aeg_wr_ae = 2'(ae); aeg_wr_idx = AEG_IDX_W'(idx);
    aeg_wr_data = data;
    @(negedge clk);
    aeg_we = 0; aeg_wr_bcast = 0;
  endtask

  task automatic aeg_read(input int ae, input int idx, output logic [63:0] data);
    @(negedge clk);
    aeg_rd_ae = 2'(ae); aeg_rd_idx = AEG_IDX_W'(idx);
    #1 data = aeg_rd_data;
  endtask

  task automatic cop_call(input int ae, input int group, input int groups_x);
    aeg_write(0, ae, AEG_GRID, {32'(group / groups_x), 32'(group % groups_x)});
    @(negedge clk) ae_start[ae] = 1;
    @(negedge clk) ae_start[ae] = 0;
  endtask

  task automatic enqueue_2d(input int width);
    int groups_x, workgroups, workg;
    logic [63:0] free_ae;
    groups_x = width / L;
    workgroups = groups_x * groups_x;
    workg = 0;
    if (workgroups > 3) begin
      for (int ae = 0; ae < int'(NUM_AE); ae++) cop_call(ae, ae, groups_x);
      workg = NUM_AE;
      while (workg < workgroups) begin
        aeg_read(0, AEG_DONE, free_ae);
        while (free_ae[NUM_AE-1:0] != 0 && workg < workgroups)
          for (int ae = 0; ae < int'(NUM_AE); ae++)
            if (free_ae[ae]) begin
              cop_call(ae, workg, groups_x);
              workg++;
              n_redispatch++;
              free_ae[ae] = 1'b0;
              break;
            end
      end
    end else begin
      n_small_path++;
      for (int g = workgroups - 1; g >= 0; g--) cop_call(g, g, groups_x);
    end
    do aeg_read(0, AEG_DONE, free_ae); while (free_ae[NUM_AE-1:0] != '1);
  endtask

  task automatic run_matmul(input int w);
    int t0;
    for (int i = 0; i < w * w; i++) begin
      u_mem.mem[A_W + i] = (i % 5 == 0) ? {$urandom, $urandom} : 64'($urandom % 2000) - 64'd1000;
      u_mem.mem[B_W + i] = 64'($urandom % 2000) - 64'd1000;
      u_mem.mem[C_W + i] = '1;
    end
    aeg_write(1, 0, AEG_ARG0 + 0, 64'(C_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 1, 64'(B_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 2, 64'(A_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 3, 64'(w));
    aeg_write(1, 0, AEG_ARG0 + 4, 64'(w));
    t0 = int'(cycle);
    enqueue_2d(w);
    $display("matrixMul %0dx%0d: %0d work-groups of 4x4, %0d cycles", w, w, (w/L)*(w/L), int'(cycle) - t0);
    for (int y = 0; y < w; y++)
      for (int x = 0; x < w; x++) begin
        logic [63:0] v = 0;
        for (int k = 0; k < w; k++) v += u_mem.mem[A_W + y*w + k] * u_mem.mem[B_W + k*w + x];
        check(u_mem.mem[C_W + y*w + x] == v, $sformatf("%0dx%0d C[%0d][%0d]", w, w, y, x));
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_matmul(4);
    run_matmul(8);
    run_matmul(12);
    run_matmul(16);
    $display("mechanisms: redispatch=%0d small_path=%0d mem_stalls=%0d", n_redispatch, n_small_path, u_mem.stalls);
    check(n_redispatch > 0, "polling re-dispatch happened");
    check(n_small_path > 0, "small work-group count path happened");
    check(u_mem.stalls > 0, "memory stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
