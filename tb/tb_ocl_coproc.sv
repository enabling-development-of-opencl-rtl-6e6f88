// tb_ocl_coproc: end-to-end test of the OpenCL compute device running VectorAdd at its default configuration
// (four AEs of 16 cores, 16 memory-controller ports each).
//
// A behavioural global memory serves all memory-controller ports (random
// stalls, fixed latency). A host model does what the host library does:
// it writes the vectors into global memory (standing in for
// clEnqueueWriteBuffer), broadcasts the kernel arguments a, b, c and
// iNumElements into AEG 10..13 of every AE (clSetKernelArg), and runs the
// polling work-group scheduler of clEnqueueNDRangeKernel: the number of
// work-groups is rounded up; with more than three it starts the first
// NUM_AE groups at once and then hands the next group to the first free AE
// it sees in AE_DONE; with three or fewer it starts them on AE 2..0 and
// waits for their done bits. It then waits until every AE is free and
// compares c with a + b; elements past iNumElements must stay untouched.
// Vector sizes: 40, 20, 1000, 256, 512, 1024, 2048, 4096. Mechanisms counted (each must occur): polling
// re-dispatch, the small-group path, out-of-range work-items, two or more
// AEs busy at once, memory-port stalls and two bus ports of one core
// competing in its memory access module. Cycle counts per run are printed.
module tb_ocl_coproc;
  import ocl_pkg::*;

  localparam int unsigned NUM_AE = 4;
  localparam int unsigned LOCAL  = 16;
  localparam int unsigned PORTS  = 16;
  localparam int unsigned NP     = NUM_AE * PORTS;
  localparam int unsigned WORDS  = 16384;
  localparam int unsigned A_W = 0, B_W = 4096, C_W = 8192;   // vector word offsets

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

  ocl_coproc dut (.*);

  global_mem_model #(.PORTS(NP), .WORDS(WORDS), .LAT(12), .STALL_PCT(20)) u_mem (
    .clk(clk), .req_valid(mc_req_valid), .req(mc_req), .req_ready(mc_req_ready),
    .rsp_valid(mc_rsp_valid), .rsp(mc_rsp));

  int checks = 0, failures = 0;
  int n_redispatch = 0, n_small_path = 0, n_out_of_range = 0, n_concurrent = 0, n_compete = 0;

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

  // mechanism monitors and a cycle counter
  int unsigned cycle = 0;
  logic        prev_acc = 0;
  logic [1:0]  prev_bus = '0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && $countones(~ae_done) >= 2) n_concurrent++;
    // bus ports of core 0 competed: its port accepts requests of two
    // different bus ports (low tag bits) in consecutive cycles
    if (mc_req_valid[0] && mc_req_ready[0]) begin
      if (prev_acc && mc_req[0].tag[1:0] != prev_bus) n_compete++;
      prev_bus <= mc_req[0].tag[1:0];
    end
    prev_acc <= mc_req_valid[0] && mc_req_ready[0];
  end

  // ---------------- host model ----------------
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

  task automatic cop_call(input int ae, input int group);
    aeg_write(0, ae, AEG_GRID, 64'(group));
    @(negedge clk) ae_start[ae] = 1;
    @(negedge clk) ae_start[ae] = 0;
  endtask

  task automatic enqueue_ndrange(input int global_size, input int local_size);
    int workgroups, workg;
    logic [63:0] free_ae;
    workgroups = global_size / local_size + ((global_size % local_size) ? 1 : 0);
    workg = 0;
    if (workgroups > 3) begin
      for (int ae = 0; ae < int'(NUM_AE); ae++) cop_call(ae, ae);
      workg = NUM_AE;
      while (workg < workgroups) begin
        aeg_read(0, AEG_DONE, free_ae);
        while (free_ae[NUM_AE-1:0] != 0 && workg < workgroups) begin
          for (int ae = 0; ae < int'(NUM_AE); ae++)
            if (free_ae[ae]) begin
              cop_call(ae, workg);
              workg++;
              n_redispatch++;
              free_ae[ae] = 1'b0;
              break;
            end
        end
      end
    end else begin
      n_small_path++;
      for (int g = workgroups - 1; g >= 0; g--) cop_call(g, g);
    end
    // blocking call: wait until every AE is free again
    do aeg_read(0, AEG_DONE, free_ae); while (free_ae[NUM_AE-1:0] != '1);
  endtask

  task automatic run_vadd(input int n);
    int padded, t0;
    logic [63:0] a, b;
    padded = ((n + LOCAL - 1) / LOCAL) * LOCAL;
    if (padded != n) n_out_of_range++;
    for (int i = 0; i < padded + 8; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      u_mem.mem[A_W + i] = a; u_mem.mem[B_W + i] = b;
      u_mem.mem[C_W + i] = 64'hDEAD_BEEF_0000_0000 | 64'(i);
    end
    aeg_write(1, 0, AEG_ARG0 + 0, 64'(A_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 1, 64'(B_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 2, 64'(C_W * 8));
    aeg_write(1, 0, AEG_ARG0 + 3, 64'(n));
    t0 = int'(cycle);
    enqueue_ndrange(n, LOCAL);
    $display("VectorAdd n=%0d: %0d work-groups of %0d, %0d cycles (%0.3f ms at 150 MHz)",
             n, padded / LOCAL, LOCAL, int'(cycle) - t0, real'(int'(cycle) - t0) / 150000.0);
    for (int i = 0; i < padded + 8; i++)
      if (i < n) check(u_mem.mem[C_W + i] == u_mem.mem[A_W + i] + u_mem.mem[B_W + i],
                       $sformatf("n=%0d c[%0d]", n, i));
      else check(u_mem.mem[C_W + i] == (64'hDEAD_BEEF_0000_0000 | 64'(i)),
                 $sformatf("n=%0d c[%0d] beyond the vector was written", n, i));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ae_done == '1, "all AEs free after reset");
    foreach (SIZES[k]) run_vadd(SIZES[k]);
    $display("mechanisms: redispatch=%0d small_path=%0d out_of_range=%0d concurrent_cycles=%0d compete_cycles=%0d mem_stalls=%0d",
             n_redispatch, n_small_path, n_out_of_range, n_concurrent, n_compete, u_mem.stalls);
    check(n_redispatch > 0, "polling re-dispatch happened");
    check(n_small_path > 0, "small work-group count path happened");
    check(n_out_of_range > 0, "out-of-range work-items happened");
    check(n_concurrent > 0, "several AEs were busy at once");
    check(u_mem.stalls > 0, "memory-port stalls happened");
    check(n_compete > 0, "bus ports of one core competed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SIZES [8] = '{40, 20, 1000, 256, 512, 1024, 2048, 4096};
endmodule
