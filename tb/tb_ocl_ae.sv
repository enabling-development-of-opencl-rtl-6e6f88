// tb_ocl_ae: self-checking test of one application engine.
//
// Two AEs are tested side by side, each with only 4 memory-controller
// ports so that several cores share one round-robin arbiter:
//   - VectorAdd, 8 cores: the host model writes a, b, c, iNumElements and
//     runs work-groups 0..4 of a 37-element vector (the last one partly
//     out of range) one after another;
//   - matrixMul, 4x4 cores: an 8x8 product, groups (0,0),(1,0),(0,1),(1,1).
// Checks: 'done' drops right after start and rises when the group is
// finished, results equal the reference, elements outside the vector are
// untouched, and two cores of one arbiter competed for its port.
module tb_ocl_ae;
  import ocl_pkg::*;
  localparam int unsigned P = 4, WORDS = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // VectorAdd AE
  logic                 v_we = 0, v_start = 0, v_done;
  logic [AEG_IDX_W-1:0] v_widx = '0;
  logic [AEG_W-1:0]     v_wdata = '0, v_rdata;
  logic     [P-1:0]     v_req_valid, v_req_ready, v_rsp_valid;
  mem_req_t [P-1:0]     v_req;
  mem_rsp_t [P-1:0]     v_rsp;
  // matrixMul AE
  logic                 m_we = 0, m_start = 0, m_done;
  logic [AEG_IDX_W-1:0] m_widx = '0;
  logic [AEG_W-1:0]     m_wdata = '0, m_rdata;
  logic     [P-1:0]     m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t [P-1:0]     m_req;
  mem_rsp_t [P-1:0]     m_rsp;

  ocl_ae #(.KERNEL(K_VADD), .LOCAL_SIZE_0(8), .LOCAL_SIZE_1(1), .NUM_MC_PORTS(P)) u_vadd (
    .clk(clk), .rst_n(rst_n), .aeg_we(v_we), .aeg_wr_idx(v_widx), .aeg_wr_data(v_wdata),
    .aeg_rd_idx(AEG_IDX_W'(AEG_DONE)), .aeg_rd_data(v_rdata), .start(v_start), .done(v_done),
    .mc_req_valid(v_req_valid), .mc_req(v_req), .mc_req_ready(v_req_ready),
    .mc_rsp_valid(v_rsp_valid), .mc_rsp(v_rsp));
  global_mem_model #(.PORTS(P), .WORDS(WORDS), .LAT(6), .STALL_PCT(25)) u_vmem (
    .clk(clk), .req_valid(v_req_valid), .req(v_req), .req_ready(v_req_ready),
    .rsp_valid(v_rsp_valid), .rsp(v_rsp));

  ocl_ae #(.KERNEL(K_MATMUL), .LOCAL_SIZE_0(4), .LOCAL_SIZE_1(4), .NUM_MC_PORTS(P)) u_mm (
    .clk(clk), .rst_n(rst_n), .aeg_we(m_we), .aeg_wr_idx(m_widx), .aeg_wr_data(m_wdata),
    .aeg_rd_idx(AEG_IDX_W'(AEG_DONE)), .aeg_rd_data(m_rdata), .start(m_start), .done(m_done),
    .mc_req_valid(m_req_valid), .mc_req(m_req), .mc_req_ready(m_req_ready),
    .mc_rsp_valid(m_rsp_valid), .mc_rsp(m_rsp));
  global_mem_model #(.PORTS(P), .WORDS(WORDS), .LAT(6), .STALL_PCT(25)) u_mmem (
    .clk(clk), .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .rsp_valid(m_rsp_valid), .rsp(m_rsp));

  int checks = 0, failures = 0, n_compete = 0;
  // Two cores of port 0 competed: port 0 accepts requests of two different
  // cores (low tag bits) in consecutive cycles.
  logic       prev_acc = 0;
  logic [1:0] prev_core = '0;
  always @(posedge clk) begin
    if (v_req_valid[0] && v_req_ready[0]) begin
      if (prev_acc && v_req[0].tag[0] != prev_core[0]) n_compete++;
      prev_core <= v_req[0].tag[1:0];
    end
    prev_acc <= v_req_valid[0] && v_req_ready[0];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic v_write(input int idx, input logic [63:0] d);
    @(negedge clk) begin v_we = 1; v_widx = AEG_IDX_W'(idx); v_wdata = d; end
    @(negedge clk) v_we = 0;
  endtask
  task automatic m_write(input int idx, input logic [63:0] d);
    @(negedge clk) begin m_we = 1; m_widx = AEG_IDX_W'(idx); m_wdata = d; end
    @(negedge clk) m_we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(v_done && m_done && v_rdata == 64'd1, "AEs free after reset, AE_DONE reads 1");

    // ---- VectorAdd: a at word 0, b at 256, c at 512, n = 37
    for (int i = 0; i < 48; i++) begin
      u_vmem.mem[i] = {$urandom, $urandom}; u_vmem.mem[256 + i] = {$urandom, $urandom};
      u_vmem.mem[512 + i] = 64'h5555;
    end
    v_write(AEG_ARG0 + 0, 0);
    v_write(AEG_ARG0 + 1, 256 * 8);
    v_write(AEG_ARG0 + 2, 512 * 8);
    v_write(AEG_ARG0 + 3, 37);
    for (int g = 0; g < 5; g++) begin
      v_write(AEG_GRID, 64'(g));
      @(negedge clk) v_start = 1;
      @(negedge clk) v_start = 0;
      check(!v_done && v_rdata == 64'd0, "done low while the group runs");
      while (!v_done) @(negedge clk);
    end
    for (int i = 0; i < 48; i++)
      if (i < 37) check(u_vmem.mem[512 + i] == u_vmem.mem[i] + u_vmem.mem[256 + i], $sformatf("c[%0d]", i));
      else check(u_vmem.mem[512 + i] == 64'h5555, $sformatf("c[%0d] untouched", i));
    check(n_compete > 0, "cores competed for an arbiter");

    // ---- matrixMul 8x8: C at word 0, B at 256, A at 512
    for (int i = 0; i < 64; i++) begin
      u_mmem.mem[512 + i] = 64'($urandom % 100); u_mmem.mem[256 + i] = 64'($urandom % 100);
      u_mmem.mem[i] = '0;
    end
    m_write(AEG_ARG0 + 0, 0);
    m_write(AEG_ARG0 + 1, 256 * 8);
    m_write(AEG_ARG0 + 2, 512 * 8);
    m_write(AEG_ARG0 + 3, 8);
    m_write(AEG_ARG0 + 4, 8);
    for (int g = 0; g < 4; g++) begin
      m_write(AEG_GRID, {32'(g / 2), 32'(g % 2)});
      @(negedge clk) m_start = 1;
      @(negedge clk) m_start = 0;
      while (!m_done) @(negedge clk);
    end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        logic [63:0] v;
        v = 0;
        for (int k = 0; k < 8; k++) v += u_mmem.mem[512 + y*8 + k] * u_mmem.mem[256 + k*8 + x];
        check(u_mmem.mem[y*8 + x] == v, $sformatf("C[%0d][%0d]", y, x));
      end
    $display("arbiter competition cycles: %0d", n_compete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
