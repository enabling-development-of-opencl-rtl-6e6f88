// tb_matmul_core: self-checking test of the matrixMul processing element.
//
// The bus_mem_model holds C (port 0), B (port 1) and A (port 2). For a
// square 5x5 product every work-item (tx, ty) is run and C[ty*wA+tx] is
// compared with sum_k A[ty*wA+k]*B[k*wB+tx] computed here (64-bit
// wrap-around), under random stalls and latencies. A rectangular case
// (wA=3, wB=4) and an empty loop (wA=0 stores 0) are run too. With
// 1-cycle memory and no stalls it checks that the cycle count grows by the
// same amount for every loop iteration.
module tb_matmul_core;
  import ocl_pkg::*;

  localparam int unsigned WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ap_start = 0, ap_done, ap_idle, ap_ready;
  logic [IDX_W-1:0] tx = 0, ty = 0, wa = 0, wb = 0;
  logic     [NUM_BUS-1:0]             req_valid, req_ready, rsp_valid;
  bus_req_t [NUM_BUS-1:0]             req;
  logic     [NUM_BUS-1:0][DATA_W-1:0] rsp_data;

  matmul_core dut (
    .clk(clk), .rst_n(rst_n), .ap_start(ap_start), .ap_done(ap_done), .ap_idle(ap_idle),
    .ap_ready(ap_ready), .global_id_0(tx), .global_id_1(ty), .arg_wa(wa), .arg_wb(wb),
    .bus_req_valid(req_valid), .bus_req(req), .bus_req_ready(req_ready),
    .bus_rsp_valid(rsp_valid), .bus_rsp_data(rsp_data));

  bus_mem_model #(.WORDS(WORDS), .MAX_LAT(4), .STALL_PCT(30)) u_mem (
    .clk(clk), .req_valid(req_valid), .req(req), .req_ready(req_ready),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ma [WORDS], mb [WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_item(input int x, input int y, input int a_w, input int b_w, output int cycles);
    tx = IDX_W'(x); ty = IDX_W'(y); wa = IDX_W'(a_w); wb = IDX_W'(b_w);
    @(negedge clk) ap_start = 1;
    @(negedge clk) ap_start = 0;
    cycles = 1;
    while (!ap_done) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  function automatic logic [DATA_W-1:0] ref_value(int x, int y, int a_w, int b_w);
    logic [DATA_W-1:0] v = 0;
    for (int k = 0; k < a_w; k++) v += ma[y*a_w + k] * mb[k*b_w + x];
    return v;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, c0, c1, c2, c3;
    for (int i = 0; i < int'(WORDS); i++) begin
      ma[i] = {$urandom, $urandom}; mb[i] = (i % 3 == 0) ? {$urandom, $urandom} : 64'($urandom % 1000);
      u_mem.mem[2][i] = ma[i]; u_mem.mem[1][i] = mb[i]; u_mem.mem[0][i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // square 5x5
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) begin
        run_item(x, y, 5, 5, cyc);
        check(u_mem.mem[0][y*5 + x] == ref_value(x, y, 5, 5),
              $sformatf("C[%0d][%0d]=%h expected %h", y, x, u_mem.mem[0][y*5 + x], ref_value(x, y, 5, 5)));
      end
    // rectangular: wA = 3, wB = 4 (output index ty*wA+tx as in the kernel)
    for (int y = 0; y < 2; y++)
      for (int x = 0; x < 3; x++) begin
        run_item(x, y, 3, 4, cyc);
        check(u_mem.mem[0][y*3 + x] == ref_value(x, y, 3, 4), $sformatf("rect C idx %0d", y*3 + x));
      end
    // empty loop
    u_mem.mem[0][1] = 64'h1234;
    run_item(1, 2, 0, 0, cyc);           // C[2*0 + 1]
    check(u_mem.mem[0][1] == 64'd0, "wA=0 stores zero");

    // timing without stalls: constant cost per iteration
    force u_mem.req_ready = '1;
    u_mem.fixed_lat = 1;
    run_item(0, 0, 0, 0, c0);
    run_item(0, 0, 1, 1, c1);
    run_item(0, 0, 2, 2, c2);
    run_item(0, 0, 3, 3, c3);
    $display("cycles for wA=0..3: %0d %0d %0d %0d", c0, c1, c2, c3);
    check(c1 - c0 == 4 && c2 - c1 == 4 && c3 - c2 == 4, "4 cycles per iteration with 1-cycle memory");
    release u_mem.req_ready;
    check(u_mem.stalls > 0, "memory stalls were exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
