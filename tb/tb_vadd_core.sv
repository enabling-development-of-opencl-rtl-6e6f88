// tb_vadd_core: self-checking test of the VectorAdd processing element.
//
// A bus_mem_model holds the three vectors a, b, c (one array each). The
// test runs work-items with in-range, boundary, and out-of-range
// global IDs, under random memory stalls and latencies, and checks
// c[gid] = a[gid] + b[gid] (64-bit wrap-around) for in-range IDs and that
// c stays untouched otherwise. With no stalls and 1-cycle latency it checks
// the cycle count from start to done (7 cycles in range, 2 out of range).
module tb_vadd_core;
  import ocl_pkg::*;

  localparam int unsigned WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ap_start = 0, ap_done, ap_idle, ap_ready;
  logic [IDX_W-1:0] gid = 0, n = 0;
  logic     [NUM_BUS-1:0]             req_valid, req_ready, rsp_valid;
  bus_req_t [NUM_BUS-1:0]             req;
  logic     [NUM_BUS-1:0][DATA_W-1:0] rsp_data;

  vadd_core dut (
    .clk(clk), .rst_n(rst_n), .ap_start(ap_start), .ap_done(ap_done), .ap_idle(ap_idle),
    .ap_ready(ap_ready), .global_id_0(gid), .arg_n(n),
    .bus_req_valid(req_valid), .bus_req(req), .bus_req_ready(req_ready),
    .bus_rsp_valid(rsp_valid), .bus_rsp_data(rsp_data));

  bus_mem_model #(.WORDS(WORDS), .MAX_LAT(4), .STALL_PCT(30)) u_mem (
    .clk(clk), .req_valid(req_valid), .req(req), .req_ready(req_ready),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ea [WORDS], eb [WORDS], ec [WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one work-item, returns cycles from start to done.
  task automatic run_item(input int g, input int num, output int cycles);
    gid = IDX_W'(g); n = IDX_W'(num);
    @(negedge clk) ap_start = 1;
    @(negedge clk) ap_start = 0;
    cycles = 1;
    while (!ap_done) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < int'(WORDS); i++) begin
      ea[i] = {$urandom, $urandom}; eb[i] = {$urandom, $urandom}; ec[i] = {$urandom, $urandom};
      u_mem.mem[0][i] = ea[i]; u_mem.mem[1][i] = eb[i]; u_mem.mem[2][i] = ec[i];
    end
    ea[5] = 64'hFFFF_FFFF_FFFF_FFFF; u_mem.mem[0][5] = ea[5];   // wrap-around sum
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ap_idle, "idle after reset");

    // every index of a 40-element vector, plus out-of-range ones
    for (int g = 0; g < int'(WORDS); g++) begin
      run_item(g, 40, cyc);
      if (g < 40) ec[g] = ea[g] + eb[g];
    end
    for (int i = 0; i < int'(WORDS); i++)
      check(u_mem.mem[2][i] == ec[i], $sformatf("c[%0d]=%h expected %h", i, u_mem.mem[2][i], ec[i]));

    // cycle counts without stalls, 1-cycle memory
    u_mem.writes = 0;
    force u_mem.req_ready = '1;
    u_mem.fixed_lat = 1;
    run_item(7, 40, cyc);
    $display("in-range work-item: %0d cycles", cyc);
    check(cyc == 7, $sformatf("in-range latency %0d", cyc));
    run_item(50, 40, cyc);
    check(cyc == 2, $sformatf("out-of-range latency %0d", cyc));
    check(u_mem.writes == 1, "one write for two work-items, one out of range");
    release u_mem.req_ready;
    check(u_mem.stalls > 0, "memory stalls were exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
