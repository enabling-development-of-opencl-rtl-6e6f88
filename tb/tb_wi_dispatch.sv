// tb_wi_dispatch: self-checking test of work-item ID generation and
// dispatch, for a 4x4 work-group (the 2-D configuration).
//
// For several work-group IDs it checks that every core gets global ID
// (gx*4 + c%4, gy*4 + c/4), that all cores are started in the same single
// cycle, that local IDs and the group ID are presented, and that 'done'
// pulses once, exactly one cycle after the last core reports done and not
// before, with cores finishing in random order.
module tb_wi_dispatch;
  import ocl_pkg::*;
  localparam int L0 = 4, L1 = 4, NC = L0 * L1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [IDX_W-1:0] g0 = 0, g1 = 0;
  logic [NC-1:0] core_start, core_done = '0;
  logic [NC-1:0][IDX_W-1:0] gid0, gid1, lid0, lid1;
  logic [IDX_W-1:0] grp0, grp1;

  wi_dispatch #(.LOCAL_SIZE_0(L0), .LOCAL_SIZE_1(L1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .group_id_0(g0), .group_id_1(g1), .busy(busy),
    .done(done), .core_start(core_start), .global_id_0(gid0), .global_id_1(gid1),
    .local_id_0(lid0), .local_id_1(lid1), .group_id_q_0(grp0), .group_id_q_1(grp1),
    .core_done(core_done));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && core_start == '0, "idle after reset");
    for (int t = 0; t < 12; t++) begin
      int gx, gy, cyc;
      logic [NC-1:0] pending;
      gx = $urandom % 50; gy = $urandom % 50;
      g0 = IDX_W'(gx); g1 = IDX_W'(gy);
      start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (core_start == '0 && cyc < 10) begin @(negedge clk); cyc++; end
      check(core_start == '1, "all cores started together");
      for (int c = 0; c < NC; c++)
        check(gid0[c] == IDX_W'(gx*L0 + c%L0) && gid1[c] == IDX_W'(gy*L1 + c/L0),
              $sformatf("core %0d ids (%0d,%0d) group (%0d,%0d)", c, gid0[c], gid1[c], gx, gy));
      for (int c = 0; c < NC; c++)
        check(lid0[c] == IDX_W'(c%L0) && lid1[c] == IDX_W'(c/L0), $sformatf("core %0d local id", c));
      check(grp0 == IDX_W'(gx) && grp1 == IDX_W'(gy), "group id held for the cores");
      @(negedge clk);
      check(core_start == '0, "start is a single pulse");
      pending = '1;
      while (pending != '0) begin
        logic [NC-1:0] fin;
        fin = NC'({$urandom, $urandom}) & NC'({$urandom}) & pending;
        core_done = fin;
        pending &= ~fin;
        @(negedge clk);
        core_done = '0;
        if (pending != '0) check(!done, "no done before the last core");
      end
      check(done, "done one cycle after the last core");
      @(negedge clk);
      check(!done && !busy, "done is a pulse, back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
