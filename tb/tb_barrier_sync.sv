// tb_barrier_sync: self-checking test of the work-group barrier.
//
// Sixteen cores arrive at a barrier one or a few at a time in random order
// (hit pulses); barrier_done must stay low until the last arrival and then
// pulse for all cores exactly once. Repeated barriers must work, and the
// 'passed' counter must match the number of completed barriers.
module tb_barrier_sync;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] hit = '0, bdone;
  logic [15:0]  passed;

  barrier_sync #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .barrier_hit(hit),
                             .barrier_done(bdone), .passed(passed));

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
    for (int b = 0; b < 20; b++) begin
      logic [N-1:0] waiting;
      waiting = '1;
      while (waiting != '0) begin
        logic [N-1:0] arrive;
        arrive = N'($urandom) & N'($urandom) & waiting;
        hit = arrive;
        waiting &= ~arrive;
        @(negedge clk);
        hit = '0;
        if (waiting != '0) check(bdone == '0, $sformatf("barrier %0d released early", b));
        else check(bdone == '1, $sformatf("barrier %0d released all cores", b));
        repeat ($urandom % 3) begin
          @(negedge clk);
          if (waiting != '0) check(bdone == '0, "no release while cores are missing");
        end
      end
      @(negedge clk);
      check(bdone == '0, "release is a single pulse");
    end
    check(passed == 16'd20, $sformatf("passed counter %0d", passed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
