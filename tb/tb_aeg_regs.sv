// tb_aeg_regs: self-checking test of the application engine registers.
//
// Random writes and reads over the register range and beyond are compared
// with a reference array; AEG_DONE must read the status input and ignore
// writes; indices past the last register read as zero.
module tb_aeg_regs;
  import ocl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0, status = 0;
  logic [AEG_IDX_W-1:0] wr_idx = '0, rd_idx = '0;
  logic [AEG_W-1:0] wr_data = '0, rd_data;
  logic [NUM_AEG-1:0][AEG_W-1:0] regs;

  aeg_regs dut (.clk(clk), .rst_n(rst_n), .we(we), .wr_idx(wr_idx), .wr_data(wr_data),
                .rd_idx(rd_idx), .rd_data(rd_data), .status_done(status), .regs(regs));

  int checks = 0, failures = 0;
  logic [AEG_W-1:0] model [NUM_AEG];
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
    for (int i = 0; i < int'(NUM_AEG); i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int ri;
      @(negedge clk);
      we = $urandom % 2;
      wr_idx = AEG_IDX_W'($urandom % (NUM_AEG + 4));
      wr_data = {$urandom, $urandom};
      status = $urandom % 2;
      ri = $urandom % (NUM_AEG + 4);
      rd_idx = AEG_IDX_W'(ri);
      #1;
      if (ri == int'(AEG_DONE)) check(rd_data == AEG_W'(status), "AEG_DONE reads status");
      else if (ri < int'(NUM_AEG)) check(rd_data == model[ri], $sformatf("read AEG %0d", ri));
      else check(rd_data == '0, "out-of-range read is zero");
      if (ri < int'(NUM_AEG) && ri != int'(AEG_DONE))
        check(regs[ri] == model[ri], "regs output matches");
      @(posedge clk);
      if (we && wr_idx < AEG_IDX_W'(NUM_AEG) && wr_idx != AEG_IDX_W'(AEG_DONE)) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
