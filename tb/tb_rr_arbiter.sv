// tb_rr_arbiter: self-checking test of the round-robin grant logic.
//
// Random request vectors with random advance/hold are applied to a 4-way
// arbiter; the grant is compared every cycle with a reference model
// (pointer, lowest-index search from the pointer, frozen grant while held).
// With all four requesting and advance every cycle the grant must rotate
// 0, 1, 2, 3, 0, ...
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, grant;
  logic         advance = 0, hold = 0;
  logic [1:0]   grant_idx;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .advance(advance),
                           .hold(hold), .grant(grant), .grant_idx(grant_idx));

  int checks = 0, failures = 0;
  int ptr = 0, locked = 0, lock_g = -1;

  function automatic int model_grant();
    if (locked) return lock_g;
    for (int k = 0; k < N; k++) if (req[(ptr + k) % N]) return (ptr + k) % N;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!locked) req = N'($urandom);
      else req = N'($urandom) | (N'(1) << lock_g);   // a waiting requester keeps its request
      advance = ($urandom % 3) == 0;
      hold    = !advance && ($urandom % 2);
      #1;
      g = model_grant();
      checks++;
      if ((g < 0 && grant != '0) || (g >= 0 && (grant != (N'(1) << g) || grant_idx != 2'(g)))) begin
        failures++;
        $display("FAIL cycle %0d: req=%b grant=%b expected %0d", cyc, req, grant, g);
      end
      @(posedge clk);
      if (g >= 0) begin
        if (advance) begin ptr = (g + 1) % N; locked = 0; end
        else if (hold) begin locked = 1; lock_g = g; end
      end
    end
    // rotation under full load
    @(negedge clk);
    req = '1; advance = 1; hold = 0;
    #1 g = grant_idx;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (grant_idx != 2'((g + i) % N)) begin failures++; $display("FAIL rotation step %0d", i); end
      @(negedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
