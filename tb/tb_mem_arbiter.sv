// tb_mem_arbiter: self-checking test of the request arbiter with response
// routing.
//
// Three requesters issue random reads and writes with their own tags and
// hold each request until accepted. The memory side has random ready and
// answers the outstanding requests in random order. Checks: every request
// reaches the port unchanged except for the requester number in the low
// tag bits, every response comes back to the requester that issued it
// with its original tag and the right data, and under full load the three
// requesters are served in turn.
module tb_mem_arbiter;
  import ocl_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [N-1:0] in_req_valid = '0, in_req_ready, in_rsp_valid;
  mem_req_t [N-1:0] in_req = '0;
  mem_rsp_t [N-1:0] in_rsp;
  logic             out_req_valid, out_req_ready = 0, out_rsp_valid = 0;
  mem_req_t         out_req;
  mem_rsp_t         out_rsp = '0;

  mem_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], got [N];
  logic [ADDR_W-1:0] exp_addr [N][1024];
  mem_req_t pendq [$];
  int last_grant = -1, rotations_ok = 0;
  bit full_load = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] data_of(logic [ADDR_W-1:0] a);
    return {16'hA5A5, a};
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // requesters
  for (genvar r = 0; r < N; r++) begin : g_req
    always @(posedge clk) begin : proc
      logic [ADDR_W-1:0] a;
      if (rst_n) begin
        if (in_req_valid[r] && in_req_ready[r]) begin
          in_req_valid[r] <= 1'b0;
          sent[r]++;
        end
        if ((!in_req_valid[r] || in_req_ready[r]) && sent[r] < 200 && (full_load || $urandom % 2)) begin
          in_req_valid[r]    <= 1'b1;
          in_req[r].write    <= $urandom % 2;
          a = ADDR_W'({r[7:0], 16'($urandom)});
          exp_addr[r][sent[r]] = a;
          in_req[r].addr     <= a;
          in_req[r].wdata    <= '0;
          in_req[r].tag      <= TAG_W'({r[3:0], 10'(sent[r])});
        end
        if (in_rsp_valid[r]) begin
          got[r]++;
          check(in_rsp[r].tag[13:10] == 4'(r), $sformatf("response tag %h at requester %0d", in_rsp[r].tag, r));
          if (!in_rsp[r].write)
            check(in_rsp[r].rdata == data_of(exp_addr[r][in_rsp[r].tag[9:0]]),
                  $sformatf("read data at requester %0d", r));
        end
      end
    end
  end

  // memory side: accept, answer in random order
  always @(posedge clk) begin
    out_rsp_valid <= 1'b0;
    if (out_req_valid && out_req_ready) begin
      int r;
      r = int'(out_req.tag[1:0]);
      check(r < N, "requester number in low tag bits");
      check(out_req.tag[15:12] == 4'(r) && out_req.addr[23:16] == 8'(r),
            $sformatf("request tag %h / addr %h belong to requester %0d", out_req.tag, out_req.addr, r));
      pendq.push_back(out_req);
      if (full_load) begin
        if (last_grant >= 0) rotations_ok += (r == (last_grant + 1) % N);
        last_grant = r;
      end
    end
    if (pendq.size() > 0 && $urandom % 2) begin
      int i;
      mem_req_t q;
      i = $urandom % pendq.size();
      q = pendq[i];
      pendq.delete(i);
      out_rsp_valid <= 1'b1;
      out_rsp.write <= q.write;
      out_rsp.tag   <= q.tag;
      out_rsp.rdata <= data_of(q.addr);
    end
    out_req_ready <= full_load ? 1'b1 : ($urandom % 3 != 0);
  end

  initial begin
    for (int r = 0; r < N; r++) begin sent[r] = 0; got[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (sent[0] == 200 && sent[1] == 200 && sent[2] == 200);
    wait (pendq.size() == 0);
    repeat (5) @(negedge clk);
    for (int r = 0; r < N; r++) check(got[r] == 200, $sformatf("requester %0d got %0d of 200 responses", r, got[r]));
    // full load: fairness
    for (int r = 0; r < N; r++) sent[r] = 100;
    full_load = 1;
    wait (sent[0] == 200 && sent[1] == 200 && sent[2] == 200);
    full_load = 0;
    $display("round-robin turns under full load: %0d", rotations_ok);
    check(rotations_ok >= 250, "requesters served in turn under full load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
