// tb_core_wrapper: self-checking test of a core's memory access module.
//
// Three bus ports (as a kernel core drives them) issue reads and writes at
// random element indices, including negative ones, with one request
// outstanding per port, into a global_mem_model whose word w holds
// 64'hC0DE_0000_0000_0000 + w (and a reference copy tracks writes). Each port has its own pointer. Checks: the
// read data equals the word at pointer + 8 * index, writes land there, and
// every response reaches the port that asked.
module tb_core_wrapper;
  import ocl_pkg::*;
  localparam int unsigned WORDS = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [NUM_BUS-1:0]             bus_req_valid = '0, bus_req_ready, bus_rsp_valid;
  bus_req_t [NUM_BUS-1:0]             bus_req = '0;
  logic     [NUM_BUS-1:0][DATA_W-1:0] bus_rsp_data;
  logic     [NUM_BUS-1:0][ADDR_W-1:0] base_addr;
  logic               mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t           mem_req;
  mem_rsp_t           mem_rsp;

  core_wrapper dut (.*);

  global_mem_model #(.PORTS(1), .WORDS(WORDS), .LAT(3), .STALL_PCT(25)) u_mem (
    .clk(clk), .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  int checks = 0, failures = 0;
  int done_cnt [NUM_BUS];
  logic [DATA_W-1:0] ref_mem [WORDS];
  logic              busy [NUM_BUS];
  logic [31:0]       exp_word [NUM_BUS];
  logic              exp_wr [NUM_BUS];
  logic [DATA_W-1:0] exp_wdata [NUM_BUS];

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

  assign base_addr[0] = 48'd8 * 1000;
  assign base_addr[1] = 48'd8 * 2000;
  assign base_addr[2] = 48'd8 * 3000;

  for (genvar p = 0; p < NUM_BUS; p++) begin : g_port
    always @(posedge clk) begin
      if (rst_n) begin
        if (bus_req_valid[p] && bus_req_ready[p]) bus_req_valid[p] <= 1'b0;
        if (bus_rsp_valid[p]) begin
          check(busy[p], $sformatf("response on idle port %0d", p));
          if (!exp_wr[p])
            check(bus_rsp_data[p] == ref_mem[exp_word[p]],
                  $sformatf("port %0d read %h expected word %0d", p, bus_rsp_data[p], exp_word[p]));
          else begin
            check(u_mem.mem[exp_word[p]] == exp_wdata[p], $sformatf("port %0d write landed", p));
            ref_mem[exp_word[p]] = exp_wdata[p];
          end
          busy[p] = 1'b0;
          done_cnt[p]++;
        end
        if (!busy[p] && done_cnt[p] < 150 && $urandom % 2) begin
          int signed idx;
          idx = int'($urandom % 1000) - 500;
          busy[p]            = 1'b1;
          exp_word[p]        = 32'(int'(base_addr[p] >> 3) + idx);
          exp_wr[p]          = ($urandom % 4 == 0);
          exp_wdata[p]       = {$urandom, $urandom};
          bus_req_valid[p]  <= 1'b1;
          bus_req[p].idx    <= IDX_W'(idx);
          bus_req[p].write  <= exp_wr[p];
          bus_req[p].wdata  <= exp_wdata[p];
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < int'(NUM_BUS); p++) begin done_cnt[p] = 0; busy[p] = 0; end
    for (int w = 0; w < int'(WORDS); w++) begin
      u_mem.mem[w] = 64'hC0DE_0000_0000_0000 + 64'(w);
      ref_mem[w]   = u_mem.mem[w];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done_cnt[0] == 150 && done_cnt[1] == 150 && done_cnt[2] == 150);
    check(u_mem.stalls > 0, "port stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
