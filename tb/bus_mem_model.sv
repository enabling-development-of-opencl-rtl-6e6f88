// bus_mem_model: test memory for a single kernel core's ap_bus ports.
//
// Each of NUM_BUS ports has its own array of WORDS 64-bit words, indexed by
// the element index modulo WORDS (one array per pointer argument). A port
// takes at most one request at a time: 'ready' is random with probability
// (100-STALL_PCT)% and the response pulse follows 1..MAX_LAT cycles after
// acceptance (reads return the word, writes store it and are acknowledged).
// Counters report accepted requests, stall cycles and writes.
module bus_mem_model
  import ocl_pkg::*;
#(
  parameter int unsigned WORDS     = 256,
  parameter int unsigned MAX_LAT   = 4,
  parameter int unsigned STALL_PCT = 30
) (
  input  logic                               clk,
  input  logic     [NUM_BUS-1:0]             req_valid,
  input  bus_req_t [NUM_BUS-1:0]             req,
  output logic     [NUM_BUS-1:0]             req_ready,
  output logic     [NUM_BUS-1:0]             rsp_valid,
  output logic     [NUM_BUS-1:0][DATA_W-1:0] rsp_data
);
  logic [DATA_W-1:0] mem [NUM_BUS][WORDS];
  int unsigned       wait_cnt [NUM_BUS];
  logic              pending  [NUM_BUS];
  logic [DATA_W-1:0] pend_data [NUM_BUS];
  int unsigned       accepted, stalls, writes;
  int unsigned       fixed_lat;   // nonzero: use this latency instead of a random one

  initial begin
    accepted = 0; stalls = 0; writes = 0; fixed_lat = 0;
    for (int p = 0; p < NUM_BUS; p++) begin
      pending[p] = 1'b0; wait_cnt[p] = 0; pend_data[p] = '0;
      for (int w = 0; w < int'(WORDS); w++) mem[p][w] = '0;
    end
    req_ready = '0; rsp_valid = '0; rsp_data = '0;
  end

  always @(posedge clk) begin
    for (int p = 0; p < NUM_BUS; p++) begin
      rsp_valid[p] <= 1'b0;
      if (req_valid[p] && req_ready[p]) begin
        accepted++;
        if (pending[p]) $error("bus_mem_model: second request on port %0d", p);
        pending[p]  = 1'b1;
        wait_cnt[p] = (fixed_lat != 0) ? fixed_lat : 1 + ($urandom % MAX_LAT);
        if (req[p].write) begin
          mem[p][req[p].idx % WORDS] = req[p].wdata;
          writes++;
        end
        pend_data[p] = mem[p][req[p].idx % WORDS];
      end else if (req_valid[p]) stalls++;
      if (pending[p]) begin
        wait_cnt[p]--;
        if (wait_cnt[p] == 0) begin
          pending[p]   = 1'b0;
          rsp_valid[p] <= 1'b1;
          rsp_data[p]  <= pend_data[p];
        end
      end
      req_ready[p] <= ($urandom % 100) >= STALL_PCT;
    end
  end
endmodule
