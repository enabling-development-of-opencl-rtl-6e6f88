// global_mem_model: behavioural global memory behind PORTS
// memory-controller ports (stands in for the crossbar, the memory
// controllers and the DRAM).
//
// WORDS 64-bit words addressed by byte address / 8 (modulo WORDS); any port
// reaches any address. Each port accepts one request per cycle when its
// random 'ready' is high (probability (100-STALL_PCT)%) and answers it LAT
// cycles later, in order per port; reads return the value at acceptance,
// writes update memory at acceptance and are acknowledged. Counters report
// accepted requests, reads, writes and stall cycles.
module global_mem_model
  import ocl_pkg::*;
#(
  parameter int unsigned PORTS     = 16,
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic                  clk,
  input  logic     [PORTS-1:0]  req_valid,
  input  mem_req_t [PORTS-1:0]  req,
  output logic     [PORTS-1:0]  req_ready,
  output logic     [PORTS-1:0]  rsp_valid,
  output mem_rsp_t [PORTS-1:0]  rsp
);
  logic [DATA_W-1:0] mem [WORDS];
  logic              pv [PORTS][LAT];
  mem_rsp_t          pr [PORTS][LAT];
  int unsigned       accepted, reads, writes, stalls;

  initial begin
    accepted = 0; reads = 0; writes = 0; stalls = 0;
    for (int w = 0; w < int'(WORDS); w++) mem[w] = '0;
    for (int p = 0; p < int'(PORTS); p++)
      for (int l = 0; l < int'(LAT); l++) begin pv[p][l] = 1'b0; pr[p][l] = '0; end
    req_ready = '0; rsp_valid = '0; rsp = '0;
  end

  always @(posedge clk) begin
    for (int p = 0; p < int'(PORTS); p++) begin
      mem_rsp_t r;
      logic     v;
      rsp_valid[p] <= pv[p][LAT-1];
      rsp[p]       <= pr[p][LAT-1];
      for (int l = int'(LAT) - 1; l > 0; l--) begin
        pv[p][l] = pv[p][l-1];
        pr[p][l] = pr[p][l-1];
      end
      v = 1'b0; r = '0;
      if (req_valid[p] && req_ready[p]) begin
        int unsigned w;
        w = int'(req[p].addr >> 3) % WORDS;
        accepted++;
        v       = 1'b1;
        r.write = req[p].write;
        r.tag   = req[p].tag;
        if (req[p].write) begin
          mem[w] = req[p].wdata;
          writes++;
        end else begin
          r.rdata = mem[w];
          reads++;
        end
      end else if (req_valid[p]) stalls++;
      pv[p][0] = v;
      pr[p][0] = r;
      req_ready[p] <= ($urandom % 100) >= STALL_PCT;
    end
  end
endmodule
