// core_wrapper: memory access module of one kernel core.
//
// A kernel core has one ap_bus port per pointer argument; each port
// presents an element index relative to its pointer. This module turns the
// index into a byte address (pointer + 8 * sign-extended index, elements
// being 64-bit 'long'), merges the ports into one request stream with a
// round-robin mem_arbiter and hands every response, selected by the low tag
// bits, back to the port that asked. Requests are combinational from the
// core to the outgoing port (no added latency); responses arrive as a
// one-cycle pulse on the bus port. Having one memory access module per
// core between the core and the arbiters follows the described
// architecture; the address arithmetic and handshakes are this design's.
module core_wrapper
  import ocl_pkg::*;
#(
  parameter int unsigned NUM_PORTS = NUM_BUS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // core side
  input  logic     [NUM_PORTS-1:0]             bus_req_valid,
  input  bus_req_t [NUM_PORTS-1:0]             bus_req,
  output logic     [NUM_PORTS-1:0]             bus_req_ready,
  output logic     [NUM_PORTS-1:0]             bus_rsp_valid,
  output logic     [NUM_PORTS-1:0][DATA_W-1:0] bus_rsp_data,
  // pointer arguments (byte addresses)
  input  logic     [NUM_PORTS-1:0][ADDR_W-1:0] base_addr,
  // toward the arbiter / memory-controller port
  output logic                                 mem_req_valid,
  output mem_req_t                             mem_req,
  input  logic                                 mem_req_ready,
  input  logic                                 mem_rsp_valid,
  input  mem_rsp_t                             mem_rsp
);
  mem_req_t [NUM_PORTS-1:0] port_req;
  mem_rsp_t [NUM_PORTS-1:0] port_rsp;

  always_comb begin
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      port_req[p].write = bus_req[p].write;
      port_req[p].addr  = base_addr[p]
                        + ({{(ADDR_W-IDX_W){bus_req[p].idx[IDX_W-1]}}, bus_req[p].idx} << 3);
      port_req[p].wdata = bus_req[p].wdata;
      port_req[p].tag   = '0;
      bus_rsp_data[p]   = port_rsp[p].rdata;
    end
  end

  mem_arbiter #(.N(NUM_PORTS)) u_merge (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_req_valid (bus_req_valid),
    .in_req       (port_req),
    .in_req_ready (bus_req_ready),
    .in_rsp_valid (bus_rsp_valid),
    .in_rsp       (port_rsp),
    .out_req_valid(mem_req_valid),
    .out_req      (mem_req),
    .out_req_ready(mem_req_ready),
    .out_rsp_valid(mem_rsp_valid),
    .out_rsp      (mem_rsp)
  );
endmodule
