// matmul_core: processing element for the matrixMul kernel, one work-item.
//
// Behaviour (kernel source): with tx = global_id_0, ty = global_id_1,
// value = sum over k < wA of A[ty*wA + k] * B[k*wB + tx], then
// C[ty*wA + tx] = value. The output index uses wA as the kernel source
// does, so it is the row-major index for square matrices. Arithmetic is
// 64-bit two's complement with wrap-around (C 'long'); index arithmetic is
// 32-bit 'int'. The core is an FSM with datapath: per loop iteration it
// issues the A and B loads together, multiplies the two values when both
// have returned and adds the product to a private accumulator register;
// after the loop it stores the accumulator and raises ap_done once the
// store is acknowledged. ap_bus ports: 0 = C, 1 = B, 2 = A (the kernel's
// argument order). Start/done/idle as in vadd_core. Without stalls an
// iteration takes read latency + 2 cycles. The kernel behaviour follows
// the described flow; scheduling and the single multiplier are this
// design's choice.
module matmul_core
  import ocl_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               ap_start,
  output logic                               ap_done,
  output logic                               ap_idle,
  output logic                               ap_ready,
  input  logic     [IDX_W-1:0]               global_id_0,  // tx
  input  logic     [IDX_W-1:0]               global_id_1,  // ty
  input  logic     [IDX_W-1:0]               arg_wa,       // wA
  input  logic     [IDX_W-1:0]               arg_wb,       // wB
  output logic     [NUM_BUS-1:0]             bus_req_valid,
  output bus_req_t [NUM_BUS-1:0]             bus_req,
  input  logic     [NUM_BUS-1:0]             bus_req_ready,
  input  logic     [NUM_BUS-1:0]             bus_rsp_valid,
  input  logic     [NUM_BUS-1:0][DATA_W-1:0] bus_rsp_data
);
  localparam int unsigned PC = 0, PB = 1, PA = 2;

  typedef enum logic [2:0] {S_IDLE, S_LOOP, S_LOAD, S_MAC, S_STORE, S_WAIT_ST, S_DONE} state_e;
  state_e state;

  logic [IDX_W-1:0]  tx, ty, wa, wb, k;
  logic [DATA_W-1:0] va, vb, acc;
  logic              a_sent, b_sent, a_got, b_got, c_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tx     <= '0;
      ty     <= '0;
      wa     <= '0;
      wb     <= '0;
      k      <= '0;
      va     <= '0;
      vb     <= '0;
      acc    <= '0;
      a_sent <= 1'b0;
      b_sent <= 1'b0;
      a_got  <= 1'b0;
      b_got  <= 1'b0;
      c_sent <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (ap_start) begin
          tx     <= global_id_0;
          ty     <= global_id_1;
          wa     <= arg_wa;
          wb     <= arg_wb;
          k      <= '0;
          acc    <= '0;
          c_sent <= 1'b0;
          state  <= S_LOOP;
        end
        S_LOOP: begin
          a_sent <= 1'b0;
          b_sent <= 1'b0;
          a_got  <= 1'b0;
          b_got  <= 1'b0;
          state  <= (k < wa) ? S_LOAD : S_STORE;
        end
        S_LOAD: begin
          if (bus_req_valid[PA] && bus_req_ready[PA]) a_sent <= 1'b1;
          if (bus_req_valid[PB] && bus_req_ready[PB]) b_sent <= 1'b1;
          if (bus_rsp_valid[PA]) begin va <= bus_rsp_data[PA]; a_got <= 1'b1; end
          if (bus_rsp_valid[PB]) begin vb <= bus_rsp_data[PB]; b_got <= 1'b1; end
          if ((a_got || bus_rsp_valid[PA]) && (b_got || bus_rsp_valid[PB])) state <= S_MAC;
        end
        S_MAC: begin
          acc   <= acc + va * vb;
          k     <= k + 1'b1;
          state <= S_LOOP;
        end
        S_STORE: if (bus_req_ready[PC]) begin
          c_sent <= 1'b1;
          state  <= S_WAIT_ST;
        end
        S_WAIT_ST: if (bus_rsp_valid[PC]) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_req_valid     = '0;
    bus_req           = '0;
    bus_req[PA].idx   = ty * wa + k;
    bus_req[PB].idx   = k * wb + tx;
    bus_req[PC].idx   = ty * wa + tx;
    bus_req[PC].write = 1'b1;
    bus_req[PC].wdata = acc;
    bus_req_valid[PA] = (state == S_LOAD) && !a_sent;
    bus_req_valid[PB] = (state == S_LOAD) && !b_sent;
    bus_req_valid[PC] = (state == S_STORE) && !c_sent;
  end

  assign ap_idle  = (state == S_IDLE);
  assign ap_done  = (state == S_DONE);
  assign ap_ready = (state == S_DONE);
endmodule
