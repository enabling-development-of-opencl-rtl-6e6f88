// vadd_core: processing element for the VectorAdd kernel, one work-item.
//
// Behaviour (kernel source): if global_id < iNumElements then
// c[global_id] = a[global_id] + b[global_id]; both compares are signed
// 'int'. The core is a small FSM with datapath in the style of a
// C-to-HDL generated core: ap_start (sampled while idle), a one-cycle
// ap_done/ap_ready pulse at the end, ap_idle while waiting. Its three
// ap_bus ports (0 = a, 1 = b, 2 = c) issue requests with valid/ready and
// receive a one-cycle response pulse; writes are acknowledged too. The two
// loads are issued at the same time, the sum is registered, the store is
// issued and ap_done follows its acknowledgement. Without memory stalls a
// work-item takes 1 (start) + read latency + 1 (add) + 1 + write latency +
// 1 cycles; an out-of-range work-item finishes 2 cycles after start.
// The kernel behaviour and the start/done/idle protocol follow the
// described flow; the exact state sequence is this design's.
module vadd_core
  import ocl_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               ap_start,
  output logic                               ap_done,
  output logic                               ap_idle,
  output logic                               ap_ready,
  input  logic     [IDX_W-1:0]               global_id_0,
  input  logic     [IDX_W-1:0]               arg_n,        // iNumElements
  output logic     [NUM_BUS-1:0]             bus_req_valid,
  output bus_req_t [NUM_BUS-1:0]             bus_req,
  input  logic     [NUM_BUS-1:0]             bus_req_ready,
  input  logic     [NUM_BUS-1:0]             bus_rsp_valid,
  input  logic     [NUM_BUS-1:0][DATA_W-1:0] bus_rsp_data
);
  localparam int unsigned PA = 0, PB = 1, PC = 2;

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_LOAD, S_ADD, S_STORE, S_WAIT_ST, S_DONE} state_e;
  state_e state;

  logic [IDX_W-1:0]  gid, n;
  logic [DATA_W-1:0] va, vb, sum;
  logic              a_sent, b_sent, a_got, b_got, c_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      gid    <= '0;
      n      <= '0;
      va     <= '0;
      vb     <= '0;
      sum    <= '0;
      a_sent <= 1'b0;
      b_sent <= 1'b0;
      a_got  <= 1'b0;
      b_got  <= 1'b0;
      c_sent <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (ap_start) begin
          gid    <= global_id_0;
          n      <= arg_n;
          a_sent <= 1'b0;
          b_sent <= 1'b0;
          a_got  <= 1'b0;
          b_got  <= 1'b0;
          c_sent <= 1'b0;
          state  <= S_CHECK;
        end
        S_CHECK: state <= ($signed(gid) < $signed(n)) ? S_LOAD : S_DONE;
        S_LOAD: begin
          if (bus_req_valid[PA] && bus_req_ready[PA]) a_sent <= 1'b1;
          if (bus_req_valid[PB] && bus_req_ready[PB]) b_sent <= 1'b1;
          if (bus_rsp_valid[PA]) begin va <= bus_rsp_data[PA]; a_got <= 1'b1; end
          if (bus_rsp_valid[PB]) begin vb <= bus_rsp_data[PB]; b_got <= 1'b1; end
          if ((a_got || bus_rsp_valid[PA]) && (b_got || bus_rsp_valid[PB])) state <= S_ADD;
        end
        S_ADD: begin
          sum   <= va + vb;
          state <= S_STORE;
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
    bus_req_valid      = '0;
    bus_req            = '0;
    bus_req[PA].idx    = gid;
    bus_req[PB].idx    = gid;
    bus_req[PC].idx    = gid;
    bus_req[PC].write  = 1'b1;
    bus_req[PC].wdata  = sum;
    bus_req_valid[PA]  = (state == S_LOAD) && !a_sent;
    bus_req_valid[PB]  = (state == S_LOAD) && !b_sent;
    bus_req_valid[PC]  = (state == S_STORE) && !c_sent;
  end

  assign ap_idle  = (state == S_IDLE);
  assign ap_done  = (state == S_DONE);
  assign ap_ready = (state == S_DONE);
endmodule
