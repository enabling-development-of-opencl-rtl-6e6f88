// ocl_pkg: types and constants shared by the OpenCL compute-device RTL.
//
// Data is the OpenCL 'long' (64 bit), work-item IDs and scalar arguments
// are OpenCL 'int' (32 bit). Memory requests carry a 48-bit byte address
// and a tag; every arbiter level pushes its requester number into the low
// tag bits so that responses, which the memory may return in any order,
// find their way back. The AEG (application engine register) numbering
// keeps registers 0..9 for the device and places kernel arguments from
// register 10 on; which reserved registers hold the work-group number and
// the done status is this design's choice (0 and 1).
package ocl_pkg;

  localparam int unsigned DATA_W  = 64;   // OpenCL long
  localparam int unsigned IDX_W   = 32;   // OpenCL int
  localparam int unsigned ADDR_W  = 48;   // byte address into global memory
  localparam int unsigned TAG_W   = 16;   // response routing tag
  localparam int unsigned NUM_BUS = 3;    // pointer arguments per kernel core
  localparam int unsigned AEG_W   = 64;   // width of one AEG register
  localparam int unsigned AEG_IDX_W = 8;  // AEG index width on the host port
  localparam int unsigned NUM_AEG = 16;   // AEGs implemented per AE

  localparam int unsigned AEG_GRID = 0;   // work-group number for the next start
  localparam int unsigned AEG_DONE = 1;   // done / free status (read only)
  localparam int unsigned AEG_ARG0 = 10;  // first kernel argument

  // Kernel replicated in the compute units (one bitstream per application).
  typedef enum logic [0:0] {
    K_VADD   = 1'b0,   // VectorAdd(a, b, c, iNumElements)
    K_MATMUL = 1'b1    // matrixMul(C, B, A, wA, wB)
  } kernel_e;

  // One ap_bus request from a core: element index relative to the pointer.
  typedef struct packed {
    logic              write;
    logic [IDX_W-1:0]  idx;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  // Request toward a memory-controller port.
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  // Response from a memory-controller port (writes are acknowledged too).
  typedef struct packed {
    logic              write;
    logic [DATA_W-1:0] rdata;
    logic [TAG_W-1:0]  tag;
  } mem_rsp_t;

endpackage
