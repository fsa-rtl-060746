// fsa_pkg: widths and types shared by the fault-tolerant systolic array (FSA).
//
// The array is N x N processing elements (PEs). Activations travel on 8-bit
// horizontal links and weights / partial sums on 24-bit vertical links; these
// link widths and the 256 x 256 array size are the design's published
// configuration. Operands are taken as signed 8-bit integers and partial sums
// as signed 24-bit integers, which is this design's choice: 256 products of
// two signed 8-bit values always fit in 24 bits.
package fsa_pkg;

  localparam int unsigned ACT_W  = 8;    // horizontal (activation) link width
  localparam int unsigned WGT_W  = 8;    // weight width carried on the vertical link
  localparam int unsigned PSUM_W = 24;   // vertical (partial sum) link width

  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [WGT_W-1:0]  wgt_t;
  typedef logic signed [PSUM_W-1:0] psum_t;

  // Dataflow of the computing array: output stationary (partial sums stay in
  // the PEs), weight stationary (weights preloaded, partial sums flow down the
  // columns) or input stationary (activations preloaded, partial sums flow
  // down the columns).
  typedef enum logic [1:0] {DF_OS = 2'd0, DF_WS = 2'd1, DF_IS = 2'd2} dataflow_t;

  // A corrected partial sum travelling from the RU array to the computing
  // array: the coordinates of the faulty PE it replaces and its value.
  // x is the row of the PE (the activation FIFO), y its column (the weight
  // FIFO). Coordinates are 16 bits wide, enough for arrays up to 65536 wide.
  typedef struct packed {
    logic        valid;
    logic [15:0] x;
    logic [15:0] y;
    psum_t       value;
  } corr_t;

  // One entry of the fault detection table.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
  } fault_loc_t;

endpackage
