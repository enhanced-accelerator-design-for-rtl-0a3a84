// Shared types and constants of the row-stationary CNN accelerator.
// Data are 8-bit signed (quantized activations and weights), partial sums are
// 32-bit signed. The scratchpad is byte addressed (128 kB, 32-bit words):
// activations, weights and 8-bit outputs take one byte each, biases and raw
// 32-bit sums one aligned word each.
// Commands travel from the scratchpad-domain control unit to the PE-domain
// array controller through a dual-clock queue; their encoding is this
// design's own.
package rs_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned PSUM_W  = 32;
  localparam int unsigned SPAD_AW  = 17;  // byte address, 128 kB
  localparam int unsigned SPAD_WAW = 15;  // word address, 32768 x 32 bit
  localparam int unsigned DIM_W   = 11;   // layer dimensions up to 2047 (1024 channels)

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [PSUM_W-1:0] psum_t;

  // Dataflow: spatial RS (filter rows on PE rows, iacts diagonal) or
  // temporal RS (output channels on PE rows, iacts vertical).
  typedef enum logic {DF_SRS = 1'b0, DF_TRS = 1'b1} dataflow_e;

  // Layer configuration written by the host.
  typedef struct packed {
    dataflow_e            mode;
    logic                 relu;
    logic                 raw;        // write 32-bit sums, skip scaling
    logic                 accum;      // raw mode: add to the sums already stored
    logic [DIM_W-1:0]     h, w, c, m; // input height/width, in/out channels
    logic [3:0]           r, s;       // filter height/width (1..15)
    logic [7:0]           c0;         // channels per PE line buffer
    logic [7:0]           q0;         // output columns per PE line buffer
    logic [SPAD_AW-1:0]   i_base, w_base, o_base, b_base;
    logic [15:0]          scale_mant;
    logic [5:0]           scale_shift;
  } cfg_t;

  typedef enum logic [2:0] {
    CMD_CLEAR = 3'd0,   // zero all psum buffers
    CMD_LOADW = 3'd1,   // stream n weights into every PE row
    CMD_LOADI = 3'd2,   // stream n iacts into every active feed
    CMD_COMP  = 3'd3,   // run the MAC loop
    CMD_DRAIN = 3'd4    // push row 'row' psums 0..qn-1 to the output buffers
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e    op;
    dataflow_e  mode;
    logic [9:0] n;       // items per feed (LOADW/LOADI)
    logic [9:0] woff;    // weight buffer offset (COMP)
    logic [7:0] qn;      // output columns in this tile
    logic [3:0] sn;      // filter width
    logic [7:0] cn;      // channels in this chunk
    logic [4:0] row;     // drained row (DRAIN)
    logic       acc;     // add psums from the rows below inside the group
    logic [3:0] rn;      // rows per group for the accumulate chain (SRS)
  } cmd_t;

endpackage
