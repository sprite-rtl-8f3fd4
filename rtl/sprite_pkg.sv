// sprite_pkg: sizes and record types shared by the SPRITE sparse CNN core.
//
// The core matches non-zero input activations (IA) against non-zero weights
// (W) by their input-channel index inside a chunk of IC_CHUNK channels.
// Each non-zero value therefore travels with a 5-bit channel index.
// Sizes follow the paper's main configuration (28 nm, Table I): 32 PEs,
// imu_row = 7, imu_col = ic_chunk = 32, 3-way priority encoders, FIFO
// depth 6, 16-bit IA/W, 24-bit psums, 0.38 KB psum storage per MAC.
// Field layouts of the stored records, the fixed-point scaling and the
// capacity split of the global buffers are this design's own choices.
package sprite_pkg;

  localparam int unsigned NUM_PE    = 32;  // PEs in the array
  localparam int unsigned IMU_ROW   = 7;   // spatial domains per PE (= MACs per PE)
  localparam int unsigned IMU_COL   = 32;  // weight slots in the IMU
  localparam int unsigned IC_CHUNK  = 32;  // input channels per matching chunk
  localparam int unsigned PWAY      = 3;   // matches found per IMU row per cycle
  localparam int unsigned FIFO_DEPTH = 6;  // index FIFO depth
  localparam int unsigned DATA_W    = 16;  // IA / W precision
  localparam int unsigned PSUM_W    = 24;  // psum precision
  localparam int unsigned IDX_W     = $clog2(IC_CHUNK);
  localparam int unsigned OC_W      = 6;   // local output channel within a PE bank
  localparam int unsigned PSUM_BANK_DEPTH = 64; // 2 banks x 64 x 24b = 0.375 KB per MAC
  localparam int unsigned PROD_SHIFT = 8;  // Q8.8 x Q8.8 -> Q16.8 psum

  // Compressed input activation, as stored in the activation buffer.
  // 'last' marks the final entry of one pixel's list within one chunk.
  typedef struct packed {
    logic                     valid;
    logic                     last;
    logic [IDX_W-1:0]         idx;
    logic signed [DATA_W-1:0] val;
  } ia_entry_t;

  // Compressed weight, one slot of a weight-buffer row.
  typedef struct packed {
    logic                     valid;
    logic [OC_W-1:0]          oc;
    logic [IDX_W-1:0]         idx;
    logic signed [DATA_W-1:0] val;
  } w_entry_t;

  // A matched pair waiting in an index FIFO for its MAC.
  typedef struct packed {
    logic [OC_W-1:0]          oc;
    logic signed [DATA_W-1:0] ia;
    logic signed [DATA_W-1:0] w;
  } pair_t;

  // Command given to every PE at the start of one IA step.
  typedef enum logic [1:0] {
    CMD_SAME_CHUNK = 2'd0,  // stream the current chunk's weights again
    CMD_NEXT_CHUNK = 2'd1,  // weights of the next chunk follow the current one
    CMD_NEW_TILE   = 2'd2   // restart at the first chunk (weight row 0)
  } pe_cmd_e;

endpackage
