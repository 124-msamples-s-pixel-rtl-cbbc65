// jp2k_pkg: types and constants shared by the level-switched JPEG 2000 codec.
//
// The numbers follow the codec's main configuration: 256x256 tiles, 64x64
// code-blocks, three decomposition levels, 10-bit sign-magnitude DWT
// coefficients (sign plus nine magnitude bit-planes), 14-bit internal DWT
// words and 256-cycle computation states. The encodings of the enums and the
// struct layouts are this design's own choice.
package jp2k_pkg;

  localparam int unsigned TILE       = 256;  // tile width and height
  localparam int unsigned CBLK       = 64;   // code-block width and height
  localparam int unsigned LEVELS     = 3;    // decomposition levels
  localparam int unsigned STATE_CYC  = 256;  // cycles per computation state
  localparam int unsigned IW         = 14;   // internal DWT word width
  localparam int unsigned CW         = 10;   // coefficient width (sign + magnitude)
  localparam int unsigned MAGW       = 9;    // magnitude bit-planes
  localparam int unsigned NCTX       = 19;   // EBC contexts per coding pass
  localparam int unsigned NPASS      = 3;    // coding passes per bit-plane

  typedef logic signed [IW-1:0] dwt_word_t;

  // Operating direction of the unified codec.
  typedef enum logic { ENCODE = 1'b0, DECODE = 1'b1 } codec_mode_e;

  // Wavelet filter.
  typedef enum logic { F53 = 1'b0, F97 = 1'b1 } filter_e;

  // Subband orientation, as used by context formation.
  typedef enum logic [1:0] { BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3 } band_e;

  // Coding passes: significance propagation, magnitude refinement, clean-up.
  typedef enum logic [1:0] { PASS_SPP = 2'd0, PASS_MRP = 2'd1, PASS_CUP = 2'd2, PASS_NONE = 2'd3 } pass_e;

  // One computation state of the level-switched schedule: the DWT and the
  // EBCs work on stripes first_stripe..last_stripe of code-block cb of tile
  // tile, at decomposition level level (1..3).
  typedef struct packed {
    logic [15:0] tile;
    logic [1:0]  level;
    logic [2:0]  cb;
    logic [3:0]  first_stripe;
    logic [3:0]  last_stripe;
  } comp_state_t;

  // Code-block numbering of a tile (CB_0..CB_6 of the schedule).
  localparam logic [2:0] CB_L3   = 3'd0;  // HL3, LH3, HH3
  localparam logic [2:0] CB_L2   = 3'd1;  // HL2, LH2, HH2
  localparam logic [2:0] CB_L1_0 = 3'd2;  // level-1 top left
  localparam logic [2:0] CB_L1_1 = 3'd3;  // level-1 top right
  localparam logic [2:0] CB_L1_2 = 3'd4;  // level-1 bottom left
  localparam logic [2:0] CB_L1_3 = 3'd5;  // level-1 bottom right
  localparam logic [2:0] CB_LL3  = 3'd6;  // LL3

  // State of one lifting stage of the 1-D filter core: a held sample pair
  // (predict stages) or the previous odd sample (update stages).
  typedef struct packed {
    logic      has;
    dwt_word_t w0;
    dwt_word_t w1;
  } lift_st_t;

  // State of a whole 1-D filter core (four lifting stages).
  typedef lift_st_t [3:0] core_st_t;

  // Operation applied to the 1-D filter core.
  typedef enum logic [1:0] { OP_NOP = 2'd0, OP_PAIR = 2'd1, OP_FLUSH = 2'd2 } core_op_e;

  // One coefficient as held by the coefficient register bank: sign,
  // magnitude, and for every bit-plane whether the coefficient is a member
  // of the significance propagation pass (insp) and became significant in
  // it (spp).
  typedef struct packed {
    logic            sign;
    logic [MAGW-1:0] mag;
    logic [MAGW-1:0] spp;
    logic [MAGW-1:0] insp;
  } crb_ent_t;

  // What the context former of one bit-plane hands to that plane's FAC for
  // one coefficient. mode: 0 nothing, 1 AC0 only, 2 AC0+AC1, 4 all four.
  typedef struct packed {
    pass_e      pass;
    logic [2:0] mode;
    logic [4:0] ctx0;
    logic       d0;
    logic [1:0] upos;
    logic [4:0] ctx1;
    logic       d1;
    logic       newsig;  // coefficient becomes significant in this plane
  } cf_out_t;

  // Context numbers: 0-8 zero coding, 9-13 sign, 14-16 refinement,
  // 17 run-length, 18 uniform.
  localparam logic [4:0] CTX_SC0 = 5'd9;
  localparam logic [4:0] CTX_MR0 = 5'd14;
  localparam logic [4:0] CTX_RL  = 5'd17;

endpackage
