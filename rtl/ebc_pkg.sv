// ebc_pkg: types of the code-block switched embedded block coder.
//
// The coding state of one FAC is, for each of the three coding passes of its
// bit-plane, the 19 adaptive context states and the MQ coder registers; the
// state of a whole EBC is that of nine FACs. A stripe column travels through
// the coefficient register bank as a col_t, with its row above the stripe and
// its tags. The layouts are this design's own.
package ebc_pkg;
  import jp2k_pkg::*;
  import mq_pkg::*;

  typedef struct packed {
    mq_reg_t                r;
    mq_ctx_t [NCTX-1:0]     cx;
  } pass_st_t;

  typedef pass_st_t [NPASS-1:0] plane_st_t;
  typedef plane_st_t [MAGW-1:0] ebc_st_t;

  // Number of code-block slots in the state memory and the line buffer.
  localparam int unsigned NSLOT = 5;

  // Slot of a code-block: CB_2/CB_4 and CB_3/CB_5 share a slot.
  function automatic logic [2:0] cb_slot(input logic [2:0] cb);
    unique case (cb)
      3'd0: return 3'd0;
      3'd1: return 3'd1;
      3'd2, 3'd4: return 3'd2;
      3'd3, 3'd5: return 3'd3;
      default: return 3'd4;
    endcase
  endfunction

  // Line-buffer base address and width of a slot: 64 columns for the
  // 64x64 code-blocks, 32 for the level-3 (32x32) ones.
  function automatic logic [7:0] slot_base(input logic [2:0] s);
    unique case (s)
      3'd0: return 8'd0;
      3'd1: return 8'd32;
      3'd2: return 8'd96;
      3'd3: return 8'd160;
      default: return 8'd224;
    endcase
  endfunction

  function automatic pass_st_t pass_init();
    pass_st_t p;
    p.r = mq_init();
    for (int i = 0; i < NCTX; i++) p.cx[i] = '{idx: 6'd0, mps: 1'b0};
    p.cx[0].idx  = 6'd4;
    p.cx[17].idx = 6'd3;
    p.cx[18].idx = UNIFORM_IDX;
    return p;
  endfunction

  function automatic ebc_st_t ebc_init();
    ebc_st_t s;
    for (int p = 0; p < MAGW; p++) for (int q = 0; q < NPASS; q++) s[p][q] = pass_init();
    return s;
  endfunction

  // Tags of a stripe column.
  typedef struct packed {
    logic        valid;
    logic        first_col;
    logic        last_col;
    logic        first_stripe;   // first stripe of its code-block: no row above
    logic        last_stripe;    // last stripe: terminate after it
    band_e       band;
    logic [2:0]  cb;
    logic [15:0] tile;
    logic [5:0]  col;
  } col_tag_t;

  typedef struct packed {
    crb_ent_t [3:0] e;
    crb_ent_t       above;
    col_tag_t       tag;
  } col_t;

  // Entry of the inter-code-block line buffer: sign, magnitude and
  // propagation flags of the last row of a stripe.
  typedef struct packed {
    logic            sign;
    logic [MAGW-1:0] mag;
    logic [MAGW-1:0] spp;
  } lb_ent_t;

endpackage
