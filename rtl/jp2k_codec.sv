// jp2k_codec: Motion-JPEG 2000 encoder core without tile memory.
//
// Pixels of 256 x 256 tiles enter row by row, one per cycle (pix_v/pix_ready).
// The three-level lifting DWT (ls_dwt) streams its subband coefficients into
// small two-stripe buffers. The main controller (ls_scheduler) issues the
// level-switched schedule of 256-cycle computation states; in each state the
// three code-block switched EBCs each code one code-block stripe of their
// subband (EBC0 the HL bands, EBC1 the HH bands and the LL3 band, EBC2 the LH
// bands), reading it in stripe-column order, one coefficient per cycle. If a
// state's stripe is not yet in its buffer, the controller is held; if a
// buffer has no free half, the DWT and the pixel input stall. Each EBC's rate
// controller truncates every terminated code-block to the byte budget, and
// the bit-stream controller sends one two-word header per code-block out on
// bs_word. The coded bytes themselves leave per cycle on the cod_bytes
// ports of the EBCs for an external bit-stream memory.
//
// Encoding only. The partition into DWT, controller, EBCs, rate control and
// bit-stream controller, the band-to-EBC mapping and the state schedule
// follow the document; the stripe buffers between DWT and coders, the
// streaming DWT and the header format are this design's own.
module jp2k_codec
  import jp2k_pkg::*;
  import mq_pkg::*;
  import ebc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,          // pulse: begin with num_tiles tiles
  input  logic [15:0]           num_tiles,
  input  filter_e               filt,
  input  logic [15:0]           budget,         // bytes per code-block
  input  logic                  pix_v,
  input  logic [7:0]            pix,
  output logic                  pix_ready,
  output logic                  bs_valid,
  input  logic                  bs_ready,
  output logic [31:0]           bs_word,
  output logic                  bs_overflow,
  output logic [2:0]            cod_valid,
  output col_tag_t [2:0]        cod_tag,        // code-block of those bytes
  output logic [2:0][MAGW-1:0][7:0][7:0] cod_data,   // bytes emitted per plane
  output logic [2:0][MAGW-1:0][3:0]      cod_count,
  output logic                  done
);
  // ---------------- DWT ----------------
  logic                  dwt_en;
  logic [2:0]            d_v, d_last;
  logic [2:0][6:0]       d_row, d_col;
  logic [2:0][3:0][CW-1:0] d_coef;

  ls_dwt u_dwt (
    .clk, .rst_n, .en(dwt_en), .filt, .pix_v(pix_v && dwt_en), .pix,
    .o_v(d_v), .o_row(d_row), .o_col(d_col), .o_coef(d_coef), .o_last(d_last)
  );

  // ---------------- stripe buffers: [level][band] ----------------
  logic [2:0][3:0][CW-1:0] sb_rd;
  logic [2:0][3:0][1:0]    sb_full, sb_rel;
  logic [2:0][3:0]         sb_stall;
  logic [2:0]              rd_row;
  logic [6:0]              rd_col;

  for (genvar l = 0; l < 3; l++) begin : g_sl
    for (genvar b = 0; b < 4; b++) begin : g_sb
      if (b != BAND_LL || l == 2) begin : g_on
        cb_stripe_buffer #(.W(TILE >> (l + 1))) u_sb (
          .clk, .rst_n, .we(d_v[l] && dwt_en), .wrow(d_row[l]), .wcol(d_col[l]),
          .wdata(d_coef[l][b]), .rrow(rd_row), .rcol(rd_col), .rdata(sb_rd[l][b]),
          .release_i(sb_rel[l][b]), .full_o(sb_full[l][b]), .stall_o(sb_stall[l][b])
        );
      end else begin : g_off
        assign sb_rd[l][b] = '0; assign sb_full[l][b] = '0; assign sb_stall[l][b] = 1'b0;
      end
    end
  end

  assign dwt_en    = !(|sb_stall);
  assign pix_ready = dwt_en;

  // ---------------- main controller ----------------
  logic        st_valid, st_start, hold, tile_done;
  comp_state_t st;
  logic [7:0]  cyc;

  ls_scheduler u_ctl (
    .clk, .rst_n, .start, .mode(ENCODE), .num_tiles, .hold,
    .state_valid(st_valid), .state_start(st_start), .state(st), .cyc,
    .tile_done, .done
  );

  // Where the current state's stripes are.
  logic [1:0] lvi;          // level index 0..2
  logic [4:0] sstripe;      // subband stripe row
  logic [3:0] cb_stripe;    // stripe within the code-block
  logic [5:0] ccol;         // column within the code-block
  logic [1:0] crow;
  logic       ready, emit, last_col_c, right_cb, ll_state;

  always_comb begin
    lvi = st.level - 2'd1;
    ll_state = st.cb == CB_LL3;
    right_cb = st.cb == CB_L1_1 || st.cb == CB_L1_3;
    crow = cyc[1:0];
    if (st.level == 2'd3) begin
      cb_stripe = st.first_stripe + 4'(cyc[7]);
      ccol      = 6'(cyc[6:2]);
      last_col_c = ccol == 6'd31;
    end else begin
      cb_stripe = st.first_stripe;
      ccol      = cyc[7:2];
      last_col_c = ccol == 6'd63;
    end
    sstripe = (st.level == 2'd1 && (st.cb == CB_L1_2 || st.cb == CB_L1_3)) ? 5'(cb_stripe) + 5'd16
                                                                        : 5'(cb_stripe);
    rd_row = {sstripe[0], crow};
    rd_col = 7'(ccol) + (right_cb ? 7'd64 : 7'd0);
    // Ready when the needed halves of every band read in this state are full.
    if (st.level == 2'd3)
      ready = ll_state ? sb_full[2][BAND_LL][sstripe[0]]
                       : sb_full[2][BAND_HL][sstripe[0]] && sb_full[2][BAND_LH][sstripe[0]] &&
                         sb_full[2][BAND_HH][sstripe[0]];
    else
      ready = sb_full[lvi][BAND_HL][sstripe[0]] &&
              sb_full[lvi][BAND_LH][sstripe[0]] && sb_full[lvi][BAND_HH][sstripe[0]];
  end
  assign hold = st_valid && !ready;
  assign emit = st_valid && !hold;

  // Release a half after the last coefficient of its last code-block stripe.
  always_comb begin
    sb_rel = '0;
    if (emit && crow == 2'd3 && last_col_c) begin
      if (st.level == 2'd3) begin
        if (ll_state) sb_rel[2][BAND_LL][sstripe[0]] = 1'b1;
        else begin
          sb_rel[2][BAND_HL][sstripe[0]] = 1'b1;
          sb_rel[2][BAND_LH][sstripe[0]] = 1'b1;
          sb_rel[2][BAND_HH][sstripe[0]] = 1'b1;
        end
      end else if (st.level == 2'd2 || right_cb) begin
        sb_rel[lvi][BAND_HL][sstripe[0]] = 1'b1;
        sb_rel[lvi][BAND_LH][sstripe[0]] = 1'b1;
        sb_rel[lvi][BAND_HH][sstripe[0]] = 1'b1;
      end
    end
  end

  // ---------------- three EBCs ----------------
  localparam band_e EBC_BAND [3] = '{BAND_HL, BAND_HH, BAND_LH};
  logic [2:0]  res_valid;
  col_tag_t [2:0] res_tag;
  logic [2:0][4:0]  res_npass;
  logic [2:0][15:0] res_bytes, res_total;

  for (genvar e = 0; e < 3; e++) begin : g_ebc
    logic            feed;
    logic [CW-1:0]   coef;
    col_tag_t        tag;
    logic            drain;
    logic            c_valid, f_valid;
    col_tag_t        c_tag, f_tag;
    logic [1:0]      c_row;
    logic [MAGW-1:0] c_mag, c_newsig;
    pass_e     [MAGW-1:0] c_pass;
    mq_bytes_t [MAGW-1:0] c_bytes;
    mq_bytes_t [MAGW-1:0][NPASS-1:0] f_bytes;
    logic            phase_idle;

    assign feed = emit && (!ll_state || e == 1);
    assign coef = ll_state ? sb_rd[2][BAND_LL] : sb_rd[lvi][EBC_BAND[e]];
    always_comb begin
      tag = '0;
      tag.valid = 1'b1;
      tag.first_col = ccol == 6'd0;
      tag.last_col = last_col_c;
      tag.first_stripe = cb_stripe == 4'd0;
      tag.last_stripe = (st.level == 2'd3) ? cb_stripe == 4'd7 : cb_stripe == 4'd15;
      tag.band = ll_state ? BAND_LL : EBC_BAND[e];
      tag.cb = st.cb;
      tag.tile = st.tile;
      tag.col = ccol;
    end
    // Idle EBCs push empty columns so the last columns get coded and the
    // code-block gets terminated.
    assign drain = !feed && phase_idle;

    cs_ebc u_ebc (
      .clk, .rst_n, .init(start), .in_valid(feed), .in_row(crow), .in_sign(coef[CW-1]),
      .in_mag(coef[MAGW-1:0]), .in_tag(tag), .drain, .can_drain(phase_idle),
      .cod_valid(c_valid), .cod_tag(c_tag), .cod_row(c_row), .cod_mag(c_mag), .cod_pass(c_pass),
      .cod_newsig(c_newsig), .cod_bytes(c_bytes), .fl_valid(f_valid), .fl_tag(f_tag), .fl_bytes(f_bytes)
    );

    rdo_controller u_rdo (
      .clk, .rst_n, .budget, .cod_valid(c_valid), .cod_tag(c_tag), .cod_pass(c_pass),
      .cod_bytes(c_bytes), .fl_valid(f_valid), .fl_tag(f_tag), .fl_bytes(f_bytes),
      .res_valid(res_valid[e]), .res_tag(res_tag[e]), .res_npass(res_npass[e]),
      .res_bytes(res_bytes[e]), .res_total(res_total[e])
    );

    assign cod_valid[e] = c_valid;
    assign cod_tag[e]   = c_tag;
    for (genvar p = 0; p < MAGW; p++) begin : g_p
      assign cod_data[e][p]  = c_bytes[p].d;
      assign cod_count[e][p] = c_bytes[p].n;
    end
  end

  logic [4:0] bs_level;
  bsc u_bsc (
    .clk, .rst_n, .res_valid, .res_tag, .res_npass, .res_bytes, .res_total,
    .bs_valid, .bs_ready, .bs_word, .overflow(bs_overflow), .level_o(bs_level)
  );
endmodule
