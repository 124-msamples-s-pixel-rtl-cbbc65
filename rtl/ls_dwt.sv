// ls_dwt: three-level forward 2-D lifting DWT of a stream of tiles.
//
// Input: 8-bit pixels of TILE x TILE tiles, tile after tile, each tile row by
// row, at most one per cycle (pix_v while en). Pixels are level-shifted by
// -128 and decomposed by three dwt_level stages; the LL band of each level
// streams straight into the next, so no tile or LL memory is needed. Output:
// per level, up to four subband coefficients of one position (row, col) per
// cycle, as sign plus 9-bit magnitude saturated at 511, ready for bit-plane
// coding. The deepest level also gives its LL band. en low stalls all three
// levels at once, which is how the coders apply back-pressure.
//
// (5,3) or (9,7) is chosen by filt; the coefficients of the irreversible
// filter are rounded to integers (unit quantisation step). The level
// structure, tile size and filters follow the document; running each level
// on its own filters instead of switching one set of filters between levels
// is this design's own choice, as are the saturation and the sign-magnitude
// output format.
module ls_dwt
  import jp2k_pkg::*;
#(
  parameter int unsigned W = TILE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  filter_e           filt,
  input  logic              pix_v,
  input  logic [7:0]        pix,
  output logic [2:0]        o_v,       // per level
  output logic [2:0][6:0]   o_row,
  output logic [2:0][6:0]   o_col,
  output logic [2:0][3:0][CW-1:0] o_coef,  // [band_e] sign & magnitude
  output logic [2:0]        o_last
);
  logic      [3:0] lv_v;
  dwt_word_t [3:0] lv_x;
  dwt_word_t [2:0][3:0] sb;

  assign lv_v[0] = pix_v;
  assign lv_x[0] = dwt_word_t'($signed({1'b0, pix}) - 16'sd128);

  function automatic logic [CW-1:0] to_sm(input dwt_word_t v);
    logic [IW-1:0] m;
    m = v[IW-1] ? IW'(-v) : IW'(v);
    if (m > IW'(2**(CW-1) - 1)) m = IW'(2**(CW-1) - 1);
    return {v[IW-1], m[CW-2:0]};
  endfunction

  for (genvar l = 0; l < 3; l++) begin : g_lv
    localparam int unsigned WL = W >> l;
    logic [$clog2(WL/2)-1:0] r, c;
    dwt_level #(.W(WL)) u_lv (
      .clk, .rst_n, .en, .filt, .in_v(lv_v[l]), .in_x(lv_x[l]),
      .o_v(o_v[l]), .o_row(r), .o_col(c),
      .o_ll(sb[l][BAND_LL]), .o_hl(sb[l][BAND_HL]), .o_lh(sb[l][BAND_LH]), .o_hh(sb[l][BAND_HH]),
      .o_last(o_last[l])
    );
    assign o_row[l] = 7'(r);
    assign o_col[l] = 7'(c);
    assign lv_v[l+1] = o_v[l];
    assign lv_x[l+1] = sb[l][BAND_LL];
    for (genvar b = 0; b < 4; b++) begin : g_b
      assign o_coef[l][b] = to_sm(sb[l][b]);
    end
  end
endmodule
