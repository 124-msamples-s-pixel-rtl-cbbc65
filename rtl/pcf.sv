// pcf: parallel context formation for one stripe column, all bit-planes at
// once.
//
// The coefficient register bank presents a window of four stripe columns:
// D (x-1) and C (x) with their significance-propagation flags, B (x+1) and
// A (x+2) with magnitudes only, and the row above the stripe (from the
// inter-code-block line buffer; zero in a code-block's first stripe). The
// flags of B are computed here and used at once, bypassed, as the right
// neighbours of C; the register bank stores them when the window moves. Each
// side has its own inputs so that columns of another stripe can be masked
// differently for the two. Stripe-causal mode is used: the row below the stripe counts
// as insignificant, as do positions outside the code-block (zero entries).
//
// Because the encoder knows every bit-plane of a coefficient, the
// significance a neighbour has when a coefficient is coded in plane p can be
// derived from magnitudes: significant before the plane (P = mag >> (p+1) !=
// 0), made significant in this plane's propagation pass (the stored spp
// flag), or during its clean-up pass (bit p set, for neighbours already
// visited in the clean-up pass). Which of these count depends on the pass and
// on whether the neighbour comes before or after in stripe scan order. The
// nine context formers CF0..CF8 evaluate this in parallel.
//
// Two results per cycle:
//  - b_insp/b_spp: pass membership of column B in every plane (needs A);
//  - cf[p]: the symbols of coefficient (C, row) in plane p for that plane's
//    FAC: zero coding and sign (propagation or clean-up pass), refinement,
//    or the run-length symbol, the two uniform position bits and the sign of
//    a clean-up run column, all issued at row 0.
// The context tables are the JPEG 2000 ones; computing membership from
// magnitudes and a one-column flag lookahead is this design's realisation.
module pcf
  import jp2k_pkg::*;
(
  input  band_e            band,
  // Flag side: pass membership of column B from C (left), B, A (right).
  input  crb_ent_t [3:0]   f_left,
  input  crb_ent_t [3:0]   f_cur,
  input  crb_ent_t [3:0]   f_right,
  input  crb_ent_t [2:0]   f_above,  // row above B's stripe: [0]=C, [1]=B, [2]=A
  output logic [3:0][MAGW-1:0] b_insp,
  output logic [3:0][MAGW-1:0] b_spp,
  // Coding side: coefficient (C, row) with left column D and right column B.
  input  crb_ent_t [3:0]   c_left,
  input  crb_ent_t [3:0]   c_cur,
  input  logic             c_right_en, // B belongs to C's stripe
  input  crb_ent_t [2:0]   c_above,  // row above C's stripe: [0]=D, [1]=C, [2]=B
  input  logic [1:0]       row,
  output cf_out_t [MAGW-1:0] cf
);

  crb_ent_t [3:0] cb_w;   // right neighbour column of C, with fresh flags
  crb_ent_t [3:0] cab;    // row above C's stripe, positions D, C, B
  assign cab = {crb_ent_t'('0), c_above[2], c_above[1], c_above[0]};

  // Significance rules.
  typedef enum logic [1:0] { R_P, R_PS, R_FULL } rule_e;

  function automatic logic sig_of(input crb_ent_t e, input int p, input rule_e r);
    logic pr, full;
    pr   = (e.mag >> (p+1)) != 0;
    full = (e.mag >> p) != 0;
    unique case (r)
      R_P:     return pr;
      R_PS:    return pr | e.spp[p];
      default: return full;
    endcase
  endfunction

  // Entry of column k (0=D,1=C,2=B,3=A) at stripe row y (-1..4).
  function automatic crb_ent_t ent(input int k, input int y, input crb_ent_t [3:0] cd,
                                   input crb_ent_t [3:0] cc, input crb_ent_t [3:0] cb,
                                   input crb_ent_t [3:0] ca, input crb_ent_t [3:0] ab);
    if (y < 0) return ab[k];
    if (y > 3) return '0;
    unique case (k)
      0: return cd[y];
      1: return cc[y];
      2: return cb[y];
      default: return ca[y];
    endcase
  endfunction

  // Zero-coding context from h, v and d neighbour counts.
  function automatic logic [4:0] zc_ctx(input band_e bd, input int h0, input int v0, input int d);
    int h, v, hv;
    h = h0; v = v0;
    if (bd == BAND_HL) begin h = v0; v = h0; end
    if (bd == BAND_HH) begin
      hv = h0 + v0;
      if (d >= 3) return 5'd8;
      if (d == 2) return (hv >= 1) ? 5'd7 : 5'd6;
      if (d == 1) return (hv >= 2) ? 5'd5 : (hv == 1) ? 5'd4 : 5'd3;
      return (hv >= 2) ? 5'd2 : (hv == 1) ? 5'd1 : 5'd0;
    end
    if (h == 2) return 5'd8;
    if (h == 1) return (v >= 1) ? 5'd7 : (d >= 1) ? 5'd6 : 5'd5;
    if (v == 2) return 5'd4;
    if (v == 1) return 5'd3;
    return (d >= 2) ? 5'd2 : (d == 1) ? 5'd1 : 5'd0;
  endfunction

  // Contribution of two opposite neighbours to the sign context.
  function automatic int contrib(input logic s0, input logic n0, input logic s1, input logic n1);
    int t;
    t = (s0 ? (n0 ? -1 : 1) : 0) + (s1 ? (n1 ? -1 : 1) : 0);
    return (t > 0) ? 1 : (t < 0) ? -1 : 0;
  endfunction

  // Neighbourhood of (C, y) for plane p under pass rule ps (SPP, MRP, CUP):
  // returns h, v, d counts, sign context and xor bit.
  typedef struct packed {
    logic [1:0] h, v;
    logic [2:0] d;
    logic [4:0] sctx;
    logic       sxor;
  } nb_t;

  function automatic nb_t neigh(input int y, input int p, input pass_e ps, input logic runchk,
                                input crb_ent_t [3:0] cd, input crb_ent_t [3:0] cc,
                                input crb_ent_t [3:0] cb, input crb_ent_t [3:0] ab);
    nb_t r;
    rule_e e_rule, l_rule;
    logic sl, sr, su, sd, sul, sur, sdl, sdr;
    crb_ent_t el, er, eu, ed;
    int hc, vc;
    e_rule = (ps == PASS_SPP) ? R_PS : (ps == PASS_MRP) ? R_PS : R_FULL;
    l_rule = (ps == PASS_SPP) ? R_P  : R_PS;
    el = ent(0, y, cd, cc, cb, '0, ab);
    er = ent(2, y, cd, cc, cb, '0, ab);
    eu = ent(1, y-1, cd, cc, cb, '0, ab);
    ed = ent(1, y+1, cd, cc, cb, '0, ab);
    // Run test at the start of a column: the column's own rows are not yet
    // visited in the clean-up pass and all of them are insignificant.
    if (runchk) begin
      if (y-1 >= 0) eu = '0;
      ed = '0;
    end
    sl  = sig_of(el, p, e_rule);
    sr  = sig_of(er, p, l_rule);
    su  = sig_of(eu, p, e_rule);
    sd  = sig_of(ed, p, l_rule);
    sul = sig_of(ent(0, y-1, cd, cc, cb, '0, ab), p, e_rule);
    sdl = sig_of(ent(0, y+1, cd, cc, cb, '0, ab), p, e_rule);
    sur = sig_of(ent(2, y-1, cd, cc, cb, '0, ab), p, (y == 0) ? e_rule : l_rule);
    sdr = sig_of(ent(2, y+1, cd, cc, cb, '0, ab), p, l_rule);
    r.h = 2'(int'(sl) + int'(sr));
    r.v = 2'(int'(su) + int'(sd));
    r.d = 3'(int'(sul) + int'(sur) + int'(sdl) + int'(sdr));
    hc = contrib(sl, el.sign, sr, er.sign);
    vc = contrib(su, eu.sign, sd, ed.sign);
    r.sxor = (hc < 0) || (hc == 0 && vc < 0);
    if (hc == 0) r.sctx = CTX_SC0 + ((vc == 0) ? 5'd0 : 5'd1);
    else         r.sctx = CTX_SC0 + ((vc == 0) ? 5'd3 : (vc == hc) ? 5'd4 : 5'd2);
    return r;
  endfunction

  // Pass membership of column B (the right neighbour of C, needing A).
  always_comb begin
    crb_ent_t [3:0] bb;
    crb_ent_t [3:0] ab4;
    bb  = f_cur;
    ab4 = {f_above[2], f_above[1], f_above[0], crb_ent_t'('0)};
    for (int y = 0; y < 4; y++) begin
      for (int p = 0; p < MAGW; p++) begin
        logic any, pr;
        pr  = (bb[y].mag >> (p+1)) != 0;
        any = 1'b0;
        for (int dy = -1; dy <= 1; dy++) begin
          // Left column C and the row above are earlier in the scan.
          any |= sig_of(ent(1, y+dy, '0, f_left, bb, f_right, ab4), p, R_PS);
          // Right column A: above row earlier, stripe rows later.
          any |= sig_of(ent(3, y+dy, '0, f_left, bb, f_right, ab4), p, (y+dy < 0) ? R_PS : R_P);
        end
        any |= sig_of(ent(2, y-1, '0, f_left, bb, f_right, ab4), p, R_PS);
        any |= sig_of(ent(2, y+1, '0, f_left, bb, f_right, ab4), p, R_P);
        bb[y].insp[p] = !pr && any;
        bb[y].spp[p]  = !pr && any && bb[y].mag[p];
      end
    end
    for (int y = 0; y < 4; y++) begin
      b_insp[y] = bb[y].insp;
      b_spp[y]  = bb[y].spp;
    end
    cb_w = c_right_en ? bb : '0;
  end


  // Context formers CF0..CF8 for coefficient (C, row).
  always_comb begin
    for (int p = 0; p < MAGW; p++) begin
      crb_ent_t e;
      nb_t nb;
      logic pr, in_spp, run, any1;
      int k;
      cf_out_t o;
      o = '0;
      nb = '0;
      o.pass = PASS_NONE;
      e  = c_cur[row];
      pr = (e.mag >> (p+1)) != 0;
      in_spp = e.insp[p];
      // Run-length mode: all four rows in the clean-up pass with empty
      // neighbourhoods at the start of the column.
      run = 1'b1;
      any1 = 1'b0;
      k = 0;
      for (int y = 3; y >= 0; y--) begin
        nb_t n2;
        n2 = neigh(y, p, PASS_CUP, 1'b1, c_left, c_cur, cb_w, cab);
        if (((c_cur[y].mag >> (p+1)) != 0) || c_cur[y].insp[p] || n2.h != 0 || n2.v != 0 || n2.d != 0)
          run = 1'b0;
        if (c_cur[y].mag[p]) begin any1 = 1'b1; k = y; end
      end
      if (pr) begin
        nb = neigh(int'(row), p, PASS_MRP, 1'b0, c_left, c_cur, cb_w, cab);
        o.pass = PASS_MRP; o.mode = 3'd1; o.d0 = e.mag[p];
        if ((e.mag >> (p+2)) != 0) o.ctx0 = CTX_MR0 + 5'd2;
        else o.ctx0 = CTX_MR0 + ((nb.h != 0 || nb.v != 0 || nb.d != 0) ? 5'd1 : 5'd0);
      end else if (in_spp) begin
        nb = neigh(int'(row), p, PASS_SPP, 1'b0, c_left, c_cur, cb_w, cab);
        o.pass = PASS_SPP; o.d0 = e.mag[p];
        o.ctx0 = zc_ctx(band, int'(nb.h), int'(nb.v), int'(nb.d));
        o.mode = e.mag[p] ? 3'd2 : 3'd1;
        o.ctx1 = nb.sctx; o.d1 = e.sign ^ nb.sxor;
        o.newsig = e.mag[p];
      end else begin
        o.pass = PASS_CUP;
        if (run) begin
          if (row == 2'd0) begin
            // Run symbol; if the run is broken, position and sign follow.
            o.ctx0 = CTX_RL; o.d0 = any1;
            if (any1) begin
              nb = neigh(k, p, PASS_CUP, 1'b0, c_left, c_cur, cb_w, cab);
              o.mode = 3'd4; o.upos = 2'(k);
              o.ctx1 = nb.sctx; o.d1 = c_cur[k].sign ^ nb.sxor;
              o.newsig = (k == 0);
            end else o.mode = 3'd1;
          end else if (any1 && int'(row) > k) begin
            // Rows after the first significant one are coded normally.
            nb = neigh(int'(row), p, PASS_CUP, 1'b0, c_left, c_cur, cb_w, cab);
            o.ctx0 = zc_ctx(band, int'(nb.h), int'(nb.v), int'(nb.d)); o.d0 = e.mag[p];
            o.mode = e.mag[p] ? 3'd2 : 3'd1;
            o.ctx1 = nb.sctx; o.d1 = e.sign ^ nb.sxor;
            o.newsig = e.mag[p];
          end else begin
            // Covered by the run symbol.
            o.mode = 3'd0;
            o.newsig = any1 && (int'(row) == k);
          end
        end else begin
          nb = neigh(int'(row), p, PASS_CUP, 1'b0, c_left, c_cur, cb_w, cab);
          o.ctx0 = zc_ctx(band, int'(nb.h), int'(nb.v), int'(nb.d)); o.d0 = e.mag[p];
          o.mode = e.mag[p] ? 3'd2 : 3'd1;
          o.ctx1 = nb.sctx; o.d1 = e.sign ^ nb.sxor;
          o.newsig = e.mag[p];
        end
      end
      cf[p] = o;
    end
  end

endmodule
