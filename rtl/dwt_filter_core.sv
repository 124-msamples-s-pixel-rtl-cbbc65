// dwt_filter_core: 1-D lifting wavelet filter, forward and inverse, (5,3)
// reversible and (9,7) irreversible, on one sample pair per operation.
//
// The core is a chain of four lifting processing elements followed (forward)
// or preceded (inverse) by a scaling element. Every element is the same
// adder-multiplier x +/- round(k * (a + b)); only the multiplexed coefficient k,
// the rounding and the add/subtract select differ between the filters and
// between the two directions, so forward and inverse transform share all the
// arithmetic. Forward order is predict, update, predict, update with the
// coefficients alpha, beta, gamma, delta ((5,3) uses the first two only with
// -1/2 and 1/4); the inverse runs update, predict, update, predict with the
// same coefficients in reverse order and subtracts. Whole-sample symmetric
// extension is applied at both ends of a line.
//
// The core is combinational and keeps no state of its own: st_i is the state
// of the four stages for the line being filtered, st_o the state after this
// operation. The row filter of the 2-D DWT keeps it in a register, the column
// filter keeps one state per column in the inter-level line buffer. A line of
// N samples is filtered by N/2 OP_PAIR operations (first sample of the pair
// in e_i) followed by OP_FLUSH operations until it has produced N/2 output
// pairs: two flushes for (9,7), one for (5,3). out_v marks an output pair
// (low-pass in lo_o, high-pass in hi_o for the forward direction; even and odd
// sample for the inverse). Pair n comes out with the operation that feeds
// pair n+1 ((5,3)) or n+2 ((9,7)).
//
// The (9,7) coefficients are 12-bit fractions; words wrap at IW bits (the
// 14-bit internal width). Filters, lifting steps and their rounding follow the
// JPEG 2000 definitions; the state-passing structure is this design's own.
module dwt_filter_core
  import jp2k_pkg::*;
(
  input  filter_e     filt,
  input  logic        inverse,
  input  core_op_e    op,
  input  dwt_word_t   e_i,
  input  dwt_word_t   o_i,
  input  core_st_t    st_i,
  output core_st_t    st_o,
  output logic        out_v,
  output dwt_word_t   lo_o,
  output dwt_word_t   hi_o
);

  localparam int FRAC = 12;
  // 12-bit fixed-point magnitudes of the (9,7) lifting and scaling constants.
  localparam int K_ALPHA = 6497;   // 1.586134342 (negative)
  localparam int K_BETA  = 217;    // 0.052980118 (negative)
  localparam int K_GAMMA = 3616;   // 0.882911076
  localparam int K_DELTA = 1817;   // 0.443506852
  localparam int K_K     = 5039;   // K   = 1.230174105
  localparam int K_INVK  = 3330;   // 1/K = 0.812893066

  // One lifting element: x + t or x - t with t = round(k * (a + b)).
  function automatic dwt_word_t lift_pe(input dwt_word_t x, input dwt_word_t a, input dwt_word_t b,
                                        input logic [15:0] kmag, input int sh, input logic [15:0] rnd,
                                        input logic neg, input logic sub);
    logic signed [IW:0]    sum;
    logic signed [IW+15:0] prod;
    logic signed [IW+15:0] t;
    sum  = (IW+1)'(a) + (IW+1)'(b);
    prod = (IW+16)'(sum) * $signed({1'b0, kmag}) + $signed({1'b0, rnd});
    t    = prod >>> sh;
    if (neg) t = -t;
    return sub ? dwt_word_t'(x - IW'(t)) : dwt_word_t'(x + IW'(t));
  endfunction

  function automatic dwt_word_t scale_pe(input dwt_word_t x, input logic [15:0] kmag);
    logic signed [IW+15:0] prod;
    prod = (IW+16)'(x) * $signed({1'b0, kmag}) + (IW+16)'(1 <<< (FRAC-1));
    return dwt_word_t'(prod >>> FRAC);
  endfunction

  // Configuration of stage s: whether it is used, predict or update type,
  // and its coefficient.
  typedef struct {
    logic used;
    logic predict;
    int   kmag;
    int   sh;
    int   rnd;
    logic neg;
  } stage_cfg_t;

  function automatic stage_cfg_t cfg(input int s, input filter_e f, input logic inv);
    stage_cfg_t c;
    int step;                       // forward lifting step index 0..3
    c = '{used: 1'b0, predict: 1'b0, kmag: 0, sh: 0, rnd: 0, neg: 1'b0};
    step = inv ? ((f == F53) ? 1 - s : 3 - s) : s;
    c.used    = (f == F97) || (s < 2);
    c.predict = (step % 2) == 0;
    if (f == F53) begin
      c.kmag = 1;
      c.sh   = c.predict ? 1 : 2;
      c.rnd  = c.predict ? 0 : 2;
      c.neg  = c.predict;
    end else begin
      c.sh  = FRAC;
      c.rnd = 1 << (FRAC-1);
      unique case (step)
        0: begin c.kmag = K_ALPHA; c.neg = 1'b1; end
        1: begin c.kmag = K_BETA;  c.neg = 1'b1; end
        2: begin c.kmag = K_GAMMA; c.neg = 1'b0; end
        default: begin c.kmag = K_DELTA; c.neg = 1'b0; end
      endcase
    end
    return c;
  endfunction

  always_comb begin
    logic      v, fl;     // pair valid / flush token travelling down the chain
    dwt_word_t e, o, he, ho, po;
    stage_cfg_t c;
    st_o = st_i;
    he = '0; ho = '0; po = '0;
    c = cfg(0, filt, inverse);
    v  = (op == OP_PAIR);
    fl = (op == OP_FLUSH);
    e  = e_i;
    o  = o_i;
    // Inverse (9,7): undo the scaling first.
    if (inverse && filt == F97) begin
      e = scale_pe(e, 16'(K_K));
      o = scale_pe(o, 16'(K_INVK));
    end
    for (int s = 0; s < 4; s++) begin
      c = cfg(s, filt, inverse);
      if (c.used) begin
        if (c.predict) begin
          // Odd sample n needs even sample n+1: hold one pair.
          if (v) begin
            if (st_i[s].has) begin
              he = st_i[s].w0; ho = st_i[s].w1;
              st_o[s].w0 = e; st_o[s].w1 = o;
              o = lift_pe(ho, he, e, 16'(c.kmag), c.sh, 16'(c.rnd), c.neg, inverse);
              e = he;
            end else begin
              st_o[s].has = 1'b1; st_o[s].w0 = e; st_o[s].w1 = o;
              v = 1'b0;
            end
          end else if (fl) begin
            if (st_i[s].has) begin
              // Right boundary: mirrored even sample equals the held one.
              o = lift_pe(st_i[s].w1, st_i[s].w0, st_i[s].w0, 16'(c.kmag), c.sh, 16'(c.rnd), c.neg, inverse);
              e = st_i[s].w0;
              st_o[s].has = 1'b0;
              v = 1'b1; fl = 1'b0;
            end
          end
        end else begin
          // Even sample n needs odd samples n-1 and n (left boundary mirrors).
          if (v) begin
            po = st_i[s].has ? st_i[s].w1 : o;
            st_o[s].has = 1'b1; st_o[s].w1 = o; st_o[s].w0 = '0;
            e = lift_pe(e, po, o, 16'(c.kmag), c.sh, 16'(c.rnd), c.neg, inverse);
          end else if (fl) begin
            st_o[s].has = 1'b0;
          end
        end
      end
    end
    if (!inverse && filt == F97) begin
      e = scale_pe(e, 16'(K_INVK));
      o = scale_pe(o, 16'(K_K));
    end
    out_v = v;
    lo_o  = e;
    hi_o  = o;
  end

endmodule
