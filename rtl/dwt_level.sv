// dwt_level: one level of the forward 2-D lifting DWT, line based.
//
// Input: the samples of a W x W image (a tile, or the LL band of the level
// above), row by row, at most one per cycle (in_v), each while en is high.
// Two row filters take alternate rows: a pair of samples is filtered as soon
// as its odd sample arrives, and the extra flush operations at the end of a
// row run on the following cycles that carry no pair, so a new row can start
// at once. Every row-filter output (one low-pass and one high-pass value of
// column k) goes to two column filters, one for the low-pass and one for the
// high-pass half of the line. Even rows are kept in a one-line buffer; on the
// odd row the column filter filters the pair using the column's lifting state
// from the inter-level line buffer. After the last row of an image the column
// filters flush every column, once ((5,3)) or twice ((9,7)), in row-major
// order; this runs while the first row of the next image is buffered.
//
// Output: up to four subband coefficients per cycle, all of row o_row and
// column o_col: LL and LH from the low-pass column filter, HL and HH from the
// high-pass one. Rows leave in order, so the LL band can feed the next level
// directly. en low freezes the whole level (a stall). Latency is a few
// cycles plus the filter delay of one or two line pairs.
//
// The row-filter and column-filter split and the line-by-line data flow
// follow the document's lifting DWT; the streaming schedule (one instance
// per level, filter state stored per column) is this design's own.
module dwt_level
  import jp2k_pkg::*;
#(
  parameter int unsigned W = TILE
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  filter_e                    filt,
  input  logic                       in_v,
  input  dwt_word_t                  in_x,
  output logic                       o_v,
  output logic [$clog2(W/2)-1:0]     o_row,
  output logic [$clog2(W/2)-1:0]     o_col,
  output dwt_word_t                  o_ll,
  output dwt_word_t                  o_hl,
  output dwt_word_t                  o_lh,
  output dwt_word_t                  o_hh,
  output logic                       o_last   // last coefficient of an image
);
  localparam int unsigned NP = W / 2;
  localparam int unsigned AW = $clog2(NP);

  logic [AW:0] lat;
  assign lat = (filt == F97) ? (AW+1)'(2) : (AW+1)'(1);

  // ---- input position ----
  logic [$clog2(W)-1:0] x_q, y_q;
  dwt_word_t            e_q;

  // ---- row filters (one per row parity) ----
  core_st_t [1:0]   rst_q;
  logic [1:0][1:0]  rfl_q;      // flushes still due per row filter
  logic [1:0][AW-1:0] rk_q;     // next output column per row filter
  logic [1:0][$clog2(W)-1:0] ry_q; // row being output per row filter

  logic       pair_go;
  logic       rsel;             // row filter operated this cycle
  core_op_e   rop;
  core_st_t   rst_i, rst_o;
  logic       r_out_v;
  dwt_word_t  r_lo, r_hi;

  assign pair_go = en && in_v && x_q[0];
  always_comb begin
    rsel = y_q[0];
    rop  = OP_NOP;
    if (pair_go) rop = OP_PAIR;
    else if (en && rfl_q[0] != 2'd0) begin rsel = 1'b0; rop = OP_FLUSH; end
    else if (en && rfl_q[1] != 2'd0) begin rsel = 1'b1; rop = OP_FLUSH; end
    rst_i = (rop == OP_PAIR && x_q == 1) ? core_st_t'('0) : rst_q[rsel];
  end

  dwt_filter_core u_row (
    .filt, .inverse(1'b0), .op(rop), .e_i(e_q), .o_i(in_x), .st_i(rst_i),
    .st_o(rst_o), .out_v(r_out_v), .lo_o(r_lo), .hi_o(r_hi)
  );

  // ---- column filters ----
  dwt_word_t [1:0] ev_mem [NP];          // even-row values, low and high half
  logic        cfl_act;                  // column flush pass running
  logic [AW:0] cfl_n;                    // flush passes done
  logic [AW-1:0] cfl_k;
  logic        cfl_pend;                 // last row done, flush not started

  logic           c_go;
  core_op_e       cop;
  logic [AW-1:0]  ck;
  logic [$clog2(W)-1:0] cy;
  core_st_t [1:0] cst_rd, cst_i, cst_o;
  logic [1:0]     c_out_v;
  dwt_word_t [1:0] c_lo, c_hi;
  logic [$clog2(W)-1:0] out_pair;

  assign c_go = en && r_out_v;
  assign ck   = c_go ? rk_q[rsel] : cfl_k;
  assign cy   = ry_q[rsel];

  always_comb begin
    cop = OP_NOP;
    if (c_go && cy[0])                cop = OP_PAIR;
    else if (en && !c_go && cfl_act)  cop = OP_FLUSH;
  end

  inter_level_line_buffer #(.DEPTH(NP)) u_ilb (
    .clk, .we(cop != OP_NOP), .waddr(ck), .wdata(cst_o), .raddr(ck), .rdata(cst_rd)
  );

  assign cst_i = (cop == OP_PAIR && cy == 1) ? '0 : cst_rd;

  for (genvar h = 0; h < 2; h++) begin : g_col
    dwt_filter_core u_col (
      .filt, .inverse(1'b0), .op(cop), .e_i(ev_mem[ck][h]), .o_i(h == 0 ? r_lo : r_hi),
      .st_i(cst_i[h]), .st_o(cst_o[h]), .out_v(c_out_v[h]), .lo_o(c_lo[h]), .hi_o(c_hi[h])
    );
  end

  // Output row of a column operation.
  assign out_pair = (cop == OP_PAIR) ? $clog2(W)'(cy >> 1) - $clog2(W)'(lat)
                                     : $clog2(W)'(NP) - $clog2(W)'(lat) + $clog2(W)'(cfl_n);

  assign o_v    = c_out_v[0];
  assign o_row  = AW'(out_pair);
  assign o_col  = ck;
  assign o_ll   = c_lo[0];
  assign o_lh   = c_hi[0];
  assign o_hl   = c_lo[1];
  assign o_hh   = c_hi[1];
  assign o_last = o_v && o_row == AW'(NP-1) && o_col == AW'(NP-1);

  always_ff @(posedge clk) begin
    if (c_go && !cy[0]) ev_mem[ck] <= {r_hi, r_lo};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; e_q <= '0; rst_q <= '0; rfl_q <= '0; rk_q <= '0; ry_q <= '0;
      cfl_act <= 1'b0; cfl_n <= '0; cfl_k <= '0; cfl_pend <= 1'b0;
    end else if (en) begin
      if (in_v) begin
        if (!x_q[0]) e_q <= in_x;
        x_q <= x_q + 1'b1;
        if (x_q == $clog2(W)'(W-1)) begin
          y_q <= y_q + 1'b1;
          rfl_q[y_q[0]] <= 2'(lat);
        end
        if (x_q == 1) begin
          rk_q[y_q[0]] <= '0;
          ry_q[y_q[0]] <= y_q;
        end
      end
      if (rop != OP_NOP) begin
        rst_q[rsel] <= rst_o;
        if (rop == OP_FLUSH) rfl_q[rsel] <= rfl_q[rsel] - 2'd1;
      end
      if (r_out_v) rk_q[rsel] <= rk_q[rsel] + 1'b1;
      // Column flush: starts after the last output of the last row.
      if (c_go && cy == $clog2(W)'(W-1) && ck == AW'(NP-1)) cfl_pend <= 1'b1;
      if (cfl_pend && !c_go) begin
        cfl_pend <= 1'b0; cfl_act <= 1'b1; cfl_n <= '0; cfl_k <= '0;
      end
      if (cop == OP_FLUSH) begin
        cfl_k <= cfl_k + 1'b1;
        if (cfl_k == AW'(NP-1)) begin
          cfl_n <= cfl_n + 1'b1;
          if (cfl_n + 1'b1 == lat) cfl_act <= 1'b0;
        end
      end
    end
  end

  // A column pair operation never meets a pending column flush.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
      (c_go && cy[0] && cy == 1) |-> !cfl_act);
endmodule
