// crb: coefficient register bank of one EBC.
//
// Coefficients arrive one per cycle in stripe scan order (four rows of a
// column top to bottom, then the next column). When the fourth row of a
// column arrives the column is pushed into a window of four column
// registers A (newest, x+2), B (x+1), C (x, being coded) and D (x-1). On the
// push, the propagation-pass flags that context formation has just computed
// for B are stored with it as it moves to C, and B's bottom row is written to
// the inter-code-block line buffer for the next stripe of its code-block. A
// column entering A picks up its row above from the line buffer (zero in a
// code-block's first stripe), which then travels with it.
//
// In the four cycles after a push, phase_act is high and phase counts the
// row of C to code. drain pushes an empty column, used to code the last two
// columns when no more input follows. The window also gives context formation
// its inputs, with columns of another stripe masked out: a column's left
// neighbour is absent if it is the first of its stripe, its right neighbour
// if it is the last.
module crb
  import jp2k_pkg::*;
  import ebc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [1:0]            in_row,
  input  logic                  in_sign,
  input  logic [MAGW-1:0]       in_mag,
  input  col_tag_t              in_tag,
  input  logic                  drain,
  input  logic [3:0][MAGW-1:0]  b_insp,
  input  logic [3:0][MAGW-1:0]  b_spp,
  output col_t                  win_d,
  output col_t                  win_c,
  output col_t                  win_b,
  output col_t                  win_a,
  output logic                  phase_act,
  output logic [1:0]            phase,
  // Context-formation inputs.
  output crb_ent_t [3:0]        f_left,
  output crb_ent_t [2:0]        f_above,
  output crb_ent_t [3:0]        f_right,
  output crb_ent_t [3:0]        c_left,
  output logic                  c_right_en,
  output crb_ent_t [2:0]        c_above
);

  crb_ent_t [2:0] asm_e;
  col_t           a_q, b_q, c_q, d_q;
  logic           push;
  col_t           newcol;
  lb_ent_t        lb_rd;
  lb_ent_t        lb_wd;

  assign push = (in_valid && in_row == 2'd3) || drain;

  inter_cb_line_buffer u_lb (
    .clk  (clk),
    .we   (push && b_q.tag.valid),
    .waddr(slot_base(cb_slot(b_q.tag.cb)) + 8'(b_q.tag.col)),
    .wdata(lb_wd),
    .raddr(slot_base(cb_slot(in_tag.cb)) + 8'(in_tag.col)),
    .rdata(lb_rd)
  );
  assign lb_wd = '{sign: b_q.e[3].sign, mag: b_q.e[3].mag, spp: b_spp[3]};

  always_comb begin
    newcol = '0;
    if (!drain && in_valid) begin
      newcol.e[0] = asm_e[0];
      newcol.e[1] = asm_e[1];
      newcol.e[2] = asm_e[2];
      newcol.e[3] = '{sign: in_sign, mag: in_mag, spp: '0, insp: '0};
      newcol.tag  = in_tag;
      newcol.tag.valid = 1'b1;
      if (!in_tag.first_stripe)
        newcol.above = '{sign: lb_rd.sign, mag: lb_rd.mag, spp: lb_rd.spp, insp: '0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_e <= '0; a_q <= '0; b_q <= '0; c_q <= '0; d_q <= '0;
      phase_act <= 1'b0; phase <= '0;
    end else begin
      if (in_valid && in_row != 2'd3)
        asm_e[in_row] <= '{sign: in_sign, mag: in_mag, spp: '0, insp: '0};
      if (push) begin
        a_q <= newcol;
        b_q <= a_q;
        c_q <= b_q;
        for (int y = 0; y < 4; y++) begin
          c_q.e[y].insp <= b_insp[y];
          c_q.e[y].spp  <= b_spp[y];
        end
        d_q <= c_q;
        phase_act <= 1'b1;
        phase <= '0;
      end else if (phase_act) begin
        if (phase == 2'd3) phase_act <= 1'b0;
        else phase <= phase + 2'd1;
      end
    end
  end

  assign win_a = a_q;
  assign win_b = b_q;
  assign win_c = c_q;
  assign win_d = d_q;

  // Flag side: B with its left (C) and right (A) neighbours.
  assign f_left     = b_q.tag.first_col ? '0 : c_q.e;
  assign f_right    = b_q.tag.last_col  ? '0 : a_q.e;
  assign f_above[0] = b_q.tag.first_col ? '0 : c_q.above;
  assign f_above[1] = b_q.above;
  assign f_above[2] = b_q.tag.last_col  ? '0 : a_q.above;
  // Coding side: C with D and B.
  assign c_left     = c_q.tag.first_col ? '0 : d_q.e;
  assign c_right_en = !c_q.tag.last_col && b_q.tag.valid;
  assign c_above[0] = c_q.tag.first_col ? '0 : d_q.above;
  assign c_above[1] = c_q.above;
  assign c_above[2] = c_q.tag.last_col  ? '0 : b_q.above;

  // The window moves at most once per four cycles: one coefficient per cycle.
  a_one_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
      push |-> (!phase_act || phase == 2'd3));

endmodule
