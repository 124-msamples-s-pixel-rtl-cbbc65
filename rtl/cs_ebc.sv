// cs_ebc: code-block switched, word-level embedded block coder (encoder).
//
// Codes one DWT coefficient per cycle, in all nine magnitude bit-planes at
// once, and switches between code-blocks at stripe boundaries without losing
// a cycle. Stream in: one sign-magnitude coefficient per cycle in stripe scan
// order, each with the tags of its stripe column (code-block, band, column,
// first/last column, first/last stripe of the code-block). Stripes of
// different code-blocks may follow each other in any order; each code-block's
// stripes come in order.
//
// Structure: the coefficient register bank (crb) forms the column window,
// parallel context formation (pcf) yields for every plane the symbols of the
// coefficient being coded, and nine four-symbol arithmetic coders (fac) code
// them, each into the codeword of the pass the coefficient belongs to in that
// plane. The stripe-causal, restart and reset ("parallel") coding mode is
// used: every (plane, pass) of a code-block has its own contexts and its own
// codeword, 27 per code-block. The coding states of all 27 coders of the
// current code-block live in the PSRB; on a switch the outgoing state goes to
// the state memory and the incoming one is read from it in the same cycle.
// Two column pushes after the last column of a code-block's last stripe all
// its 27 codewords are terminated at once, and its state slot is re-used.
//
// Outputs per cycle: for the coefficient coded (cod_valid), its pass and
// whether it became significant in every plane (side information for rate
// control) and the bytes every FAC emitted; on termination (fl_valid) the
// final bytes of all 27 codewords. Latency from a coefficient to its coding:
// two columns (8 cycles) plus one. drain pushes an empty column.
module cs_ebc
  import jp2k_pkg::*;
  import mq_pkg::*;
  import ebc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            in_valid,
  input  logic [1:0]      in_row,
  input  logic            in_sign,
  input  logic [MAGW-1:0] in_mag,
  input  col_tag_t        in_tag,
  input  logic            drain,
  output logic            can_drain,   // a push (data or drain) is allowed now
  output logic            cod_valid,
  output col_tag_t        cod_tag,
  output logic [1:0]      cod_row,
  output logic [MAGW-1:0] cod_mag,
  output pass_e     [MAGW-1:0] cod_pass,
  output logic      [MAGW-1:0] cod_newsig,
  output mq_bytes_t [MAGW-1:0] cod_bytes,
  output logic            fl_valid,
  output col_tag_t        fl_tag,
  output mq_bytes_t [MAGW-1:0][NPASS-1:0] fl_bytes
);

  col_t win_d, win_c, win_b, win_a;
  logic phase_act;
  logic [1:0] phase;
  crb_ent_t [3:0] f_left, f_right, c_left;
  crb_ent_t [2:0] f_above, c_above;
  logic c_right_en;
  logic [3:0][MAGW-1:0] b_insp, b_spp;
  cf_out_t [MAGW-1:0] cf;

  crb u_crb (
    .clk, .rst_n, .in_valid, .in_row, .in_sign, .in_mag, .in_tag, .drain,
    .b_insp, .b_spp, .win_d, .win_c, .win_b, .win_a, .phase_act, .phase,
    .f_left, .f_above, .f_right, .c_left, .c_right_en, .c_above
  );

  pcf u_pcf (
    .band(win_c.tag.valid ? win_c.tag.band : win_b.tag.band),
    .f_left, .f_cur(win_b.e), .f_right, .f_above, .b_insp, .b_spp,
    .c_left, .c_cur(win_c.e), .c_right_en, .c_above, .row(phase), .cf
  );

  // ---- code-block switching ----
  logic       term_pending;
  col_tag_t   term_tag;
  logic       loaded_valid;
  logic       first_phase;
  logic       load;
  logic [2:0] load_slot;
  logic [2:0] out_slot;
  logic       coding;
  ebc_st_t    cur_st, out_st, upd_st;

  assign first_phase = phase_act && phase == 2'd0;
  assign coding      = phase_act && win_c.tag.valid;
  assign load_slot   = win_c.tag.valid ? cb_slot(win_c.tag.cb) : out_slot;
  assign load        = first_phase && (term_pending ||
                       (win_c.tag.valid && (!loaded_valid || load_slot != out_slot)));

  psrb_state_memory u_psrb (
    .clk, .rst_n, .init, .load, .load_slot, .reset_out(term_pending),
    .upd_en(coding), .upd_i(upd_st), .cur_o(cur_st), .out_o(out_st), .out_slot_o(out_slot)
  );

  // ---- nine FACs ----
  mq_reg_t   [MAGW-1:0] f_reg_i, f_reg_o;
  mq_ctx_t   [MAGW-1:0] f_cx0_i, f_cx1_i, f_cx0_o, f_cx1_o;
  mq_bytes_t [MAGW-1:0] f_bytes;
  logic      [MAGW-1:0][2:0] f_mode;

  for (genvar p = 0; p < MAGW; p++) begin : g_fac
    logic [1:0] ps;
    assign ps = (cf[p].pass == PASS_NONE) ? 2'd0 : 2'(cf[p].pass);
    assign f_reg_i[p] = cur_st[p][ps].r;
    assign f_cx0_i[p] = cur_st[p][ps].cx[cf[p].ctx0];
    assign f_cx1_i[p] = cur_st[p][ps].cx[cf[p].ctx1];
    assign f_mode[p]  = (coding && cf[p].pass != PASS_NONE) ? cf[p].mode : 3'd0;
    fac u_fac (
      .mode(f_mode[p]), .flush(1'b0), .d0(cf[p].d0), .upos(cf[p].upos), .d1(cf[p].d1),
      .reg_i(f_reg_i[p]), .cx0_i(f_cx0_i[p]), .cx1_i(f_cx1_i[p]),
      .reg_o(f_reg_o[p]), .cx0_o(f_cx0_o[p]), .cx1_o(f_cx1_o[p]), .bytes_o(f_bytes[p])
    );
  end

  always_comb begin
    upd_st = cur_st;
    for (int p = 0; p < MAGW; p++) begin
      if (f_mode[p] != 3'd0) begin
        upd_st[p][cf[p].pass].r = f_reg_o[p];
        upd_st[p][cf[p].pass].cx[cf[p].ctx0] = f_cx0_o[p];
        if (f_mode[p] == 3'd2 || f_mode[p] == 3'd4)
          upd_st[p][cf[p].pass].cx[cf[p].ctx1] = f_cx1_o[p];
      end
    end
  end

  // ---- termination of all 27 codewords of a finished code-block ----
  always_comb begin
    for (int p = 0; p < MAGW; p++)
      for (int q = 0; q < NPASS; q++) begin
        mq_reg_t r;
        mq_bytes_t o;
        r = out_st[p][q].r;
        o = '0;
        mq_flush(r, o);
        fl_bytes[p][q] = o;
      end
  end
  assign fl_valid = first_phase && term_pending;
  assign fl_tag   = term_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      term_pending <= 1'b0; term_tag <= '0; loaded_valid <= 1'b0;
    end else if (init) begin
      term_pending <= 1'b0; term_tag <= '0; loaded_valid <= 1'b0;
    end else begin
      if (load) loaded_valid <= win_c.tag.valid;
      if (fl_valid) term_pending <= 1'b0;
      if (coding && phase == 2'd3 && win_c.tag.last_col && win_c.tag.last_stripe) begin
        term_pending <= 1'b1;
        term_tag     <= win_c.tag;
      end
    end
  end

  assign can_drain = !phase_act || phase == 2'd3;
  assign cod_valid = coding;
  assign cod_tag   = win_c.tag;
  assign cod_row   = phase;
  assign cod_mag   = win_c.e[phase].mag;
  for (genvar p = 0; p < MAGW; p++) begin : g_out
    assign cod_pass[p]   = coding ? cf[p].pass : PASS_NONE;
    assign cod_newsig[p] = coding && cf[p].newsig;
    assign cod_bytes[p]  = f_bytes[p];
  end

endmodule
