// tb_jp2k_codec: end-to-end test of the encoder at its default sizes.
//
// Streams NT tiles of 256 x 256 pixels (a smooth ramp plus noise, with a
// flat region so the clean-up pass runs in run mode) into the codec, with
// random back-pressure on the header output, and checks: one header per
// terminated code-block (19 per tile: six per detail EBC plus LL3), fields in
// range, kept length within the budget and not above the total, the total
// equal to the bytes the coders emitted for that code-block, and that every
// mechanism happened: pixel stall, controller hold, code-block switch, level
// switch, run-mode coding, termination and FIFO back-pressure.
module tb_jp2k_codec;
  import jp2k_pkg::*;
  import mq_pkg::*;
  import ebc_pkg::*;

  localparam int NT = 1;
  localparam int unsigned BUDGET = 400;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic pix_v, pix_ready, bs_valid, bs_ready, bs_overflow, done;
  logic [7:0] pix;
  logic [31:0] bs_word;
  logic [2:0] cod_valid;
  col_tag_t [2:0] cod_tag;
  logic [2:0][MAGW-1:0][7:0][7:0] cod_data;
  logic [2:0][MAGW-1:0][3:0] cod_count;
  filter_e filt = F97;

  jp2k_codec dut (
    .clk, .rst_n, .start, .num_tiles(16'(NT)), .filt, .budget(16'(BUDGET)),
    .pix_v, .pix, .pix_ready, .bs_valid, .bs_ready, .bs_word, .bs_overflow,
    .cod_valid, .cod_tag, .cod_data, .cod_count, .done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- pixel source ----
  int px = 0, py = 0, pt = 0;
  assign pix_v = rst_n && pt < NT;
  always_comb begin
    if (py >= 128 && px < 128) pix = 8'd100;          // flat quarter
    else pix = 8'((px * 3 + py * 2 + pt * 17) & 8'hff) ^ 8'($urandom_range(0, 7));
  end
  always_ff @(posedge clk)
    if (pix_v && pix_ready) begin
      if (px == 255) begin
        px <= 0;
        if (py == 255) begin py <= 0; pt <= pt + 1; end else py <= py + 1;
      end else px <= px + 1;
    end

  // ---- mechanism counters ----
  int n_stall = 0, n_hold = 0, n_switch = 0, n_lvsw = 0, n_run = 0, n_term = 0, n_bp = 0;
  logic [1:0] last_lvl = '0;
  always_ff @(posedge clk) if (rst_n) begin
    if (!pix_ready && pt < NT) n_stall <= n_stall + 1;
    if (dut.hold) n_hold <= n_hold + 1;
    if (dut.st_start) begin
      if (dut.st.level != last_lvl) n_lvsw <= n_lvsw + 1;
      last_lvl <= dut.st.level;
    end
    if (bs_valid && !bs_ready) n_bp <= n_bp + 1;
  end
  for (genvar e = 0; e < 3; e++) begin : g_mon
    always_ff @(posedge clk) if (rst_n) begin
      if (dut.g_ebc[e].u_ebc.load) n_switch <= n_switch + 1;
      if (dut.g_ebc[e].f_valid) n_term <= n_term + 1;
      if (dut.g_ebc[e].c_valid)
        for (int p = 0; p < MAGW; p++)
          if (dut.g_ebc[e].u_ebc.cf[p].pass == PASS_CUP && dut.g_ebc[e].u_ebc.cf[p].mode == 3'd4)
            n_run <= n_run + 1;
    end
  end

  // ---- bytes emitted per code-block (keyed by EBC, tile and cb) ----
  int emitted [string];
  always_ff @(posedge clk) if (rst_n)
    for (int e = 0; e < 3; e++) begin
      col_tag_t t;
      int s;
      string k;
      s = 0;
      for (int p = 0; p < MAGW; p++) s += int'(cod_count[e][p]);
      t = cod_tag[e];
      k = $sformatf("%0d/%0d/%0d", e, t.tile, t.cb);
      if (cod_valid[e] && s != 0) emitted[k] = (emitted.exists(k) ? emitted[k] : 0) + s;
      if (e == 0 ? dut.g_ebc[0].f_valid : e == 1 ? dut.g_ebc[1].f_valid : dut.g_ebc[2].f_valid) begin
        mq_bytes_t [MAGW-1:0][NPASS-1:0] fb;
        col_tag_t ft;
        if (e == 0) begin fb = dut.g_ebc[0].f_bytes; ft = dut.g_ebc[0].f_tag; end
        else if (e == 1) begin fb = dut.g_ebc[1].f_bytes; ft = dut.g_ebc[1].f_tag; end
        else begin fb = dut.g_ebc[2].f_bytes; ft = dut.g_ebc[2].f_tag; end
        k = $sformatf("%0d/%0d/%0d", e, ft.tile, ft.cb);
        for (int p = 0; p < MAGW; p++) for (int q = 0; q < NPASS; q++)
          emitted[k] = (emitted.exists(k) ? emitted[k] : 0) + int'(fb[p][q].n);
      end
    end

  // Header totals as seen at the rate controllers, for the comparison.
  int rdo_total [string];
  always_ff @(posedge clk) if (rst_n)
    for (int e = 0; e < 3; e++)
      if (dut.res_valid[e])
        rdo_total[$sformatf("%0d/%0d/%0d", e, dut.res_tag[e].tile, dut.res_tag[e].cb)] = int'(dut.res_total[e]);

  // ---- header sink ----
  int n_hdr = 0;
  logic word1 = 1'b0;
  logic [31:0] w0;
  always_ff @(posedge clk) begin
    bs_ready <= ($urandom_range(0, 3) != 0);
    if (bs_valid && bs_ready) begin
      word1 <= !word1;
      if (!word1) w0 <= bs_word;
      else begin
        n_hdr <= n_hdr + 1;
        chk(w0[10:6] <= 5'd27, "npass range");
        chk(bs_word[31:16] <= 16'(BUDGET), "kept within budget");
        chk(bs_word[31:16] <= bs_word[15:0], "kept <= total");
        chk(w0[31:16] < 16'(NT), "tile range");
        chk((w0[12:11] == 2'(BAND_LL)) == (w0[15:13] == CB_LL3), "band/cb");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); start = 1'b1; @(posedge clk); start = 1'b0;
    wait (done);
    repeat (400) @(posedge clk);
    chk(n_hdr == 19 * NT, $sformatf("header count %0d", n_hdr));
    chk(!bs_overflow, "no FIFO overflow");
    foreach (rdo_total[k]) begin
      chk(emitted.exists(k) && emitted[k] == rdo_total[k],
          $sformatf("total bytes of %s: %0d vs %0d", k, rdo_total[k], emitted.exists(k) ? emitted[k] : -1));
    end
    chk(rdo_total.num() == 19 * NT, "terminated code-blocks");
    $display("mechanisms: stall=%0d hold=%0d switch=%0d levelsw=%0d run=%0d term=%0d backpressure=%0d",
             n_stall, n_hold, n_switch, n_lvsw, n_run, n_term, n_bp);
    chk(n_stall > 0, "pixel stall happened");
    chk(n_hold > 0, "controller hold happened");
    chk(n_switch > 0, "code-block switch happened");
    chk(n_lvsw > 0, "level switch happened");
    chk(n_run > 0, "run mode happened");
    chk(n_term > 0, "termination happened");
    chk(n_bp > 0, "header back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000 * NT) @(posedge clk);
    failures++;
    $display("FAIL watchdog: pt=%0d state=%p hold=%0d", pt, dut.st, dut.hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
