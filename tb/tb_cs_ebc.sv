// tb_cs_ebc: checks the code-block switched EBC against a sequential
// reference coder.
//
// Three code-blocks are fed stripe by stripe: A (slot 2) and B (slot 3) with
// their stripes interleaved, so the EBC switches code-block on every stripe,
// then C, which re-uses A's slot after A was terminated. Random idle gaps
// with drain columns are inserted between columns. The bytes every plane's
// coder emits are collected per code-block, plane and pass, with the flush
// bytes at termination appended; each of the 27 codewords of every
// code-block must equal the reference: the textbook stripe-causal EBCOT
// symbols of that plane and pass, coded by a reference MQ coder with its
// own contexts per codeword. Termination must come once per code-block.
module tb_cs_ebc;
  import jp2k_pkg::*;
  import mq_pkg::*;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;

  localparam int BW = 16, BH = 12;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic in_valid, in_sign, drain, can_drain;
  logic [1:0] in_row;
  logic [MAGW-1:0] in_mag;
  col_tag_t in_tag;
  logic cod_valid, fl_valid;
  col_tag_t cod_tag, fl_tag;
  logic [1:0] cod_row;
  logic [MAGW-1:0] cod_mag, cod_newsig;
  pass_e [MAGW-1:0] cod_pass;
  mq_bytes_t [MAGW-1:0] cod_bytes;
  mq_bytes_t [MAGW-1:0][NPASS-1:0] fl_bytes;

  cs_ebc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte got [3][9][3][$];
  int  nterm [3] = '{0, 0, 0};
  int  nload = 0;
  ebc_ref blk [3];
  logic [2:0] cbid [3] = '{3'd2, 3'd3, 3'd4};
  band_e bnd [3] = '{BAND_HL, BAND_HH, BAND_LH};

  function automatic int which(input logic [2:0] cb);
    return int'(cb) - 2;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.load) nload++;
    if (cod_valid)
      for (int p = 0; p < MAGW; p++)
        if (cod_pass[p] != PASS_NONE)
          for (int i = 0; i < int'(cod_bytes[p].n); i++)
            got[which(cod_tag.cb)][p][cod_pass[p]].push_back(byte'(cod_bytes[p].d[i]));
    if (fl_valid) begin
      int k;
      k = which(fl_tag.cb);
      nterm[k]++;
      for (int p = 0; p < MAGW; p++)
        for (int q = 0; q < NPASS; q++)
          for (int i = 0; i < int'(fl_bytes[p][q].n); i++) got[k][p][q].push_back(byte'(fl_bytes[p][q].d[i]));
    end
  end

  // Stimulus: a list of per-cycle actions (coefficient, idle or drain), played
  // one per cycle; a drain waits until the EBC can take a push.
  typedef struct { int kind; int k; int s; int x; int r; } act_t;   // kind 0 coef, 1 idle, 2 drain
  act_t acts[$];
  act_t cur;
  bit   running = 0;

  task automatic add_stripe(input int k, input int s);
    act_t a;
    repeat ($urandom_range(0, 2)) begin a = '{2, 0, 0, 0, 0}; acts.push_back(a); end
    for (int x = 0; x < BW; x++) begin
      while ($urandom_range(0, 4) == 0) begin a = '{1, 0, 0, 0, 0}; acts.push_back(a); end
      for (int r = 0; r < 4; r++) begin a = '{0, k, s, x, r}; acts.push_back(a); end
    end
  endtask

  always_comb begin
    col_tag_t t;
    t = '0;
    in_valid = running && cur.kind == 0;
    drain    = running && cur.kind == 2 && can_drain;
    in_row   = 2'(cur.r);
    t.valid = 1'b1; t.first_col = cur.x == 0; t.last_col = cur.x == BW - 1;
    t.first_stripe = cur.s == 0; t.last_stripe = cur.s == BH / 4 - 1;
    t.band = bnd[cur.k]; t.cb = cbid[cur.k]; t.col = 6'(cur.x);
    in_tag  = t;
    in_sign = (running && cur.kind == 0) ? blk[cur.k].sgn[4*cur.s+cur.r][cur.x][0] : 1'b0;
    in_mag  = (running && cur.kind == 0) ? 9'(blk[cur.k].mag[4*cur.s+cur.r][cur.x]) : '0;
  end

  always @(posedge clk)
    if (running && (cur.kind != 2 || can_drain)) begin
      if (acts.size() != 0) cur <= acts.pop_front();
      else running <= 0;
    end

  initial begin
    for (int k = 0; k < 3; k++) begin
      blk[k] = new(BW, BH, bnd[k]);
      for (int y = 0; y < BH; y++) for (int x = 0; x < BW; x++) begin
        int m;
        m = (k == 2 && y < 8) ? 0 : $urandom_range(0, 511) >> $urandom_range(0, 9);
        blk[k].mag[y][x] = m;
        blk[k].sgn[y][x] = $urandom_range(0, 1);
      end
      blk[k].run();
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    init <= 1'b1; @(posedge clk); init <= 1'b0;
    for (int s = 0; s < BH / 4; s++) begin add_stripe(0, s); add_stripe(1, s); end
    for (int s = 0; s < BH / 4; s++) add_stripe(2, s);
    repeat (6) begin act_t a; a = '{2, 0, 0, 0, 0}; acts.push_back(a); end
    cur = acts.pop_front();
    running = 1;
    wait (!running);
    repeat (8) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (nterm[k] != 1) begin failures++; $display("FAIL block %0d terminated %0d times", k, nterm[k]); end
      for (int p = 0; p < MAGW; p++)
        for (int q = 0; q < NPASS; q++) begin
          mq_ref m;
          m = new();
          foreach (blk[k].syms[p][q][i]) m.code(blk[k].syms[p][q][i] >> 1, blk[k].syms[p][q][i] & 1);
          m.flush();
          checks++;
          if (m.out != got[k][p][q]) begin
            failures++;
            if (failures < 10)
              $display("FAIL block %0d plane %0d pass %0d: %0d bytes vs %0d expected: %p vs %p", k, p, q,
                       got[k][p][q].size(), m.out.size(), got[k][p][q], m.out);
          end
        end
    end
    checks++;
    if (nload < 2 * BH / 4) begin failures++; $display("FAIL only %0d switches", nload); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
