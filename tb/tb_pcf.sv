// tb_pcf: checks parallel context formation against the bit-plane
// sequential reference coder.
//
// The testbench plays the coefficient register bank: for every stripe
// column it presents the window (left column with flags, current column,
// right columns, row above), stores the flags the PCF computes and collects
// the symbols of all nine context formers. The symbol lists of every
// (bit-plane, pass) must equal those of the reference, in order. Code-blocks
// of several sizes, all four bands and sparse and dense data are used; run
// mode, its interruption and all three passes must occur.
module tb_pcf;
  import jp2k_pkg::*;
  import ebc_ref_pkg::*;

  band_e band;
  crb_ent_t [3:0] f_left, f_cur, f_right, c_left, c_cur;
  crb_ent_t [2:0] f_above, c_above;
  logic c_right_en;
  logic [1:0] row;
  logic [3:0][MAGW-1:0] b_insp, b_spp;
  cf_out_t [MAGW-1:0] cf;
  int checks = 0, failures = 0;
  int n_run = 0, n_runbreak = 0, n_pass[3] = '{0,0,0};

  pcf dut (.*);

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  crb_ent_t blk[64][64];   // coefficient store with flags (y, x)
  int got[9][3][$];

  function automatic crb_ent_t at(int y, int x, int w, int h);
    if (x < 0 || x >= w || y < 0 || y >= h) return '0;
    return blk[y][x];
  endfunction

  task automatic code_block(int w, int h, int bd, int density);
    ebc_ref r;
    r = new(w, h, bd);
    band = band_e'(bd);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      int m;
      m = (int'($urandom_range(0, 99)) < density) ? int'($urandom_range(1, 511)) >> $urandom_range(0, 8) : 0;
      r.mag[y][x] = m; r.sgn[y][x] = $urandom_range(0, 1);
      blk[y][x] = '0; blk[y][x].mag = 9'(m); blk[y][x].sign = r.sgn[y][x][0];
    end
    r.run();
    foreach (got[p, q]) got[p][q].delete();
    for (int s0 = 0; s0 < h; s0 += 4) begin
      // Flags of column 0 first, then for each x: flags of x+1 and coding of x.
      for (int x = -1; x < w; x++) begin
        for (int y = 0; y < 4; y++) begin
          f_left[y] = at(s0+y, x, w, h); f_cur[y] = at(s0+y, x+1, w, h); f_right[y] = at(s0+y, x+2, w, h);
          c_left[y] = at(s0+y, x-1, w, h); c_cur[y] = at(s0+y, x, w, h);
        end
        for (int k = 0; k < 3; k++) begin
          f_above[k] = at(s0-1, x+k, w, h);
          c_above[k] = at(s0-1, x-1+k, w, h);
        end
        c_right_en = (x+1 < w);
        if (x >= 0) begin
          for (int y = 0; y < 4; y++) begin
            row = 2'(y);
            #1;
            for (int p = 0; p < 9; p++) begin
              cf_out_t o;
              o = cf[p];
              if (o.pass != PASS_NONE && o.mode != 0) begin
                got[p][o.pass].push_back(o.ctx0*2 + o.d0);
                if (o.mode == 4) begin
                  got[p][o.pass].push_back(18*2 + o.upos[1]); got[p][o.pass].push_back(18*2 + o.upos[0]);
                  n_runbreak++;
                end
                if (o.mode == 2 || o.mode == 4) got[p][o.pass].push_back(o.ctx1*2 + o.d1);
                if (o.ctx0 == CTX_RL) n_run++;
                n_pass[o.pass]++;
              end
            end
          end
        end else #1;
        // Store the flags of column x+1.
        if (x+1 < w) for (int y = 0; y < 4; y++) if (s0+y < h) begin
          blk[s0+y][x+1].insp = b_insp[y]; blk[s0+y][x+1].spp = b_spp[y];
        end
      end
    end
    for (int p = 0; p < 9; p++) for (int q = 0; q < 3; q++) begin
      bit ok;
      ok = (got[p][q].size() == r.syms[p][q].size());
      if (ok) foreach (got[p][q][i]) if (got[p][q][i] != r.syms[p][q][i]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) begin
          int i0 = -1;
          foreach (got[p][q][i]) if (i0 < 0 && i < r.syms[p][q].size() && got[p][q][i] != r.syms[p][q][i]) i0 = i;
          $display("FAIL %0dx%0d band %0d plane %0d pass %0d: %0d symbols, expected %0d, first difference at %0d (%0d vs %0d)",
                   w, h, bd, p, q, got[p][q].size(), r.syms[p][q].size(), i0,
                   (i0 >= 0) ? got[p][q][i0] : -1, (i0 >= 0) ? r.syms[p][q][i0] : -1);
        end
      end
    end
  endtask

  initial begin
    int dens[4] = '{5, 30, 70, 100};
    for (int bd = 0; bd < 4; bd++)
      for (int di = 0; di < 4; di++) begin
        code_block(8, 8, bd, dens[di]);
        code_block(16, 12, bd, dens[di]);
      end
    code_block(32, 32, 3, 20);
    code_block(64, 8, 1, 40);
    checks++; if (n_run == 0 || n_runbreak == 0) begin failures++; $display("FAIL: run mode not exercised"); end
    checks++; if (n_pass[0] == 0 || n_pass[1] == 0 || n_pass[2] == 0) begin failures++; $display("FAIL: pass missing"); end
    $display("symbols: spp %0d mrp %0d cup %0d, runs %0d, broken runs %0d", n_pass[0], n_pass[1], n_pass[2], n_run, n_runbreak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
