// tb_ls_scheduler: checks the level-switched schedule of the main controller.
//
// Three tiles are encoded. The first 19 states of the second tile must be the
// printed steady-state sequence (level-1 code-blocks 2/3 interleaved with the
// previous tile's last level-2 and level-3 states), every tile must take 88
// states of 256 cycles, and every (tile, code-block, stripe) must be issued
// exactly once. A stall (hold) is applied in the middle and must lengthen the
// run by exactly its length. A decoding run checks that the count is the same
// and that each level-1 row comes after the level-2 state that feeds it.
module tb_ls_scheduler;
  import jp2k_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, hold = 1'b0;
  codec_mode_e mode = ENCODE;
  logic [15:0] num_tiles = 16'd3;
  logic state_valid, state_start, tile_done, done;
  comp_state_t state;
  logic [7:0] cyc;
  int checks = 0, failures = 0;

  ls_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected steady-state sequence (tile offset relative to the current
  // tile, code-block, first stripe, last stripe).
  int exp_dt[19] = '{0,0,-1,0,0,0,0,0,-1,-1,0,0,0,0,0,0,0,0,0};
  int exp_cb[19] = '{2,3, 1,2,3,2,3,1, 0, 6,2,3,2,3,1,2,3,2,3};
  int exp_s0[19] = '{0,0,15,1,1,2,2,0, 6, 6,3,3,4,4,1,5,5,6,6};
  int exp_s1[19] = '{0,0,15,1,1,2,2,0, 7, 7,3,3,4,4,1,5,5,6,6};

  comp_state_t log_q[$];
  int n_tile_done = 0;
  int stall_events = 0;

  always @(posedge clk) begin
    if (state_start) log_q.push_back(state);
    if (tile_done) n_tile_done++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input codec_mode_e m, input int stall_len, output longint cycles);
    longint t0;
    mode = m;
    log_q.delete();
    n_tile_done = 0;
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    t0 = 0;
    while (!done) begin
      @(posedge clk); t0++;
      if (t0 == 30000 && stall_len > 0) begin
        hold <= 1'b1; repeat (stall_len) @(posedge clk); hold <= 1'b0; t0 += stall_len;
        stall_events++;
      end
    end
    cycles = t0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    longint c_enc, c_enc_stall, c_dec;
    int seen[int];
    int first, key;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(ENCODE, 0, c_enc);
    // Sequence of tile 1 starts at its first level-1 state.
    first = -1;
    foreach (log_q[i]) if (first < 0 && log_q[i].tile == 1 && log_q[i].level == 1) first = i;
    chk(first >= 0, "tile 1 found");
    for (int i = 0; i < 19; i++) begin
      comp_state_t s;
      s = log_q[first+i];
      chk(int'(s.tile) == 1 + exp_dt[i] && int'(s.cb) == exp_cb[i] &&
          int'(s.first_stripe) == exp_s0[i] && int'(s.last_stripe) == exp_s1[i],
          $sformatf("state %0d: got T%0d CB%0d S%0d-%0d", i+1, s.tile, s.cb, s.first_stripe, s.last_stripe));
    end
    chk(log_q.size() == 3*88, $sformatf("encode state count %0d", log_q.size()));
    foreach (log_q[i]) begin
      key = log_q[i].tile*1000 + log_q[i].cb*100 + log_q[i].first_stripe;
      chk(!seen.exists(key), "state issued once");
      seen[key] = 1;
    end
    chk(n_tile_done == 3, "three tile_done pulses");
    // 88 states of 256 cycles plus one issue cycle each.
    chk(c_enc == 3*88*257 + 1, $sformatf("encode cycles %0d", c_enc));

    run(ENCODE, 100, c_enc_stall);
    chk(c_enc_stall == c_enc + 100, $sformatf("stall adds its length: %0d", c_enc_stall));
    chk(stall_events == 1, "stall happened");

    run(DECODE, 0, c_dec);
    chk(log_q.size() == 3*88, "decode state count");
    chk(log_q[0].level == 3 && log_q[0].cb == 6, "decode starts with LL3");
    begin
      int l2done = 0, l1rows = 0;
      bit ok = 1;
      foreach (log_q[i]) begin
        if (log_q[i].level == 2) l2done++;
        if (log_q[i].level == 1 && (log_q[i].cb == 2 || log_q[i].cb == 4)) begin
          if (2*l2done < l1rows + 3 && l2done != 3*16) ok = 0;
          l1rows++;
        end
      end
      chk(ok, "decode level-1 rows wait for level 2");
    end
    chk(n_tile_done == 3, "decode tile_done pulses");
    chk(c_dec == c_enc, "decode takes as long as encode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
