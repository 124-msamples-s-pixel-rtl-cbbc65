// tb_fac: checks the four-symbol arithmetic coder against a reference MQ
// encoder written with integer arithmetic in the testbench.
//
// Random groups of symbols are coded in all three modes (1, 2 and 4
// symbols) through 19 adaptive contexts, the coder registers and context
// states being kept by the testbench as the state bank would. After each
// sequence the codeword is flushed; every emitted byte must equal the
// reference codeword. Some sequences are heavily skewed so that long MPS runs
// and carries occur. Every mode must have been exercised.
module tb_fac;
  import mq_pkg::*;

  logic [2:0] mode;
  logic       flush, d0, d1;
  logic [1:0] upos;
  mq_reg_t    reg_i, reg_o;
  mq_ctx_t    cx0_i, cx1_i, cx0_o, cx1_o;
  mq_bytes_t  bytes_o;
  int checks = 0, failures = 0;
  int n_mode[5] = '{0,0,0,0,0};

  fac dut (.*);

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference encoder (integer model of the standard's procedures) ----
  int QE[47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                 'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                 'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                 'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                 'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
  int NMPS[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,
                   30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
  int NLPS[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,23,24,
                   25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
  int SW[47]   = '{1,0,0,0,0,0,1,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0};

  int ra, rc, rct, rb; bit rfirst;
  int ridx[19], rmps[19];
  byte rbuf[$];

  function automatic void r_init();
    ra = 'h8000; rc = 0; rct = 12; rb = 0; rfirst = 1;
  endfunction
  function automatic void r_put(int v);
    if (!rfirst) rbuf.push_back(byte'(v));
    rfirst = 0;
  endfunction
  function automatic void r_byteout();
    if (rb == 'hFF) begin r_put(rb); rb = rc >> 20; rc &= 'hFFFFF; rct = 7; end
    else if (rc < 'h8000000) begin r_put(rb); rb = rc >> 19; rc &= 'h7FFFF; rct = 8; end
    else begin
      rb = rb + 1;
      if (rb == 'hFF) begin rc &= 'h7FFFFFF; r_put(rb); rb = rc >> 20; rc &= 'hFFFFF; rct = 7; end
      else begin r_put(rb); rb = (rc >> 19) & 'hFF; rc &= 'h7FFFF; rct = 8; end
    end
  endfunction
  function automatic void r_renorm();
    do begin ra = (ra << 1) & 'hFFFF; rc = (rc << 1) & 'hFFFFFFF; rct--; if (rct == 0) r_byteout(); end
    while ((ra & 'h8000) == 0);
  endfunction
  function automatic void r_code(int cx, int d);   // cx < 0: uniform
    int idx, mps, q;
    idx = (cx < 0) ? 46 : ridx[cx]; mps = (cx < 0) ? 0 : rmps[cx];
    q = QE[idx];
    ra -= q;
    if (d == mps) begin
      if ((ra & 'h8000) == 0) begin
        if (ra < q) ra = q; else rc += q;
        if (cx >= 0) ridx[cx] = NMPS[idx];
        r_renorm();
      end else rc += q;
    end else begin
      if (ra < q) rc += q; else ra = q;
      if (cx >= 0) begin if (SW[idx]) rmps[cx] = 1 - mps; ridx[cx] = NLPS[idx]; end
      r_renorm();
    end
  endfunction
  function automatic void r_flush();
    int t;
    t = rc + ra; rc = rc | 'hFFFF; if (rc >= t) rc -= 'h8000;
    rc = (rc << rct) & 'hFFFFFFF; r_byteout(); rc = (rc << rct) & 'hFFFFFFF; r_byteout();
    if (rb != 'hFF) r_put(rb);
  endfunction

  // ---- device side state, kept as the state bank would ----
  mq_reg_t dreg;
  mq_ctx_t dctx[19];
  byte dbuf[$];

  task automatic step(input int m, input int c0, input int b0, input int u, input int c1, input int b1);
    mode = 3'(m); flush = 1'b0; d0 = b0[0]; upos = u[1:0]; d1 = b1[0];
    reg_i = dreg; cx0_i = dctx[c0]; cx1_i = dctx[c1];
    #1;
    dreg = reg_o; dctx[c0] = cx0_o;
    if (m == 2 || m == 4) dctx[c1] = cx1_o;
    for (int i = 0; i < int'(bytes_o.n); i++) dbuf.push_back(byte'(bytes_o.d[i]));
    n_mode[m]++;
    r_code(c0, b0);
    if (m == 4) begin r_code(-1, u >> 1); r_code(-1, u & 1); end
    if (m == 2 || m == 4) r_code(c1, b1);
  endtask

  task automatic do_flush();
    mode = 3'd0; flush = 1'b1; reg_i = dreg; #1;
    for (int i = 0; i < int'(bytes_o.n); i++) dbuf.push_back(byte'(bytes_o.d[i]));
    dreg = reg_o;
    flush = 1'b0;
    r_flush();
  endtask

  initial begin
    for (int seq = 0; seq < 40; seq++) begin
      int skew = (seq % 4 == 0) ? 2 : (seq % 4 == 1) ? 50 : (seq % 4 == 2) ? 97 : 99;
      int len = 50 + int'($urandom_range(0, 400));
      r_init(); rbuf.delete(); dbuf.delete();
      dreg = mq_init();
      for (int i = 0; i < 19; i++) begin
        ridx[i] = (i == 0) ? 4 : (i == 17) ? 3 : 0; rmps[i] = 0;
        dctx[i] = '{idx: 6'(ridx[i]), mps: 1'b0};
      end
      for (int k = 0; k < len; k++) begin
        int m, c0, c1, b0, b1, u, rr;
        rr = int'($urandom_range(0, 2)); m = (rr == 0) ? 1 : (rr == 1) ? 2 : 4;
        c0 = int'($urandom_range(0, 8)); if (m == 1 && $urandom_range(0, 1)) c0 = 14 + int'($urandom_range(0, 3));
        c1 = 9 + int'($urandom_range(0, 4));
        b0 = (int'($urandom_range(0, 99)) >= skew) ? 1 : 0;
        b1 = int'($urandom_range(0, 1)); u = int'($urandom_range(0, 3));
        if (m == 4) c0 = 17;
        step(m, c0, b0, u, c1, b1);
      end
      do_flush();
      checks++;
      if (rbuf.size() != dbuf.size()) begin
        failures++; $display("FAIL seq %0d: %0d bytes, expected %0d", seq, dbuf.size(), rbuf.size());
      end else begin
        bit ok = 1;
        foreach (rbuf[i]) if (rbuf[i] != dbuf[i]) ok = 0;
        if (!ok) begin failures++; $display("FAIL seq %0d: byte mismatch", seq); end
      end
      checks++;
      if (dreg != mq_init()) begin failures++; $display("FAIL: coder not re-initialised after flush"); end
    end
    checks++;
    if (n_mode[1] == 0 || n_mode[2] == 0 || n_mode[4] == 0) begin failures++; $display("FAIL: mode not exercised"); end
    $display("modes: 1-symbol %0d, 2-symbol %0d, 4-symbol %0d", n_mode[1], n_mode[2], n_mode[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
