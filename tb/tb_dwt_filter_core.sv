// tb_dwt_filter_core: checks the 1-D lifting core against a line-at-a-time
// reference written from the textbook lifting equations.
//
// Random lines of several even lengths are filtered forward with (5,3) and
// compared exactly with the integer reference, and with (9,7) compared with a
// floating-point reference within a small tolerance. Each forward result is
// then filtered by the inverse core and must give back the line: exactly for
// (5,3), within +-2 for (9,7). The output latency in operations is checked.
module tb_dwt_filter_core;
  import jp2k_pkg::*;

  filter_e   filt;
  logic      inverse;
  core_op_e  op;
  dwt_word_t e_i, o_i, lo_o, hi_o;
  core_st_t  st_i, st_o;
  logic      out_v;
  int checks = 0, failures = 0;

  dwt_filter_core dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // Run one line through the core. in_a/in_b are the pair halves; results
  // collected in out_a/out_b. first_out returns the op index of the first output.
  task automatic run_line(input filter_e f, input logic inv, input int npairs,
                          input int in_a[], input int in_b[],
                          output int out_a[], output int out_b[], output int first_out);
    int k = 0, ops = 0;
    out_a = new[npairs]; out_b = new[npairs];
    filt = f; inverse = inv; st_i = '0; first_out = -1;
    while (k < npairs) begin
      if (ops < npairs) begin op = OP_PAIR; e_i = dwt_word_t'(in_a[ops]); o_i = dwt_word_t'(in_b[ops]); end
      else begin op = OP_FLUSH; e_i = '0; o_i = '0; end
      #1;
      if (out_v) begin
        if (first_out < 0) first_out = ops;
        out_a[k] = int'(lo_o); out_b[k] = int'(hi_o); k++;
      end
      st_i = st_o;
      ops++;
      if (ops > npairs + 4) break;
    end
    chk(k == npairs, $sformatf("got %0d of %0d pairs", k, npairs));
  endtask

  function automatic int fdiv(input int a, input int b);  // floor(a / b)
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic int mir(input int i, input int n);
    if (i < 0) return -i;
    if (i >= n) return 2*n - 2 - i;
    return i;
  endfunction

  initial begin
    int lens[4] = '{2, 8, 16, 128};
    int x[], xe[], xo[], lo[], hi[], re[], ro[], fo;
    int rs[], rd[];
    real a[], rlo, rhi;
    for (int li = 0; li < 4; li++) begin
      for (int rep = 0; rep < 6; rep++) begin
        int n = lens[li], np = lens[li] / 2;
        x = new[n]; xe = new[np]; xo = new[np]; rs = new[np]; rd = new[np];
        foreach (x[i]) x[i] = (rep == 0) ? 127 : int'($urandom_range(0, 255)) - 128;
        for (int i = 0; i < np; i++) begin xe[i] = x[2*i]; xo[i] = x[2*i+1]; end
        // (5,3) reference.
        for (int i = 0; i < np; i++) rd[i] = x[2*i+1] - fdiv(x[2*i] + x[mir(2*i+2, n)], 2);
        for (int i = 0; i < np; i++) rs[i] = x[2*i] + fdiv(rd[(i == 0) ? 0 : i-1] + rd[i] + 2, 4);
        run_line(F53, 1'b0, np, xe, xo, lo, hi, fo);
        chk(fo == 1, $sformatf("5/3 first output at op %0d", fo));
        for (int i = 0; i < np; i++)
          chk(lo[i] == rs[i] && hi[i] == rd[i], $sformatf("5/3 n=%0d i=%0d got %0d/%0d exp %0d/%0d", n, i, lo[i], hi[i], rs[i], rd[i]));
        run_line(F53, 1'b1, np, lo, hi, re, ro, fo);
        for (int i = 0; i < np; i++)
          chk(re[i] == xe[i] && ro[i] == xo[i], $sformatf("5/3 inverse n=%0d i=%0d", n, i));
        // (9,7) reference in floating point.
        a = new[n];
        foreach (x[i]) a[i] = real'(x[i]);
        for (int i = 1; i < n; i += 2) a[i] += -1.586134342 * (a[i-1] + a[mir(i+1, n)]);
        for (int i = 0; i < n; i += 2) a[i] += -0.052980118 * (a[mir(i-1, n)] + a[mir(i+1, n)]);
        for (int i = 1; i < n; i += 2) a[i] +=  0.882911076 * (a[i-1] + a[mir(i+1, n)]);
        for (int i = 0; i < n; i += 2) a[i] +=  0.443506852 * (a[mir(i-1, n)] + a[mir(i+1, n)]);
        run_line(F97, 1'b0, np, xe, xo, lo, hi, fo);
        chk(fo == 2, $sformatf("9/7 first output at op %0d", fo));
        for (int i = 0; i < np; i++) begin
          rlo = a[2*i] / 1.230174105; rhi = a[2*i+1] * 1.230174105;
          chk((real'(lo[i]) - rlo) < 3.0 && (rlo - real'(lo[i])) < 3.0 &&
              (real'(hi[i]) - rhi) < 3.0 && (rhi - real'(hi[i])) < 3.0,
              $sformatf("9/7 n=%0d i=%0d got %0d/%0d exp %f/%f", n, i, lo[i], hi[i], rlo, rhi));
        end
        run_line(F97, 1'b1, np, lo, hi, re, ro, fo);
        for (int i = 0; i < np; i++)
          chk((re[i] - xe[i]) <= 2 && (xe[i] - re[i]) <= 2 && (ro[i] - xo[i]) <= 2 && (xo[i] - ro[i]) <= 2,
              $sformatf("9/7 inverse n=%0d i=%0d got %0d/%0d exp %0d/%0d", n, i, re[i], ro[i], xe[i], xo[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
