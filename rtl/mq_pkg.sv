// mq_pkg: the adaptive binary arithmetic (MQ) coder of JPEG 2000 as
// functions, shared by the general and the uniform coders of the four-symbol
// arithmetic coder.
//
// mq_encode codes one decision in one context and returns the new coder
// registers and context state together with the bytes it has emitted
// (at most two per decision, three for a flush). mq_flush terminates a codeword. The
// probability table (47 states, Qe and the next-state indices) and the
// encoding procedure are the ones the JPEG 2000 standard defines; the
// bit-level packing of the state is this design's own.
package mq_pkg;

  // Registers of one MQ encoder.
  typedef struct packed {
    logic [15:0] a;     // interval
    logic [27:0] c;     // code register
    logic [3:0]  ct;    // bits until the next byte-out
    logic [7:0]  b;     // byte waiting to be emitted
    logic        bv;    // b holds a byte (false right after initialisation)
  } mq_reg_t;

  // Adaptive state of one context: table index and most probable symbol.
  typedef struct packed {
    logic [5:0] idx;
    logic       mps;
  } mq_ctx_t;

  // Bytes emitted by one step of the four-symbol coder: up to eight.
  typedef struct packed {
    logic [3:0]       n;
    logic [7:0][7:0]  d;   // d[0] first
  } mq_bytes_t;

  localparam logic [5:0] UNIFORM_IDX = 6'd46;

  function automatic logic [15:0] qe(input logic [5:0] i);
    unique case (i)
      6'd0: qe = 16'h5601; 6'd1: qe = 16'h3401; 6'd2: qe = 16'h1801; 6'd3: qe = 16'h0AC1;
      6'd4: qe = 16'h0521; 6'd5: qe = 16'h0221; 6'd6: qe = 16'h5601; 6'd7: qe = 16'h5401;
      6'd8: qe = 16'h4801; 6'd9: qe = 16'h3801; 6'd10: qe = 16'h3001; 6'd11: qe = 16'h2401;
      6'd12: qe = 16'h1C01; 6'd13: qe = 16'h1601; 6'd14: qe = 16'h5601; 6'd15: qe = 16'h5401;
      6'd16: qe = 16'h5101; 6'd17: qe = 16'h4801; 6'd18: qe = 16'h3801; 6'd19: qe = 16'h3401;
      6'd20: qe = 16'h3001; 6'd21: qe = 16'h2801; 6'd22: qe = 16'h2401; 6'd23: qe = 16'h2201;
      6'd24: qe = 16'h1C01; 6'd25: qe = 16'h1801; 6'd26: qe = 16'h1601; 6'd27: qe = 16'h1401;
      6'd28: qe = 16'h1201; 6'd29: qe = 16'h1101; 6'd30: qe = 16'h0AC1; 6'd31: qe = 16'h09C1;
      6'd32: qe = 16'h08A1; 6'd33: qe = 16'h0521; 6'd34: qe = 16'h0441; 6'd35: qe = 16'h02A1;
      6'd36: qe = 16'h0221; 6'd37: qe = 16'h0141; 6'd38: qe = 16'h0111; 6'd39: qe = 16'h0085;
      6'd40: qe = 16'h0049; 6'd41: qe = 16'h0025; 6'd42: qe = 16'h0015; 6'd43: qe = 16'h0009;
      6'd44: qe = 16'h0005; 6'd45: qe = 16'h0001; default: qe = 16'h5601;
    endcase
  endfunction

  function automatic logic [5:0] nmps(input logic [5:0] i);
    if (i == 6'd46) return 6'd46;
    if (i == 6'd45) return 6'd45;
    if (i == 6'd5)  return 6'd38;
    if (i == 6'd13) return 6'd29;
    return i + 6'd1;
  endfunction

  function automatic logic [5:0] nlps(input logic [5:0] i);
    unique case (i)
      6'd0: nlps = 6'd1;   6'd1: nlps = 6'd6;   6'd2: nlps = 6'd9;   6'd3: nlps = 6'd12;
      6'd4: nlps = 6'd29;  6'd5: nlps = 6'd33;  6'd6: nlps = 6'd6;   6'd7: nlps = 6'd14;
      6'd8: nlps = 6'd14;  6'd9: nlps = 6'd14;  6'd10: nlps = 6'd17; 6'd11: nlps = 6'd18;
      6'd12: nlps = 6'd20; 6'd13: nlps = 6'd21; 6'd14: nlps = 6'd14; 6'd15: nlps = 6'd14;
      6'd16: nlps = 6'd15; 6'd17: nlps = 6'd16; 6'd18: nlps = 6'd17; 6'd19: nlps = 6'd18;
      6'd20: nlps = 6'd19; 6'd21: nlps = 6'd19; 6'd22: nlps = 6'd20; 6'd23: nlps = 6'd21;
      6'd24: nlps = 6'd22; 6'd25: nlps = 6'd23; 6'd26: nlps = 6'd24; 6'd27: nlps = 6'd25;
      6'd28: nlps = 6'd26; 6'd29: nlps = 6'd27; 6'd30: nlps = 6'd28; 6'd31: nlps = 6'd29;
      6'd32: nlps = 6'd30; 6'd33: nlps = 6'd31; 6'd34: nlps = 6'd32; 6'd35: nlps = 6'd33;
      6'd36: nlps = 6'd34; 6'd37: nlps = 6'd35; 6'd38: nlps = 6'd36; 6'd39: nlps = 6'd37;
      6'd40: nlps = 6'd38; 6'd41: nlps = 6'd39; 6'd42: nlps = 6'd40; 6'd43: nlps = 6'd41;
      6'd44: nlps = 6'd42; 6'd45: nlps = 6'd43; default: nlps = 6'd46;
    endcase
  endfunction

  function automatic logic switch_mps(input logic [5:0] i);
    return (i == 6'd0) || (i == 6'd6) || (i == 6'd14);
  endfunction

  function automatic mq_reg_t mq_init();
    mq_reg_t r;
    r.a = 16'h8000; r.c = '0; r.ct = 4'd12; r.b = '0; r.bv = 1'b0;
    return r;
  endfunction

  // BYTEOUT: move the top bits of c into b, emitting the previous b. The very
  // first byte-out only loads b (the initial "byte" before the codeword).
  function automatic void byte_out(inout mq_reg_t r, inout mq_bytes_t o);
    if (r.b == 8'hFF) begin
      if (r.bv) begin o.d[o.n[2:0]] = r.b; o.n = o.n + 4'd1; end
      r.b = r.c[27:20]; r.c[27:20] = 8'h00; r.ct = 4'd7; r.bv = 1'b1;
    end else if (r.c[27]) begin
      r.b = r.b + 8'd1;
      if (r.b == 8'hFF) begin
        r.c[27] = 1'b0;
        if (r.bv) begin o.d[o.n[2:0]] = r.b; o.n = o.n + 4'd1; end
        r.b = r.c[27:20]; r.c[27:20] = 8'h00; r.ct = 4'd7; r.bv = 1'b1;
      end else begin
        if (r.bv) begin o.d[o.n[2:0]] = r.b; o.n = o.n + 4'd1; end
        r.b = r.c[26:19]; r.c[27:19] = 9'h000; r.ct = 4'd8; r.bv = 1'b1;
      end
    end else begin
      if (r.bv) begin o.d[o.n[2:0]] = r.b; o.n = o.n + 4'd1; end
      r.b = r.c[26:19]; r.c[27:19] = 9'h000; r.ct = 4'd8; r.bv = 1'b1;
    end
  endfunction

  // RENORME: shift until a >= 0x8000.
  function automatic void renorm(inout mq_reg_t r, inout mq_bytes_t o);
    for (int i = 0; i < 16; i++) begin
      if (!r.a[15]) begin
        r.a = {r.a[14:0], 1'b0};
        r.c = {r.c[26:0], 1'b0};
        r.ct = r.ct - 4'd1;
        if (r.ct == 4'd0) byte_out(r, o);
      end
    end
  endfunction

  // Code decision d in context cx. With adapt = 0 the context is used as a
  // fixed (uniform) probability and never changes.
  function automatic void mq_encode(inout mq_reg_t r, inout mq_ctx_t cx, input logic d,
                                    input logic adapt, inout mq_bytes_t o);
    logic [15:0] q;
    q = qe(cx.idx);
    r.a = r.a - q;
    if (d == cx.mps) begin
      if (!r.a[15]) begin
        if (r.a < q) r.a = q;
        else         r.c = r.c + 28'(q);
        if (adapt) cx.idx = nmps(cx.idx);
        renorm(r, o);
      end else begin
        r.c = r.c + 28'(q);
      end
    end else begin
      if (r.a < q) r.c = r.c + 28'(q);
      else         r.a = q;
      if (adapt) begin
        if (switch_mps(cx.idx)) cx.mps = ~cx.mps;
        cx.idx = nlps(cx.idx);
      end
      renorm(r, o);
    end
  endfunction

  // FLUSH: terminate the codeword (SETBITS, two byte-outs, emit the last byte
  // unless it is 0xFF).
  function automatic void mq_flush(inout mq_reg_t r, inout mq_bytes_t o);
    logic [27:0] t;
    t = r.c + 28'(r.a);
    r.c = r.c | 28'hFFFF;
    if (r.c >= t) r.c = r.c - 28'h8000;
    r.c = r.c << r.ct;
    byte_out(r, o);
    r.c = r.c << r.ct;
    byte_out(r, o);
    if (r.b != 8'hFF && r.bv) begin o.d[o.n[2:0]] = r.b; o.n = o.n + 4'd1; end
    r = mq_init();
  endfunction

endpackage
