// fac: four-symbol arithmetic coder (FAC) of one bit-plane.
//
// One FAC codes, in one cycle, every symbol that context formation produces
// for one coefficient in its bit-plane. It chains two general adaptive MQ
// coders and two uniform coders: AC0 codes the magnitude symbol (zero coding,
// refinement or run-length), UC0 and UC1 the two bits of a run-length
// position, AC1 the sign. A multiplexer selects the path:
//   mode 1: AC0 only                         (refinement, run of zeros)
//   mode 2: AC0 then AC1                     (zero coding and sign)
//   mode 4: AC0, UC0, UC1, then AC1          (run interrupted: position, sign)
// The uniform coders use the fixed uniform probability state and have no
// adaptation logic. flush terminates the codeword instead of coding.
//
// The FAC is combinational. The code registers of the selected coding pass
// (reg_i) and the states of the two contexts it uses (cx0_i for AC0, cx1_i for
// AC1) come from the probability state register bank and go back to it
// (reg_o, cx0_o, cx1_o); emitted bytes appear on bytes_o in codeword order.
// The coder arithmetic is the JPEG 2000 MQ coder; chaining the four coders
// through one register set is this design's reading of the coder structure.
module fac
  import mq_pkg::*;
(
  input  logic [2:0] mode,      // 0 idle, 1, 2 or 4 symbols
  input  logic       flush,
  input  logic       d0,        // AC0 decision
  input  logic [1:0] upos,      // UC0 (upos[1]) then UC1 (upos[0])
  input  logic       d1,        // AC1 decision (sign)
  input  mq_reg_t    reg_i,
  input  mq_ctx_t    cx0_i,
  input  mq_ctx_t    cx1_i,
  output mq_reg_t    reg_o,
  output mq_ctx_t    cx0_o,
  output mq_ctx_t    cx1_o,
  output mq_bytes_t  bytes_o
);

  always_comb begin
    mq_reg_t   r;
    mq_ctx_t   c0, c1, cu;
    mq_bytes_t o;
    r  = reg_i;
    c0 = cx0_i;
    c1 = cx1_i;
    cu = '{idx: UNIFORM_IDX, mps: 1'b0};
    o  = '0;
    if (flush) begin
      mq_flush(r, o);
    end else if (mode != 3'd0) begin
      mq_encode(r, c0, d0, 1'b1, o);                  // AC0
      if (mode == 3'd4) begin
        mq_encode(r, cu, upos[1], 1'b0, o);           // UC0
        mq_encode(r, cu, upos[0], 1'b0, o);           // UC1
      end
      if (mode == 3'd2 || mode == 3'd4)
        mq_encode(r, c1, d1, 1'b1, o);                // AC1
    end
    reg_o   = r;
    cx0_o   = c0;
    cx1_o   = c1;
    bytes_o = o;
  end

endmodule
