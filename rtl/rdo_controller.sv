// rdo_controller: rate control of one EBC by truncation of the coded passes.
//
// While a code-block is coded, the byte count of each of its 27 codewords
// (9 bit-planes x 3 passes) is accumulated per state slot from the bytes the
// FACs emit. When the code-block is terminated, the final flush bytes are
// added and the passes are taken in embedded order (most significant plane
// first; within a plane significance propagation, refinement, clean-up)
// while their total stays within the byte budget. The result (number of
// passes kept and their total length) is registered and valid for one cycle
// one clock after termination.
//
// The document gives rate-distortion optimisation by truncation of the
// embedded codewords but not its algorithm; the budget-only rule (no
// distortion estimate) is this design's simplest choice.
module rdo_controller
  import jp2k_pkg::*;
  import mq_pkg::*;
  import ebc_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [15:0]                      budget,
  input  logic                             cod_valid,
  input  col_tag_t                         cod_tag,
  input  pass_e     [MAGW-1:0]             cod_pass,
  input  mq_bytes_t [MAGW-1:0]             cod_bytes,
  input  logic                             fl_valid,
  input  col_tag_t                         fl_tag,
  input  mq_bytes_t [MAGW-1:0][NPASS-1:0]  fl_bytes,
  output logic                             res_valid,
  output col_tag_t                         res_tag,
  output logic [4:0]                       res_npass,
  output logic [15:0]                      res_bytes,
  output logic [15:0]                      res_total
);
  typedef logic [15:0] len_t;
  len_t [MAGW-1:0][NPASS-1:0] len_mem [NSLOT];

  len_t [MAGW-1:0][NPASS-1:0] fin;
  logic [2:0] fs, cs;
  logic [4:0] npass;
  logic [15:0] kept, total;

  assign fs = cb_slot(fl_tag.cb);
  assign cs = cb_slot(cod_tag.cb);

  always_comb begin
    logic stop;
    fin = len_mem[fs];
    for (int p = 0; p < MAGW; p++)
      for (int q = 0; q < NPASS; q++)
        fin[p][q] = fin[p][q] + 16'(fl_bytes[p][q].n);
    npass = '0; kept = '0; total = '0; stop = 1'b0;
    for (int p = MAGW-1; p >= 0; p--)
      for (int q = 0; q < NPASS; q++) begin
        total = total + fin[p][q];
        if (!stop && kept + fin[p][q] <= budget) begin
          kept  = kept + fin[p][q];
          npass = npass + 5'd1;
        end else stop = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) len_mem[i] <= '0;
    end else begin
    if (fl_valid) len_mem[fs] <= '0;
    if (cod_valid)
      for (int p = 0; p < MAGW; p++)
        if (cod_pass[p] != PASS_NONE)
          len_mem[cs][p][cod_pass[p]] <= ((fl_valid && fs == cs) ? 16'd0 : len_mem[cs][p][cod_pass[p]])
                                          + 16'(cod_bytes[p].n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0; res_tag <= '0; res_npass <= '0; res_bytes <= '0; res_total <= '0;
    end else begin
      res_valid <= fl_valid;
      if (fl_valid) begin
        res_tag <= fl_tag; res_npass <= npass; res_bytes <= kept; res_total <= total;
      end
    end
  end
endmodule
