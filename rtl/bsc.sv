// bsc: bit-stream controller, collecting the code-block results of the three
// EBCs into one stream of 32-bit header words for the external bit-stream
// memory.
//
// Each EBC's rate controller delivers, once per terminated code-block, the
// tile, code-block, band, number of passes kept and kept length. These wait
// in a FIFO of DEPTH entries (three can arrive in one cycle; the EBCs write
// in fixed order) and leave as two words each with a ready/valid handshake:
// word 0 = {tile[15:0], cb[2:0], band[1:0], npass[4:0], 6'b0}, word 1 =
// {kept bytes[15:0], total bytes[15:0]}. overflow is sticky when a result
// finds the FIFO full. The document names the bit-stream controller and its
// memory interface only; the FIFO and the word format are this design's own.
module bsc
  import jp2k_pkg::*;
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        res_valid,
  input  col_tag_t [2:0]    res_tag,
  input  logic [2:0][4:0]   res_npass,
  input  logic [2:0][15:0]  res_bytes,
  input  logic [2:0][15:0]  res_total,
  output logic              bs_valid,
  input  logic              bs_ready,
  output logic [31:0]       bs_word,
  output logic              overflow,
  output logic [$clog2(DEPTH):0] level_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [63:0] fifo [DEPTH];
  logic [AW:0] wp, rp;
  logic        half;   // second word of the head entry

  assign level_o  = wp - rp;
  assign bs_valid = wp != rp;
  assign bs_word  = half ? fifo[rp[AW-1:0]][31:0] : fifo[rp[AW-1:0]][63:32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; half <= 1'b0; overflow <= 1'b0;
    end else begin
      logic [AW:0] w;
      w = wp;
      for (int e = 0; e < 3; e++)
        if (res_valid[e]) begin
          if (w - rp == (AW+1)'(DEPTH)) overflow <= 1'b1;
          else begin
            fifo[w[AW-1:0]] <= {res_tag[e].tile, res_tag[e].cb, res_tag[e].band, res_npass[e], 6'b0,
                                res_bytes[e], res_total[e]};
            w = w + 1'b1;
          end
        end
      wp <= w;
      if (bs_valid && bs_ready) begin
        half <= !half;
        if (half) rp <= rp + 1'b1;
      end
    end
  end
endmodule
