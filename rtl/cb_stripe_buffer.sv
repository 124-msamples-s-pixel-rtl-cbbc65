// cb_stripe_buffer: two stripes (2 x 4 rows) of one subband, between the DWT
// and a coder.
//
// The DWT writes coefficients in row order (we, row, col); the coder reads
// them back in stripe-column order at any address (asynchronous read). The
// buffer has two halves, one per stripe parity: a half becomes full when the
// last coefficient of its fourth row is written, and empty again when the
// coder releases it after coding all code-block stripes in it. full_o tells
// the writer's controller to stall before a full half would be written.
// This reordering buffer is this design's own; the document has the DWT
// deliver code-block stripes directly.
module cb_stripe_buffer
  import jp2k_pkg::*;
#(
  parameter int unsigned W = TILE / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [6:0]            wrow,
  input  logic [6:0]            wcol,
  input  logic [CW-1:0]         wdata,
  input  logic [2:0]            rrow,   // row within the two stripes
  input  logic [6:0]            rcol,
  output logic [CW-1:0]         rdata,
  input  logic [1:0]            release_i,
  output logic [1:0]            full_o,
  output logic                  stall_o
);
  localparam int unsigned CWB = $clog2(W);
  logic [CW-1:0] mem [8][W];

  always_ff @(posedge clk)
    if (we) mem[wrow[2:0]][wcol[CWB-1:0]] <= wdata;
  assign rdata = mem[rrow][rcol[CWB-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_o <= '0;
    else begin
      for (int h = 0; h < 2; h++) begin
        if (release_i[h]) full_o[h] <= 1'b0;
        if (we && wrow[2] == h[0] && wrow[1:0] == 2'd3 && wcol == 7'(W-1)) full_o[h] <= 1'b1;
      end
    end
  end
  assign stall_o = &full_o;

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) we |-> !full_o[wrow[2]]);
endmodule
