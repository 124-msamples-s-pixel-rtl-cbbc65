// inter_cb_line_buffer: last row of the previous stripe of every open
// code-block, for the context formation of the next stripe.
//
// One entry per column of each code-block slot: 64 columns for the three
// 64-wide slots and 32 for the two level-3 slots, 256 entries in all. The
// entry holds sign, magnitude and the per-plane propagation-pass significance
// flags of the coefficient. Asynchronous read, synchronous write, one port
// each.
module inter_cb_line_buffer
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  lb_ent_t                  wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output lb_ent_t                  rdata
);
  lb_ent_t mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
