// inter_level_line_buffer: per-column state memory of the column filters of
// one DWT level.
//
// The column filters are the shared lifting cores of dwt_filter_core; a
// column's lifting state (the partial sums of its four lifting stages) lives
// here between the rows that feed it, so the cores themselves hold nothing and
// can move from column to column every cycle. One entry per column of the
// level's low-pass and high-pass half (DEPTH = half the level's line width)
// holds the states of both column cores. Read is asynchronous (a register
// file), write is synchronous; a read of the entry being written returns the
// old state. Storing the lifting state instead of whole lines is this
// design's own choice; the document keeps DWT lines per level in this buffer.
module inter_level_line_buffer
  import jp2k_pkg::*;
#(
  parameter int unsigned DEPTH = TILE / 2
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  core_st_t [1:0]           wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output core_st_t [1:0]           rdata
);
  core_st_t [1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
