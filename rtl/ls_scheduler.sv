// ls_scheduler: main controller of the codec, issuing the level-switched
// schedule.
//
// A tile is processed as a sequence of computation states of STATE_CYC
// cycles each. In every state the DWT and the three EBCs work together on one
// 64x4 stripe of a level-1 or level-2 code-block in each of the three detail
// subbands, or on two 32x4 stripes of the level-3 code-blocks. Per tile that
// makes 64 level-1 states (32 stripe rows, each split into the left and the
// right code-block), 16 level-2 states and 4+4 level-3 states (CB_0, then
// the LL3 code-block CB_6 on one EBC), 88 states in all.
//
// Encoding: the DWT switches to a deeper level as soon as the LL buffer of
// the level above holds enough lines, and the deeper level has priority. A
// level-2 state k (counted over all tiles) may start once 2k+3 level-1 stripe
// rows are done, a level-3 state j once 4j+5 level-2 states are done: the
// minimum of 2k+2 and 4j+4 plus one stripe of four lines for the latency of
// the DWT. This reproduces the printed schedule, in which the last level-2 and
// level-3 states of tile i-1 run during the first stripes of tile i. After
// the last tile the remaining deep states run without waiting.
//
// Decoding runs the dependencies the other way round (the deepest level feeds
// the next shallower one, shallow levels have priority): level-1 stripe row r
// may start once 2*(level-2 states done) >= r+3, level-2 state k once
// 4*(level-3 states done) >= k+5, and level-3 states have no input to wait
// for. The exact decoding order is this design's reading of "opposite".
//
// Interface: pulse start with num_tiles and mode set; the controller then
// holds state_valid high while a state runs, pulses state_start in its first
// cycle and counts cyc 0..STATE_CYC-1. hold freezes the cycle counter (a
// stall of the whole pipeline). tile_done pulses when the last state of a
// tile ends; done pulses when the whole sequence has ended.
module ls_scheduler
  import jp2k_pkg::*;
#(
  parameter int unsigned STATE_CYCLES = STATE_CYC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  codec_mode_e         mode,
  input  logic [15:0]         num_tiles,
  input  logic                hold,
  output logic                state_valid,
  output logic                state_start,
  output comp_state_t         state,
  output logic [$clog2(STATE_CYCLES)-1:0] cyc,
  output logic                tile_done,
  output logic                done
);

  localparam int unsigned S1 = TILE / 8;     // level-1 stripe rows per tile (32)
  localparam int unsigned X1 = TILE / 2 / CBLK; // level-1 code-blocks per row (2)
  localparam int unsigned SPC = CBLK / 4;    // stripes per 64x64 code-block (16)
  localparam int unsigned S2 = TILE / 16;    // level-2 states per tile (16)
  localparam int unsigned S3 = TILE / 64;    // level-3 state pairs per tile (4)

  typedef enum logic [1:0] { IDLE, RUN } ctl_e;
  ctl_e        ctl;
  codec_mode_e mode_q;
  logic [15:0] ntiles_q;

  // Global progress counters over all tiles.
  logic [31:0] g1;       // level-1 stripe rows done
  logic [31:0] g2;       // level-2 states done
  logic [31:0] g3;       // level-3 state pairs done
  logic [$clog2(X1+1)-1:0] part1; // next level-1 code-block within the row
  logic        part3;    // 0: CB_0 next, 1: CB_6 next
  logic [1:0]  cur_lvl;

  logic [31:0] tot1, tot2, tot3;
  assign tot1 = 32'(ntiles_q) * S1;
  assign tot2 = 32'(ntiles_q) * S2;
  assign tot3 = 32'(ntiles_q) * S3;

  logic rdy1, rdy2, rdy3;
  always_comb begin
    if (mode_q == ENCODE) begin
      rdy1 = (g1 < tot1);
      rdy2 = (g2 < tot2) && ((g1 >= 2*g2 + 3) || (g1 == tot1));
      rdy3 = (g3 < tot3) && ((g2 >= 4*g3 + 5) || (g2 == tot2));
    end else begin
      rdy3 = (g3 < tot3);
      rdy2 = (g2 < tot2) && ((4*g3 >= g2 + 5) || (g3 == tot3));
      rdy1 = (g1 < tot1) && ((2*g2 >= g1 + 3) || (g2 == tot2));
    end
  end

  // Choice of the next state's level: an unfinished level-1 row or level-3
  // pair is always completed first; otherwise by priority.
  logic [1:0] nxt_lvl;
  always_comb begin
    nxt_lvl = 2'd0;
    if (part1 != 0)       nxt_lvl = 2'd1;
    else if (part3)       nxt_lvl = 2'd3;
    else if (mode_q == ENCODE) begin
      if (rdy3)           nxt_lvl = 2'd3;
      else if (rdy2)      nxt_lvl = 2'd2;
      else if (rdy1)      nxt_lvl = 2'd1;
    end else begin
      if (rdy1)           nxt_lvl = 2'd1;
      else if (rdy2)      nxt_lvl = 2'd2;
      else if (rdy3)      nxt_lvl = 2'd3;
    end
  end

  function automatic comp_state_t make_state(input logic [1:0] lvl, input logic [31:0] a1,
                                             input logic [31:0] a2, input logic [31:0] a3,
                                             input logic [$clog2(X1+1)-1:0] p1, input logic p3,
                                             input codec_mode_e m);
    comp_state_t s;
    logic [31:0] row;
    s = '0;
    s.level = lvl;
    unique case (lvl)
      2'd1: begin
        s.tile = 16'(a1 / S1);
        row    = a1 % S1;
        s.cb   = 3'(32'(CB_L1_0) + (row / SPC) * X1 + 32'(p1));
        s.first_stripe = 4'(row % SPC);
        s.last_stripe  = 4'(row % SPC);
      end
      2'd2: begin
        s.tile = 16'(a2 / S2);
        s.cb   = CB_L2;
        s.first_stripe = 4'(a2 % S2);
        s.last_stripe  = 4'(a2 % S2);
      end
      default: begin
        s.tile = 16'(a3 / S3);
        s.cb   = (p3 ^ (m == DECODE)) ? CB_LL3 : CB_L3;  // decoding starts with LL3
        s.first_stripe = 4'((a3 % S3) * 2);
        s.last_stripe  = 4'((a3 % S3) * 2 + 1);
      end
    endcase
    return s;
  endfunction

  logic last_cyc;
  assign last_cyc = state_valid && !hold && (cyc == $bits(cyc)'(STATE_CYCLES-1));

  // Progress counters after the state that ends now.
  logic [31:0] g1_n, g2_n, g3_n;
  logic [$clog2(X1+1)-1:0] part1_n;
  logic part3_n;
  logic tile_end;
  always_comb begin
    g1_n = g1; g2_n = g2; g3_n = g3; part1_n = part1; part3_n = part3;
    tile_end = 1'b0;
    unique case (cur_lvl)
      2'd1: if (32'(part1) == X1-1) begin
              part1_n = '0; g1_n = g1 + 1;
              if (mode_q == DECODE && (g1_n % S1) == 0) tile_end = 1'b1;
            end else part1_n = part1 + 1'b1;
      2'd2: g2_n = g2 + 1;
      2'd3: if (part3) begin
              part3_n = 1'b0; g3_n = g3 + 1;
              if (mode_q == ENCODE && (g3_n % S3) == 0) tile_end = 1'b1;
            end else part3_n = 1'b1;
      default: ;
    endcase
  end

  logic any_left;
  assign any_left = (g1_n < tot1) || (g2_n < tot2) || (g3_n < tot3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl <= IDLE; mode_q <= ENCODE; ntiles_q <= '0;
      g1 <= '0; g2 <= '0; g3 <= '0; part1 <= '0; part3 <= 1'b0; cur_lvl <= 2'd0;
      state_valid <= 1'b0; state_start <= 1'b0; state <= '0; cyc <= '0;
      tile_done <= 1'b0; done <= 1'b0;
    end else begin
      state_start <= 1'b0;
      tile_done   <= 1'b0;
      done        <= 1'b0;
      unique case (ctl)
        IDLE: if (start && num_tiles != 0) begin
          ctl <= RUN; mode_q <= mode; ntiles_q <= num_tiles;
          g1 <= '0; g2 <= '0; g3 <= '0; part1 <= '0; part3 <= 1'b0;
          cur_lvl <= 2'd0; state_valid <= 1'b0;
        end
        RUN: begin
          if (!state_valid) begin
            // Issue the next state (also right after start).
            state_valid <= 1'b1; state_start <= 1'b1; cyc <= '0;
            cur_lvl <= nxt_lvl;
            state <= make_state(nxt_lvl, g1, g2, g3, part1, part3, mode_q);
          end else if (!hold) begin
            if (!last_cyc) cyc <= cyc + 1'b1;
            else begin
              g1 <= g1_n; g2 <= g2_n; g3 <= g3_n; part1 <= part1_n; part3 <= part3_n;
              tile_done <= tile_end;
              state_valid <= 1'b0;
              if (!any_left) begin ctl <= IDLE; done <= 1'b1; end
            end
          end
        end
        default: ctl <= IDLE;
      endcase
    end
  end

  // A state must always be issuable: the dependency rules never dead-lock.
  a_progress: assert property (@(posedge clk) disable iff (!rst_n)
      (ctl == RUN && !state_valid) |-> (part1 != 0 || part3 || rdy1 || rdy2 || rdy3));

endmodule
