// psrb_state_memory: probability state register bank (PSRB) and state
// memory of one code-block switched EBC.
//
// The PSRB holds the coding state (contexts and coder registers of all
// passes of all nine FACs) of the code-block being coded. The state memory
// keeps the state of every unfinished code-block, one slot per code-block
// that can be open at a time (NSLOT = 5). Switching code-blocks takes no
// cycle: with load set, the FACs read the incoming code-block's state
// straight from the memory while the PSRB content is written back to the
// slot it came from (or the initial state if reset_out is set, after the
// outgoing code-block has been terminated). If the incoming slot is the one
// going out and reset_out is set, the initial state is read.
//
// cur_o is the state the FACs use this cycle, out_o the PSRB content (the
// outgoing state), out_slot_o its slot. upd_i, written when upd_en is set,
// is the state after this cycle's coding. init clears every slot.
module psrb_state_memory
  import ebc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          load,
  input  logic [2:0]    load_slot,
  input  logic          reset_out,
  input  logic          upd_en,
  input  ebc_st_t       upd_i,
  output ebc_st_t       cur_o,
  output ebc_st_t       out_o,
  output logic [2:0]    out_slot_o
);

  ebc_st_t     mem [NSLOT];
  ebc_st_t     psrb;
  logic [2:0]  slot_q;

  always_comb begin
    if (load) begin
      if (load_slot == slot_q && reset_out) cur_o = ebc_init();
      else if (load_slot == slot_q)         cur_o = psrb;
      else                                  cur_o = mem[load_slot];
    end else cur_o = psrb;
  end
  assign out_o      = psrb;
  assign out_slot_o = slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psrb   <= ebc_init();
      slot_q <= '0;
    end else if (init) begin
      psrb   <= ebc_init();
      slot_q <= '0;
    end else begin
      if (load) slot_q <= load_slot;
      if (upd_en)    psrb <= upd_i;
      else if (load) psrb <= cur_o;
    end
  end

  // The state memory itself; written only on a switch.
  always_ff @(posedge clk) begin
    if (init) begin
      for (int i = 0; i < NSLOT; i++) mem[i] <= ebc_init();
    end else if (load && load_slot != slot_q) begin
      mem[slot_q] <= reset_out ? ebc_init() : psrb;
    end
  end

endmodule
