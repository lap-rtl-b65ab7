// lap_addr_gen: stage-2 address generation of the LAP pipeline.
//
// Computes the two addresses fetched in parallel in stage 3. The instruction
// memory address is the state identifier plus the input character (one
// integer addition, as the packed layout allows), wrapping modulo the memory
// size. The auxiliary address depends on the state type: a DEFAULT_OPT1 state
// falls back to the initial state, so the initial table slot INIT_BASE + c is
// read; every other type reads the associated word the state's aux pointer
// names. The wrap-around and the INIT_BASE offset are this design's choices.
//
// Purely combinational; the caller registers the addresses into the memories.
module lap_addr_gen
  import lap_pkg::*;
#(
  parameter int unsigned IMEM_AW   = 12,
  parameter int unsigned AUX_AW    = 9,
  parameter int unsigned INIT_BASE = 0
) (
  input  state_t              st,
  input  logic [CHAR_W-1:0]   ch,
  output logic [IMEM_AW-1:0]  imem_addr,
  output logic [AUX_AW-1:0]   aux_addr
);

  always_comb begin
    imem_addr = IMEM_AW'(32'(st.id) + 32'(ch));
    if (st.itype == T_DEF_OPT1) aux_addr = AUX_AW'(INIT_BASE + 32'(ch));
    else                        aux_addr = AUX_AW'(st.aux_ptr);
  end

endmodule
