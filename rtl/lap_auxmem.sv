// lap_auxmem: LAP auxiliary memory.
//
// A small memory read in the same cycle as the instruction memory. It holds
// two kinds of words: the initial state's transition table (word
// INIT_BASE + c is the initial state's edge on character c, checked by its
// signature) and the associated instructions, each describing the default
// state of an optimization-2 state, the majority destination of a MAJORITY
// state or the epsilon destination of an EPSILON state. Associated words may
// sit in the unused slots of the initial table; their signature must then
// differ from the character that would index them.
//
// The default of 160 words of 32 bits (0.625 KB) is this design's reading of
// the prototype's 0.6 KB. Reads past the last word return an all-zero word,
// which is a NULL instruction and so always misses the signature check; an
// initial-table lookup for a character outside the table therefore keeps the
// automaton in its initial state.
//
// Interface and timing: as lap_imem, one synchronous read port (address in
// stage 2, word in stage 3) and a host write port; the array is not reset.
module lap_auxmem
  import lap_pkg::*;
#(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned AW    = 9,
  parameter int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[IW'(waddr)] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (re) rdata <= (32'(raddr) < DEPTH) ? mem[IW'(raddr)] : '0;
  end

endmodule
