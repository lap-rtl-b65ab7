// lap_imem: LAP instruction memory.
//
// Holds the transition tables of all states, packed into one linear space the
// way coupled-linear packing does it: the edge of state s on character c sits
// at word s + c, and its signature field tells whether the word really
// belongs to (s, c). The default size, 4096 words of 32 bits (16 KB), follows
// the prototype; a 12-bit state identifier addresses it directly.
//
// Interface and timing: one synchronous read port used by the pipeline
// (address in stage 2, word out one cycle later in stage 3) and one write
// port used by the host to load a program. Reads and writes to the same word
// in one cycle return the old word. Reset does not clear the array (a block
// RAM cannot be reset), so the host loads every word, empty slots included,
// before starting a context. The read register is reset to zero.
module lap_imem
  import lap_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
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
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
