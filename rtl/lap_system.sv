// lap_system: a pattern-matching system of NCORES LAP cores.
//
// Each core holds its own copy of an automaton program and scans NCTX
// character streams of its own, so NCORES x NCTX streams are matched at
// once. The default of five cores of four contexts each is the prototype
// system's size. A host (not part of this design) loads the programs over
// one shared write bus: prog_core picks the core, or prog_bcast writes the
// same word into every core. The number of cores follows the LAP prototype;
// how the cores share the host bus is this design's own choice.
//
// Interface: all per-core signals are arrays indexed by core number, and
// per-context signals by [core][context]; their meaning and timing are those
// of lap_core.
module lap_system
  import lap_pkg::*;
#(
  parameter int unsigned NCORES      = 5,
  parameter int unsigned NCTX        = 4,
  parameter int unsigned STACK_DEPTH = 16,
  parameter int unsigned IMEM_DEPTH  = 4096,
  parameter int unsigned AUX_DEPTH   = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  logic              prog_bcast,
  input  logic [7:0]        prog_core,
  input  logic              prog_aux,
  input  logic [11:0]       prog_addr,
  input  instr_t            prog_data,
  input  state_t            start_st  [NCORES],
  input  logic [NCTX-1:0]   ctx_init  [NCORES],
  input  logic [NCTX-1:0]   in_valid  [NCORES],
  output logic [NCTX-1:0]   in_ready  [NCORES],
  input  logic [CHAR_W-1:0] in_char   [NCORES][NCTX],
  input  logic [NCTX-1:0]   in_last   [NCORES],
  output logic [NCTX-1:0]   ctx_done  [NCORES],
  output logic [NCTX-1:0]   ctx_overflow [NCORES],
  output report_t           rpt       [NCORES],
  output events_t           ev        [NCORES]
);

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic we;
    assign we = prog_we && (prog_bcast || (32'(prog_core) == c));

    lap_core #(
      .NCTX        (NCTX),
      .STACK_DEPTH (STACK_DEPTH),
      .IMEM_DEPTH  (IMEM_DEPTH),
      .AUX_DEPTH   (AUX_DEPTH)
    ) u_core (
      .clk, .rst_n,
      .prog_we      (we),
      .prog_aux     (prog_aux),
      .prog_addr    (prog_addr),
      .prog_data    (prog_data),
      .start_st     (start_st[c]),
      .ctx_init     (ctx_init[c]),
      .in_valid     (in_valid[c]),
      .in_ready     (in_ready[c]),
      .in_char      (in_char[c]),
      .in_last      (in_last[c]),
      .ctx_done     (ctx_done[c]),
      .ctx_overflow (ctx_overflow[c]),
      .rpt          (rpt[c]),
      .ev           (ev[c])
    );
  end

endmodule
