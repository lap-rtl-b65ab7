// lap_core: one LAP automata processor core.
//
// Runs a finite automaton (DFA, ADFA or NFA) stored in its two memories over
// NCTX independent input streams. A four-stage pipeline processes one active
// state per cycle:
//   S1  select    the context whose turn it is (round robin) hands out one
//                 active state from its Active State Stack and one character
//                 from its Stream Prefetch Unit
//   S2  address   instruction address = state + character; auxiliary address
//                 = initial-table slot or associated-word pointer
//   S3  fetch     both memories are read in the same cycle
//   S4  decode    the decoder picks the next state(s), pushes them into the
//                 stack and reports matches
// Fine-grained multithreading removes every pipeline hazard: with NCTX >= 4
// a context is in at most one stage at a time, and its S4 update lands before
// its next S1. The pipeline therefore never stalls; a context slot only goes
// idle when its stream has no character ready or the context has finished.
// All contexts share the program. The pipeline split, the four contexts and
// the parallel fetch follow the LAP description; the context-slot rules, the
// restart from the initial state when a context's active set is empty, the
// stream interface and the report format are this design's own.
//
// Interface:
//   prog_we/prog_aux/prog_addr/prog_data  host write into the instruction
//                                         memory (prog_aux = 0) or the
//                                         auxiliary memory (prog_aux = 1)
//   start_st      descriptor of the initial state (shared by all contexts)
//   ctx_init[k]   pulse: restarts context k (empty stacks, empty FIFO,
//                 position 0, initial state active); in-flight work of k is
//                 discarded
//   in_*[k]       character stream of context k, in_last marks its end
//   ctx_done[k]   context k consumed its last character and has no state
//                 left to process for it; stays high until the next init
//   rpt           one-cycle report: context, accepting state entered and the
//                 position of the character that entered it
//   ev            one-cycle event pulses (see lap_pkg::events_t)
// Latency: a report appears three cycles after the state that produced it
// left S1 (registered out of S4).
module lap_core
  import lap_pkg::*;
#(
  parameter int unsigned NCTX        = 4,
  parameter int unsigned STACK_DEPTH = 16,
  parameter int unsigned SPU_DEPTH   = 4,
  parameter int unsigned IMEM_DEPTH  = 4096,
  parameter int unsigned AUX_DEPTH   = 160,
  parameter int unsigned INIT_BASE   = 0,
  parameter int unsigned CW          = $clog2(NCTX),
  parameter int unsigned IMEM_AW     = $clog2(IMEM_DEPTH),
  parameter int unsigned AUX_AW      = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  logic              prog_aux,
  input  logic [11:0]       prog_addr,
  input  instr_t            prog_data,
  input  state_t            start_st,
  input  logic [NCTX-1:0]   ctx_init,
  input  logic [NCTX-1:0]   in_valid,
  output logic [NCTX-1:0]   in_ready,
  input  logic [CHAR_W-1:0] in_char [NCTX],
  input  logic [NCTX-1:0]   in_last,
  output logic [NCTX-1:0]   ctx_done,
  output logic [NCTX-1:0]   ctx_overflow,
  output report_t           rpt,
  output events_t           ev
);

  if (NCTX < 4) begin : g_ctx_check
    $error("lap_core needs at least four contexts to keep the pipeline hazard-free");
  end

  localparam logic [1:0] OP_NONE = 2'd0, OP_POP_CUR = 2'd1, OP_SWAP = 2'd2;

  typedef struct packed {
    logic              valid;
    logic [CW-1:0]     ctx;
    state_t            st;
    logic [CHAR_W-1:0] ch;
    logic [POS_W-1:0]  pos;
  } slot_t;

  // ---------------- per-context stream prefetch units ----------------
  logic [NCTX-1:0]   head_valid, cur_last, cur_valid, consume;
  logic [CHAR_W-1:0] head_char [NCTX];
  logic [CHAR_W-1:0] cur_char  [NCTX];
  logic [POS_W-1:0]  cur_pos   [NCTX];

  for (genvar k = 0; k < NCTX; k++) begin : g_spu
    lap_spu #(.DEPTH(SPU_DEPTH)) u_spu (
      .clk, .rst_n,
      .init       (ctx_init[k]),
      .in_valid   (in_valid[k]),
      .in_ready   (in_ready[k]),
      .in_char    (in_char[k]),
      .in_last    (in_last[k]),
      .head_valid (head_valid[k]),
      .head_char  (head_char[k]),
      .head_last  (),
      .consume    (consume[k]),
      .cur_char   (cur_char[k]),
      .cur_pos    (cur_pos[k]),
      .cur_last   (cur_last[k]),
      .cur_valid  (cur_valid[k])
    );
  end

  // ---------------- active state stack ----------------
  logic [CW-1:0] rr;
  logic [1:0]    pop_op;
  logic          cur_empty, next_empty, push0_new, dedup_ev, overflow_ev;
  state_t        cur_top, next_top;
  push_t         push0, push1;
  slot_t         s2, s3, s4;

  lap_ass #(.NCTX(NCTX), .DEPTH(STACK_DEPTH)) u_ass (
    .clk, .rst_n,
    .init        (ctx_init),
    .start_st    (start_st),
    .pop_ctx     (rr),
    .pop_op      (pop_op),
    .cur_empty   (cur_empty),
    .next_empty  (next_empty),
    .cur_top     (cur_top),
    .next_top    (next_top),
    .push_ctx    (s4.ctx),
    .push0       (push0),
    .push1       (push1),
    .push0_new   (push0_new),
    .dedup_ev    (dedup_ev),
    .overflow_ev (overflow_ev),
    .overflow    (ctx_overflow),
    .cur_count   (),
    .next_count  ()
  );

  // ---------------- S1: context and state selection ----------------
  logic [NCTX-1:0] active;
  slot_t           s1;
  logic            s1_done, s1_starve, s1_restart, s1_adv;

  always_comb begin
    s1         = '0;
    pop_op     = OP_NONE;
    consume    = '0;
    s1_done    = 1'b0;
    s1_starve  = 1'b0;
    s1_restart = 1'b0;
    s1_adv     = 1'b0;
    s1.ctx     = rr;
    if (active[rr] && !ctx_init[rr]) begin
      if (!cur_empty) begin
        s1.valid = 1'b1;
        s1.st    = cur_top;
        s1.ch    = cur_char[rr];
        s1.pos   = cur_pos[rr];
        pop_op   = OP_POP_CUR;
      end else if (cur_valid[rr] && cur_last[rr]) begin
        s1_done = 1'b1;
      end else if (head_valid[rr]) begin
        s1.valid    = 1'b1;
        s1.st       = next_empty ? start_st : next_top;
        s1.ch       = head_char[rr];
        s1.pos      = cur_valid[rr] ? cur_pos[rr] + 1'b1 : '0;
        pop_op      = OP_SWAP;
        consume[rr] = 1'b1;
        s1_adv      = 1'b1;
        s1_restart  = next_empty;
      end else begin
        s1_starve = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '0;
      active   <= '0;
      ctx_done <= '0;
    end else begin
      rr <= (32'(rr) == NCTX - 1) ? '0 : rr + 1'b1;
      if (s1_done) begin
        active[rr]   <= 1'b0;
        ctx_done[rr] <= 1'b1;
      end
      for (int k = 0; k < NCTX; k++) begin
        if (ctx_init[k]) begin
          active[k]   <= 1'b1;
          ctx_done[k] <= 1'b0;
        end
      end
    end
  end

  // ---------------- S2: address generation ----------------
  logic [IMEM_AW-1:0] imem_raddr;
  logic [AUX_AW-1:0]  aux_raddr;
  instr_t             iw, aw;

  lap_addr_gen #(.IMEM_AW(IMEM_AW), .AUX_AW(AUX_AW), .INIT_BASE(INIT_BASE)) u_agen (
    .st        (s2.st),
    .ch        (s2.ch),
    .imem_addr (imem_raddr),
    .aux_addr  (aux_raddr)
  );

  // ---------------- S3: parallel fetch ----------------
  lap_imem #(.DEPTH(IMEM_DEPTH), .AW(IMEM_AW)) u_imem (
    .clk, .rst_n,
    .we    (prog_we && !prog_aux),
    .waddr (IMEM_AW'(prog_addr)),
    .wdata (prog_data),
    .re    (s2.valid),
    .raddr (imem_raddr),
    .rdata (iw)
  );

  lap_auxmem #(.DEPTH(AUX_DEPTH), .AW(AUX_AW)) u_aux (
    .clk, .rst_n,
    .we    (prog_we && prog_aux),
    .waddr (AUX_AW'(prog_addr)),
    .wdata (prog_data),
    .re    (s2.valid),
    .raddr (aux_raddr),
    .rdata (aw)
  );

  // ---------------- S4: decode ----------------
  instr_t  s4_iw, s4_aw;
  logic    match;
  events_t dec_ev;

  lap_decoder u_dec (
    .valid    (s4.valid),
    .st       (s4.st),
    .ch       (s4.ch),
    .iw       (s4_iw),
    .aw       (s4_aw),
    .start_st (start_st),
    .push0    (push0),
    .push1    (push1),
    .match    (match),
    .ev       (dec_ev)
  );

  // ---------------- pipeline registers and outputs ----------------
  function automatic slot_t kill(slot_t s, logic [NCTX-1:0] init);
    slot_t r = s;
    if (init[s.ctx]) r.valid = 1'b0;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0; s3 <= '0; s4 <= '0;
      s4_iw <= '0; s4_aw <= '0;
      rpt <= '0; ev <= '0;
    end else begin
      s2    <= s1;
      s3    <= kill(s2, ctx_init);
      s4    <= kill(s3, ctx_init);
      s4_iw <= iw;
      s4_aw <= aw;
      rpt.valid <= match && push0_new && !ctx_init[s4.ctx];
      rpt.ctx   <= 4'(s4.ctx);
      rpt.state <= push0.st.id;
      rpt.pos   <= s4.pos;
      ev          <= dec_ev;
      ev.dedup    <= dedup_ev;
      ev.overflow <= overflow_ev;
      ev.char_adv <= s1_adv;
      ev.starve   <= s1_starve;
      ev.restart  <= s1_restart;
    end
  end

endmodule
