// lap_ass: Active State Stack (ASS) of a LAP core, for all contexts.
//
// Each context keeps two stacks of state descriptors: the states still to be
// processed for its current character ("cur") and the states already
// activated for the next character ("next"). The pipeline's first stage pops
// one state at a time, so several active states (an NFA, or an ADFA state and
// its default state) are processed serially. When "cur" is empty the context
// moves on: the two stacks swap roles in one cycle and the top of the old
// "next" stack is handed out at once, so a one-state automaton (DFA, ADFA)
// spends no cycle on the change of character. The last stage pushes up to two
// states per cycle into either stack.
//
// Duplicates are dropped: a push equal to a state already held in its target
// stack (or to the other push of the same cycle) is ignored, which keeps an
// NFA's active set a set. A push into a full stack is dropped and sets the
// context's sticky overflow flag. Holding active states in a stack and
// serialising them follow the LAP description; the two-stack organisation,
// the duplicate check, the depth and the overflow rule are this design's own.
//
// Interface and timing:
//   init      per-context pulse: empties "cur", sets "next" to start_st and
//             clears overflow (takes priority over everything else)
//   pop_ctx   the context read by stage 1; cur_top/next_top and the empty
//             flags are combinational reads of it
//   pop_op    OP_POP_CUR removes the top of "cur"; OP_SWAP swaps the stacks
//             and removes the top of the old "next" (if any); applied at the
//             clock edge
//   push_ctx  the context written by stage 4 with push0/push1 at the edge;
//             push0_new says combinationally that push0 will be stored
// The pipeline never pops and pushes the same context in one cycle.
module lap_ass
  import lap_pkg::*;
#(
  parameter int unsigned NCTX  = 4,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CW    = $clog2(NCTX),
  parameter int unsigned NW    = $clog2(DEPTH + 1),
  parameter int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCTX-1:0] init,
  input  state_t          start_st,
  input  logic [CW-1:0]   pop_ctx,
  input  logic [1:0]      pop_op,
  output logic            cur_empty,
  output logic            next_empty,
  output state_t          cur_top,
  output state_t          next_top,
  input  logic [CW-1:0]   push_ctx,
  input  push_t           push0,
  input  push_t           push1,
  output logic            push0_new,
  output logic            dedup_ev,
  output logic            overflow_ev,
  output logic [NCTX-1:0] overflow,
  output logic [NW-1:0]   cur_count [NCTX],
  output logic [NW-1:0]   next_count [NCTX]
);

  localparam logic [1:0] OP_NONE = 2'd0, OP_POP_CUR = 2'd1, OP_SWAP = 2'd2;

  state_t        mem  [NCTX][2][DEPTH];
  logic [NW-1:0] cnt  [NCTX][2];
  logic          cur_bank [NCTX];

  // ---------------- stage-1 read side ----------------
  logic          pb;
  logic [NW-1:0] pc_cur, pc_next;
  always_comb begin
    pb         = cur_bank[pop_ctx];
    pc_cur     = cnt[pop_ctx][pb];
    pc_next    = cnt[pop_ctx][!pb];
    cur_empty  = (pc_cur == '0);
    next_empty = (pc_next == '0);
    cur_top    = cur_empty  ? '0 : mem[pop_ctx][pb][IW'(pc_cur - 1'b1)];
    next_top   = next_empty ? '0 : mem[pop_ctx][!pb][IW'(pc_next - 1'b1)];
  end

  // ---------------- stage-4 write side ----------------
  logic          b0, b1;
  logic [NW-1:0] c0, c1;
  logic          dup0, dup1, full0, full1, acc0, acc1;
  always_comb begin
    b0   = push0.to_next ? !cur_bank[push_ctx] : cur_bank[push_ctx];
    b1   = push1.to_next ? !cur_bank[push_ctx] : cur_bank[push_ctx];
    c0   = cnt[push_ctx][b0];
    dup0 = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (NW'(i) < c0 && mem[push_ctx][b0][i] == push0.st) dup0 = 1'b1;
    full0 = (c0 == NW'(DEPTH));
    acc0  = push0.valid && !dup0 && !full0;

    c1   = cnt[push_ctx][b1] + NW'(acc0 && (b0 == b1));
    dup1 = acc0 && (b0 == b1) && (push0.st == push1.st);
    for (int unsigned i = 0; i < DEPTH; i++)
      if (NW'(i) < cnt[push_ctx][b1] && mem[push_ctx][b1][i] == push1.st) dup1 = 1'b1;
    full1 = (c1 >= NW'(DEPTH));
    acc1  = push1.valid && !dup1 && !full1;

    push0_new   = acc0;
    dedup_ev    = (push0.valid && dup0) || (push1.valid && dup1);
    overflow_ev = (push0.valid && !dup0 && full0) || (push1.valid && !dup1 && full1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCTX; k++) begin
        cnt[k][0]   <= '0;
        cnt[k][1]   <= '0;
        cur_bank[k] <= 1'b0;
        overflow[k] <= 1'b0;
      end
    end else begin
      // pop side
      if (!init[pop_ctx]) begin
        if (pop_op == OP_POP_CUR && !cur_empty) begin
          cnt[pop_ctx][pb] <= pc_cur - 1'b1;
        end else if (pop_op == OP_SWAP) begin
          cur_bank[pop_ctx] <= !pb;
          cnt[pop_ctx][!pb] <= next_empty ? '0 : pc_next - 1'b1;
          cnt[pop_ctx][pb]  <= '0;
        end
      end
      // push side
      if (!init[push_ctx]) begin
        if (acc0 && acc1 && b0 == b1) begin
          cnt[push_ctx][b0] <= c0 + NW'(2);
        end else begin
          if (acc0) cnt[push_ctx][b0] <= c0 + 1'b1;
          if (acc1) cnt[push_ctx][b1] <= cnt[push_ctx][b1] + 1'b1;
        end
        if (overflow_ev) overflow[push_ctx] <= 1'b1;
      end
      // init side
      for (int k = 0; k < NCTX; k++) begin
        if (init[k]) begin
          cur_bank[k]  <= 1'b0;
          cnt[k][0]    <= '0;
          cnt[k][1]    <= NW'(1);
          overflow[k]  <= 1'b0;
        end
      end
    end
  end

  // Stack storage (not reset: only words below the counts are ever read).
  always_ff @(posedge clk) begin
    if (!init[push_ctx]) begin
      if (acc0) mem[push_ctx][b0][IW'(c0)] <= push0.st;
      if (acc1) mem[push_ctx][b1][IW'(c1)] <= push1.st;
    end
    for (int k = 0; k < NCTX; k++)
      if (init[k]) mem[k][1][0] <= start_st;
  end

  always_comb begin
    for (int k = 0; k < NCTX; k++) begin
      cur_count[k]  = cnt[k][cur_bank[k]];
      next_count[k] = cnt[k][!cur_bank[k]];
    end
  end

  // The pipeline must never touch one context from both ends in a cycle.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (pop_op != OP_NONE && (push0.valid || push1.valid)) |-> (pop_ctx != push_ctx));

endmodule
