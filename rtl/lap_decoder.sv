// lap_decoder: stage-4 instruction decoder of the LAP pipeline.
//
// Given the active state being processed, its input character and the two
// words fetched in stage 3 (own-table word I from the instruction memory,
// word A from the auxiliary memory), decides which states become active and
// whether a pattern matched. The own-table word hits when its signature
// equals the character and it is not a NULL word. Per state type:
//
//   NULL         nothing; the state is dead
//   BASIC        hit: I's target for the next character; miss: nothing
//   DEFAULT_OPT1 hit: I; else A (initial-table word) if it hits; else the
//                initial state. Both words were fetched together, so the
//                fall-back to the initial state costs no extra step.
//   DEFAULT_OPT2 hit: I; miss: A describes the default state, which becomes
//                active for the same character (one more step, but the
//                associated word itself was fetched in parallel)
//   MAJORITY     hit: I; miss: A is the majority edge, taken on this character
//   EPSILON      hit: I; in any case A's state is active for this character
//   PERSIST      hit: I; in any case this state stays active for the next one
//
// The types, their purpose and their one-step cost follow the LAP instruction
// set; the exact miss rules of BASIC, MAJORITY, EPSILON and PERSIST are this
// design's reading of the one-line descriptions. Up to two pushes are
// produced. Push 0 reports a match when it is a transition on the current
// character into a state whose accept flag is set.
//
// Purely combinational.
module lap_decoder
  import lap_pkg::*;
(
  input  logic              valid,
  input  state_t            st,
  input  logic [CHAR_W-1:0] ch,
  input  instr_t            iw,      // instruction memory word
  input  instr_t            aw,      // auxiliary memory word
  input  state_t            start_st,
  output push_t             push0,
  output push_t             push1,
  output logic              match,   // push0 enters an accepting state
  output events_t           ev
);

  logic i_hit, a_hit;

  always_comb begin
    i_hit = (iw.sig == ch) && (iw.itype != T_NULL);
    a_hit = (aw.sig == ch) && (aw.itype != T_NULL);
    push0 = '0;
    push1 = '0;
    ev    = '0;
    if (valid) begin
      ev.step = 1'b1;
      ev.hit  = i_hit && (st.itype != T_NULL);
      if (i_hit && (st.itype != T_NULL)) begin
        push0 = '{valid: 1'b1, to_next: 1'b1, st: instr2state(iw)};
      end
      unique case (st.itype)
        T_DEF_OPT1: if (!i_hit) begin
          if (a_hit) begin
            push0        = '{valid: 1'b1, to_next: 1'b1, st: instr2state(aw)};
            ev.opt1_init = 1'b1;
          end else begin
            push0         = '{valid: 1'b1, to_next: 1'b1, st: start_st};
            ev.opt1_start = 1'b1;
          end
        end
        T_DEF_OPT2: if (!i_hit) begin
          push0      = '{valid: 1'b1, to_next: 1'b0, st: instr2state(aw)};
          ev.opt2_fb = 1'b1;
        end
        T_MAJORITY: if (!i_hit) begin
          push0       = '{valid: 1'b1, to_next: 1'b1, st: instr2state(aw)};
          ev.majority = 1'b1;
        end
        T_EPSILON: begin
          push1      = '{valid: 1'b1, to_next: 1'b0, st: instr2state(aw)};
          ev.epsilon = 1'b1;
        end
        T_PERSIST: begin
          push1      = '{valid: 1'b1, to_next: 1'b1, st: st};
          ev.persist = 1'b1;
        end
        default: ;  // NULL, BASIC and the unused code: no fall-back
      endcase
    end
    match = push0.valid && push0.to_next && push0.st.accept &&
            !(st.itype == T_DEF_OPT1 && !i_hit && !a_hit);
  end

endmodule
