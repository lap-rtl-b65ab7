// lap_pkg: types and constants shared by the LAP automata processor.
//
// An instruction word is 32 bits with four fields: an 8-bit signature (the
// input character the edge is labelled with), a 12-bit target state
// identifier, a 3-bit type and a 9-bit attach field. The four fields, the
// 32-bit width, the 12-bit state identifier, the 8-bit character and the seven
// instruction types follow the LAP description. The bit order of the fields,
// the type encoding and the split of "attach" into an accept flag and an 8-bit
// auxiliary-memory pointer are this design's own choices.
//
// An active state is carried through the pipeline as a state descriptor: the
// target, type and attach fields of the instruction that activated it. A
// state's type says how a miss in its own transition table is resolved.
package lap_pkg;

  localparam int unsigned CHAR_W   = 8;
  localparam int unsigned STATE_W  = 12;
  localparam int unsigned TYPE_W   = 3;
  localparam int unsigned AUXP_W   = 8;
  localparam int unsigned INSTR_W  = 32;
  localparam int unsigned POS_W    = 32;

  typedef enum logic [TYPE_W-1:0] {
    T_NULL     = 3'd0,  // does nothing; empty memory slot or dead state
    T_BASIC    = 3'd1,  // labelled edges only; a miss kills the state
    T_DEF_OPT1 = 3'd2,  // default state is the initial state (optimization 1)
    T_DEF_OPT2 = 3'd3,  // default state is a non-initial state (optimization 2)
    T_MAJORITY = 3'd4,  // a miss takes the majority edge held in aux memory
    T_EPSILON  = 3'd5,  // an epsilon edge to the state held in aux memory
    T_PERSIST  = 3'd6   // state stays active on every character
  } itype_e;

  typedef struct packed {
    logic [CHAR_W-1:0]  sig;
    logic [STATE_W-1:0] target;
    itype_e             itype;
    logic               accept;
    logic [AUXP_W-1:0]  aux_ptr;
  } instr_t;

  typedef struct packed {
    logic [STATE_W-1:0] id;
    itype_e             itype;
    logic               accept;
    logic [AUXP_W-1:0]  aux_ptr;
  } state_t;

  // One entry pushed into the active state stack.
  typedef struct packed {
    logic   valid;
    logic   to_next;  // 1: active for the next character, 0: same character
    state_t st;
  } push_t;

  // Match report: a transition into an accepting state.
  typedef struct packed {
    logic               valid;
    logic [3:0]         ctx;    // context (up to 16)
    logic [STATE_W-1:0] state;
    logic [POS_W-1:0]   pos;    // index of the character that made the match
  } report_t;

  // One-cycle event pulses, for performance counting.
  typedef struct packed {
    logic step;        // an active state was processed (stage 4)
    logic char_adv;    // a context moved to a new character (stage 1)
    logic starve;      // a context slot went idle waiting for input
    logic hit;         // own-table signature check passed
    logic opt1_init;   // OPT1 miss resolved by the initial table
    logic opt1_start;  // OPT1 miss fell through to the initial state
    logic opt2_fb;     // OPT2 fall-back to the associated default state
    logic majority;    // MAJORITY miss took the majority edge
    logic epsilon;     // EPSILON edge followed
    logic persist;     // PERSIST state kept active
    logic restart;     // context had no active state and restarted
    logic dedup;       // a push was dropped as a duplicate
    logic overflow;    // a push was dropped because the stack was full
  } events_t;

  function automatic state_t instr2state(instr_t i);
    state_t s;
    s.id      = i.target;
    s.itype   = i.itype;
    s.accept  = i.accept;
    s.aux_ptr = i.aux_ptr;
    return s;
  endfunction

endpackage
