// lap_ref_pkg: test programs and a reference model for the LAP testbenches.
//
// lap_prog holds a memory image (instruction memory, auxiliary memory and the
// initial state). build_adfa() hand-builds the ADFA for the patterns "abc",
// "ba" and "cd+": a depth-bound-2 automaton whose depth-1 states fall back to
// the initial state (DEFAULT_OPT1) and whose depth-2 states fall back to a
// depth-1 state (DEFAULT_OPT2). adfa_golden() finds the same matches by plain
// string search, independently of any automaton. build_nfa() builds an NFA
// for the same patterns with PERSIST, BASIC and EPSILON states. build_fig1()
// builds the ADFA for "a+", "b+c" and "c*d+", checked by fig1_golden(). build_random() fills the
// memories with a random program that uses every instruction type, without
// same-character cycles.
//
// lap_ref interprets a memory image one context at a time, with the same
// rules as the hardware (two stacks, LIFO order, duplicate and overflow
// drops), and records the reports and the number of processing steps.
package lap_ref_pkg;
  import lap_pkg::*;

  localparam int IMEM_WORDS = 4096;
  localparam int AUX_WORDS  = 160;

  // ADFA state identifiers (each owns slots id + c of the instruction memory)
  localparam logic [11:0] ID_S0 = 12'h200, ID_A = 12'h010, ID_B = 12'h020,
                          ID_C = 12'h030, ID_CD = 12'h040, ID_AB = 12'h050,
                          ID_ABC = 12'h060, ID_BA = 12'h070;

  // NFA state identifiers for the same three patterns
  localparam logic [11:0] ID_P = 12'h300, ID_NA = 12'h310, ID_NB = 12'h320,
                          ID_NC = 12'h330, ID_NAB = 12'h340, ID_NABC = 12'h350,
                          ID_NBA = 12'h360, ID_NCD = 12'h370;

  // ADFA for "a+", "b+c", "c*d+"
  localparam logic [11:0] ID_F1 = 12'h400, ID_FA = 12'h410, ID_FD = 12'h420,
                          ID_FB = 12'h430, ID_FBC = 12'h440;

  typedef struct packed {
    logic [31:0]  pos;
    logic [11:0]  state;
  } rep_t;

  function automatic instr_t mk(logic [7:0] sig, state_t s);
    instr_t i;
    i.sig = sig; i.target = s.id; i.itype = s.itype; i.accept = s.accept;
    i.aux_ptr = s.aux_ptr;
    return i;
  endfunction

  function automatic state_t st(logic [11:0] id, itype_e t, logic acc, logic [7:0] p);
    state_t s;
    s.id = id; s.itype = t; s.accept = acc; s.aux_ptr = p;
    return s;
  endfunction

  class lap_prog;
    instr_t imem [IMEM_WORDS];
    instr_t aux  [AUX_WORDS];
    state_t start;

    function void clear();
      foreach (imem[i]) imem[i] = '0;
      foreach (aux[i])  aux[i]  = '0;
    endfunction

    function void build_adfa();
      state_t s0, a, b, c, cd, ab, abc, ba;
      clear();
      s0  = st(ID_S0,  T_DEF_OPT1, 1'b0, 8'd0);
      a   = st(ID_A,   T_DEF_OPT1, 1'b0, 8'd0);
      b   = st(ID_B,   T_DEF_OPT1, 1'b0, 8'd0);
      c   = st(ID_C,   T_DEF_OPT1, 1'b0, 8'd0);
      cd  = st(ID_CD,  T_DEF_OPT1, 1'b1, 8'd0);
      ab  = st(ID_AB,  T_DEF_OPT2, 1'b0, 8'd1);   // default state B
      abc = st(ID_ABC, T_DEF_OPT2, 1'b1, 8'd2);   // default state C
      ba  = st(ID_BA,  T_DEF_OPT2, 1'b1, 8'd3);   // default state A
      start = s0;
      // initial table: slot INIT_BASE(0) + c
      aux[8'h61] = mk("a", a);
      aux[8'h62] = mk("b", b);
      aux[8'h63] = mk("c", c);
      // associated words (signature never equals the slot index)
      aux[1] = mk(8'hff, b);
      aux[2] = mk(8'hff, c);
      aux[3] = mk(8'hff, a);
      // own tables
      imem[ID_A  + 12'h62] = mk("b", ab);
      imem[ID_B  + 12'h61] = mk("a", ba);
      imem[ID_C  + 12'h64] = mk("d", cd);
      imem[ID_CD + 12'h64] = mk("d", cd);
      imem[ID_AB + 12'h63] = mk("c", abc);
    endfunction

    // ADFA for "a+", "b+c", "c*d+": every state falls back to the initial
    // state; only the "b" state keeps an own edge (on c).
    function void build_fig1();
      state_t f1, fa, fd, fb, fbc;
      clear();
      f1  = st(ID_F1,  T_DEF_OPT1, 1'b0, 8'd0);
      fa  = st(ID_FA,  T_DEF_OPT1, 1'b1, 8'd0);
      fd  = st(ID_FD,  T_DEF_OPT1, 1'b1, 8'd0);
      fb  = st(ID_FB,  T_DEF_OPT1, 1'b0, 8'd0);
      fbc = st(ID_FBC, T_DEF_OPT1, 1'b1, 8'd0);
      start = f1;
      aux[8'h61] = mk("a", fa);
      aux[8'h62] = mk("b", fb);
      aux[8'h64] = mk("d", fd);
      imem[ID_FB + 12'h63] = mk("c", fbc);
    endfunction

    // NFA for "abc", "ba", "cd+": a PERSIST start state (self-loop on every
    // character), BASIC states for the pattern prefixes, and an EPSILON edge
    // from the "cd" state back to the "c" state for the repetition of d.
    function void build_nfa();
      state_t pp, na, nb, nc, nab, nabc, nba, ncd;
      clear();
      pp   = st(ID_P,    T_PERSIST, 1'b0, 8'd0);
      na   = st(ID_NA,   T_BASIC,   1'b0, 8'd0);
      nb   = st(ID_NB,   T_BASIC,   1'b0, 8'd0);
      nc   = st(ID_NC,   T_BASIC,   1'b0, 8'd0);
      nab  = st(ID_NAB,  T_BASIC,   1'b0, 8'd0);
      nabc = st(ID_NABC, T_BASIC,   1'b1, 8'd0);
      nba  = st(ID_NBA,  T_BASIC,   1'b1, 8'd0);
      ncd  = st(ID_NCD,  T_EPSILON, 1'b1, 8'd1);
      start = pp;
      aux[1] = mk(8'hff, nc);
      imem[ID_P   + 12'h61] = mk("a", na);
      imem[ID_P   + 12'h62] = mk("b", nb);
      imem[ID_P   + 12'h63] = mk("c", nc);
      imem[ID_NA  + 12'h62] = mk("b", nab);
      imem[ID_NAB + 12'h63] = mk("c", nabc);
      imem[ID_NB  + 12'h61] = mk("a", nba);
      imem[ID_NC  + 12'h64] = mk("d", ncd);
    endfunction

    // nst states with random types; characters drawn from 'a'..'a'+nch-1;
    // each (state, character) edge exists with probability 1/(sparse+1)
    function void build_random(int nst, int nch, itype_e start_type, int sparse = 2);
      state_t s [];
      logic [11:0] id;
      int ptr;
      clear();
      s = new[nst];
      for (int i = 0; i < nst; i++) begin
        itype_e t;
        t = itype_e'($urandom_range(1, 6));
        if (i == 0) t = start_type;
        // same-character pushes must point to a lower-numbered state
        // (state 1 is always BASIC, so that active sets can die out)
        if (i == 1) t = T_BASIC;
        // states 2..4 make sure every miss rule is present
        if (i == 2) t = T_MAJORITY;
        if (i == 3) t = T_EPSILON;
        if (i == 4) t = T_DEF_OPT2;
        id = 12'(i * 37 + 5);
        s[i] = st(id, t, ($urandom_range(0, 4) == 0) && i != 0, 8'd0);
      end
      // associated words live above the initial-table slots of 'a'..'a'+nch-1;
      // pointers are handed out first, then the words are written, so every
      // word carries its state's final pointer
      ptr = 8'h61 + nch;
      for (int i = 0; i < nst; i++) begin
        if (s[i].itype inside {T_DEF_OPT2, T_EPSILON, T_MAJORITY}) begin
          if (ptr < AUX_WORDS) begin
            s[i].aux_ptr = 8'(ptr);
            ptr++;
          end else s[i].itype = T_BASIC;
        end
      end
      for (int i = 0; i < nst; i++) begin
        int j;
        if (s[i].itype inside {T_DEF_OPT2, T_EPSILON}) j = $urandom_range(1, i - 1);
        else j = $urandom_range(0, nst - 1);
        if (s[i].itype inside {T_DEF_OPT2, T_EPSILON, T_MAJORITY})
          aux[s[i].aux_ptr] = mk(8'hff, s[j]);
      end
      for (int i = 0; i < nst; i++)
        for (int c = 0; c < nch; c++)
          if ($urandom_range(0, sparse) == 0)
            imem[s[i].id + 12'(8'h61 + c)] = mk(8'(8'h61 + c), s[$urandom_range(1, nst - 1)]);
      // the start state leads to states 1..4 on every character
      for (int c = 0; c < nch; c++)
        imem[s[0].id + 12'(8'h61 + c)] = mk(8'(8'h61 + c), s[(c % 4) + 1]);
      for (int c = 0; c < nch; c++)
        if ($urandom_range(0, 1) == 0)
          aux[8'h61 + c] = mk(8'(8'h61 + c), s[$urandom_range(1, nst - 1)]);
      start = s[0];
    endfunction
  endclass

  // Matches of "abc", "ba" and "cd+" found by string search.
  // The reported state identifiers are those of the ADFA unless nfa is set.
  function automatic void adfa_golden(input byte unsigned t [$], ref rep_t exp [$],
                                      input bit nfa = 1'b0);
    logic [11:0] i_abc, i_ba, i_cd;
    i_abc = nfa ? ID_NABC : ID_ABC;
    i_ba  = nfa ? ID_NBA  : ID_BA;
    i_cd  = nfa ? ID_NCD  : ID_CD;
    exp = {};
    for (int i = 0; i < t.size(); i++) begin
      if (i >= 2 && t[i-2] == "a" && t[i-1] == "b" && t[i] == "c")
        exp.push_back('{pos: 32'(i), state: i_abc});
      else if (i >= 1 && t[i-1] == "b" && t[i] == "a")
        exp.push_back('{pos: 32'(i), state: i_ba});
      else if (t[i] == "d") begin
        int j = i - 1;
        while (j >= 0 && t[j] == "d") j--;
        if (j >= 0 && t[j] == "c") exp.push_back('{pos: 32'(i), state: i_cd});
      end
    end
  endfunction

  // Matches of "a+", "b+c" and "c*d+" found by string search.
  function automatic void fig1_golden(input byte unsigned t [$], ref rep_t exp [$]);
    exp = {};
    for (int i = 0; i < t.size(); i++) begin
      if (t[i] == "a") exp.push_back('{pos: 32'(i), state: ID_FA});
      else if (t[i] == "d") exp.push_back('{pos: 32'(i), state: ID_FD});
      else if (t[i] == "c" && i >= 1 && t[i-1] == "b") exp.push_back('{pos: 32'(i), state: ID_FBC});
    end
  endfunction

  class lap_ref;
    lap_prog p;
    int      depth;
    int      aux_base;
    rep_t    reps [$];
    int      steps;
    bit      overflow;
    int      n_opt2, n_eps, n_persist, n_major, n_init, n_startfb, n_restart, n_dedup;

    function new(lap_prog prog, int stack_depth);
      p = prog; depth = stack_depth; aux_base = 0;
    endfunction

    local function void push(ref state_t stk [$], input state_t s);
      foreach (stk[i]) if (stk[i] == s) begin n_dedup++; return; end
      if (stk.size() >= depth) begin overflow = 1; return; end
      stk.push_back(s);
    endfunction

    local function instr_t rd_aux(int a);
      return (a < AUX_WORDS) ? p.aux[a] : '0;
    endfunction

    function void run(byte unsigned t [$]);
      state_t cur [$], nxt [$], s;
      int pos = -1;
      reps = {}; steps = 0; overflow = 0;
      n_opt2 = 0; n_eps = 0; n_persist = 0; n_major = 0; n_init = 0;
      n_startfb = 0; n_restart = 0; n_dedup = 0;
      nxt.push_back(p.start);
      forever begin
        if (cur.size() > 0) s = cur.pop_back();
        else if (pos == t.size() - 1) break;
        else begin
          pos++;
          cur = nxt; nxt = {};
          if (cur.size() > 0) s = cur.pop_back();
          else begin s = p.start; n_restart++; end
        end
        step(s, t[pos], pos, cur, nxt);
      end
    endfunction

    local function void step(state_t s, byte unsigned ch, int pos,
                             ref state_t cur [$], ref state_t nxt [$]);
      instr_t iw, aw;
      bit hit, ahit;
      int sz;
      steps++;
      iw = p.imem[(int'(s.id) + int'(ch)) % IMEM_WORDS];
      aw = rd_aux(s.itype == T_DEF_OPT1 ? aux_base + int'(ch) : int'(s.aux_ptr));
      hit  = iw.sig == ch && iw.itype != T_NULL && s.itype != T_NULL;
      ahit = aw.sig == ch && aw.itype != T_NULL;
      if (hit) begin
        sz = nxt.size();
        push(nxt, instr2state(iw));
        if (nxt.size() > sz && iw.accept) reps.push_back('{pos: 32'(pos), state: iw.target});
      end else begin
        case (s.itype)
          T_DEF_OPT1: if (ahit) begin
            n_init++;
            sz = nxt.size();
            push(nxt, instr2state(aw));
            if (nxt.size() > sz && aw.accept) reps.push_back('{pos: 32'(pos), state: aw.target});
          end else begin
            n_startfb++;
            push(nxt, p.start);
          end
          T_DEF_OPT2: begin n_opt2++; push(cur, instr2state(aw)); end
          T_MAJORITY: begin
            n_major++;
            sz = nxt.size();
            push(nxt, instr2state(aw));
            if (nxt.size() > sz && aw.accept) reps.push_back('{pos: 32'(pos), state: aw.target});
          end
          default: ;
        endcase
      end
      if (s.itype == T_EPSILON) begin n_eps++; push(cur, instr2state(aw)); end
      if (s.itype == T_PERSIST) begin n_persist++; push(nxt, s); end
    endfunction
  endclass

endpackage
