// tb_lap_core: self-checking test of one LAP core.
//
// 1. ADFA for "abc", "ba", "cd+" on four random texts, streams always ready:
//    reports must equal a plain string search, and the run must take
//    NCTX cycles per processing step of the busiest context (stall-free
//    pipeline, one step per cycle for the core).
//    The ADFA for "a+", "b+c", "c*d+" must likewise match a string search
//    and run at exactly one character per cycle.
// 2. NFA for the same patterns (PERSIST start, EPSILON loop for d+): reports
//    must again equal the string search; the NFA line rate is printed.
// 3. Random programs using every instruction type, with gaps in the input
//    streams and a shallow stack so that overflow happens: reports, overflow
//    flags and step counts must equal the reference interpreter.
// Event counts show that every mechanism occurred.
module tb_lap_core;
  import lap_pkg::*;
  import lap_ref_pkg::*;

  localparam int NCTX  = 4;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              prog_we, prog_aux;
  logic [11:0]       prog_addr;
  instr_t            prog_data;
  state_t            start_st;
  logic [NCTX-1:0]   ctx_init, in_valid, in_ready, in_last, ctx_done, ctx_overflow;
  logic [7:0]        in_char [NCTX];
  report_t           rpt;
  events_t           ev;

  lap_core #(.NCTX(NCTX), .STACK_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .prog_we, .prog_aux, .prog_addr, .prog_data, .start_st,
    .ctx_init, .in_valid, .in_ready, .in_char, .in_last, .ctx_done,
    .ctx_overflow, .rpt, .ev);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // event counters
  int n_step, n_adv, n_starve, n_hit, n_init, n_startfb, n_opt2, n_major,
      n_eps, n_persist, n_restart, n_dedup, n_ovf, n_rpt;
  always @(posedge clk) if (rst_n) begin
    n_step += int'(ev.step);       n_adv += int'(ev.char_adv);
    n_starve += int'(ev.starve);   n_hit += int'(ev.hit);
    n_init += int'(ev.opt1_init);  n_startfb += int'(ev.opt1_start);
    n_opt2 += int'(ev.opt2_fb);    n_major += int'(ev.majority);
    n_eps += int'(ev.epsilon);     n_persist += int'(ev.persist);
    n_restart += int'(ev.restart); n_dedup += int'(ev.dedup);
    n_ovf += int'(ev.overflow);    n_rpt += int'(rpt.valid);
  end

  // stream drivers
  byte unsigned txt [NCTX][$];
  int           idx [NCTX];
  bit           gaps;
  bit           go = 1'b0;
  rep_t         got [NCTX][$];

  always @(negedge clk) begin
    for (int k = 0; k < NCTX; k++) begin
      if (go && idx[k] < txt[k].size() && (!gaps || $urandom_range(0, 2) != 0)) begin
        in_valid[k] = 1'b1;
        in_char[k]  = txt[k][idx[k]];
        in_last[k]  = (idx[k] == txt[k].size() - 1);
      end else begin
        in_valid[k] = 1'b0;
        in_char[k]  = '0;
        in_last[k]  = 1'b0;
      end
    end
  end
  always @(posedge clk) begin
    for (int k = 0; k < NCTX; k++)
      if (in_valid[k] && in_ready[k]) idx[k]++;
    if (rst_n && rpt.valid) got[rpt.ctx].push_back('{pos: rpt.pos, state: rpt.state});
  end

  task automatic load(lap_prog p);
    @(negedge clk);
    for (int a = 0; a < IMEM_WORDS; a++) begin
      prog_we = 1'b1; prog_aux = 1'b0; prog_addr = 12'(a); prog_data = p.imem[a];
      @(negedge clk);
    end
    for (int a = 0; a < AUX_WORDS; a++) begin
      prog_we = 1'b1; prog_aux = 1'b1; prog_addr = 12'(a); prog_data = p.aux[a];
      @(negedge clk);
    end
    prog_we = 1'b0;
    start_st = p.start;
  endtask

  // starts all contexts, waits for them and returns the elapsed cycles
  task automatic run(output int elapsed);
    int t0;
    for (int k = 0; k < NCTX; k++) begin idx[k] = 0; got[k] = {}; end
    @(negedge clk);
    ctx_init = '1;
    @(negedge clk);
    ctx_init = '0;
    go = 1'b1;
    t0 = cyc;
    while (ctx_done != '1) @(posedge clk);
    elapsed = cyc - t0;
    go = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  task automatic compare(int k, rep_t exp [$], string tag);
    check(got[k].size() == exp.size(),
          $sformatf("%s ctx%0d: %0d reports, expected %0d", tag, k, got[k].size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got[k].size(); i++)
      check(got[k][i] == exp[i], $sformatf("%s ctx%0d report %0d: pos %0d state %h, expected pos %0d state %h",
            tag, k, i, got[k][i].pos, got[k][i].state, exp[i].pos, exp[i].state));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lap_prog p;
    lap_ref  m;
    rep_t    exp [$];
    int      elapsed, maxsteps, totsteps, steps0, nchars;
    byte unsigned alpha [5] = '{"a", "b", "c", "d", "x"};

    prog_we = 0; prog_aux = 0; prog_addr = 0; prog_data = '0; start_st = '0;
    ctx_init = '0; gaps = 0;
    for (int k = 0; k < NCTX; k++) begin in_valid[k] = 0; in_char[k] = 0; in_last[k] = 0; idx[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- test 1: ADFA, full rate ----------------
    p = new();
    p.build_adfa();
    load(p);
    m = new(p, DEPTH);
    maxsteps = 0; totsteps = 0; nchars = 0;
    for (int k = 0; k < NCTX; k++) begin
      txt[k] = {};
      for (int i = 0; i < 300; i++) txt[k].push_back(alpha[$urandom_range(0, 4)]);
      nchars += txt[k].size();
      m.run(txt[k]);
      totsteps += m.steps;
      if (m.steps > maxsteps) maxsteps = m.steps;
    end
    steps0 = n_step;
    run(elapsed);
    for (int k = 0; k < NCTX; k++) begin
      adfa_golden(txt[k], exp);
      compare(k, exp, "adfa");
    end
    check(n_step - steps0 == totsteps, $sformatf("adfa steps %0d, expected %0d", n_step - steps0, totsteps));
    check(elapsed >= NCTX * maxsteps && elapsed <= NCTX * maxsteps + 12,
          $sformatf("adfa cycles %0d, expected %0d..%0d", elapsed, NCTX * maxsteps, NCTX * maxsteps + 12));
    $display("adfa: %0d chars in %0d cycles, line rate %0.3f chars/cycle (%0d steps)",
             nchars, elapsed, real'(nchars) / real'(elapsed), totsteps);

    // ---------------- test 1b: ADFA for a+, b+c, c*d+ ----------------
    p = new();
    p.build_fig1();
    load(p);
    for (int k = 0; k < NCTX; k++) begin
      txt[k] = {};
      for (int i = 0; i < 200; i++) txt[k].push_back(alpha[$urandom_range(0, 4)]);
    end
    run(elapsed);
    for (int k = 0; k < NCTX; k++) begin
      fig1_golden(txt[k], exp);
      compare(k, exp, "fig1");
    end
    // one step per character: no OPT2 states in this automaton
    check(elapsed >= NCTX * 200 && elapsed <= NCTX * 200 + 12,
          $sformatf("fig1 cycles %0d, expected %0d..%0d", elapsed, NCTX * 200, NCTX * 200 + 12));

    // ---------------- test 2: NFA for the same patterns, full rate ----------
    p = new();
    p.build_nfa();
    load(p);
    m = new(p, DEPTH);
    totsteps = 0; maxsteps = 0;
    for (int k = 0; k < NCTX; k++) begin
      txt[k] = {};
      for (int i = 0; i < 300; i++) txt[k].push_back(alpha[$urandom_range(0, 4)]);
      m.run(txt[k]);
      totsteps += m.steps;
      if (m.steps > maxsteps) maxsteps = m.steps;
    end
    steps0 = n_step;
    run(elapsed);
    for (int k = 0; k < NCTX; k++) begin
      adfa_golden(txt[k], exp, 1'b1);
      compare(k, exp, "nfa");
      check(!ctx_overflow[k], "nfa overflow");
    end
    check(n_step - steps0 == totsteps, $sformatf("nfa steps %0d, expected %0d", n_step - steps0, totsteps));
    check(elapsed >= NCTX * maxsteps && elapsed <= NCTX * maxsteps + 12,
          $sformatf("nfa cycles %0d, expected %0d..%0d", elapsed, NCTX * maxsteps, NCTX * maxsteps + 12));
    $display("nfa: %0d chars in %0d cycles, line rate %0.3f chars/cycle (%0d steps)",
             nchars, elapsed, real'(nchars) / real'(elapsed), totsteps);

    // ---------------- test 3: random programs, gaps ----------------
    gaps = 1;
    for (int r = 0; r < 6; r++) begin
      p = new();
      p.build_random(12, 4, (r % 2 == 0) ? T_PERSIST : T_DEF_OPT1);
      load(p);
      m = new(p, DEPTH);
      for (int k = 0; k < NCTX; k++) begin
        txt[k] = {};
        for (int i = 0; i < 120; i++) txt[k].push_back(8'(8'h61 + $urandom_range(0, 3)));
      end
      run(elapsed);
      for (int k = 0; k < NCTX; k++) begin
        m.run(txt[k]);
        compare(k, m.reps, $sformatf("rand%0d", r));
        check(ctx_overflow[k] == m.overflow,
              $sformatf("rand%0d ctx%0d overflow %0b, expected %0b", r, k, ctx_overflow[k], m.overflow));
      end
    end

    // every mechanism must have happened
    check(n_hit > 0,     "no own-table hit");
    check(n_init > 0,    "no initial-table fall-back (OPT1)");
    check(n_startfb > 0, "no fall-through to the initial state (OPT1)");
    check(n_opt2 > 0,    "no OPT2 fall-back");
    check(n_major > 0,   "no MAJORITY edge");
    check(n_eps > 0,     "no EPSILON edge");
    check(n_persist > 0, "no PERSIST state");
    check(n_restart > 0, "no restart");
    check(n_dedup > 0,   "no duplicate dropped");
    check(n_ovf > 0,     "no overflow");
    check(n_starve > 0,  "no starved slot");
    check(n_rpt > 0,     "no report");
    $display("events: steps=%0d adv=%0d hit=%0d opt1_init=%0d opt1_start=%0d opt2=%0d majority=%0d epsilon=%0d persist=%0d restart=%0d dedup=%0d overflow=%0d starve=%0d reports=%0d",
             n_step, n_adv, n_hit, n_init, n_startfb, n_opt2, n_major, n_eps, n_persist,
             n_restart, n_dedup, n_ovf, n_starve, n_rpt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
