// tb_lap_system: end-to-end test of the five-core LAP system at its default
// size (no parameter overrides).
//
// Cores 0-2 receive the ADFA for "abc", "ba" and "cd+" through one broadcast
// program load; cores 3 and 4 are then loaded one by one with different
// random programs that use every instruction type (core 3 starts in a BASIC
// state, so its active sets die out and restart; core 4's is large enough
// to overflow the 16-entry stacks). All twenty contexts then scan random
// texts at once; core 3's streams have random gaps. Checks:
//   - ADFA reports equal a plain string search;
//   - random-program reports and overflow flags equal the reference model;
//   - each ADFA core takes four cycles per step of its busiest context
//     (stall-free pipeline) and the line rate is printed;
//   - every mechanism (own-table hit, initial-table fall-back, fall-through to
//     the initial state, OPT2 fall-back, majority, epsilon, persist, restart,
//     duplicate drop, overflow, starved slot, report) happened.
module tb_lap_system;
  import lap_pkg::*;
  import lap_ref_pkg::*;

  localparam int NC = 5, NX = 4, L = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              prog_we, prog_bcast, prog_aux;
  logic [7:0]        prog_core;
  logic [11:0]       prog_addr;
  instr_t            prog_data;
  state_t            start_st [NC];
  logic [NX-1:0]     ctx_init [NC], in_valid [NC], in_ready [NC], in_last [NC];
  logic [NX-1:0]     ctx_done [NC], ctx_overflow [NC];
  logic [7:0]        in_char [NC][NX];
  report_t           rpt [NC];
  events_t           ev [NC];

  lap_system dut (.clk, .rst_n, .prog_we, .prog_bcast, .prog_core, .prog_aux,
    .prog_addr, .prog_data, .start_st, .ctx_init, .in_valid, .in_ready, .in_char,
    .in_last, .ctx_done, .ctx_overflow, .rpt, .ev);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_step [NC];
  int n_hit, n_init, n_startfb, n_opt2, n_major, n_eps, n_persist, n_restart,
      n_dedup, n_ovf, n_starve, n_rpt;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      n_step[c] += int'(ev[c].step);
      n_hit += int'(ev[c].hit);           n_init += int'(ev[c].opt1_init);
      n_startfb += int'(ev[c].opt1_start); n_opt2 += int'(ev[c].opt2_fb);
      n_major += int'(ev[c].majority);    n_eps += int'(ev[c].epsilon);
      n_persist += int'(ev[c].persist);   n_restart += int'(ev[c].restart);
      n_dedup += int'(ev[c].dedup);       n_ovf += int'(ev[c].overflow);
      n_starve += int'(ev[c].starve);     n_rpt += int'(rpt[c].valid);
    end
  end

  byte unsigned txt [NC][NX][$];
  int           idx [NC][NX];
  bit           go = 1'b0;
  rep_t         got [NC][NX][$];
  int           t_done [NC];

  always @(negedge clk) begin
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < NX; k++) begin
        if (go && idx[c][k] < txt[c][k].size() && (c != 3 || $urandom_range(0, 2) != 0)) begin
          in_valid[c][k] = 1'b1;
          in_char[c][k]  = txt[c][k][idx[c][k]];
          in_last[c][k]  = (idx[c][k] == txt[c][k].size() - 1);
        end else begin
          in_valid[c][k] = 1'b0;
          in_char[c][k]  = '0;
          in_last[c][k]  = 1'b0;
        end
      end
  end
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      for (int k = 0; k < NX; k++)
        if (in_valid[c][k] && in_ready[c][k]) idx[c][k]++;
      if (go && rpt[c].valid) got[c][rpt[c].ctx].push_back('{pos: rpt[c].pos, state: rpt[c].state});
      if (go && ctx_done[c] == '1 && t_done[c] == 0) t_done[c] = cyc;
    end
  end

  task automatic load(lap_prog p, bit bcast, int core);
    @(negedge clk);
    prog_bcast = bcast; prog_core = 8'(core);
    for (int a = 0; a < IMEM_WORDS + AUX_WORDS; a++) begin
      prog_we   = 1'b1;
      prog_aux  = (a >= IMEM_WORDS);
      prog_addr = 12'(a >= IMEM_WORDS ? a - IMEM_WORDS : a);
      prog_data = (a >= IMEM_WORDS) ? p.aux[a - IMEM_WORDS] : p.imem[a];
      @(negedge clk);
    end
    prog_we = 1'b0; prog_bcast = 1'b0;
  endtask

  task automatic compare(int c, int k, rep_t exp [$]);
    check(got[c][k].size() == exp.size(),
          $sformatf("core%0d ctx%0d: %0d reports, expected %0d", c, k, got[c][k].size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got[c][k].size(); i++)
      check(got[c][k][i] == exp[i], $sformatf("core%0d ctx%0d report %0d: pos %0d state %h, expected pos %0d state %h",
            c, k, i, got[c][k][i].pos, got[c][k][i].state, exp[i].pos, exp[i].state));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lap_prog pa, p3, p4;
    lap_ref  m;
    rep_t    exp [$];
    int      t0, maxsteps [NC], totsteps [NC], nchars;
    byte unsigned alpha [5] = '{"a", "b", "c", "d", "x"};

    prog_we = 0; prog_bcast = 0; prog_core = 0; prog_aux = 0; prog_addr = 0; prog_data = '0;
    for (int c = 0; c < NC; c++) begin
      start_st[c] = '0; ctx_init[c] = '0; t_done[c] = 0; n_step[c] = 0;
      for (int k = 0; k < NX; k++) begin
        in_valid[c][k] = 0; in_char[c][k] = 0; in_last[c][k] = 0; idx[c][k] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    pa = new(); pa.build_adfa();
    p3 = new(); p3.build_random(12, 4, T_BASIC);
    p4 = new(); p4.build_random(60, 4, T_PERSIST, 0);
    load(pa, 1'b1, 0);
    load(p3, 1'b0, 3);
    load(p4, 1'b0, 4);
    for (int c = 0; c < NC; c++) start_st[c] = (c < 3) ? pa.start : (c == 3 ? p3.start : p4.start);

    nchars = 0;
    for (int c = 0; c < NC; c++) begin
      maxsteps[c] = 0; totsteps[c] = 0;
      m = new((c < 3) ? pa : (c == 3 ? p3 : p4), 16);
      for (int k = 0; k < NX; k++) begin
        txt[c][k] = {};
        for (int i = 0; i < L; i++)
          txt[c][k].push_back(c < 3 ? alpha[$urandom_range(0, 4)] : 8'(8'h61 + $urandom_range(0, 3)));
        nchars += L;
        m.run(txt[c][k]);
        totsteps[c] += m.steps;
        if (m.steps > maxsteps[c]) maxsteps[c] = m.steps;
      end
    end

    @(negedge clk);
    for (int c = 0; c < NC; c++) ctx_init[c] = '1;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin ctx_init[c] = '0; n_step[c] = 0; end
    go = 1'b1;
    t0 = cyc;
    wait (t_done[0] != 0 && t_done[1] != 0 && t_done[2] != 0 && t_done[3] != 0 && t_done[4] != 0);
    repeat (4) @(posedge clk);

    for (int c = 0; c < NC; c++) begin
      m = new((c < 3) ? pa : (c == 3 ? p3 : p4), 16);
      for (int k = 0; k < NX; k++) begin
        if (c < 3) adfa_golden(txt[c][k], exp);
        else begin m.run(txt[c][k]); exp = m.reps; end
        compare(c, k, exp);
        if (c >= 3) check(ctx_overflow[c][k] == m.overflow,
                          $sformatf("core%0d ctx%0d overflow %0b expected %0b", c, k, ctx_overflow[c][k], m.overflow));
      end
      check(n_step[c] == totsteps[c], $sformatf("core%0d steps %0d expected %0d", c, n_step[c], totsteps[c]));
      if (c < 3) begin
        int el;
        el = t_done[c] - t0;
        check(el >= NX * maxsteps[c] && el <= NX * maxsteps[c] + 12,
              $sformatf("core%0d cycles %0d expected %0d..%0d", c, el, NX * maxsteps[c], NX * maxsteps[c] + 12));
        $display("core%0d ADFA: %0d chars in %0d cycles, line rate %0.3f chars/cycle, %0.2f Gbps at 263 MHz",
                 c, NX * L, el, real'(NX * L) / real'(el), 8.0 * 0.263 * real'(NX * L) / real'(el));
      end
    end

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
    $display("events: hit=%0d opt1_init=%0d opt1_start=%0d opt2=%0d majority=%0d epsilon=%0d persist=%0d restart=%0d dedup=%0d overflow=%0d starve=%0d reports=%0d",
             n_hit, n_init, n_startfb, n_opt2, n_major, n_eps, n_persist, n_restart,
             n_dedup, n_ovf, n_starve, n_rpt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
