// tb_lap_ass: random test of the Active State Stack against a queue model.
//
// Every cycle a random context is popped (pop of "cur" or swap) and a
// different random context receives up to two pushes drawn from a small set
// of states, so duplicates and overflow (DEPTH 4) are frequent. Tops, empty
// flags, counts, push0_new, the dedup/overflow events and the sticky
// overflow flags are compared with the model every cycle.
module tb_lap_ass;
  import lap_pkg::*;

  localparam int NCTX = 4, DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCTX-1:0] init, overflow;
  state_t          start_st, cur_top, next_top;
  logic [1:0]      pop_ctx, push_ctx, pop_op;
  logic            cur_empty, next_empty, push0_new, dedup_ev, overflow_ev;
  push_t           push0, push1;
  logic [2:0]      cur_count [NCTX], next_count [NCTX];

  lap_ass #(.NCTX(NCTX), .DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .start_st, .pop_ctx,
    .pop_op, .cur_empty, .next_empty, .cur_top, .next_top, .push_ctx, .push0, .push1,
    .push0_new, .dedup_ev, .overflow_ev, .overflow, .cur_count, .next_count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  state_t mc [NCTX][$];
  state_t mn [NCTX][$];
  bit     movf [NCTX];
  int     n_dup = 0, n_ovf = 0, n_swap = 0;

  function automatic state_t rs();
    return '{id: 12'($urandom_range(0, 5)), itype: T_BASIC, accept: 1'b0, aux_ptr: 8'd0};
  endfunction

  // returns 1 if stored, sets dup/ovf flags
  function automatic bit mpush(ref state_t q [$], input state_t s, ref bit dup, ref bit ovf);
    foreach (q[i]) if (q[i] == s) begin dup = 1; return 0; end
    if (q.size() >= DEPTH) begin ovf = 1; return 0; end
    q.push_back(s);
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = '0; pop_op = 0; pop_ctx = 0; push_ctx = 1; push0 = '0; push1 = '0;
    start_st = '{id: 12'h7, itype: T_DEF_OPT1, accept: 1'b0, aux_ptr: 8'd0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    init = '1;
    @(negedge clk);
    init = '0;
    for (int k = 0; k < NCTX; k++) begin mc[k] = {}; mn[k] = '{start_st}; movf[k] = 0; end
    for (int n = 0; n < 5000; n++) begin
      bit d, o, e0;
      int pc, qc;
      pc = $urandom_range(0, 3);
      qc = (pc + $urandom_range(1, 3)) % 4;
      pop_ctx = 2'(pc); push_ctx = 2'(qc);
      pop_op = 2'($urandom_range(0, 2));
      push0 = '{valid: 1'($urandom_range(0, 1)), to_next: 1'($urandom), st: rs()};
      push1 = '{valid: ($urandom_range(0, 3) == 0), to_next: 1'($urandom), st: rs()};
      #1;
      // combinational outputs
      check(cur_empty == (mc[pc].size() == 0), "cur_empty");
      check(next_empty == (mn[pc].size() == 0), "next_empty");
      if (mc[pc].size() > 0) check(cur_top == mc[pc][$], "cur_top");
      if (mn[pc].size() > 0) check(next_top == mn[pc][$], "next_top");
      for (int k = 0; k < NCTX; k++) begin
        check(int'(cur_count[k]) == mc[k].size() && int'(next_count[k]) == mn[k].size(), "counts");
        check(overflow[k] == movf[k], "overflow flag");
      end
      // model update
      d = 0; o = 0;
      e0 = 0;
      if (push0.valid) begin
        if (push0.to_next) e0 = mpush(mn[qc], push0.st, d, o);
        else               e0 = mpush(mc[qc], push0.st, d, o);
      end
      if (push1.valid) begin
        if (push1.to_next) void'(mpush(mn[qc], push1.st, d, o));
        else               void'(mpush(mc[qc], push1.st, d, o));
      end
      check(push0_new == e0, "push0_new");
      check(dedup_ev == d, "dedup event");
      check(overflow_ev == o, "overflow event");
      if (o) movf[qc] = 1;
      n_dup += int'(d); n_ovf += int'(o);
      if (pop_op == 2'd1 && mc[pc].size() > 0) void'(mc[pc].pop_back());
      else if (pop_op == 2'd2) begin
        n_swap++;
        mc[pc] = mn[pc];
        mn[pc] = {};
        if (mc[pc].size() > 0) void'(mc[pc].pop_back());
      end
      @(negedge clk);
      // occasionally restart a context
      if ($urandom_range(0, 99) == 0) begin
        int k;
        k = $urandom_range(0, 3);
        pop_op = 0; push0 = '0; push1 = '0;
        init = 4'(1 << k);
        @(negedge clk);
        init = '0;
        mc[k] = {}; mn[k] = '{start_st}; movf[k] = 0;
      end
    end
    check(n_dup > 0 && n_ovf > 0 && n_swap > 0, "dedup, overflow and swap all occurred");
    $display("dups=%0d overflows=%0d swaps=%0d", n_dup, n_ovf, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
