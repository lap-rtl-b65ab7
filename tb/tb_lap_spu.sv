// tb_lap_spu: test of the Stream Prefetch Unit.
//
// A random-gap producer streams 300 characters (the last one flagged) while
// a random-gap consumer takes them. Checks: characters come out in order,
// each exactly once, the position counts from 0, the last flag follows the
// last character, in_ready drops when DEPTH characters wait, and init empties
// the unit.
module tb_lap_spu;
  import lap_pkg::*;

  localparam int DEPTH = 4;
  localparam int N     = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       init, in_valid, in_ready, in_last, head_valid, head_last, consume;
  logic       cur_last, cur_valid;
  logic [7:0] in_char, head_char, cur_char;
  logic [31:0] cur_pos;

  lap_spu #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .in_valid, .in_ready, .in_char,
    .in_last, .head_valid, .head_char, .head_last, .consume, .cur_char, .cur_pos,
    .cur_last, .cur_valid);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned data [N];
  int sent = 0, got = 0, held = 0, full_seen = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && !init) begin
    in_valid = (sent < N) && ($urandom_range(0, 3) != 0);
    in_char  = data[sent < N ? sent : 0];
    in_last  = (sent == N - 1);
    consume  = head_valid && ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) if (rst_n && !init) begin
    // occupancy as seen by the testbench
    if (held == DEPTH) begin
      full_seen++;
      check(!in_ready, "in_ready high with a full FIFO");
    end
    check(head_valid == (held > 0), "head_valid disagrees with occupancy");
    if (consume) begin
      check(head_char == data[got], $sformatf("char %0d: %h expected %h", got, head_char, data[got]));
    end
    held += int'(in_valid && in_ready) - int'(consume);
    if (in_valid && in_ready) sent++;
    if (consume) begin
      got++;
      #1;
      check(cur_valid && cur_pos == 32'(got - 1), $sformatf("position %0d expected %0d", cur_pos, got - 1));
      check(cur_char == data[got - 1], "current char");
      check(cur_last == (got == N), "last flag");
    end
  end

  initial begin
    foreach (data[i]) data[i] = 8'($urandom);
    init = 0; in_valid = 0; in_char = 0; in_last = 0; consume = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (got == N);
    check(full_seen > 0, "FIFO never filled");
    // init empties the unit
    @(negedge clk);
    in_valid = 1'b1; in_char = 8'h11; consume = 1'b0;
    @(negedge clk);
    init = 1'b1; in_valid = 1'b0; consume = 1'b0;
    @(negedge clk);
    init = 1'b0;
    #1;
    check(!head_valid && !cur_valid && cur_pos == 0 && in_ready, "init did not empty the unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
