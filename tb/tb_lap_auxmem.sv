// tb_lap_auxmem: write/read test of the LAP auxmem memory at its default size.
//
// Writes random words to every address, reads them back (one cycle read
// latency) in random order, checks a same-cycle read-during-write returns the
// old word, and checks that reads past the last word return zero.
module tb_lap_auxmem;
  import lap_pkg::*;

  localparam int D = 160;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            we, re;
  logic [8:0] waddr, raddr;
  instr_t          wdata, rdata;
  instr_t          model [D];

  lap_auxmem dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a, instr_t exp);
    @(negedge clk);
    we = 1'b0; re = 1'b1; raddr = 9'(a);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL: addr %0d read %h expected %h", a, rdata, exp);
    end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(a); wdata = instr_t'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 2 * D; n++) begin
      int a;
      a = $urandom_range(0, D - 1);
      rd(a, model[a]);
    end
    // read during write of the same word returns the old word
    @(negedge clk);
    we = 1'b1; waddr = 9'(5); wdata = ~model[5];
    re = 1'b1; raddr = 9'(5);
    @(negedge clk);
    we = 1'b0; re = 1'b0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("FAIL: read during write"); end
    model[5] = ~model[5];
    rd(5, model[5]);
    for (int a = D; a < 512; a += 37) rd(a, '0);
    rd(511, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
