// tb_lap_addr_gen: random check of the stage-2 address arithmetic.
//
// Instruction address must be (state + character) mod 4096; the auxiliary
// address must be INIT_BASE + character for DEFAULT_OPT1 states and the aux
// pointer otherwise. Run with INIT_BASE = 7 to see the offset applied.
module tb_lap_addr_gen;
  import lap_pkg::*;

  state_t     st;
  logic [7:0] ch;
  logic [11:0] ia;
  logic [8:0]  aa;

  lap_addr_gen #(.IMEM_AW(12), .AUX_AW(9), .INIT_BASE(7)) dut (
    .st, .ch, .imem_addr(ia), .aux_addr(aa));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ei, ea;
      st = '{id: 12'($urandom), itype: itype_e'($urandom_range(0, 6)), accept: 1'($urandom), aux_ptr: 8'($urandom)};
      ch = 8'($urandom);
      if (n < 8) begin st.id = 12'hfff - 12'(n); ch = 8'hff; end  // wrap-around
      #1;
      ei = (int'(st.id) + int'(ch)) % 4096;
      ea = (st.itype == T_DEF_OPT1) ? 7 + int'(ch) : int'(st.aux_ptr);
      checks += 2;
      if (int'(ia) != ei) begin failures++; $display("FAIL: imem addr %0d expected %0d", ia, ei); end
      if (int'(aa) != ea) begin failures++; $display("FAIL: aux addr %0d expected %0d", aa, ea); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
