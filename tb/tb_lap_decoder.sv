// tb_lap_decoder: exhaustive check of the stage-4 decision rules.
//
// For every state type, with the own-table word hitting or missing and the
// auxiliary word hitting or missing, the pushes and the match flag are
// compared with the rule table written out below, case by case.
module tb_lap_decoder;
  import lap_pkg::*;

  logic    valid;
  state_t  st, start_st;
  logic [7:0] ch;
  instr_t  iw, aw;
  push_t   push0, push1;
  logic    match;
  events_t ev;

  lap_decoder dut (.valid, .st, .ch, .iw, .aw, .start_st, .push0, .push1, .match, .ev);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic state_t s_of(instr_t i);
    return '{id: i.target, itype: i.itype, accept: i.accept, aux_ptr: i.aux_ptr};
  endfunction

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_t e0, e1;
    bit    em;
    start_st = '{id: 12'h200, itype: T_DEF_OPT1, accept: 1'b0, aux_ptr: 8'd0};
    for (int t = 0; t < 8; t++)
      for (int ih = 0; ih < 2; ih++)
        for (int ah = 0; ah < 2; ah++)
          for (int acc = 0; acc < 2; acc++)
            for (int v = 0; v < 2; v++) begin
              valid = v[0];
              ch = 8'($urandom_range(0, 255));
              st = '{id: 12'($urandom), itype: itype_e'(t), accept: 1'($urandom), aux_ptr: 8'($urandom)};
              iw = '{sig: ih ? ch : ch ^ 8'h5a, target: 12'($urandom), itype: T_BASIC, accept: acc[0], aux_ptr: 8'($urandom)};
              aw = '{sig: ah ? ch : ch ^ 8'h21, target: 12'($urandom), itype: T_MAJORITY, accept: acc[0], aux_ptr: 8'($urandom)};
              if ($urandom_range(0, 1) == 1 && ih == 1) iw.itype = T_NULL;  // NULL word never hits
              #1;
              e0 = '0; e1 = '0; em = 0;
              if (v == 1) begin
                bit h;
                h = (ih == 1) && iw.itype != T_NULL && t != 0;
                if (h) begin e0 = '{1'b1, 1'b1, s_of(iw)}; em = acc[0]; end
                else case (t)
                  2: if (ah == 1) begin e0 = '{1'b1, 1'b1, s_of(aw)}; em = acc[0]; end
                     else e0 = '{1'b1, 1'b1, start_st};
                  3: e0 = '{1'b1, 1'b0, s_of(aw)};
                  4: begin e0 = '{1'b1, 1'b1, s_of(aw)}; em = acc[0]; end
                  default: ;
                endcase
                if (t == 5) e1 = '{1'b1, 1'b0, s_of(aw)};
                if (t == 6) e1 = '{1'b1, 1'b1, st};
              end
              check(push0 == e0, $sformatf("type %0d ih %0d ah %0d v %0d: push0 %h expected %h", t, ih, ah, v, push0, e0));
              check(push1 == e1, $sformatf("type %0d ih %0d ah %0d v %0d: push1 %h expected %h", t, ih, ah, v, push1, e1));
              check(match == em, $sformatf("type %0d ih %0d ah %0d v %0d: match %0b expected %0b", t, ih, ah, v, match, em));
              check(ev.step == v[0], "step event");
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
