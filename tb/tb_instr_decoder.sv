// tb_instr_decoder: checks the decoder for every 6-bit opcode, both values of
// the d bit and random operand fields.  The expected controls come from a
// table in this testbench listing, per mnemonic, the destination, the flags
// it changes and its flow-control class; the barrel shifts must write f with
// the shift count from bits [2:0] and leave the flags alone.
module tb_instr_decoder;
  import utemrisc01_pkg::*;
  instr_t instr;
  ctrl_t  ctrl;
  logic   illegal;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr(instr), .ctrl(ctrl), .illegal(illegal));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {dest ("W","F","D" = d bit,"-"), flags ("ZCD" subset), class}
  function automatic string mn(int op);
    case (op)
      'h00: return "nop";    'h01: return "addwf";  'h02: return "andwf";  'h03: return "clrw";
      'h04: return "comf";   'h05: return "decf";   'h06: return "decfsz"; 'h07: return "incf";
      'h08: return "incfsz"; 'h09: return "iorwf";  'h0A: return "movf";   'h0B: return "rlf";
      'h0C: return "rrf";    'h0D: return "subwf";  'h0E: return "xorwf";  'h0F: return "bcf";
      'h10: return "bsf";    'h11: return "btfsc";  'h12: return "btfss";  'h14: return "retlw";
      'h15: return "call";   'h16: return "goto";   'h17: return "movlw";  'h18: return "iorlw";
      'h19: return "andlw";  'h1A: return "xorlw";  'h1B: return "movwf";  'h1C: return "clrf";
      'h1D: return "swapfw"; 'h1E: return "mulw";   'h1F: return "clrwdt"; 'h20: return "sleep";
      'h21: return "tris";   'h22: return "option"; 'h23: return "sublw";  'h24: return "bsl";
      'h25: return "bsr";    'h3F: return "end";
      default: return "";
    endcase
  endfunction

  function automatic string dest(string m);
    case (m)
      "addwf","andwf","comf","decf","decfsz","incf","incfsz","iorwf","movf","rlf","rrf","subwf","xorwf": return "D";
      "clrw","retlw","movlw","iorlw","andlw","xorlw","swapfw","mulw","sublw": return "W";
      "bcf","bsf","movwf","clrf","bsl","bsr": return "F";
      default: return "-";
    endcase
  endfunction

  function automatic string flags(string m);
    case (m)
      "addwf","subwf","sublw": return "ZCD";
      "andwf","clrw","comf","decf","incf","iorwf","movf","xorwf","iorlw","andlw","xorlw","clrf","mulw": return "Z";
      "rlf","rrf": return "C";
      default: return "";
    endcase
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%04h", what, instr);
    end
  endtask

  initial begin
    string m, ds, fl;
    logic d;
    for (int op = 0; op < 64; op++)
      for (int r = 0; r < 16; r++) begin
        instr = {6'(op), 10'($urandom)};
        d = instr[2];
        #1;
        m = mn(op); ds = dest(m); fl = flags(m);
        check("illegal", illegal == (m == ""));
        if (m == "") begin
          check("undefined has no effect", ctrl.wr_w == 0 && ctrl.wr_f == 0 && !ctrl.is_goto && !ctrl.is_end);
          continue;
        end
        check($sformatf("%s wr_w", m), ctrl.wr_w == (ds == "W" || (ds == "D" && !d)));
        check($sformatf("%s wr_f", m), ctrl.wr_f == (ds == "F" || (ds == "D" && d)));
        check($sformatf("%s upd_z", m), ctrl.upd_z == (fl inside {"ZCD","Z"}));
        check($sformatf("%s upd_c", m), ctrl.upd_c == (fl inside {"ZCD","C"}));
        check($sformatf("%s upd_dc", m), ctrl.upd_dc == (fl == "ZCD"));
        check($sformatf("%s goto", m), ctrl.is_goto == (m == "goto"));
        check($sformatf("%s call", m), ctrl.is_call == (m == "call"));
        check($sformatf("%s retlw", m), ctrl.is_retlw == (m == "retlw"));
        check($sformatf("%s skipz", m), ctrl.skip_zero == (m inside {"decfsz","incfsz"}));
        check($sformatf("%s skipc", m), ctrl.skip_bclr == (m == "btfsc"));
        check($sformatf("%s skips", m), ctrl.skip_bset == (m == "btfss"));
        check($sformatf("%s sleep", m), ctrl.is_sleep == (m == "sleep"));
        check($sformatf("%s end", m), ctrl.is_end == (m == "end"));
        check($sformatf("%s tris", m), ctrl.is_tris == (m == "tris"));
        check($sformatf("%s option", m), ctrl.is_option == (m == "option"));
        check($sformatf("%s clrwdt", m), ctrl.is_clrwdt == (m == "clrwdt"));
        check($sformatf("%s field", m), ctrl.b_is_field == (m inside {"bcf","bsf","btfsc","btfss","bsl","bsr"}));
        check($sformatf("%s literal", m), (ctrl.a_sel == ASEL_LIT) == (m inside {"retlw","movlw","iorlw","andlw","xorlw","sublw"}));
        if (m == "bsl") check("bsl op", ctrl.alu_op == ALU_BSL && ctrl.is_shift);
        if (m == "bsr") check("bsr op", ctrl.alu_op == ALU_BSR && ctrl.is_shift);
        if (m == "rrf") check("rrf op", ctrl.alu_op == ALU_RRF);
        if (m == "subwf" || m == "sublw") check("sub op", ctrl.alu_op == ALU_SUB);
        if (m == "addwf") check("add op", ctrl.alu_op == ALU_ADD);
        if (m == "movwf") check("movwf source", ctrl.a_sel == ASEL_W && ctrl.alu_op == ALU_PASS_A);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
