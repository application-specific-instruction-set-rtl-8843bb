// instr_decoder: turns a 16-bit UTeMRISC01 instruction word into the control
// bundle (ctrl_t) that steers the ALU, the register writes, the program
// counter and the special instructions.
//
// The opcode is instr[15:10].  For byte operations with a destination choice
// (addwf, andwf, comf, decf, decfsz, incf, incfsz, iorwf, movf, rlf, rrf,
// subwf, xorwf) the d bit is instr[2]: 0 sends the result to W, 1 back to f.
// Bit operations (bcf, bsf, btfsc, btfss) take the bit number from
// instr[2:0], and the barrel shifts bsl / bsr take the shift count from the
// same three bits and always write the result back to f, without touching
// the STATUS flags.
//
// The opcode values 0x14..0x25 and 0x3F, the operand formats and the
// behaviour of bsl / bsr (load f, shift count times, store to f) follow the
// instruction set definition of the core.  The values 0x00..0x12, the position
// of the d bit and the flag effects are this design's choices, modelled on
// the baseline PIC instruction set.  Unknown opcodes decode as nop.
//
// Purely combinational.
module instr_decoder
  import utemrisc01_pkg::*;
(
  input  instr_t instr,
  output ctrl_t  ctrl,
  output logic   illegal   // opcode not in the instruction set (executed as nop)
);

  logic d;
  assign d = instr[2];

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = ALU_PASS_A;
    ctrl.a_sel   = ASEL_F;
    illegal      = 1'b0;
    unique case (instr[15:10])
      OP_NOP:    ;
      OP_ADDWF:  begin ctrl.alu_op = ALU_ADD;  ctrl.wr_w = !d; ctrl.wr_f = d;
                       ctrl.upd_z = 1; ctrl.upd_c = 1; ctrl.upd_dc = 1; end
      OP_ANDWF:  begin ctrl.alu_op = ALU_AND;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_CLRW:   begin ctrl.alu_op = ALU_CLR;  ctrl.wr_w = 1; ctrl.upd_z = 1; end
      OP_COMF:   begin ctrl.alu_op = ALU_COM;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_DECF:   begin ctrl.alu_op = ALU_DEC;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_DECFSZ: begin ctrl.alu_op = ALU_DEC;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.skip_zero = 1; end
      OP_INCF:   begin ctrl.alu_op = ALU_INC;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_INCFSZ: begin ctrl.alu_op = ALU_INC;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.skip_zero = 1; end
      OP_IORWF:  begin ctrl.alu_op = ALU_IOR;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_MOVF:   begin ctrl.alu_op = ALU_PASS_A; ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_RLF:    begin ctrl.alu_op = ALU_RLF;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_c = 1; end
      OP_RRF:    begin ctrl.alu_op = ALU_RRF;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_c = 1; end
      OP_SUBWF:  begin ctrl.alu_op = ALU_SUB;  ctrl.wr_w = !d; ctrl.wr_f = d;
                       ctrl.upd_z = 1; ctrl.upd_c = 1; ctrl.upd_dc = 1; end
      OP_XORWF:  begin ctrl.alu_op = ALU_XOR;  ctrl.wr_w = !d; ctrl.wr_f = d; ctrl.upd_z = 1; end
      OP_BCF:    begin ctrl.alu_op = ALU_BCF;  ctrl.b_is_field = 1; ctrl.wr_f = 1; end
      OP_BSF:    begin ctrl.alu_op = ALU_BSF;  ctrl.b_is_field = 1; ctrl.wr_f = 1; end
      OP_BTFSC:  begin ctrl.b_is_field = 1; ctrl.skip_bclr = 1; end
      OP_BTFSS:  begin ctrl.b_is_field = 1; ctrl.skip_bset = 1; end
      OP_RETLW:  begin ctrl.alu_op = ALU_PASS_A; ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1; ctrl.is_retlw = 1; end
      OP_CALL:   ctrl.is_call = 1;
      OP_GOTO:   ctrl.is_goto = 1;
      OP_MOVLW:  begin ctrl.alu_op = ALU_PASS_A; ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1; end
      OP_IORLW:  begin ctrl.alu_op = ALU_IOR;  ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1; ctrl.upd_z = 1; end
      OP_ANDLW:  begin ctrl.alu_op = ALU_AND;  ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1; ctrl.upd_z = 1; end
      OP_XORLW:  begin ctrl.alu_op = ALU_XOR;  ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1; ctrl.upd_z = 1; end
      OP_MOVWF:  begin ctrl.alu_op = ALU_PASS_A; ctrl.a_sel = ASEL_W; ctrl.wr_f = 1; end
      OP_CLRF:   begin ctrl.alu_op = ALU_CLR;  ctrl.wr_f = 1; ctrl.upd_z = 1; end
      OP_SWAPFW: begin ctrl.alu_op = ALU_SWAP; ctrl.wr_w = 1; end
      OP_MULW:   begin ctrl.alu_op = ALU_MUL;  ctrl.wr_w = 1; ctrl.upd_z = 1; end
      OP_CLRWDT: ctrl.is_clrwdt = 1;
      OP_SLEEP:  ctrl.is_sleep = 1;
      OP_TRIS:   ctrl.is_tris = 1;
      OP_OPTION: ctrl.is_option = 1;
      OP_SUBLW:  begin ctrl.alu_op = ALU_SUB;  ctrl.a_sel = ASEL_LIT; ctrl.wr_w = 1;
                       ctrl.upd_z = 1; ctrl.upd_c = 1; ctrl.upd_dc = 1; end
      OP_BSL:    begin ctrl.alu_op = ALU_BSL;  ctrl.b_is_field = 1; ctrl.wr_f = 1; ctrl.is_shift = 1; end
      OP_BSR:    begin ctrl.alu_op = ALU_BSR;  ctrl.b_is_field = 1; ctrl.wr_f = 1; ctrl.is_shift = 1; end
      OP_END:    ctrl.is_end = 1;
      default:   illegal = 1'b1;
    endcase
  end

endmodule
