// alu: the 8-bit arithmetic and logic unit of the UTeMRISC01 core.
//
// It executes every data operation of the instruction set in one clock cycle
// (the unit itself is combinational; the core writes its result at the next
// clock edge).  Operand a is register f or the 8-bit literal, operand b is W
// or, for bit and shift instructions, the 3-bit field of the instruction.
// The barrel shifts (ALU_BSL / ALU_BSR) pass through the barrel_shifter
// sub-unit, so a shift by any count 0..7 takes the same single cycle as an
// addition; the single-place rotates through carry (rlf / rrf) inherited from
// the PIC are kept beside it.
//
// Flags: z is set when the result is zero.  c is the carry of an addition,
// the inverted borrow of a subtraction (1 = no borrow, as on the PIC), or the
// bit rotated out by rlf / rrf; for other operations c = c_in.  dc is the
// carry out of bit 3 for add and the inverted borrow out of bit 3 for
// subtract.  Which flags an instruction keeps is decided by the decoder.
// The flag rules and the use of the low product byte for ALU_MUL are this
// design's choices following PIC conventions; the single-cycle shift by the
// instruction's count follows the instruction definition.
module alu
  import utemrisc01_pkg::*;
(
  input  alu_op_e op,
  input  byte_t   a,
  input  byte_t   b,
  input  logic    c_in,
  output byte_t   y,
  output logic    c_out,
  output logic    dc_out,
  output logic    z_out
);

  byte_t       shifted;
  logic [8:0]  sum9;
  logic [4:0]  sum5;
  logic [15:0] prod;

  barrel_shifter #(.WIDTH(8), .SHAMT_W(3)) u_bshift (
    .din       (a),
    .amount    (b[2:0]),
    .dir_right (op == ALU_BSR),
    .dout      (shifted)
  );

  assign prod = a * b;

  always_comb begin
    y      = a;
    c_out  = c_in;
    dc_out = 1'b0;
    sum9   = '0;
    sum5   = '0;
    unique case (op)
      ALU_PASS_A: y = a;
      ALU_CLR:    y = '0;
      ALU_ADD: begin
        sum9   = {1'b0, a} + {1'b0, b};
        sum5   = {1'b0, a[3:0]} + {1'b0, b[3:0]};
        y      = sum9[7:0];
        c_out  = sum9[8];
        dc_out = sum5[4];
      end
      ALU_SUB: begin
        // a - b as a + ~b + 1; carry out = no borrow
        sum9   = {1'b0, a} + {1'b0, ~b} + 9'd1;
        sum5   = {1'b0, a[3:0]} + {1'b0, ~b[3:0]} + 5'd1;
        y      = sum9[7:0];
        c_out  = sum9[8];
        dc_out = sum5[4];
      end
      ALU_AND:  y = a & b;
      ALU_IOR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_COM:  y = ~a;
      ALU_INC:  y = a + 8'd1;
      ALU_DEC:  y = a - 8'd1;
      ALU_RLF: begin
        y     = {a[6:0], c_in};
        c_out = a[7];
      end
      ALU_RRF: begin
        y     = {c_in, a[7:1]};
        c_out = a[0];
      end
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_BCF:  y = a & ~(8'd1 << b[2:0]);
      ALU_BSF:  y = a | (8'd1 << b[2:0]);
      ALU_BSL,
      ALU_BSR:  y = shifted;
      ALU_MUL:  y = prod[7:0];
      default:  y = a;
    endcase
    z_out = (y == '0);
  end

endmodule
