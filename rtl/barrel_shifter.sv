// barrel_shifter: shifts an 8-bit value left or right by 0..7 places in one
// combinational pass.
//
// This is the unit behind the bsl ("barrel shift left f") and bsr ("barrel
// shift right f") instructions.  The instruction carries a 3-bit count, and
// the result is the operand shifted by exactly that many places, so a division
// or multiplication by 2^n costs one instruction cycle instead of n single-bit
// rotate instructions.  The shifter is built as three stages that shift by 1,
// 2 and 4 places, each stage enabled by one bit of the count.
//
// Vacated bit positions are filled with zeros (logical shift); bits shifted
// out are lost.  The count range 0..7, the direction and the one-cycle
// execution follow the instruction definition; the zero fill is this design's
// choice (the instruction definition only says "shift").
//
// Interface: din (8 bits), amount (3 bits), dir_right (1 = right, 0 = left),
// dout.  Purely combinational, no clock.
module barrel_shifter #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned SHAMT_W = 3
) (
  input  logic [WIDTH-1:0]   din,
  input  logic [SHAMT_W-1:0] amount,
  input  logic               dir_right,
  output logic [WIDTH-1:0]   dout
);

  // stage[i] is the value after the stages for count bits 0..i-1
  logic [WIDTH-1:0] stage [SHAMT_W+1];

  always_comb begin
    stage[0] = din;
    for (int i = 0; i < SHAMT_W; i++) begin
      if (amount[i]) begin
        if (dir_right) stage[i+1] = stage[i] >> (1 << i);
        else           stage[i+1] = stage[i] << (1 << i);
      end else begin
        stage[i+1] = stage[i];
      end
    end
    dout = stage[SHAMT_W];
  end

endmodule
