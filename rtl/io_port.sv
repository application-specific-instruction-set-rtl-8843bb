// io_port: one 8-bit bidirectional port of the UTeMRISC01 core.
//
// A direction register (loaded from W by the tris instruction) selects per
// bit whether the pin is an input (1) or an output (0), as on the PIC.  A
// write to the port's register address stores into the output latch; a read
// returns the pin level for input bits and the latch for output bits.
//
// Interface: tris_we/tris_wdata load the direction register, we/wdata load
// the latch, rdata is the value the core reads, pin_in are the pad inputs,
// pin_out/pin_oe drive the pads (pin_oe = ~tris).  Writes take effect at the
// rising clock edge; a synchronous active-high reset makes every pin an input
// and clears the latch.  The tris instruction comes from the instruction set;
// the register behaviour and reset values are this design's choices after the
// PIC.
module io_port #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tris_we,
  input  logic [WIDTH-1:0] tris_wdata,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  logic [WIDTH-1:0] pin_in,
  output logic [WIDTH-1:0] pin_out,
  output logic [WIDTH-1:0] pin_oe
);

  logic [WIDTH-1:0] tris_q;
  logic [WIDTH-1:0] latch_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tris_q  <= '1;
      latch_q <= '0;
    end else begin
      if (tris_we) tris_q  <= tris_wdata;
      if (we)      latch_q <= wdata;
    end
  end

  assign rdata   = (tris_q & pin_in) | (~tris_q & latch_q);
  assign pin_out = latch_q;
  assign pin_oe  = ~tris_q;

endmodule
