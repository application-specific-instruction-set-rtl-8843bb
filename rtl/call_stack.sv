// call_stack: hardware return-address stack of the UTeMRISC01 core.
//
// call pushes the address of the instruction after the call; retlw pops it.
// The stack is a small circular buffer with a pointer, like the PIC stack it
// replaces: a push onto a full stack overwrites the oldest entry and a pop of
// an empty stack returns whatever entry the pointer wraps to, so software must
// keep the nesting within DEPTH.  The outputs full and empty let a
// testbench or debugger observe that.
//
// Interface: push with push_addr, pop; top is the entry a pop returns and is
// valid combinationally.  Push and pop take effect at the rising clock edge;
// if both are asserted, push wins.  Synchronous active-high reset empties it.
// Call and retlw come from the instruction set; the depth (8) and the
// wrap-around behaviour are this design's choices.
module call_stack #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              push,
  input  logic [ADDR_W-1:0] push_addr,
  input  logic              pop,
  output logic [ADDR_W-1:0] top,
  output logic              full,
  output logic              empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0] entry [DEPTH];
  logic [PTR_W-1:0]  sp;       // next free slot
  logic [PTR_W:0]    level;    // number of valid entries, saturating at DEPTH

  function automatic logic [PTR_W-1:0] wrap_inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [PTR_W-1:0] wrap_dec(logic [PTR_W-1:0] p);
    return (p == '0) ? PTR_W'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign top   = entry[wrap_dec(sp)];
  assign full  = (level == (PTR_W+1)'(DEPTH));
  assign empty = (level == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sp    <= '0;
      level <= '0;
      for (int i = 0; i < DEPTH; i++) entry[i] <= '0;
    end else if (push) begin
      entry[sp] <= push_addr;
      sp        <= wrap_inc(sp);
      if (!full) level <= level + 1'b1;
    end else if (pop) begin
      sp <= wrap_dec(sp);
      if (!empty) level <= level - 1'b1;
    end
  end

endmodule
