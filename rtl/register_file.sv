// register_file: the single-bank data memory of the UTeMRISC01 core.
//
// The original PIC splits its register space into banks selected by status
// bits, so a program must switch banks before it can reach part of the
// memory.  This core removes the banks: the 7-bit f field of an instruction
// (or the 7-bit FSR for indirect access) addresses one flat space of 128
// bytes directly.  The core places its special function registers on a few
// low addresses and uses this array for the rest; the entries behind the
// special registers are simply never used.
//
// One asynchronous read port feeds the ALU in the same cycle, so a
// read-modify-write instruction (e.g. bsr f) completes in one clock; the
// write port stores on the rising clock edge.  The flat single bank follows
// the core description; the size (128 bytes, set by the 7-bit f field) and
// the lack of a reset (general-purpose RAM powers up undefined, as on the PIC)
// are this design's reading.
module register_file #(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
