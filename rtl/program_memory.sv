// program_memory: instruction memory of the UTeMRISC01 core.
//
// 1024 words of 16 bits, the range the 10-bit address field of call and goto
// can reach.  The fetch port is synchronous (one-cycle latency, enable en),
// which maps onto an FPGA block RAM and gives the core its two-stage
// fetch / execute overlap.  A separate write port loads the program; on an
// FPGA the same contents would normally come from the configuration
// bitstream, and INIT_FILE may name a hex file to preload with $readmemh.
//
// Word width and depth follow the instruction format; the synchronous read,
// the load port and the zero fill of an unloaded memory (zero is nop) are
// this design's choices.
module program_memory #(
  parameter int unsigned ADDR_W    = 10,
  parameter int unsigned DATA_W    = 16,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  // fetch port
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] rdata,
  // program load port
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    if (en)      rdata <= mem[addr];
  end

endmodule
