// tb_register_file: writes random data to random addresses of the 128-byte
// single-bank memory and compares every read with a shadow array kept by the
// testbench; also checks that a write is visible at the next clock and that
// a disabled write changes nothing.
module tb_register_file;
  logic clk = 0;
  logic [6:0] raddr, waddr;
  logic [7:0] rdata, wdata;
  logic we;
  logic [7:0] shadow [128];
  int checks = 0, failures = 0;

  register_file #(.ADDR_W(7), .DATA_W(8)) dut (
    .clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    // fill every location
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = 8'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 7'($urandom); wdata = 8'($urandom);
      raddr = 7'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %02h exp %02h", raddr, rdata, shadow[raddr]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      raddr = waddr;
      #1;
      checks++;
      if (rdata !== shadow[waddr]) begin
        failures++;
        if (failures < 10) $display("FAIL after write addr %0d got %02h exp %02h", waddr, rdata, shadow[waddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
