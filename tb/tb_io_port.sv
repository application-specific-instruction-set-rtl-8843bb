// tb_io_port: checks reset direction (all inputs), the direction register,
// the output latch, pin_oe = ~tris and the mixed read-back (pins for input
// bits, latch for output bits) against values computed in the testbench.
module tb_io_port;
  logic clk = 0, rst = 1;
  logic tris_we = 0, we = 0;
  logic [7:0] tris_wdata = 0, wdata = 0, rdata, pin_in = 0, pin_out, pin_oe;
  logic [7:0] m_tris, m_latch;
  int checks = 0, failures = 0;

  io_port #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .tris_we(tris_we), .tris_wdata(tris_wdata), .we(we), .wdata(wdata),
    .rdata(rdata), .pin_in(pin_in), .pin_out(pin_out), .pin_oe(pin_oe));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    m_tris = 8'hFF; m_latch = 8'h00;
    pin_in = 8'h5A; #1;
    check("reset: all inputs", pin_oe == 8'h00 && rdata == 8'h5A);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      tris_we = 1'($urandom); tris_wdata = 8'($urandom);
      we = 1'($urandom); wdata = 8'($urandom);
      pin_in = 8'($urandom);
      @(posedge clk);
      if (tris_we) m_tris = tris_wdata;
      if (we) m_latch = wdata;
      #1;
      check("pin_oe", pin_oe == ~m_tris);
      check("pin_out", pin_out == m_latch);
      check("rdata", rdata == ((m_tris & pin_in) | (~m_tris & m_latch)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
