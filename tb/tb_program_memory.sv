// tb_program_memory: loads all 1024 words through the load port, then reads
// them back in random order and checks the one-clock read latency and that
// the output holds while the fetch enable is low.
module tb_program_memory;
  logic clk = 0;
  logic en = 0, load_we = 0;
  logic [9:0] addr = 0, load_addr = 0;
  logic [15:0] rdata, load_data = 0;
  logic [15:0] image [1024];
  logic [15:0] held;
  int checks = 0, failures = 0;

  program_memory #(.ADDR_W(10), .DATA_W(16)) dut (
    .clk(clk), .en(en), .addr(addr), .rdata(rdata),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); load_we = 1; load_addr = 10'(i); load_data = 16'($urandom); image[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1; addr = 10'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== image[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %04h exp %04h", addr, rdata, image[addr]);
      end
      if (i % 10 == 0) begin
        held = rdata;
        @(negedge clk); en = 0; addr = addr + 10'd1;
        @(posedge clk); #1;
        checks++;
        if (rdata !== held) begin
          failures++;
          if (failures < 10) $display("FAIL output changed with en low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
