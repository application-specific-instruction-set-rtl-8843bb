// tb_call_stack: drives random push / pop sequences into call_stack and
// compares the returned addresses and the full / empty outputs with a
// circular-buffer model kept in the testbench, including pushes beyond the
// depth (oldest entry overwritten).
module tb_call_stack;
  localparam int D = 8;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0;
  logic [9:0] push_addr = 0, top;
  logic full, empty;
  logic [9:0] model [D];
  int sp = 0, level = 0;
  int checks = 0, failures = 0;
  int pushes_when_full = 0;

  call_stack #(.DEPTH(D), .ADDR_W(10)) dut (
    .clk(clk), .rst(rst), .push(push), .push_addr(push_addr), .pop(pop),
    .top(top), .full(full), .empty(empty));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    check("empty after reset", empty && !full);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // bias towards pushes in the first half, pops in the second
      if (i % 400 < 200) begin push = ($urandom_range(0, 3) != 0); pop = !push; end
      else               begin pop  = ($urandom_range(0, 3) != 0); push = !pop; end
      push_addr = 10'($urandom);
      if (pop && !push) begin
        if (level > 0) check("popped value", top == model[(sp + D - 1) % D]);
      end
      if (push && level == D) pushes_when_full++;
      @(posedge clk);
      if (push) begin
        model[sp] = push_addr; sp = (sp + 1) % D; if (level < D) level++;
      end else if (pop) begin
        sp = (sp + D - 1) % D; if (level > 0) level--;
      end
      #1;
      check("full flag", full == (level == D));
      check("empty flag", empty == (level == 0));
      if (level > 0) check("top", top == model[(sp + D - 1) % D]);
    end
    check("overflow exercised", pushes_when_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
