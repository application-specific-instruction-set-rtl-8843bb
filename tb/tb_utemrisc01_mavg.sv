// tb_utemrisc01_mavg: the moving-average filter workload on UTeMRISC01.
//
// For several window sizes M = 2^L the filter program is run twice on the
// same core and the same random input: once dividing with the barrel-shift
// instructions (bsr / bsl, one instruction each) and once with the
// single-place "bcf C ; rrf ; rrf" loop that a core without the barrel
// shifter has to use.  Both runs must produce the averages computed in this
// testbench, each must take exactly the clock count worked out from its
// program text, and the barrel-shift run must be the faster one.  The
// clock counts and the saving are printed.
module tb_utemrisc01_mavg;
  import utemrisc01_pkg::*;
  import utemrisc01_asm_pkg::*;

  logic   clk = 0, rst = 1;
  logic   prog_we = 0;
  pc_t    prog_addr = 0;
  instr_t prog_data = 0;
  byte_t  porta_out, porta_oe, portb_out, portb_oe, option_q;
  logic   wdt_clear, sleeping, halted, retire;

  int checks = 0, failures = 0;
  int cyc = 0;

  utemrisc01 dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .porta_in(8'h00), .porta_out, .porta_oe, .portb_in(8'h00), .portb_out, .portb_oe,
    .option_q, .wdt_clear, .wake(1'b0), .sleeping, .halted, .retire);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // run the filter once; returns the clock count
  task automatic run_filter(int n, int l, bit use_bsr, byte_t x [], output int cycles);
    prog_c p = new();
    int m = 1 << l, sum;
    build_mavg(p, n, l, use_bsr, x);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      prog_we = 1; prog_addr = pc_t'(i); prog_data = p.mem[i];
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    cyc = 0;
    fork
      wait (halted);
      begin repeat (50000) @(posedge clk); end
    join_any
    disable fork;
    cycles = cyc;
    check($sformatf("N=%0d M=%0d bsr=%0d halted", n, m, use_bsr), halted);
    check($sformatf("N=%0d M=%0d bsr=%0d cycles %0d expected %0d", n, m, use_bsr, cycles,
                    mavg_cycles(n, l, use_bsr)), cycles == mavg_cycles(n, l, use_bsr));
    for (int i = 0; i + m <= n; i++) begin
      sum = 0;
      for (int j = 0; j < m; j++) sum += int'(x[i + j]);
      check($sformatf("N=%0d M=%0d bsr=%0d Y[%0d]", n, m, use_bsr, i),
            dut.u_rf.mem[y_base(n) + i] == byte_t'(sum / m));
    end
  endtask

  initial begin
    int ns [5] = '{32, 32, 32, 32, 48};
    int ls [5] = '{1, 2, 3, 4, 5};
    int c_new, c_old;
    byte_t x [];
    for (int k = 0; k < 5; k++) begin
      x = new[ns[k]];
      foreach (x[i]) x[i] = byte_t'($urandom);
      run_filter(ns[k], ls[k], 1'b1, x, c_new);
      run_filter(ns[k], ls[k], 1'b0, x, c_old);
      check($sformatf("M=%0d barrel shift faster", 1 << ls[k]), c_new < c_old);
      $display("N=%0d M=%0d: barrel shift %0d clocks, shift loop %0d clocks, %0.1f%% fewer",
               ns[k], 1 << ls[k], c_new, c_old, 100.0 * real'(c_old - c_new) / real'(c_old));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
