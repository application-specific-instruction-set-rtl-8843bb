// tb_utemrisc01: end-to-end test of the UTeMRISC01 microcontroller at its
// default parameters.
//
// Run 1 executes an instruction-exercise program: barrel shifts by several
// counts (including seven bsr back to back, which must retire in seven
// consecutive clocks), arithmetic with C/DC/Z, logic and literal operations,
// rotates through carry, bit set/clear/test with skips, decfsz / incfsz loops,
// nested call / retlw, a computed goto through PCL, indirect access through
// FSR / INDF, port direction and read-back, option, clrwdt, sleep with wake-up
// and end.  Every result is stored in data memory and compared with a value
// worked out by hand for this program.
//
// Run 2 executes the moving-average filter (32 samples, window M = 8) using
// bsr / bsl for the division and checks every output against an average
// computed in this testbench, and the clock count against the count worked
// out from the program text.
//
// Each mechanism (barrel shift, skip, branch redirect, call / return, computed
// goto, indirect access, sleep / wake, port I/O, halt) is counted, and one
// that never happens is a failure.
module tb_utemrisc01;
  import utemrisc01_pkg::*;
  import utemrisc01_asm_pkg::*;

  logic   clk = 0, rst = 1;
  logic   prog_we = 0;
  pc_t    prog_addr = 0;
  instr_t prog_data = 0;
  byte_t  porta_in = 0, portb_in = 0;
  byte_t  porta_out, porta_oe, portb_out, portb_oe, option_q;
  logic   wdt_clear, wake = 0, sleeping, halted, retire;

  int checks = 0, failures = 0;
  int cyc = 0;

  utemrisc01 dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .porta_in, .porta_out, .porta_oe, .portb_in, .portb_out, .portb_oe,
    .option_q, .wdt_clear, .wake, .sleeping, .halted, .retire);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanism statistics
  int n_shift, n_skip, n_redirect, n_call, n_ret, n_pcl, n_indf, n_sleep_cyc,
      n_wake, n_port, n_wdt, n_halt, run_shift, max_run_shift;

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (dut.exec && dut.ctrl.is_shift) begin
        n_shift++; run_shift++;
        if (run_shift > max_run_shift) max_run_shift = run_shift;
      end else run_shift = 0;
      if (dut.skip) n_skip++;
      if (dut.redirect) n_redirect++;
      if (dut.exec && dut.ctrl.is_call) n_call++;
      if (dut.exec && dut.ctrl.is_retlw) n_ret++;
      if (dut.exec && dut.ctrl.wr_f && dut.eff_addr == A_PCL) n_pcl++;
      if (dut.exec && dut.f_field == A_INDF) n_indf++;
      if (sleeping) n_sleep_cyc++;
      if (sleeping && wake) n_wake++;
      if (dut.exec && (dut.eff_addr inside {A_PORTA, A_PORTB}) && dut.ctrl.a_sel == ASEL_F) n_port++;
      if (wdt_clear) n_wdt++;
      if (sleeping && retire) begin
        failures++;
        $display("FAIL instruction retired while sleeping");
      end
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic byte_t ram(int a);
    return dut.u_rf.mem[a];
  endfunction

  task automatic load_and_reset(prog_c p);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < p.top; i++) begin
      prog_we = 1; prog_addr = pc_t'(i); prog_data = p.mem[i];
      @(negedge clk);
    end
    // clear the rest of a previously loaded image
    for (int i = p.top; i < 1024; i++) begin
      prog_we = 1; prog_addr = pc_t'(i); prog_data = '0;
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    cyc = 0;
  endtask

  // ------------------------------------------------ run 1: instruction test
  task automatic build_isa(prog_c p, output int a_sleep);
    int a, d;
    p.org(0);
    // barrel shifts
    d = p.emit(enc_k(OP_MOVLW, 'h96)); d = p.emit(enc_f(OP_MOVWF, 'h40, 1)); d = p.emit(enc_b(OP_BSR, 'h40, 3));
    d = p.emit(enc_k(OP_MOVLW, 'h96)); d = p.emit(enc_f(OP_MOVWF, 'h41, 1)); d = p.emit(enc_b(OP_BSL, 'h41, 3));
    d = p.emit(enc_k(OP_MOVLW, 'hFF)); d = p.emit(enc_f(OP_MOVWF, 'h42, 1)); d = p.emit(enc_b(OP_BSR, 'h42, 7));
    d = p.emit(enc_k(OP_MOVLW, 'h80)); d = p.emit(enc_f(OP_MOVWF, 'h43, 1));
    for (int i = 0; i < 7; i++) d = p.emit(enc_b(OP_BSR, 'h43, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h3C)); d = p.emit(enc_f(OP_MOVWF, 'h44, 1)); d = p.emit(enc_b(OP_BSL, 'h44, 0));
    // add with carry out, read STATUS
    d = p.emit(enc_k(OP_MOVLW, 'hC8)); d = p.emit(enc_f(OP_MOVWF, 'h45, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h64)); d = p.emit(enc_f(OP_ADDWF, 'h45, 1));
    d = p.emit(enc_f(OP_MOVF, A_STATUS, 0)); d = p.emit(enc_f(OP_MOVWF, 'h46, 1));
    // subtract with borrow
    d = p.emit(enc_k(OP_MOVLW, 'h30)); d = p.emit(enc_f(OP_MOVWF, 'h47, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h50)); d = p.emit(enc_f(OP_SUBWF, 'h47, 1));
    d = p.emit(enc_f(OP_MOVF, A_STATUS, 0)); d = p.emit(enc_f(OP_MOVWF, 'h48, 1));
    // sublw, literal logic
    d = p.emit(enc_k(OP_MOVLW, 'h05)); d = p.emit(enc_k(OP_SUBLW, 'h20)); d = p.emit(enc_f(OP_MOVWF, 'h49, 1));
    d = p.emit(enc_k(OP_MOVLW, 'hF0)); d = p.emit(enc_k(OP_ANDLW, 'h3C)); d = p.emit(enc_k(OP_IORLW, 'h03));
    d = p.emit(enc_k(OP_XORLW, 'hFF)); d = p.emit(enc_f(OP_MOVWF, 'h4A, 1));
    d = p.emit(enc_f(OP_COMF, 'h4A, 0)); d = p.emit(enc_f(OP_MOVWF, 'h4B, 1));
    d = p.emit(enc_f(OP_SWAPFW, 'h40, 0)); d = p.emit(enc_f(OP_MOVWF, 'h4C, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h0D)); d = p.emit(enc_f(OP_MULW, 'h40, 0)); d = p.emit(enc_f(OP_MOVWF, 'h4D, 1));
    // rotates through carry
    d = p.emit(enc_b(OP_BCF, A_STATUS, ST_C));
    d = p.emit(enc_k(OP_MOVLW, 'h81)); d = p.emit(enc_f(OP_MOVWF, 'h4E, 1));
    d = p.emit(enc_f(OP_RLF, 'h4E, 1)); d = p.emit(enc_f(OP_RRF, 'h4E, 1));
    d = p.emit(enc_f(OP_RRF, 'h4E, 0)); d = p.emit(enc_f(OP_MOVWF, 'h4F, 1));
    // bit set / clear
    d = p.emit(enc_f(OP_CLRF, 'h50, 1)); d = p.emit(enc_b(OP_BSF, 'h50, 5));
    d = p.emit(enc_b(OP_BSF, 'h50, 0)); d = p.emit(enc_b(OP_BCF, 'h50, 5));
    // bit tests with skips
    d = p.emit(enc_f(OP_CLRF, 'h51, 1));
    d = p.emit(enc_b(OP_BTFSS, 'h50, 0)); d = p.emit(enc_f(OP_INCF, 'h51, 1));
    d = p.emit(enc_b(OP_BTFSC, 'h50, 1)); d = p.emit(enc_f(OP_INCF, 'h51, 1));
    d = p.emit(enc_b(OP_BTFSC, 'h50, 0)); d = p.emit(enc_f(OP_INCF, 'h51, 1));
    // decfsz loop
    d = p.emit(enc_k(OP_MOVLW, 5)); d = p.emit(enc_f(OP_MOVWF, 'h52, 1)); d = p.emit(enc_f(OP_CLRF, 'h53, 1));
    a = p.emit(enc_f(OP_INCF, 'h53, 1)); d = p.emit(enc_f(OP_DECFSZ, 'h52, 1)); d = p.emit(enc_k(OP_GOTO, a));
    // incfsz
    d = p.emit(enc_k(OP_MOVLW, 'hFE)); d = p.emit(enc_f(OP_MOVWF, 'h54, 1)); d = p.emit(enc_k(OP_MOVLW, 'h11));
    d = p.emit(enc_f(OP_INCFSZ, 'h54, 1)); d = p.emit(enc_f(OP_INCFSZ, 'h54, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h77)); d = p.emit(enc_f(OP_MOVWF, 'h55, 1));
    // call / retlw, nested
    d = p.emit(enc_k(OP_CALL, 'h200)); d = p.emit(enc_f(OP_MOVWF, 'h56, 1));
    d = p.emit(enc_k(OP_CALL, 'h210)); d = p.emit(enc_f(OP_MOVWF, 'h58, 1));
    // indirect access
    d = p.emit(enc_k(OP_MOVLW, 'h60)); d = p.emit(enc_f(OP_MOVWF, A_FSR, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h9C)); d = p.emit(enc_f(OP_MOVWF, A_INDF, 1));
    d = p.emit(enc_f(OP_INCF, A_FSR, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h3D)); d = p.emit(enc_f(OP_MOVWF, A_INDF, 1));
    d = p.emit(enc_f(OP_DECF, A_FSR, 1));
    d = p.emit(enc_f(OP_MOVF, A_INDF, 0)); d = p.emit(enc_f(OP_MOVWF, 'h59, 1));
    d = p.emit(enc_k(OP_MOVLW, 'h55)); d = p.emit(enc_f(OP_MOVWF, 'h5A, 1));
    d = p.emit(enc_f(OP_CLRF, A_FSR, 1)); d = p.emit(enc_f(OP_MOVF, A_INDF, 0)); d = p.emit(enc_f(OP_MOVWF, 'h5A, 1));
    // computed goto into a retlw table
    d = p.emit(enc_k(OP_MOVLW, 2)); d = p.emit(enc_k(OP_CALL, 'h220)); d = p.emit(enc_f(OP_MOVWF, 'h5B, 1));
    // ports
    d = p.emit(enc_k(OP_MOVLW, 'h0F)); d = p.emit(enc_k(OP_TRIS, 6));
    d = p.emit(enc_k(OP_MOVLW, 'hA5)); d = p.emit(enc_f(OP_MOVWF, A_PORTB, 1));
    d = p.emit(enc_f(OP_MOVF, A_PORTB, 0)); d = p.emit(enc_f(OP_MOVWF, 'h5C, 1));
    d = p.emit(enc_f(OP_MOVF, A_PORTA, 0)); d = p.emit(enc_f(OP_MOVWF, 'h5D, 1));
    // option, clrwdt
    d = p.emit(enc_k(OP_MOVLW, 'h07)); d = p.emit(enc_n(OP_OPTION)); d = p.emit(enc_n(OP_CLRWDT));
    // sleep, then continue after wake
    a_sleep = p.emit(enc_n(OP_SLEEP));
    d = p.emit(enc_k(OP_MOVLW, 'hEE)); d = p.emit(enc_f(OP_MOVWF, 'h5E, 1));
    // forward goto over one word
    a = p.lc;
    d = p.emit(enc_k(OP_GOTO, a + 2)); d = p.emit(enc_k(OP_MOVLW, 'h00));
    d = p.emit(enc_k(OP_MOVLW, 'h42)); d = p.emit(enc_f(OP_MOVWF, 'h5F, 1));
    d = p.emit(enc_n(OP_CLRW)); d = p.emit(enc_f(OP_MOVWF, 'h62, 1));
    d = p.emit(enc_n(OP_END));
    // subroutines
    p.org('h200); d = p.emit(enc_k(OP_RETLW, 'h5C));
    p.org('h210); d = p.emit(enc_k(OP_CALL, 'h200)); d = p.emit(enc_f(OP_MOVWF, 'h57, 1));
                  d = p.emit(enc_k(OP_RETLW, 'hA5));
    p.org('h220); d = p.emit(enc_f(OP_ADDWF, A_PCL, 1));
                  d = p.emit(enc_k(OP_RETLW, 'h10)); d = p.emit(enc_k(OP_RETLW, 'h20));
                  d = p.emit(enc_k(OP_RETLW, 'h30)); d = p.emit(enc_k(OP_RETLW, 'h40));
  endtask

  initial begin
    prog_c p1, p2;
    int a_sleep, start;
    byte_t x [];
    int n, l, m, sum, c_expect;

    // ---------------- run 1
    p1 = new();
    build_isa(p1, a_sleep);
    porta_in = 8'h69;
    portb_in = 8'h3C;
    load_and_reset(p1);
    fork
      wait (sleeping);
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    check("run 1 reached sleep", sleeping);
    repeat (10) @(posedge clk);
    check("asleep: no retire", !retire && sleeping);
    @(negedge clk); wake = 1;
    @(negedge clk); wake = 0;
    fork
      wait (halted);
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    check("run 1 halted", halted);
    check("bsr 0x96 by 3", ram('h40) == 8'h12);
    check("bsl 0x96 by 3", ram('h41) == 8'hB0);
    check("bsr 0xFF by 7", ram('h42) == 8'h01);
    check("7 x bsr 0x80 by 1", ram('h43) == 8'h01);
    check("bsl by 0", ram('h44) == 8'h3C);
    check("addwf result", ram('h45) == 8'h2C);
    check("addwf flags C=1 DC=0 Z=0", ram('h46) == 8'h01);
    check("subwf result", ram('h47) == 8'hE0);
    check("subwf flags C=0 DC=1 Z=0", ram('h48) == 8'h02);
    check("sublw", ram('h49) == 8'h1B);
    check("andlw/iorlw/xorlw", ram('h4A) == 8'hCC);
    check("comf", ram('h4B) == 8'h33);
    check("swapfw", ram('h4C) == 8'h21);
    check("mulw", ram('h4D) == 8'hEA);
    check("rlf then rrf", ram('h4E) == 8'h81);
    check("rrf to W", ram('h4F) == 8'h40);
    check("bsf/bcf", ram('h50) == 8'h01);
    check("btfss/btfsc skips", ram('h51) == 8'h01);
    check("decfsz loop count", ram('h53) == 8'h05 && ram('h52) == 8'h00);
    check("incfsz skip", ram('h55) == 8'h11 && ram('h54) == 8'h00);
    check("call/retlw", ram('h56) == 8'h5C);
    check("nested call inner", ram('h57) == 8'h5C);
    check("nested call outer", ram('h58) == 8'hA5);
    check("indirect write 0", ram('h60) == 8'h9C);
    check("indirect write 1", ram('h61) == 8'h3D);
    check("indirect read", ram('h59) == 8'h9C);
    check("INDF with FSR=0 reads 0", ram('h5A) == 8'h00);
    check("computed goto", ram('h5B) == 8'h30);
    check("port B mixed read", ram('h5C) == 8'hAC);
    check("port A input read", ram('h5D) == 8'h69);
    check("port B drive", portb_oe == 8'hF0 && portb_out == 8'hA5 && porta_oe == 8'h00);
    check("option", option_q == 8'h07);
    check("after wake", ram('h5E) == 8'hEE);
    check("forward goto", ram('h5F) == 8'h42);
    check("clrw", ram('h62) == 8'h00);
    check("seven bsr in seven consecutive clocks", max_run_shift >= 7);
    if (halted) n_halt++;

    // ---------------- run 2: moving-average filter, N = 32, M = 8
    n = 32; l = 3; m = 1 << l;
    x = new[n];
    foreach (x[i]) x[i] = byte_t'($urandom);
    p2 = new();
    build_mavg(p2, n, l, 1'b1, x);
    load_and_reset(p2);
    start = cyc;
    fork
      wait (halted);
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    check("run 2 halted", halted);
    if (halted) n_halt++;
    c_expect = mavg_cycles(n, l, 1'b1);
    check($sformatf("filter cycles %0d expected %0d", cyc - start, c_expect), cyc - start == c_expect);
    for (int i = 0; i < n; i++) check($sformatf("X[%0d] loaded", i), ram(X_BASE + i) == x[i]);
    for (int i = 0; i + m <= n; i++) begin
      sum = 0;
      for (int j = 0; j < m; j++) sum += int'(x[i + j]);
      check($sformatf("Y[%0d] = %0d", i, sum / m), ram(y_base(n) + i) == byte_t'(sum / m));
    end

    // ---------------- mechanism coverage
    $display("barrel shifts %0d, skips %0d, redirects %0d, calls %0d, returns %0d, computed gotos %0d,",
             n_shift, n_skip, n_redirect, n_call, n_ret, n_pcl);
    $display("indirect accesses %0d, sleep cycles %0d, wake-ups %0d, port accesses %0d, wdt clears %0d, halts %0d",
             n_indf, n_sleep_cyc, n_wake, n_port, n_wdt, n_halt);
    check("barrel shift happened", n_shift > 0);
    check("skip happened", n_skip > 0);
    check("redirect happened", n_redirect > 0);
    check("call happened", n_call > 0);
    check("return happened", n_ret > 0);
    check("computed goto happened", n_pcl > 0);
    check("indirect access happened", n_indf > 0);
    check("sleep happened", n_sleep_cyc > 0);
    check("wake happened", n_wake > 0);
    check("port access happened", n_port > 0);
    check("wdt clear happened", n_wdt > 0);
    check("halt happened", n_halt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
