// utemrisc01_asm_pkg: a small in-testbench assembler for UTeMRISC01 and the
// moving-average filter program used by the system testbenches.
//
// Encoders:  enc_f  (byte operation: opcode, f, d bit in bit 2)
//            enc_b  (bit / shift operation: opcode, f, 3-bit field)
//            enc_k  (opcode and 10-bit literal or address)
//            enc_n  (opcode alone)
// The class prog_c collects words at increasing addresses (org() moves the
// location counter) and hands the image to a testbench for loading.
//
// build_mavg() emits the moving-average filter: it loads N samples from a
// retlw table (computed goto through PCL) into X[], then for each output
// point i clears a 16-bit accumulator, adds X[i..i+M-1] with carry into the
// high byte, divides by M = 2^L and stores the 8-bit result in Y[i].  With
// use_bsr the division is "bsr lo,L ; bsl hi,8-L ; movf hi,W ; iorwf lo,F";
// without it, it is the single-place loop "bcf C ; rrf hi ; rrf lo" run L
// times, the only way to divide on a core without the barrel shifter.
package utemrisc01_asm_pkg;
  import utemrisc01_pkg::*;

  function automatic instr_t enc_f(opcode_e op, int f, int d);
    return {op, 7'(f), 1'(d), 2'b00};
  endfunction

  function automatic instr_t enc_b(opcode_e op, int f, int b);
    return {op, 7'(f), 3'(b)};
  endfunction

  function automatic instr_t enc_k(opcode_e op, int k);
    return {op, 10'(k)};
  endfunction

  function automatic instr_t enc_n(opcode_e op);
    return {op, 10'd0};
  endfunction

  localparam int F_W = 0;   // d = 0: result to W
  localparam int F_F = 1;   // d = 1: result to f

  class prog_c;
    instr_t mem [1024];
    int     lc;
    int     top;

    function new();
      foreach (mem[i]) mem[i] = '0;
      lc  = 0;
      top = 0;
    endfunction

    function void org(int a);
      lc = a;
    endfunction

    function int emit(instr_t w);
      int a = lc;
      mem[lc] = w;
      lc++;
      if (lc > top) top = lc;
      return a;
    endfunction
  endclass

  // Data layout of the filter program
  localparam int V_K   = 'h08;  // table index
  localparam int V_CNT = 'h09;  // load counter
  localparam int V_XP  = 'h0A;  // pointer to X[i]
  localparam int V_YP  = 'h0B;  // pointer to Y[i]
  localparam int V_CI  = 'h0C;  // outer counter
  localparam int V_CJ  = 'h0D;  // inner counter
  localparam int V_SLO = 'h0E;  // accumulator low byte
  localparam int V_SHI = 'h0F;  // accumulator high byte
  localparam int V_CS  = 'h10;  // shift counter (loop version)
  localparam int X_BASE = 'h18;
  localparam int TABLE_ADDR = 'h300;

  // Y[] follows X[]; N + (N - M + 1) must fit below address 0x80
  function automatic int y_base(int n);
    return X_BASE + n;
  endfunction

  // Cycle count of build_mavg from release of reset to the clock in which
  // 'end' executes (one fetch cycle, one clock per instruction, one extra per
  // taken branch or skip), worked out from the program text.
  function automatic int mavg_cycles(int n, int l, bit use_bsr);
    int m    = 1 << l;
    int nout = n - m + 1;
    int avg  = use_bsr ? 4 : 6 * l + 1;
    return 11 + 13 * n + nout * (14 + 8 * m + avg);
  endfunction

  function automatic void build_mavg(prog_c p, int n, int l, bit use_bsr, byte_t x []);
    int m    = 1 << l;
    int nout = n - m + 1;
    int a_load, a_outer, a_inner, a_sh, dummy;
    p.org(0);
    // load input data to array X[]
    dummy  = p.emit(enc_k(OP_MOVLW, X_BASE));
    dummy  = p.emit(enc_f(OP_MOVWF, A_FSR, F_F));
    dummy  = p.emit(enc_f(OP_CLRF, V_K, F_F));
    dummy  = p.emit(enc_k(OP_MOVLW, n));
    dummy  = p.emit(enc_f(OP_MOVWF, V_CNT, F_F));
    a_load = p.emit(enc_f(OP_MOVF, V_K, F_W));
    dummy  = p.emit(enc_k(OP_CALL, TABLE_ADDR));
    dummy  = p.emit(enc_f(OP_MOVWF, A_INDF, F_F));
    dummy  = p.emit(enc_f(OP_INCF, A_FSR, F_F));
    dummy  = p.emit(enc_f(OP_INCF, V_K, F_F));
    dummy  = p.emit(enc_f(OP_DECFSZ, V_CNT, F_F));
    dummy  = p.emit(enc_k(OP_GOTO, a_load));
    // set I for each output point
    dummy  = p.emit(enc_k(OP_MOVLW, X_BASE));
    dummy  = p.emit(enc_f(OP_MOVWF, V_XP, F_F));
    dummy  = p.emit(enc_k(OP_MOVLW, y_base(n)));
    dummy  = p.emit(enc_f(OP_MOVWF, V_YP, F_F));
    dummy  = p.emit(enc_k(OP_MOVLW, nout));
    dummy  = p.emit(enc_f(OP_MOVWF, V_CI, F_F));
    // clear accumulator, set J
    a_outer = p.emit(enc_f(OP_CLRF, V_SLO, F_F));
    dummy  = p.emit(enc_f(OP_CLRF, V_SHI, F_F));
    dummy  = p.emit(enc_f(OP_MOVF, V_XP, F_W));
    dummy  = p.emit(enc_f(OP_MOVWF, A_FSR, F_F));
    dummy  = p.emit(enc_k(OP_MOVLW, m));
    dummy  = p.emit(enc_f(OP_MOVWF, V_CJ, F_F));
    // summation Y[I] = Y[I] + X[I+J]
    a_inner = p.emit(enc_f(OP_MOVF, A_INDF, F_W));
    dummy  = p.emit(enc_f(OP_ADDWF, V_SLO, F_F));
    dummy  = p.emit(enc_b(OP_BTFSC, A_STATUS, ST_C));
    dummy  = p.emit(enc_f(OP_INCF, V_SHI, F_F));
    dummy  = p.emit(enc_f(OP_INCF, A_FSR, F_F));
    dummy  = p.emit(enc_f(OP_DECFSZ, V_CJ, F_F));
    dummy  = p.emit(enc_k(OP_GOTO, a_inner));
    // average Y[I] = Y[I] / M
    if (use_bsr) begin
      dummy = p.emit(enc_b(OP_BSR, V_SLO, l));
      dummy = p.emit(enc_b(OP_BSL, V_SHI, 8 - l));
      dummy = p.emit(enc_f(OP_MOVF, V_SHI, F_W));
      dummy = p.emit(enc_f(OP_IORWF, V_SLO, F_F));
    end else begin
      dummy = p.emit(enc_k(OP_MOVLW, l));
      dummy = p.emit(enc_f(OP_MOVWF, V_CS, F_F));
      a_sh  = p.emit(enc_b(OP_BCF, A_STATUS, ST_C));
      dummy = p.emit(enc_f(OP_RRF, V_SHI, F_F));
      dummy = p.emit(enc_f(OP_RRF, V_SLO, F_F));
      dummy = p.emit(enc_f(OP_DECFSZ, V_CS, F_F));
      dummy = p.emit(enc_k(OP_GOTO, a_sh));
    end
    // store Y[I], next I
    dummy  = p.emit(enc_f(OP_MOVF, V_YP, F_W));
    dummy  = p.emit(enc_f(OP_MOVWF, A_FSR, F_F));
    dummy  = p.emit(enc_f(OP_MOVF, V_SLO, F_W));
    dummy  = p.emit(enc_f(OP_MOVWF, A_INDF, F_F));
    dummy  = p.emit(enc_f(OP_INCF, V_YP, F_F));
    dummy  = p.emit(enc_f(OP_INCF, V_XP, F_F));
    dummy  = p.emit(enc_f(OP_DECFSZ, V_CI, F_F));
    dummy  = p.emit(enc_k(OP_GOTO, a_outer));
    dummy  = p.emit(enc_n(OP_END));
    // sample table: computed goto into a list of retlw
    p.org(TABLE_ADDR);
    dummy  = p.emit(enc_f(OP_ADDWF, A_PCL, F_F));
    for (int i = 0; i < n; i++) dummy = p.emit(enc_k(OP_RETLW, int'(x[i])));
  endfunction

endpackage
