// utemrisc01: top level of the UTeMRISC01 8-bit soft-core microcontroller.
//
// UTeMRISC01 is a PIC-derived 8-bit RISC core extended for a moving-average
// filter.  Its distinguishing feature is a pair of barrel-shift instructions,
// bsl f,n and bsr f,n, that shift register f left or right by n = 0..7 places
// in a single instruction cycle and write the result back to f.  A filter
// that divides a window sum by M = 2^n thus needs one instruction where the
// PIC it descends from needs n rotate-through-carry instructions (plus the
// carry clears and loop control around them).  The core also drops the PIC's
// register banks: the 7-bit f field reaches all 128 data addresses directly.
//
// Structure: a two-stage pipeline.  Stage 1 fetches the word at pc_q from
// program_memory (synchronous read); stage 2 decodes it (instr_decoder),
// reads register f from register_file or a special register, computes in the
// alu (which contains the barrel_shifter) and writes W or f at the next clock
// edge.  Every instruction therefore issues in one clock.  goto, call, retlw
// and writes to PCL redirect the fetch and discard the word already fetched,
// so they take two clocks; a taken skip (decfsz, incfsz, btfsc, btfss)
// discards the next word the same way.  call and retlw use call_stack; two
// io_port instances form PORTA and PORTB.
//
// Special instructions: sleep stops fetch and execute until wake is high;
// end stops the core until reset (halted = 1), which marks the end of a
// program run; clrwdt pulses wdt_clear for one clock for an external
// watchdog; option copies W to the option output; tris 5 / tris 6 copy W to
// the direction register of PORTA / PORTB.
//
// Interface: clk, synchronous active-high rst (pc = 0, W = STATUS = FSR = 0,
// ports all inputs).  prog_we/prog_addr/prog_data write program memory,
// normally while rst is held.  retire is high in each clock in which an
// instruction completes.
//
// What follows the core description: 8-bit data, 16-bit words with a 6-bit
// opcode, the listed opcodes and formats, the bsl/bsr behaviour and their
// one-cycle execution, the single-bank memory.  This design's own choices:
// the pipeline, the register map, the flag rules, the opcodes 0x00..0x12,
// the stack depth, the PCL and port behaviour, and the program load port.
module utemrisc01
  import utemrisc01_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst,
  // program load port
  input  logic       prog_we,
  input  pc_t        prog_addr,
  input  instr_t     prog_data,
  // I/O ports
  input  byte_t      porta_in,
  output byte_t      porta_out,
  output byte_t      porta_oe,
  input  byte_t      portb_in,
  output byte_t      portb_out,
  output byte_t      portb_oe,
  // special registers and control
  output byte_t      option_q,
  output logic       wdt_clear,
  input  logic       wake,
  output logic       sleeping,
  output logic       halted,
  output logic       retire
);

  // ---------------------------------------------------------------- fetch
  pc_t    pc_q;        // address being fetched
  pc_t    ex_pc;       // address of the word in ir
  logic   ex_valid;    // ir holds an instruction to execute
  instr_t ir;
  logic   run;

  assign run = !sleeping && !halted;

  program_memory #(.ADDR_W(PC_W), .DATA_W(INSTR_W)) u_pmem (
    .clk       (clk),
    .en        (run),
    .addr      (pc_q),
    .rdata     (ir),
    .load_we   (prog_we),
    .load_addr (prog_addr),
    .load_data (prog_data)
  );

  // --------------------------------------------------------------- decode
  ctrl_t ctrl;
  logic  illegal;
  logic  exec;          // an instruction executes in this clock

  instr_decoder u_dec (
    .instr   (ir),
    .ctrl    (ctrl),
    .illegal (illegal)
  );

  assign exec   = run && ex_valid;
  assign retire = exec;

  // ------------------------------------------------------ register access
  byte_t  w_q, fsr_q;
  logic   c_q, dc_q, z_q;
  faddr_t f_field, eff_addr;
  pc_t    ex_pc_next;
  byte_t  f_val, rf_rdata, pa_rdata, pb_rdata;
  logic   is_sfr;

  assign f_field    = ir[9:3];
  assign ex_pc_next = ex_pc + 1'b1;
  assign eff_addr = (f_field == A_INDF) ? fsr_q[FADDR_W-1:0] : f_field;
  assign is_sfr   = eff_addr inside {A_INDF, A_PCL, A_STATUS, A_FSR, A_PORTA, A_PORTB};

  always_comb begin
    unique case (eff_addr)
      A_INDF:   f_val = '0;              // INDF through FSR = 0 reads zero
      A_PCL:    f_val = ex_pc_next[7:0];   // PC already points past this word
      A_STATUS: f_val = {5'b0, z_q, dc_q, c_q};
      A_FSR:    f_val = fsr_q;
      A_PORTA:  f_val = pa_rdata;
      A_PORTB:  f_val = pb_rdata;
      default:  f_val = rf_rdata;
    endcase
  end

  // ------------------------------------------------------------------ ALU
  byte_t alu_a, alu_b, alu_y;
  logic  alu_c, alu_dc, alu_z;

  always_comb begin
    unique case (ctrl.a_sel)
      ASEL_LIT: alu_a = ir[7:0];
      ASEL_W:   alu_a = w_q;
      default:  alu_a = f_val;
    endcase
    alu_b = ctrl.b_is_field ? {5'b0, ir[2:0]} : w_q;
  end

  alu u_alu (
    .op     (ctrl.alu_op),
    .a      (alu_a),
    .b      (alu_b),
    .c_in   (c_q),
    .y      (alu_y),
    .c_out  (alu_c),
    .dc_out (alu_dc),
    .z_out  (alu_z)
  );

  logic f_we;
  assign f_we = exec && ctrl.wr_f;

  register_file #(.ADDR_W(FADDR_W), .DATA_W(DATA_W)) u_rf (
    .clk   (clk),
    .raddr (eff_addr),
    .rdata (rf_rdata),
    .we    (f_we && !is_sfr),
    .waddr (eff_addr),
    .wdata (alu_y)
  );

  // ------------------------------------------------------------------ I/O
  logic tris_a, tris_b;
  assign tris_a = exec && ctrl.is_tris && (ir[9:0] == 10'(A_PORTA));
  assign tris_b = exec && ctrl.is_tris && (ir[9:0] == 10'(A_PORTB));

  io_port #(.WIDTH(DATA_W)) u_porta (
    .clk        (clk),
    .rst        (rst),
    .tris_we    (tris_a),
    .tris_wdata (w_q),
    .we         (f_we && eff_addr == A_PORTA),
    .wdata      (alu_y),
    .rdata      (pa_rdata),
    .pin_in     (porta_in),
    .pin_out    (porta_out),
    .pin_oe     (porta_oe)
  );

  io_port #(.WIDTH(DATA_W)) u_portb (
    .clk        (clk),
    .rst        (rst),
    .tris_we    (tris_b),
    .tris_wdata (w_q),
    .we         (f_we && eff_addr == A_PORTB),
    .wdata      (alu_y),
    .rdata      (pb_rdata),
    .pin_in     (portb_in),
    .pin_out    (portb_out),
    .pin_oe     (portb_oe)
  );

  // ------------------------------------------------------- program flow
  pc_t  stk_top;
  logic stk_full, stk_empty;
  logic bit_val, skip, redirect;
  pc_t  target;

  assign bit_val = f_val[ir[2:0]];
  assign skip    = exec && ((ctrl.skip_zero && alu_z) ||
                            (ctrl.skip_bclr && !bit_val) ||
                            (ctrl.skip_bset &&  bit_val));

  always_comb begin
    redirect = 1'b0;
    target   = pc_q + 1'b1;
    if (exec) begin
      if (ctrl.is_goto || ctrl.is_call) begin
        redirect = 1'b1;
        target   = ir[PC_W-1:0];
      end else if (ctrl.is_retlw) begin
        redirect = 1'b1;
        target   = stk_top;
      end else if (ctrl.wr_f && eff_addr == A_PCL) begin
        redirect = 1'b1;
        target   = {ex_pc_next[PC_W-1:8], alu_y};
      end
    end
  end

  call_stack #(.DEPTH(STACK_DEPTH), .ADDR_W(PC_W)) u_stack (
    .clk       (clk),
    .rst       (rst),
    .push      (exec && ctrl.is_call),
    .push_addr (ex_pc_next),
    .pop       (exec && ctrl.is_retlw),
    .top       (stk_top),
    .full      (stk_full),
    .empty     (stk_empty)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q     <= '0;
      ex_pc    <= '0;
      ex_valid <= 1'b0;
      sleeping <= 1'b0;
      halted   <= 1'b0;
    end else if (run) begin
      ex_pc    <= pc_q;
      pc_q     <= redirect ? target : pc_q + 1'b1;
      ex_valid <= !(redirect || skip);
      if (exec && ctrl.is_sleep) sleeping <= 1'b1;
      if (exec && ctrl.is_end)   halted   <= 1'b1;
    end else if (sleeping && wake) begin
      sleeping <= 1'b0;
    end
  end

  // ------------------------------------------------- W, STATUS, FSR, OPTION
  always_ff @(posedge clk) begin
    if (rst) begin
      w_q      <= '0;
      fsr_q    <= '0;
      c_q      <= 1'b0;
      dc_q     <= 1'b0;
      z_q      <= 1'b0;
      option_q <= '1;
    end else if (exec) begin
      if (ctrl.wr_w) w_q <= alu_y;
      if (f_we && eff_addr == A_FSR) fsr_q <= alu_y;
      if (f_we && eff_addr == A_STATUS) begin
        c_q  <= alu_y[ST_C];
        dc_q <= alu_y[ST_DC];
        z_q  <= alu_y[ST_Z];
      end
      // flag updates of the operation take precedence over a STATUS write
      if (ctrl.upd_c)  c_q  <= alu_c;
      if (ctrl.upd_dc) dc_q <= alu_dc;
      if (ctrl.upd_z)  z_q  <= alu_z;
      if (ctrl.is_option) option_q <= w_q;
    end
  end

  assign wdt_clear = exec && ctrl.is_clrwdt;

  // ----------------------------------------------------------- assertions
  // Programs must keep subroutine nesting within the stack depth.
  a_no_stack_overflow: assert property (@(posedge clk) disable iff (rst)
    (exec && ctrl.is_call) |-> !stk_full)
    else $error("call stack overflow at pc %0h", ex_pc);
  a_no_stack_underflow: assert property (@(posedge clk) disable iff (rst)
    (exec && ctrl.is_retlw) |-> !stk_empty)
    else $error("retlw with empty call stack at pc %0h", ex_pc);
  // Only defined opcodes should be executed.
  a_legal_opcode: assert property (@(posedge clk) disable iff (rst)
    exec |-> !illegal)
    else $warning("undefined opcode %0h at pc %0h executed as nop", ir[15:10], ex_pc);

endmodule
