// utemrisc01_pkg: types and constants shared by the UTeMRISC01 core.
//
// UTeMRISC01 is an 8-bit, PIC-style soft-core microcontroller with 16-bit
// instruction words.  Every instruction has a 6-bit opcode in bits [15:10].
// The operand formats are
//   "6 10"  : opcode, 10-bit literal or program address   (goto, call, movlw ...)
//   "6 7 3" : opcode, 7-bit register address f, 3-bit field b
//             (bit number, shift count, or the d bit of byte operations)
//   "6 -10" : opcode, 10 unused bits                       (clrwdt, sleep, option, end)
//
// The opcode values 0x14..0x25 and 0x3F, and the formats, follow the
// machine-instruction table of the instruction-set model the core was designed
// with.  The barrel shifts are bsl = 0x24 and bsr = 0x25.  Opcodes 0x00..0x13
// are not printed there; this design assigns them to the remaining
// baseline-PIC byte and bit operations in the order listed below (a design
// choice), and 0x13 and 0x26..0x3E are reserved and execute as nop.
//
// Register map of the single-bank data space (7-bit address, no bank bits):
// INDF 0x00, PCL 0x02, STATUS 0x03, FSR 0x04, PORTA 0x05, PORTB 0x06; every
// other address is general-purpose RAM.  STATUS holds C (bit 0), DC (bit 1)
// and Z (bit 2), as on the PIC.  The map is this design's choice, following
// the PIC the core is derived from.
package utemrisc01_pkg;

  localparam int unsigned DATA_W  = 8;   // data path width
  localparam int unsigned INSTR_W = 16;  // instruction word width
  localparam int unsigned PC_W    = 10;  // program address width (10-bit call/goto field)
  localparam int unsigned FADDR_W = 7;   // register address width (7-bit f field)

  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [FADDR_W-1:0] faddr_t;

  // 6-bit opcodes
  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    OP_ADDWF  = 6'h01,
    OP_ANDWF  = 6'h02,
    OP_CLRW   = 6'h03,
    OP_COMF   = 6'h04,
    OP_DECF   = 6'h05,
    OP_DECFSZ = 6'h06,
    OP_INCF   = 6'h07,
    OP_INCFSZ = 6'h08,
    OP_IORWF  = 6'h09,
    OP_MOVF   = 6'h0A,
    OP_RLF    = 6'h0B,
    OP_RRF    = 6'h0C,
    OP_SUBWF  = 6'h0D,
    OP_XORWF  = 6'h0E,
    OP_BCF    = 6'h0F,
    OP_BSF    = 6'h10,
    OP_BTFSC  = 6'h11,
    OP_BTFSS  = 6'h12,
    OP_RETLW  = 6'h14,
    OP_CALL   = 6'h15,
    OP_GOTO   = 6'h16,
    OP_MOVLW  = 6'h17,
    OP_IORLW  = 6'h18,
    OP_ANDLW  = 6'h19,
    OP_XORLW  = 6'h1A,
    OP_MOVWF  = 6'h1B,
    OP_CLRF   = 6'h1C,
    OP_SWAPFW = 6'h1D,
    OP_MULW   = 6'h1E,
    OP_CLRWDT = 6'h1F,
    OP_SLEEP  = 6'h20,
    OP_TRIS   = 6'h21,
    OP_OPTION = 6'h22,
    OP_SUBLW  = 6'h23,
    OP_BSL    = 6'h24,
    OP_BSR    = 6'h25,
    OP_END    = 6'h3F
  } opcode_e;

  // Special function register addresses
  localparam faddr_t A_INDF   = 7'h00;
  localparam faddr_t A_PCL    = 7'h02;
  localparam faddr_t A_STATUS = 7'h03;
  localparam faddr_t A_FSR    = 7'h04;
  localparam faddr_t A_PORTA  = 7'h05;
  localparam faddr_t A_PORTB  = 7'h06;

  // STATUS bit positions
  localparam int unsigned ST_C  = 0;
  localparam int unsigned ST_DC = 1;
  localparam int unsigned ST_Z  = 2;

  // ALU operations
  typedef enum logic [4:0] {
    ALU_PASS_A,  // result = a (movf, movlw, movwf source)
    ALU_CLR,     // result = 0
    ALU_ADD,     // a + b
    ALU_SUB,     // a - b
    ALU_AND,
    ALU_IOR,
    ALU_XOR,
    ALU_COM,     // ~a
    ALU_INC,     // a + 1
    ALU_DEC,     // a - 1
    ALU_RLF,     // rotate a left through carry
    ALU_RRF,     // rotate a right through carry
    ALU_SWAP,    // swap nibbles of a
    ALU_BCF,     // clear bit b of a
    ALU_BSF,     // set bit b of a
    ALU_BSL,     // barrel shift a left by b places
    ALU_BSR,     // barrel shift a right by b places
    ALU_MUL      // low byte of a * b
  } alu_op_e;

  // Source of ALU operand a
  typedef enum logic [1:0] {
    ASEL_F,    // register f
    ASEL_LIT,  // 8-bit literal instr[7:0]
    ASEL_W     // working register W
  } asel_e;

  // Decoded controls of one instruction
  typedef struct packed {
    alu_op_e alu_op;
    asel_e   a_sel;        // ALU operand a
    logic    b_is_field;   // ALU operand b is the 3-bit field (bit number / count), not W
    logic    wr_w;         // result goes to W
    logic    wr_f;         // result goes to register f
    logic    upd_z;        // update Z
    logic    upd_c;        // update C
    logic    upd_dc;       // update DC
    logic    skip_zero;    // skip next instruction if result is zero (decfsz, incfsz)
    logic    skip_bclr;    // skip if bit b of f is clear (btfsc)
    logic    skip_bset;    // skip if bit b of f is set (btfss)
    logic    is_goto;
    logic    is_call;
    logic    is_retlw;
    logic    is_tris;
    logic    is_option;
    logic    is_clrwdt;
    logic    is_sleep;
    logic    is_end;
    logic    is_shift;     // bsl / bsr (for statistics)
  } ctrl_t;

endpackage
