// sicxe_pkg: constants and types shared by the SIC/XE computer.
//
// Holds the opcode values of the instruction set, the condition code
// encoding, register numbers, ALU operation codes, the interrupt vector
// address and the device address map. Opcodes of the standard SIC/XE set
// follow the architecture; the three interrupt instructions EINT, DINT and
// RINT are this design's own encoding (format 1, reusing the opcodes of the
// removed I/O-channel instructions SIO, HIO and TIO).
package sicxe_pkg;

  // Condition code values (CC register, 2 bits)
  localparam logic [1:0] CC_LT = 2'b00;
  localparam logic [1:0] CC_EQ = 2'b01;
  localparam logic [1:0] CC_GT = 2'b10;

  // Register numbers used in format 2 instructions
  localparam logic [3:0] R_A = 4'd0;
  localparam logic [3:0] R_X = 4'd1;
  localparam logic [3:0] R_L = 4'd2;
  localparam logic [3:0] R_B = 4'd3;
  localparam logic [3:0] R_S = 4'd4;
  localparam logic [3:0] R_T = 4'd5;

  // Address of the word that holds the interrupt handler address
  localparam logic [19:0] IRQ_VECTOR = 20'hffffd;

  // Format SIC/3/4 opcodes (8-bit values, low two bits zero)
  localparam logic [7:0] OP_LDA  = 8'h00, OP_LDX  = 8'h04, OP_LDL  = 8'h08;
  localparam logic [7:0] OP_STA  = 8'h0C, OP_STX  = 8'h10, OP_STL  = 8'h14;
  localparam logic [7:0] OP_ADD  = 8'h18, OP_SUB  = 8'h1C, OP_MUL  = 8'h20;
  localparam logic [7:0] OP_DIV  = 8'h24, OP_COMP = 8'h28, OP_TIX  = 8'h2C;
  localparam logic [7:0] OP_JEQ  = 8'h30, OP_JGT  = 8'h34, OP_JLT  = 8'h38;
  localparam logic [7:0] OP_J    = 8'h3C, OP_AND  = 8'h40, OP_OR   = 8'h44;
  localparam logic [7:0] OP_JSUB = 8'h48, OP_RSUB = 8'h4C, OP_LDCH = 8'h50;
  localparam logic [7:0] OP_STCH = 8'h54, OP_LDB  = 8'h68, OP_LDS  = 8'h6C;
  localparam logic [7:0] OP_LDT  = 8'h74, OP_STB  = 8'h78, OP_STS  = 8'h7C;
  localparam logic [7:0] OP_STT  = 8'h84, OP_RD   = 8'hD8, OP_WD   = 8'hDC;
  localparam logic [7:0] OP_TD   = 8'hE0, OP_STSW = 8'hE8;
  // Format 2 opcodes
  localparam logic [7:0] OP_ADDR   = 8'h90, OP_SUBR  = 8'h94, OP_MULR = 8'h98;
  localparam logic [7:0] OP_COMPR  = 8'hA0, OP_SHIFTL = 8'hA4, OP_SHIFTR = 8'hA8;
  localparam logic [7:0] OP_RMO    = 8'hAC, OP_CLEAR = 8'hB4, OP_TIXR = 8'hB8;
  // Format 1 opcodes of the interrupt mechanism (this design's encoding)
  localparam logic [7:0] OP_EINT = 8'hF0, OP_DINT = 8'hF4, OP_RINT = 8'hF8;

  typedef enum logic [1:0] {FMT_BAD, FMT_1, FMT_2, FMT_34} fmt_e;

  // Instruction format from the first instruction byte
  function automatic fmt_e insn_format(input logic [7:0] b0);
    logic [7:0] op6;
    op6 = {b0[7:2], 2'b00};
    if (b0 == OP_EINT || b0 == OP_DINT || b0 == OP_RINT) return FMT_1;
    case (b0)
      OP_ADDR, OP_SUBR, OP_MULR, OP_COMPR, OP_SHIFTL, OP_SHIFTR,
      OP_RMO, OP_CLEAR, OP_TIXR: return FMT_2;
      default: ;
    endcase
    case (op6)
      OP_LDA, OP_LDX, OP_LDL, OP_STA, OP_STX, OP_STL, OP_ADD, OP_SUB,
      OP_MUL, OP_COMP, OP_TIX, OP_JEQ, OP_JGT, OP_JLT, OP_J, OP_AND,
      OP_OR, OP_JSUB, OP_RSUB, OP_LDCH, OP_STCH, OP_LDB, OP_LDS, OP_LDT,
      OP_STB, OP_STS, OP_STT, OP_RD, OP_WD, OP_TD, OP_STSW: return FMT_34;
      default: return FMT_BAD;
    endcase
  endfunction

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_AND, ALU_OR,
    ALU_SHL,    // rotate left by shamt
    ALU_SHR,    // arithmetic shift right by shamt
    ALU_PASSA, ALU_PASSB,
    ALU_BYTE    // {a[23:8], b[7:0]}
  } alu_op_e;

  // Device addresses
  localparam logic [7:0] DEV_SWITCHES = 8'h02;
  localparam logic [7:0] DEV_BUTTONS  = 8'h03;
  localparam logic [7:0] DEV_PS2      = 8'h04;
  localparam logic [7:0] DEV_LEDS     = 8'h05;
  localparam logic [7:0] DEV_SEG_MODE = 8'h06;
  localparam logic [7:0] DEV_SEG_HEXR = 8'h07;
  localparam logic [7:0] DEV_SEG_HEXL = 8'h08;
  localparam logic [7:0] DEV_SEG_DIG0 = 8'h09;
  localparam logic [7:0] DEV_SEG_DIG3 = 8'h0C;
  localparam logic [7:0] DEV_VGA_ROW  = 8'h0D;
  localparam logic [7:0] DEV_VGA_COL  = 8'h0E;
  localparam logic [7:0] DEV_VGA_COLOR = 8'h0F;

endpackage
