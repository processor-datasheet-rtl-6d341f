// legv8_pkg: types and constants shared by the processor's blocks.
//
// The 31-bit control word follows the field order and bit positions of the
// control-word table of the datasheet (PS in [30:29] down to SL in [0]).
// ALU function-select codes follow the ALU's own function-select table:
// FS[4:2] chooses the operation, FS[1] inverts A, FS[0] inverts B.
// Opcodes are those of the LEGv8 subset the datasheet lists; the ones its
// opcode table prints illegibly (the branches) are the standard LEGv8 values.
package legv8_pkg;

  localparam int unsigned XLEN  = 64;  // data path width
  localparam int unsigned ILEN  = 32;  // instruction width
  localparam int unsigned NREGS = 32;  // general purpose registers
  localparam int unsigned RAW   = 5;   // register address width

  // Program-counter control (PS)
  typedef enum logic [1:0] {
    PS_HOLD   = 2'b00,  // PC <- PC
    PS_INC    = 2'b01,  // PC <- PC + 4
    PS_LOAD   = 2'b10,  // PC <- in
    PS_OFFSET = 2'b11   // PC <- PC + 4 + in*4
  } ps_e;

  // ALU operation, FS[4:2]
  typedef enum logic [2:0] {
    OP_AND  = 3'b000,
    OP_OR   = 3'b001,
    OP_ADD  = 3'b010,
    OP_XOR  = 3'b011,
    OP_SHR  = 3'b100,  // A >> 1, zero shifted in
    OP_SHL  = 3'b101,  // A << 1, zero shifted in
    OP_ZERO = 3'b110,  // constant 0
    OP_ONES = 3'b111   // constant 16'hFFFF, zero extended
  } alu_op_e;

  // Full 5-bit function selects used by the control unit
  localparam logic [4:0] FS_AND  = 5'b00000;
  localparam logic [4:0] FS_BIC  = 5'b00001;  // A & ~B
  localparam logic [4:0] FS_OR   = 5'b00100;
  localparam logic [4:0] FS_ADD  = 5'b01000;
  localparam logic [4:0] FS_SUB  = 5'b01001;
  localparam logic [4:0] FS_XOR  = 5'b01100;
  localparam logic [4:0] FS_SHR  = 5'b10000;
  localparam logic [4:0] FS_SHL  = 5'b10100;
  localparam logic [4:0] FS_ZERO = 5'b11000;
  localparam logic [4:0] FS_ONES = 5'b11100;

  // ALU status, bit 0 = Z ... bit 3 = V
  typedef struct packed {
    logic v;  // signed overflow
    logic c;  // carry out of unsigned addition
    logic n;  // result negative
    logic z;  // result zero
  } status_t;

  // Control word, {PS, DA, SA, SB, FS, regW, ramW, EN_MEM, EN_ALU, EN_B,
  // EN_PC, selB, PCsel, SL}
  typedef struct packed {
    ps_e            ps;      // [30:29]
    logic [RAW-1:0] da;      // [28:24] write register
    logic [RAW-1:0] sa;      // [23:19] read register A
    logic [RAW-1:0] sb;      // [18:14] read register B
    logic [4:0]     fs;      // [13:9]  ALU function select
    logic           reg_w;   // [8]  write register file
    logic           ram_w;   // [7]  write data RAM
    logic           en_mem;  // [6]  RAM drives the data bus
    logic           en_alu;  // [5]  ALU drives the data bus
    logic           en_b;    // [4]  register B drives the data bus
    logic           en_pc;   // [3]  PC+4 drives the data bus
    logic           sel_b;   // [2]  ALU B input: 0 register B, 1 literal K
    logic           pc_sel;  // [1]  PC input: 0 register A, 1 literal K
    logic           sl;      // [0]  load the status register from the ALU
  } ctrl_word_t;

  localparam ctrl_word_t CW_NOP = '{ps: PS_INC, default: '0};

  // LEGv8 opcodes (instruction bits [31:21]; shorter opcodes left aligned)
  localparam logic [10:0] OPC_ADD   = 11'b10001011000;
  localparam logic [10:0] OPC_SUB   = 11'b11001011000;
  localparam logic [10:0] OPC_ADDS  = 11'b10101011000;
  localparam logic [10:0] OPC_SUBS  = 11'b11101011000;
  localparam logic [10:0] OPC_AND   = 11'b10001010000;
  localparam logic [10:0] OPC_ORR   = 11'b10101010000;
  localparam logic [10:0] OPC_EOR   = 11'b11001010000;
  localparam logic [10:0] OPC_ANDS  = 11'b11101010000;
  localparam logic [10:0] OPC_LSR   = 11'b11010011010;
  localparam logic [10:0] OPC_LSL   = 11'b11010011011;
  localparam logic [10:0] OPC_STUR  = 11'b11111000000;
  localparam logic [10:0] OPC_LDUR  = 11'b11111000010;
  localparam logic [10:0] OPC_BR    = 11'b11010110000;
  localparam logic [9:0]  OPC_ADDI  = 10'b1001000100;
  localparam logic [9:0]  OPC_SUBI  = 10'b1101000100;
  localparam logic [9:0]  OPC_ADDIS = 10'b1011000100;
  localparam logic [9:0]  OPC_SUBIS = 10'b1111000100;
  localparam logic [9:0]  OPC_ANDI  = 10'b1001001000;
  localparam logic [9:0]  OPC_ORRI  = 10'b1011001000;
  localparam logic [9:0]  OPC_EORI  = 10'b1101001000;
  localparam logic [9:0]  OPC_ANDIS = 10'b1111001000;
  localparam logic [8:0]  OPC_MOVZ  = 9'b110100101;
  localparam logic [8:0]  OPC_MOVK  = 9'b111100101;
  localparam logic [7:0]  OPC_CBZ   = 8'b10110100;
  localparam logic [7:0]  OPC_CBNZ  = 8'b10110101;
  localparam logic [7:0]  OPC_BCOND = 8'b01010100;
  localparam logic [5:0]  OPC_B     = 6'b000101;
  localparam logic [5:0]  OPC_BL    = 6'b100101;

  localparam logic [RAW-1:0] LINK_REG = 5'd30;  // BL writes the return address here

  // B.cond condition codes (instruction bits [3:0])
  function automatic logic cond_holds(input logic [3:0] cond, input status_t f);
    logic r;
    unique case (cond[3:1])
      3'b000:  r = f.z;                      // EQ / NE
      3'b001:  r = f.c;                      // HS / LO
      3'b010:  r = f.n;                      // MI / PL
      3'b011:  r = f.v;                      // VS / VC
      3'b100:  r = f.c & ~f.z;               // HI / LS
      3'b101:  r = (f.n == f.v);             // GE / LT
      3'b110:  r = ~f.z & (f.n == f.v);      // GT / LE
      default: r = 1'b1;                     // AL
    endcase
    return (cond[0] && cond[3:1] != 3'b111) ? ~r : r;
  endfunction

endpackage
