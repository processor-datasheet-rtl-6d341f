// control_unit: instruction decoder and sequencer.
//
// For the instruction on `instr` it produces the 31-bit control word of the
// datapath, the literal K (an immediate, a branch offset or a mask) and its
// own next state. Most instructions finish in one cycle in state S_EXEC with
// PS = increment. Three need more cycles; the PC is held (PS = hold) until
// their last cycle, so the instruction stays on `instr` meanwhile:
//   MOVZ  S_EXEC: Rd <- 0                S_MOV: Rd <- Rd | (imm16 << 16*hw)
//   MOVK  S_EXEC: Rd <- Rd & ~(FFFF<<s)  S_MOV: Rd <- Rd | (imm16 << 16*hw)
//   LSL / LSR #n  the ALU shifts by one place, so the first cycle writes
//         Rd <- Rn shifted once and S_SHIFT repeats Rd <- Rd shifted once
//         until n shifts are done. n = 0 copies Rn in one cycle by putting
//         register B (SB = Rn) on the data bus (EN_B).
// Branches: B / BL use PS = offset with PCsel = K; BL also writes PC+4 to X30.
// CBZ / CBNZ pass Rt through the ALU with PS = offset and raise zbr; the
// datapath turns the branch into an increment when the ALU's zero flag
// disagrees, so the decision needs no path from the ALU back into this block. B.cond tests the status register (flags) loaded by an
// earlier flag-setting instruction. BR loads the PC from register Rn.
// The datapath's offset mode computes PC + 4 + K*4, so K carries the encoded
// word offset minus one and branch targets are PC + 4*offset as in LEGv8.
// Unknown opcodes act as no operation. Reset (asynchronous, active high)
// returns to S_EXEC.
//
// Follows the datasheet: the control-word fields, the instruction list, the
// opcodes, a two-bit next-state field and the two-cycle MOVZ / MOVK. This
// design's own choices: the LEGv8 field positions, every control-word value
// (derived from what each field does), the shift sequencing, zero-extended
// 12-bit immediates for the logical immediates, and the branch offset
// adjustment.
module control_unit
  import legv8_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [ILEN-1:0] instr,
  input  status_t         flags,     // status register
  output ctrl_word_t      cw,
  output logic [XLEN-1:0] k,
  output logic [1:0]      zbr,       // CBZ/CBNZ: bit 1 = compare-and-branch, bit 0 = branch if nonzero
  output logic [1:0]      state      // current state, S_EXEC = 0
);

  typedef enum logic [1:0] {
    S_EXEC  = 2'b00,
    S_MOV   = 2'b01,
    S_SHIFT = 2'b10
  } state_e;

  state_e     st, st_next;
  logic [5:0] cnt, cnt_next;   // shifts still to do

  // Instruction fields (LEGv8 layout)
  logic [10:0]    opc11;
  logic [RAW-1:0] rd, rn, rm;
  logic [5:0]     shamt;
  logic [11:0]    imm12;
  logic [8:0]     dt_addr;
  logic [15:0]    mov_imm;
  logic [1:0]     hw;
  logic [25:0]    br_addr;
  logic [18:0]    cb_addr;

  assign opc11   = instr[31:21];
  assign rm      = instr[20:16];
  assign shamt   = instr[15:10];
  assign rn      = instr[9:5];
  assign rd      = instr[4:0];
  assign imm12   = instr[21:10];
  assign dt_addr = instr[20:12];
  assign mov_imm = instr[20:5];
  assign hw      = instr[22:21];
  assign br_addr = instr[25:0];
  assign cb_addr = instr[23:5];

  logic [XLEN-1:0] mov_val, mov_mask, br_k, cb_k;
  assign mov_val  = XLEN'(mov_imm) << {hw, 4'b0000};
  assign mov_mask = XLEN'(16'hFFFF) << {hw, 4'b0000};
  assign br_k     = {{(XLEN-26){br_addr[25]}}, br_addr} - XLEN'(1);
  assign cb_k     = {{(XLEN-19){cb_addr[18]}}, cb_addr} - XLEN'(1);

  // One cycle of an ALU instruction writing Rd
  function automatic ctrl_word_t alu_cw(input logic [4:0] fs, input logic imm,
                                        input logic setf, input logic [RAW-1:0] d,
                                        input logic [RAW-1:0] a, input logic [RAW-1:0] b);
    ctrl_word_t c = CW_NOP;
    c.fs     = fs;
    c.da     = d;
    c.sa     = a;
    c.sb     = b;
    c.reg_w  = 1'b1;
    c.en_alu = 1'b1;
    c.sel_b  = imm;
    c.sl     = setf;
    return c;
  endfunction

  always_comb begin
    cw       = CW_NOP;
    k        = '0;
    st_next  = S_EXEC;
    cnt_next = cnt;
    zbr      = 2'b00;

    unique case (st)
      S_MOV: begin
        cw = alu_cw(FS_OR, 1'b1, 1'b0, rd, rd, rd);
        k  = mov_val;
      end

      S_SHIFT: begin
        cw = alu_cw((opc11 == OPC_LSL) ? FS_SHL : FS_SHR, 1'b0, 1'b0, rd, rd, rd);
        cnt_next = cnt - 6'd1;
        if (cnt != 6'd1) begin
          cw.ps   = PS_HOLD;
          st_next = S_SHIFT;
        end
      end

      default: begin  // S_EXEC
        if (opc11 == OPC_ADD)       cw = alu_cw(FS_ADD, 1'b0, 1'b0, rd, rn, rm);
        else if (opc11 == OPC_SUB)  cw = alu_cw(FS_SUB, 1'b0, 1'b0, rd, rn, rm);
        else if (opc11 == OPC_ADDS) cw = alu_cw(FS_ADD, 1'b0, 1'b1, rd, rn, rm);
        else if (opc11 == OPC_SUBS) cw = alu_cw(FS_SUB, 1'b0, 1'b1, rd, rn, rm);
        else if (opc11 == OPC_AND)  cw = alu_cw(FS_AND, 1'b0, 1'b0, rd, rn, rm);
        else if (opc11 == OPC_ORR)  cw = alu_cw(FS_OR,  1'b0, 1'b0, rd, rn, rm);
        else if (opc11 == OPC_EOR)  cw = alu_cw(FS_XOR, 1'b0, 1'b0, rd, rn, rm);
        else if (opc11 == OPC_ANDS) cw = alu_cw(FS_AND, 1'b0, 1'b1, rd, rn, rm);
        else if (opc11 == OPC_LSL || opc11 == OPC_LSR) begin
          if (shamt == 6'd0) begin
            cw        = alu_cw(FS_OR, 1'b0, 1'b0, rd, rn, rn);
            cw.en_alu = 1'b0;
            cw.en_b   = 1'b1;  // plain copy: register B straight onto the bus
          end else begin
            cw = alu_cw((opc11 == OPC_LSL) ? FS_SHL : FS_SHR, 1'b0, 1'b0, rd, rn, rn);
            if (shamt != 6'd1) begin
              cw.ps    = PS_HOLD;
              st_next  = S_SHIFT;
              cnt_next = shamt - 6'd1;
            end
          end
        end
        else if (opc11[10:1] == OPC_ADDI)  begin cw = alu_cw(FS_ADD, 1'b1, 1'b0, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_SUBI)  begin cw = alu_cw(FS_SUB, 1'b1, 1'b0, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_ADDIS) begin cw = alu_cw(FS_ADD, 1'b1, 1'b1, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_SUBIS) begin cw = alu_cw(FS_SUB, 1'b1, 1'b1, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_ANDI)  begin cw = alu_cw(FS_AND, 1'b1, 1'b0, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_ORRI)  begin cw = alu_cw(FS_OR,  1'b1, 1'b0, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_EORI)  begin cw = alu_cw(FS_XOR, 1'b1, 1'b0, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:1] == OPC_ANDIS) begin cw = alu_cw(FS_AND, 1'b1, 1'b1, rd, rn, rm); k = XLEN'(imm12); end
        else if (opc11[10:2] == OPC_MOVZ) begin
          cw      = alu_cw(FS_ZERO, 1'b0, 1'b0, rd, rd, rd);
          cw.ps   = PS_HOLD;
          st_next = S_MOV;
        end
        else if (opc11[10:2] == OPC_MOVK) begin
          cw      = alu_cw(FS_BIC, 1'b1, 1'b0, rd, rd, rd);
          cw.ps   = PS_HOLD;
          k       = mov_mask;
          st_next = S_MOV;
        end
        else if (opc11 == OPC_LDUR) begin
          cw        = alu_cw(FS_ADD, 1'b1, 1'b0, rd, rn, rd);
          cw.en_alu = 1'b0;
          cw.en_mem = 1'b1;
          k         = {{(XLEN-9){dt_addr[8]}}, dt_addr};
        end
        else if (opc11 == OPC_STUR) begin
          cw        = alu_cw(FS_ADD, 1'b1, 1'b0, rd, rn, rd);
          cw.reg_w  = 1'b0;
          cw.en_alu = 1'b0;
          cw.ram_w  = 1'b1;
          k         = {{(XLEN-9){dt_addr[8]}}, dt_addr};
        end
        else if (opc11 == OPC_BR) begin
          cw.sa = rn;
          cw.ps = PS_LOAD;
        end
        else if (opc11[10:5] == OPC_B || opc11[10:5] == OPC_BL) begin
          cw.ps     = PS_OFFSET;
          cw.pc_sel = 1'b1;
          k         = br_k;
          if (opc11[10:5] == OPC_BL) begin
            cw.da    = LINK_REG;
            cw.reg_w = 1'b1;
            cw.en_pc = 1'b1;
          end
        end
        else if (opc11[10:3] == OPC_CBZ || opc11[10:3] == OPC_CBNZ) begin
          cw.sa     = rd;
          cw.sb     = rd;
          cw.fs     = FS_OR;
          cw.pc_sel = 1'b1;
          k         = cb_k;
          cw.ps     = PS_OFFSET;
          zbr       = {1'b1, opc11[10:3] == OPC_CBNZ};
        end
        else if (opc11[10:3] == OPC_BCOND) begin
          cw.pc_sel = 1'b1;
          k         = cb_k;
          if (cond_holds(instr[3:0], flags)) cw.ps = PS_OFFSET;
        end
      end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st  <= S_EXEC;
      cnt <= '0;
    end else begin
      st  <= st_next;
      cnt <= cnt_next;
    end
  end

  assign state = st;

endmodule
