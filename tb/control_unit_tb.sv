// control_unit_tb: self-checking test of the instruction decoder/sequencer.
//
// For every instruction of the set the testbench applies the machine word and
// compares the control word, the literal K and the compare-and-branch request
// with values written out here from what each instruction must do. Register
// fields that the instruction does not use are not compared (-1). Multi-cycle
// instructions are stepped through: MOVZ and MOVK must take two cycles with the
// PC held in the first, LSL/LSR #n must take n cycles (one when n = 0).
// B.cond is checked for all 16 conditions against all 16 flag settings.
module control_unit_tb;
  import legv8_pkg::*;
  import legv8_asm_pkg::*;

  logic        clk = 0, rst;
  logic [31:0] instr;
  status_t     flags;
  ctrl_word_t  cw;
  logic [63:0] k;
  logic [1:0]  zbr, state;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst(rst), .instr(instr), .flags(flags), .cw(cw), .k(k),
                    .zbr(zbr), .state(state));

  always #5 clk = ~clk;

  // Expected control word; da/sa/sb = -1 means "not used"
  task automatic expect_cw(input string what, input logic [1:0] ps, input int da, input int sa,
                           input int sb, input logic [4:0] fs, input logic [8:0] flags9,
                           input logic [63:0] ek, input logic [1:0] ezbr = 2'b00);
    logic ok;
    #1;
    ok = (cw.ps == ps) && (cw.fs == fs) && (k == ek) && (zbr == ezbr)
      && ({cw.reg_w, cw.ram_w, cw.en_mem, cw.en_alu, cw.en_b, cw.en_pc, cw.sel_b, cw.pc_sel, cw.sl} == flags9)
      && (da < 0 || cw.da == 5'(da)) && (sa < 0 || cw.sa == 5'(sa)) && (sb < 0 || cw.sb == 5'(sb));
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cw=%p k=%h zbr=%b", what, cw, k, zbr);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  //                          regW ramW MEM ALU B PC selB PCsel SL
  localparam logic [8:0] F_ALU   = 9'b1_0_0_1_0_0_0_0_0;
  localparam logic [8:0] F_ALUS  = 9'b1_0_0_1_0_0_0_0_1;
  localparam logic [8:0] F_ALUI  = 9'b1_0_0_1_0_0_1_0_0;
  localparam logic [8:0] F_ALUIS = 9'b1_0_0_1_0_0_1_0_1;
  localparam logic [8:0] F_LD    = 9'b1_0_1_0_0_0_1_0_0;
  localparam logic [8:0] F_ST    = 9'b0_1_0_0_0_0_1_0_0;
  localparam logic [8:0] F_BR    = 9'b0_0_0_0_0_0_0_1_0;
  localparam logic [8:0] F_BL    = 9'b1_0_0_0_0_1_0_1_0;
  localparam logic [8:0] F_BRR   = 9'b0_0_0_0_0_0_0_0_0;

  function automatic logic ref_cond(input int c, input logic [3:0] f);
    logic z, n, cc, v, r;
    {v, cc, n, z} = f;
    case (c)
      0: r = z;          1: r = !z;
      2: r = cc;         3: r = !cc;
      4: r = n;          5: r = !n;
      6: r = v;          7: r = !v;
      8: r = cc && !z;   9: r = !(cc && !z);
      10: r = n == v;    11: r = n != v;
      12: r = !z && n == v; 13: r = !(!z && n == v);
      default: r = 1;
    endcase
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; flags = '0; instr = 0;
    #12 rst = 0;
    @(negedge clk);
    // Register-register
    instr = r_type(OPC_ADD, 3, 4, 5);  expect_cw("ADD",  2'b01, 3, 4, 5, 5'b01000, F_ALU, 0);
    instr = r_type(OPC_SUB, 6, 7, 8);  expect_cw("SUB",  2'b01, 6, 7, 8, 5'b01001, F_ALU, 0);
    instr = r_type(OPC_ADDS, 1, 2, 9); expect_cw("ADDS", 2'b01, 1, 2, 9, 5'b01000, F_ALUS, 0);
    instr = r_type(OPC_SUBS, 1, 2, 9); expect_cw("SUBS", 2'b01, 1, 2, 9, 5'b01001, F_ALUS, 0);
    instr = r_type(OPC_AND, 10, 11, 12); expect_cw("AND", 2'b01, 10, 11, 12, 5'b00000, F_ALU, 0);
    instr = r_type(OPC_ORR, 10, 11, 12); expect_cw("ORR", 2'b01, 10, 11, 12, 5'b00100, F_ALU, 0);
    instr = r_type(OPC_EOR, 10, 11, 12); expect_cw("EOR", 2'b01, 10, 11, 12, 5'b01100, F_ALU, 0);
    instr = r_type(OPC_ANDS, 10, 11, 12); expect_cw("ANDS", 2'b01, 10, 11, 12, 5'b00000, F_ALUS, 0);
    // Immediates
    instr = i_type(OPC_ADDI, 2, 3, 4095);  expect_cw("ADDI",  2'b01, 2, 3, -1, 5'b01000, F_ALUI, 4095);
    instr = i_type(OPC_SUBI, 2, 3, 17);    expect_cw("SUBI",  2'b01, 2, 3, -1, 5'b01001, F_ALUI, 17);
    instr = i_type(OPC_ADDIS, 2, 3, 1);    expect_cw("ADDIS", 2'b01, 2, 3, -1, 5'b01000, F_ALUIS, 1);
    instr = i_type(OPC_SUBIS, 2, 3, 2);    expect_cw("SUBIS", 2'b01, 2, 3, -1, 5'b01001, F_ALUIS, 2);
    instr = i_type(OPC_ANDI, 2, 3, 12'hF0F); expect_cw("ANDI", 2'b01, 2, 3, -1, 5'b00000, F_ALUI, 64'hF0F);
    instr = i_type(OPC_ORRI, 2, 3, 12'h800); expect_cw("ORRI", 2'b01, 2, 3, -1, 5'b00100, F_ALUI, 64'h800);
    instr = i_type(OPC_EORI, 2, 3, 5);       expect_cw("EORI", 2'b01, 2, 3, -1, 5'b01100, F_ALUI, 5);
    instr = i_type(OPC_ANDIS, 2, 3, 7);      expect_cw("ANDIS", 2'b01, 2, 3, -1, 5'b00000, F_ALUIS, 7);
    // Loads and stores
    instr = d_type(OPC_LDUR, 5, 6, 16);  expect_cw("LDUR", 2'b01, 5, 6, -1, 5'b01000, F_LD, 16);
    instr = d_type(OPC_LDUR, 5, 6, -8);  expect_cw("LDUR neg", 2'b01, 5, 6, -1, 5'b01000, F_LD, -64'd8);
    instr = d_type(OPC_STUR, 5, 6, 24);  expect_cw("STUR", 2'b01, -1, 6, 5, 5'b01000, F_ST, 24);
    // Branches (K = offset - 1 because PS=11 adds 4 + 4K)
    instr = b_type(OPC_B, 10);           expect_cw("B",  2'b11, -1, -1, -1, 5'b00000, F_BR, 9);
    instr = b_type(OPC_B, -3);           expect_cw("B back", 2'b11, -1, -1, -1, 5'b00000, F_BR, -64'd4);
    instr = b_type(OPC_BL, 5);           expect_cw("BL", 2'b11, 30, -1, -1, 5'b00000, F_BL, 4);
    instr = r_type(OPC_BR, 0, 30, 0);    expect_cw("BR", 2'b10, -1, 30, -1, 5'b00000, F_BRR, 0);
    instr = cb_type(OPC_CBZ, 7, 4);      expect_cw("CBZ", 2'b11, -1, 7, 7, 5'b00100, F_BR, 3, 2'b10);
    instr = cb_type(OPC_CBNZ, 7, -2);    expect_cw("CBNZ", 2'b11, -1, 7, 7, 5'b00100, F_BR, -64'd3, 2'b11);
    for (int c = 0; c < 16; c++) begin
      for (int f = 0; f < 16; f++) begin
        instr = cb_type(OPC_BCOND, c, 6);
        flags = status_t'(4'(f));
        expect_cw($sformatf("B.cond %0d flags %b", c, 4'(f)),
                  ref_cond(c, 4'(f)) ? 2'b11 : 2'b01, -1, -1, -1, 5'b00000, F_BR, 5);
      end
    end
    // Unknown opcode: no operation
    instr = 32'h0000_0000; expect_cw("NOP", 2'b01, -1, -1, -1, 5'b00000, 9'b0, 0);
    // MOVZ: two cycles
    instr = iw_type(OPC_MOVZ, 4, 16'hBEEF, 2);
    expect_cw("MOVZ 1", 2'b00, 4, -1, -1, 5'b11000, F_ALU, 0);
    tick();
    expect_cw("MOVZ 2", 2'b01, 4, 4, -1, 5'b00100, F_ALUI, 64'hBEEF_0000_0000);
    tick();
    // MOVK: two cycles
    instr = iw_type(OPC_MOVK, 9, 16'h1234, 1);
    expect_cw("MOVK 1", 2'b00, 9, 9, -1, 5'b00001, F_ALUI, 64'hFFFF_0000);
    tick();
    expect_cw("MOVK 2", 2'b01, 9, 9, -1, 5'b00100, F_ALUI, 64'h1234_0000);
    tick();
    // LSL #3: three cycles
    instr = r_type(OPC_LSL, 8, 2, 0, 3);
    expect_cw("LSL 1", 2'b00, 8, 2, -1, 5'b10100, F_ALU, 0);
    tick();
    expect_cw("LSL 2", 2'b00, 8, 8, -1, 5'b10100, F_ALU, 0);
    tick();
    expect_cw("LSL 3", 2'b01, 8, 8, -1, 5'b10100, F_ALU, 0);
    tick();
    instr = r_type(OPC_LSR, 8, 2, 0, 1);
    expect_cw("LSR #1", 2'b01, 8, 2, -1, 5'b10000, F_ALU, 0);
    instr = r_type(OPC_LSR, 8, 2, 0, 0);
    expect_cw("LSR #0", 2'b01, 8, 2, 2, 5'b00100, 9'b1_0_0_0_1_0_0_0_0, 0);
    instr = r_type(OPC_LSR, 8, 2, 0, 63);
    for (int i = 1; i <= 63; i++) begin
      expect_cw($sformatf("LSR #63 cycle %0d", i), (i == 63) ? 2'b01 : 2'b00, 8,
                (i == 1) ? 2 : 8, -1, 5'b10000, F_ALU, 0);
      tick();
    end
    instr = r_type(OPC_ADD, 3, 4, 5);
    expect_cw("ADD after LSR", 2'b01, 3, 4, 5, 5'b01000, F_ALU, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
