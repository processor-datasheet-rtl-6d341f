// cpu_tb: end-to-end test of the processor at its default sizes.
//
// The testbench assembles programs, loads them through the instruction-memory
// load port and runs them, while an instruction-level model of the instruction
// set, written here, executes the same program. For each instruction the model
// gives the next PC and the number of clocks it must take (1; 2 for MOVZ and
// MOVK; n for LSL/LSR #n with n > 1). Every clock the processor's PC is
// compared with the model: it must hold during the extra cycles of a
// multi-cycle instruction and move to the model's next PC on the last one. A
// program ends on a branch to itself; then all 32 registers and every data
// word the program stored are compared with the model.
//
// Program 0 is written by hand: a counted loop closed by B.NE, MOVZ/MOVK
// building a 64-bit constant, loads and stores, single and multi-cycle shifts,
// CBZ/CBNZ taken and not taken, BL/BR as a call and return, and flag-setting
// arithmetic followed by conditional branches. Programs 1..N are random mixes
// of every instruction with short forward branches. Each mechanism (every
// opcode, taken and untaken conditional branches, held-PC cycles of MOV and
// shifts, each flag being set, each of the four data-bus sources, status
// register loads and RAM writes) is counted and must occur at least once.
module cpu_tb;
  import legv8_pkg::*;
  import legv8_asm_pkg::*;

  localparam int NPROG = 6;

  logic        clk = 0, rst;
  logic        le;
  logic [7:0]  la;
  logic [31:0] ld;
  logic [63:0] pc, bus;
  logic [31:0] instr;
  status_t     flags;
  logic [1:0]  cu_state;

  cpu dut (.clk(clk), .rst(rst), .imem_load_en(le), .imem_load_addr(la), .imem_load_data(ld),
           .pc(pc), .instr(instr), .flags(flags), .cu_state(cu_state), .bus(bus));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Program and model state
  logic [31:0] prog [256];
  int          plen;
  logic [63:0] mr [32];
  logic [63:0] mm [256];
  logic        mvalid [256];
  logic [63:0] mpc;
  logic [3:0]  mf;   // {V,C,N,Z}

  // Coverage
  int    seen [string];
  int n_br_taken = 0, n_br_not = 0, n_hold = 0, n_flag_z = 0, n_flag_n = 0, n_flag_c = 0, n_flag_v = 0;
  int n_cycles = 0, n_instr = 0;
  int n_src [4] = '{0, 0, 0, 0};  // bus driven by RAM, ALU, register B, PC+4
  int n_sl = 0, n_ramw = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_cu.cw.en_mem) n_src[0]++;
      if (dut.u_cu.cw.en_alu) n_src[1]++;
      if (dut.u_cu.cw.en_b)   n_src[2]++;
      if (dut.u_cu.cw.en_pc)  n_src[3]++;
      if (dut.u_cu.cw.sl)     n_sl++;
      if (dut.u_cu.cw.ram_w)  n_ramw++;
    end
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] sx(input logic [63:0] v, input int bits);
    return 64'($signed(v << (64 - bits)) >>> (64 - bits));
  endfunction

  function automatic logic m_cond(input int c);
    logic z, n, cc, v, r;
    {v, cc, n, z} = mf;
    case (c >> 1)
      0: r = z;
      1: r = cc;
      2: r = n;
      3: r = v;
      4: r = cc && !z;
      5: r = n == v;
      6: r = !z && n == v;
      default: r = 1;
    endcase
    if (c[0] && c != 15) r = !r;
    return r;
  endfunction

  // Add/subtract with flags
  function automatic logic [67:0] m_add(input logic [63:0] a, input logic [63:0] b, input logic sub);
    logic [64:0] s;
    logic [63:0] bb;
    logic v;
    bb = sub ? ~b : b;
    s = 65'(a) + 65'(bb) + 65'(sub);
    v = (a[63] == bb[63]) && (s[63] != a[63]);
    return {v, s[64], s[63], s[63:0] == 0, s[63:0]};
  endfunction

  function automatic void count(input string n);
    if (!seen.exists(n)) seen[n] = 0;
    seen[n]++;
  endfunction

  // Execute one instruction in the model; returns the clocks it takes
  function automatic int m_step();
    logic [31:0] w;
    logic [10:0] op;
    int rd, rn, rm, sh, cyc;
    logic [63:0] a, b, r, imm, npc;
    logic [67:0] t;
    w = (mpc[63:10] == 0) ? prog[mpc[9:2]] : 32'd0;
    op = w[31:21];
    rd = int'(w[4:0]); rn = int'(w[9:5]); rm = int'(w[20:16]); sh = int'(w[15:10]);
    a = mr[rn]; b = mr[rm]; imm = 64'(w[21:10]);
    npc = mpc + 4;
    cyc = 1;
    if (op == OPC_ADD)       begin mr[rd] = a + b; count("ADD"); end
    else if (op == OPC_SUB)  begin mr[rd] = a - b; count("SUB"); end
    else if (op == OPC_ADDS) begin t = m_add(a, b, 0); mr[rd] = t[63:0]; mf = t[67:64]; count("ADDS"); end
    else if (op == OPC_SUBS) begin t = m_add(a, b, 1); mr[rd] = t[63:0]; mf = t[67:64]; count("SUBS"); end
    else if (op == OPC_AND)  begin mr[rd] = a & b; count("AND"); end
    else if (op == OPC_ORR)  begin mr[rd] = a | b; count("ORR"); end
    else if (op == OPC_EOR)  begin mr[rd] = a ^ b; count("EOR"); end
    else if (op == OPC_ANDS) begin r = a & b; mr[rd] = r; mf = {2'b00, r[63], r == 0}; count("ANDS"); end
    else if (op == OPC_LSL)  begin mr[rd] = a << sh; cyc = (sh > 1) ? sh : 1; count("LSL"); end
    else if (op == OPC_LSR)  begin mr[rd] = a >> sh; cyc = (sh > 1) ? sh : 1; count("LSR"); end
    else if (op[10:1] == OPC_ADDI)  begin mr[rd] = a + imm; count("ADDI"); end
    else if (op[10:1] == OPC_SUBI)  begin mr[rd] = a - imm; count("SUBI"); end
    else if (op[10:1] == OPC_ADDIS) begin t = m_add(a, imm, 0); mr[rd] = t[63:0]; mf = t[67:64]; count("ADDIS"); end
    else if (op[10:1] == OPC_SUBIS) begin t = m_add(a, imm, 1); mr[rd] = t[63:0]; mf = t[67:64]; count("SUBIS"); end
    else if (op[10:1] == OPC_ANDI)  begin mr[rd] = a & imm; count("ANDI"); end
    else if (op[10:1] == OPC_ORRI)  begin mr[rd] = a | imm; count("ORRI"); end
    else if (op[10:1] == OPC_EORI)  begin mr[rd] = a ^ imm; count("EORI"); end
    else if (op[10:1] == OPC_ANDIS) begin r = a & imm; mr[rd] = r; mf = {2'b00, r[63], r == 0}; count("ANDIS"); end
    else if (op[10:2] == OPC_MOVZ) begin
      mr[rd] = 64'(w[20:5]) << (16 * int'(w[22:21])); cyc = 2; count("MOVZ");
    end
    else if (op[10:2] == OPC_MOVK) begin
      r = 64'hFFFF << (16 * int'(w[22:21]));
      mr[rd] = (mr[rd] & ~r) | (64'(w[20:5]) << (16 * int'(w[22:21]))); cyc = 2; count("MOVK");
    end
    else if (op == OPC_LDUR || op == OPC_STUR) begin
      int idx;
      r = a + sx(64'(w[20:12]), 9);
      idx = int'(r[10:3]);
      if (op == OPC_STUR) begin mm[idx] = mr[rd]; mvalid[idx] = 1; count("STUR"); end
      else begin
        if (!mvalid[idx]) begin failures++; $display("FAIL test program loads unwritten word %0d", idx); end
        mr[rd] = mm[idx]; count("LDUR");
      end
    end
    else if (op == OPC_BR) begin npc = a; count("BR"); end
    else if (op[10:5] == OPC_B)  begin npc = mpc + 4 * sx(64'(w[25:0]), 26); count("B"); end
    else if (op[10:5] == OPC_BL) begin mr[30] = mpc + 4; npc = mpc + 4 * sx(64'(w[25:0]), 26); count("BL"); end
    else if (op[10:3] == OPC_CBZ || op[10:3] == OPC_CBNZ || op[10:3] == OPC_BCOND) begin
      logic take;
      if (op[10:3] == OPC_CBZ) begin take = (mr[rd] == 0); count("CBZ"); end
      else if (op[10:3] == OPC_CBNZ) begin take = (mr[rd] != 0); count("CBNZ"); end
      else begin take = m_cond(rd & 15); count("B.cond"); end
      if (take) begin npc = mpc + 4 * sx(64'(w[23:5]), 19); n_br_taken++; end
      else n_br_not++;
    end
    if (cyc > 1) n_hold++;
    if (mf[0]) n_flag_z++;
    if (mf[1]) n_flag_n++;
    if (mf[2]) n_flag_c++;
    if (mf[3]) n_flag_v++;
    mpc = npc;
    return cyc;
  endfunction

  function automatic void emit(input logic [31:0] w);
    prog[plen] = w;
    plen++;
  endfunction

  // Hand-written program
  task automatic build_fixed();
    plen = 0;
    emit(iw_type(OPC_MOVZ, 1, 16'h1234, 0));        // X1 = 0x1234
    emit(iw_type(OPC_MOVK, 1, 16'hABCD, 1));        // X1 = 0xABCD1234
    emit(iw_type(OPC_MOVK, 1, 16'h8001, 3));        // X1 = 0x8001_0000_ABCD_1234
    emit(iw_type(OPC_MOVZ, 2, 5, 0));               // X2 = 5 (loop count)
    emit(iw_type(OPC_MOVZ, 4, 0, 0));               // X4 = 0 (sum)
    emit(iw_type(OPC_MOVZ, 5, 16'h0100, 0));        // X5 = 0x100 (data base)
    emit(r_type(OPC_ADD, 4, 4, 2));                 // loop: X4 += X2
    emit(i_type(OPC_SUBIS, 2, 2, 1));               //   X2 -= 1, set flags
    emit(cb_type(OPC_BCOND, 1, -2));                //   B.NE loop
    emit(d_type(OPC_STUR, 4, 5, 8));                // mem[X5+8] = X4 (15)
    emit(d_type(OPC_STUR, 1, 5, -16));              // mem[X5-16] = X1
    emit(d_type(OPC_LDUR, 6, 5, 8));                // X6 = 15
    emit(d_type(OPC_LDUR, 7, 5, -16));              // X7 = X1
    emit(r_type(OPC_LSL, 8, 1, 0, 4));              // X8 = X1 << 4 (4 cycles)
    emit(r_type(OPC_LSR, 9, 1, 0, 63));             // X9 = X1 >> 63 (63 cycles)
    emit(r_type(OPC_LSR, 10, 1, 0, 1));             // X10 = X1 >> 1
    emit(r_type(OPC_LSL, 11, 1, 0, 0));             // X11 = X1
    emit(cb_type(OPC_CBZ, 12, 2));                  // X12 == 0: skip next
    emit(i_type(OPC_ADDI, 13, 13, 99));             //   (skipped)
    emit(cb_type(OPC_CBNZ, 12, 2));                 // not taken
    emit(cb_type(OPC_CBZ, 6, 2));                   // not taken
    emit(cb_type(OPC_CBNZ, 6, 2));                  // taken
    emit(i_type(OPC_ADDI, 13, 13, 77));             //   (skipped)
    emit(b_type(OPC_BL, 6));                        // call func (6 ahead)
    emit(r_type(OPC_SUB, 15, 14, 6));               // after return: X15 = X14 - X6
    emit(r_type(OPC_ADDS, 16, 1, 1));               // X1 + X1: carry and overflow
    emit(cb_type(OPC_BCOND, 6, 2));                 // B.VS +2: taken
    emit(i_type(OPC_ADDI, 17, 17, 1));              //   (skipped)
    emit(b_type(OPC_B, 7));                         // jump over func to tail
    emit(i_type(OPC_ADDI, 14, 6, 100));             // func: X14 = X6 + 100
    emit(r_type(OPC_ORR, 18, 1, 6));
    emit(r_type(OPC_EOR, 19, 1, 8));
    emit(r_type(OPC_AND, 20, 1, 8));
    emit(r_type(OPC_BR, 0, 30, 0));                 // return
    emit(32'h0);                                    // never reached
    emit(r_type(OPC_SUBS, 21, 6, 4));               // tail: 15 - 15 = 0, Z set
    emit(cb_type(OPC_BCOND, 0, 2));                 // B.EQ taken
    emit(i_type(OPC_ADDI, 22, 22, 1));              //   (skipped)
    emit(r_type(OPC_SUBS, 23, 6, 14));              // 15 - 115 < 0
    emit(cb_type(OPC_BCOND, 11, 2));                // B.LT taken
    emit(i_type(OPC_ADDI, 22, 22, 2));              //   (skipped)
    emit(cb_type(OPC_BCOND, 12, 2));                // B.GT not taken
    emit(i_type(OPC_ANDIS, 24, 1, 12'hFFF));
    emit(i_type(OPC_ORRI, 25, 24, 12'h800));
    emit(i_type(OPC_EORI, 26, 25, 12'h0F0));
    emit(i_type(OPC_ANDI, 27, 26, 12'h0FF));
    emit(i_type(OPC_ADDIS, 28, 27, 12'hFFF));
    emit(r_type(OPC_ANDS, 29, 1, 1));               // N set
    emit(b_type(OPC_B, 0));                         // halt
  endtask

  // Random program: pre-store 32 words at X5 = 0x100, then a random mix
  task automatic build_random(input int n);
    plen = 0;
    emit(iw_type(OPC_MOVZ, 5, 16'h0100, 0));
    for (int j = 0; j < 32; j++) emit(d_type(OPC_STUR, j == 5 ? 0 : j, 5, 8 * j - 128));
    for (int i = 0; i < n; i++) begin
      int rd, rn, rm, kind;
      rd = $urandom % 32; if (rd == 5) rd = 6;   // X5 stays the base address
      rn = $urandom % 32; rm = $urandom % 32;
      kind = $urandom % 30;
      case (kind)
        0: emit(r_type(OPC_ADD, rd, rn, rm));
        1: emit(r_type(OPC_SUB, rd, rn, rm));
        2: emit(r_type(OPC_ADDS, rd, rn, rm));
        3: emit(r_type(OPC_SUBS, rd, rn, rm));
        4: emit(r_type(OPC_AND, rd, rn, rm));
        5: emit(r_type(OPC_ORR, rd, rn, rm));
        6: emit(r_type(OPC_EOR, rd, rn, rm));
        7: emit(r_type(OPC_ANDS, rd, rn, rm));
        8: emit(r_type(OPC_LSL, rd, rn, 0, $urandom % 12));
        9: emit(r_type(OPC_LSR, rd, rn, 0, $urandom % 12));
        10: emit(i_type(OPC_ADDI, rd, rn, $urandom));
        11: emit(i_type(OPC_SUBI, rd, rn, $urandom));
        12: emit(i_type(OPC_ADDIS, rd, rn, $urandom));
        13: emit(i_type(OPC_SUBIS, rd, rn, $urandom));
        14: emit(i_type(OPC_ANDI, rd, rn, $urandom));
        15: emit(i_type(OPC_ORRI, rd, rn, $urandom));
        16: emit(i_type(OPC_EORI, rd, rn, $urandom));
        17: emit(i_type(OPC_ANDIS, rd, rn, $urandom));
        18, 19: emit(iw_type(OPC_MOVZ, rd, $urandom, $urandom % 4));
        20, 21: emit(iw_type(OPC_MOVK, rd, $urandom, $urandom % 4));
        22, 23: emit(d_type(OPC_LDUR, rd, 5, 8 * int'($urandom % 32) - 128));
        24: emit(d_type(OPC_STUR, rm, 5, 8 * int'($urandom % 32) - 128));
        25: emit(cb_type(OPC_CBZ, rm, 1 + $urandom % 3));
        26: emit(cb_type(OPC_CBNZ, rm, 1 + $urandom % 3));
        27, 28: emit(cb_type(OPC_BCOND, $urandom % 16, 1 + $urandom % 3));
        default: emit(b_type(($urandom % 2) ? OPC_BL : OPC_B, 1 + $urandom % 3));
      endcase
    end
    emit(32'h0); emit(32'h0); emit(32'h0);         // landing area for the last branches
    emit(b_type(OPC_B, 0));                         // halt
  endtask

  // Load, reset, run against the model
  task automatic run_program(input string name);
    int cyc, step_count;
    logic halted;
    rst = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      le = 1; la = 8'(i); ld = (i < plen) ? prog[i] : 32'h0;
    end
    @(negedge clk);
    le = 0;
    for (int i = 0; i < 32; i++) mr[i] = 0;
    for (int i = 0; i < 256; i++) mvalid[i] = 0;
    mpc = 0; mf = 0;
    rst = 0;
    halted = 0;
    step_count = 0;
    while (!halted && step_count < 4000) begin
      logic [63:0] start_pc;
      start_pc = mpc;
      halted = (prog[mpc[9:2]] == b_type(OPC_B, 0));
      cyc = m_step();
      step_count++;
      n_instr++;
      for (int c = 1; c <= cyc; c++) begin
        @(posedge clk); #1;
        n_cycles++;
        chk($sformatf("%s PC after cycle %0d of instruction at %h", name, c, start_pc),
            pc, (c == cyc) ? mpc : start_pc);
      end
    end
    chk({name, " halted"}, 64'(halted), 1);
    for (int i = 0; i < 32; i++) chk($sformatf("%s X%0d", name, i), dut.u_dp.u_regfile.regs[i], mr[i]);
    for (int i = 0; i < 255; i++)
      if (mvalid[i]) chk($sformatf("%s mem[%0d]", name, i), dut.u_ram.mem[i], mm[i]);
    chk({name, " flags"}, 64'(flags), 64'(mf));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; le = 0; la = 0; ld = 0;
    build_fixed();
    run_program("fixed");
    // results a reader can verify by hand
    chk("loop sum X4", dut.u_dp.u_regfile.regs[4], 15);
    chk("MOVZ/MOVK X1", dut.u_dp.u_regfile.regs[1], 64'h8001_0000_ABCD_1234);
    chk("LDUR X7", dut.u_dp.u_regfile.regs[7], 64'h8001_0000_ABCD_1234);
    chk("LSR #63 X9", dut.u_dp.u_regfile.regs[9], 1);
    chk("call X15", dut.u_dp.u_regfile.regs[15], 100);
    chk("skips X13 X17 X22", dut.u_dp.u_regfile.regs[13] | dut.u_dp.u_regfile.regs[17] |
        dut.u_dp.u_regfile.regs[22], 0);
    for (int p = 1; p < NPROG; p++) begin
      build_random(200);
      run_program($sformatf("random%0d", p));
    end
    // Every mechanism must have happened
    begin
      string ops [$] = '{"ADD", "SUB", "ADDS", "SUBS", "AND", "ORR", "EOR", "ANDS", "LSL", "LSR",
                         "ADDI", "SUBI", "ADDIS", "SUBIS", "ANDI", "ORRI", "EORI", "ANDIS",
                         "MOVZ", "MOVK", "LDUR", "STUR", "B", "BL", "BR", "CBZ", "CBNZ", "B.cond"};
      foreach (ops[i]) begin
        checks++;
        if (!seen.exists(ops[i])) begin failures++; $display("FAIL never executed %s", ops[i]); end
      end
    end
    checks++;
    if (n_br_taken == 0 || n_br_not == 0 || n_hold == 0 || n_flag_z == 0 || n_flag_n == 0 ||
        n_flag_c == 0 || n_flag_v == 0 || n_src[0] == 0 || n_src[1] == 0 || n_src[2] == 0 ||
        n_src[3] == 0 || n_sl == 0 || n_ramw == 0) begin
      failures++;
      $display("FAIL mechanism never happened");
    end
    $display("mechanisms: instructions=%0d cycles=%0d branches taken=%0d not taken=%0d multi-cycle=%0d",
             n_instr, n_cycles, n_br_taken, n_br_not, n_hold);
    $display("            bus sources RAM=%0d ALU=%0d regB=%0d PC+4=%0d, status loads=%0d, RAM writes=%0d",
             n_src[0], n_src[1], n_src[2], n_src[3], n_sl, n_ramw);
    $display("            flags seen set Z=%0d N=%0d C=%0d V=%0d", n_flag_z, n_flag_n, n_flag_c, n_flag_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
