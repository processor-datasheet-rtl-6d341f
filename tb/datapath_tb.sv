// datapath_tb: self-checking test of the datapath with the data RAM attached.
//
// The testbench plays the control unit: it applies random but legal control
// words (at most one data-bus source) and random literals K, and keeps its own
// model of the 32 registers, the PC, the status register and the RAM. Every
// cycle it compares the data bus, the PC and the status register with the
// model. Registers are first loaded with random values in two steps (clear,
// then OR in K). RAM loads only read words that were stored before. The
// compare-and-branch request is exercised with both zero and nonzero operands.
// Each control-word field is counted and must have been used.
module datapath_tb;
  import legv8_pkg::*;

  logic        clk = 0, rst;
  ctrl_word_t  cw;
  logic [63:0] k, pc, bus, ram_wdata, ram_rdata;
  logic [1:0]  zbr;
  status_t     flags;
  logic [7:0]  ram_addr;
  logic        ram_we;

  logic [63:0] m_regs [32];
  logic [63:0] m_mem [256];
  logic        m_valid [256];
  logic [63:0] m_pc;
  logic [3:0]  m_flags;
  int checks = 0, failures = 0;
  int n_mem = 0, n_alu = 0, n_b = 0, n_pc = 0, n_st = 0, n_sl = 0, n_zbr_t = 0, n_zbr_n = 0;
  int n_ps [4] = '{0, 0, 0, 0};

  datapath dut (.clk(clk), .rst(rst), .cw(cw), .k(k), .zbr(zbr), .pc(pc), .flags(flags),
                .ram_addr(ram_addr), .ram_we(ram_we), .ram_wdata(ram_wdata),
                .ram_rdata(ram_rdata), .bus(bus));
  data_ram ram (.clk(clk), .rst(rst), .addr(ram_addr), .we(ram_we), .wr_data(ram_wdata),
                .rd_data(ram_rdata));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (cw=%p k=%h)", what, got, exp, cw, k);
    end
  endtask

  // Reference ALU: result and {V,C,N,Z}
  function automatic logic [67:0] ref_alu(input logic [63:0] a, input logic [63:0] b,
                                          input logic [4:0] fs);
    logic [63:0] x, y, r;
    logic [64:0] s;
    logic c, v;
    x = fs[1] ? ~a : a;
    y = fs[0] ? ~b : b;
    s = 65'(x) + 65'(y) + 65'(fs[1] | fs[0]);
    c = 0; v = 0;
    case (fs[4:2])
      0: r = x & y;
      1: r = x | y;
      2: begin r = s[63:0]; c = s[64]; v = (x[63] == y[63]) && (r[63] != x[63]); end
      3: r = x ^ y;
      4: r = x >> 1;
      5: r = x << 1;
      6: r = 0;
      default: r = 64'hFFFF;
    endcase
    return {v, c, r[63], r == 0, r};
  endfunction

  // Apply cw/k for one cycle, check against the model, then advance the model
  task automatic run_cycle();
    logic [63:0] a, b, alub, f, exp_bus, pcin;
    logic [3:0]  st;
    logic [67:0] res;
    int          idx;
    logic [1:0]  ps;
    a    = m_regs[cw.sa];
    b    = m_regs[cw.sb];
    alub = cw.sel_b ? k : b;
    res  = ref_alu(a, alub, cw.fs);
    f    = res[63:0];
    st   = res[67:64];
    idx  = int'(f[10:3]);
    if (cw.en_mem && (idx == 255 || !m_valid[idx])) cw.en_mem = 0;
    exp_bus = cw.en_mem ? m_mem[idx] : cw.en_alu ? f : cw.en_b ? b : cw.en_pc ? m_pc + 4 : 64'd0;
    @(negedge clk); #1;
    chk("bus", bus, exp_bus);
    chk("pc", pc, m_pc);
    chk("flags", 64'(flags), 64'(m_flags));
    @(posedge clk); #1;
    // model update
    ps = cw.ps;
    if (zbr[1] && (st[0] == zbr[0])) ps = 2'b01;
    if (zbr[1]) begin
      if (ps == 2'b11) n_zbr_t++; else n_zbr_n++;
    end
    pcin = cw.pc_sel ? k : a;
    case (ps)
      2'b00: ;
      2'b01: m_pc = m_pc + 4;
      2'b10: m_pc = pcin;
      default: m_pc = m_pc + 4 + (pcin << 2);
    endcase
    n_ps[ps]++;
    if (cw.reg_w) m_regs[cw.da] = exp_bus;
    if (cw.ram_w && idx != 255) begin m_mem[idx] = b; m_valid[idx] = 1; n_st++; end
    if (cw.sl) begin m_flags = st; n_sl++; end
    if (cw.en_mem) n_mem++;
    if (cw.en_alu) n_alu++;
    if (cw.en_b) n_b++;
    if (cw.en_pc) n_pc++;
  endtask

  task automatic nop_cw();
    cw = '{ps: PS_HOLD, default: '0};
    k = 0; zbr = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; nop_cw();
    for (int i = 0; i < 32; i++) m_regs[i] = 0;
    for (int i = 0; i < 256; i++) m_valid[i] = 0;
    m_pc = 0; m_flags = 0;
    #12 rst = 0;
    // Load every register: clear, then OR in K
    for (int r = 0; r < 32; r++) begin
      nop_cw(); cw.fs = FS_ZERO; cw.da = 5'(r); cw.reg_w = 1; cw.en_alu = 1;
      run_cycle();
      nop_cw(); cw.fs = FS_OR; cw.da = 5'(r); cw.sa = 5'(r); cw.sel_b = 1; cw.reg_w = 1;
      cw.en_alu = 1; k = {$urandom, $urandom};
      run_cycle();
    end
    // Random legal control words
    for (int i = 0; i < 3000; i++) begin
      int src;
      cw = ctrl_word_t'({$urandom});
      src = $urandom % 5;
      cw.en_mem = (src == 0); cw.en_alu = (src == 1); cw.en_b = (src == 2); cw.en_pc = (src == 3);
      case ($urandom % 4)
        0: k = {$urandom, $urandom};
        1: k = 64'($urandom % 64);
        2: k = -64'($urandom % 64);
        default: k = 64'($urandom % 2048);
      endcase
      if (cw.ram_w || cw.en_mem) cw.fs = FS_ADD;
      if (cw.ps == PS_LOAD) cw.pc_sel = 1'b1;       // keep the PC in a readable range
      if (cw.ps == PS_LOAD) k = 64'($urandom % 4096) << 2;
      zbr = 2'b00;
      if (i % 10 == 0) begin
        zbr = {1'b1, 1'($urandom)};
        cw.ps = PS_OFFSET; cw.fs = FS_OR; cw.sb = cw.sa; cw.pc_sel = 1;
        k = 64'($urandom % 16);
        if ($urandom % 2 == 0) begin  // make the tested register zero first
          logic [4:0] r;
          r = cw.sa;
          nop_cw(); cw.fs = FS_ZERO; cw.da = r; cw.reg_w = 1; cw.en_alu = 1;
          run_cycle();
          cw = '{ps: PS_OFFSET, sa: r, sb: r, fs: FS_OR, pc_sel: 1, default: '0};
          zbr = {1'b1, 1'($urandom)};
          k = 64'($urandom % 16);
        end
      end
      run_cycle();
    end
    checks++;
    if (n_mem == 0 || n_alu == 0 || n_b == 0 || n_pc == 0 || n_st == 0 || n_sl == 0 ||
        n_zbr_t == 0 || n_zbr_n == 0 || n_ps[0] == 0 || n_ps[1] == 0 || n_ps[2] == 0 || n_ps[3] == 0) begin
      failures++;
      $display("FAIL coverage mem=%0d alu=%0d b=%0d pc=%0d st=%0d sl=%0d zbr=%0d/%0d", n_mem, n_alu,
               n_b, n_pc, n_st, n_sl, n_zbr_t, n_zbr_n);
    end
    $display("coverage: mem=%0d alu=%0d b=%0d pc=%0d stores=%0d sl=%0d cbz taken=%0d not=%0d",
             n_mem, n_alu, n_b, n_pc, n_st, n_sl, n_zbr_t, n_zbr_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
