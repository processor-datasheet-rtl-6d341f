// datapath: register file, ALU, program counter, status register and the
// shared data bus, all steered by the 31-bit control word.
//
// Register A always feeds ALU input A. ALU input B is register B or the
// literal K (selB). The PC's jump input is register A or K (PCsel). One data
// bus carries the value written back to the register file; exactly one of four
// sources may drive it in a cycle: the data RAM (EN_MEM), the ALU (EN_ALU),
// register B (EN_B) or PC+4 (EN_PC). The bus is built as an AND-OR multiplexer
// rather than tri-state drivers, and an assertion flags two enabled sources.
// The data RAM sits outside this block: the ALU result addresses it and
// register B supplies its write data. With SL = 1 the status register keeps the
// ALU's Z/N/C/V at the rising edge for later conditional branches. The adder's
// carry input is 1 whenever either operand is inverted, so the subtract code
// forms A + ~B + 1.
//
// Timing: one instruction step per clock. Register reads, the ALU and the bus
// are combinational; the register file, PC and status register update on the
// rising edge; the RAM read data arrives from the falling edge inside the same
// cycle. Reset (asynchronous, active high) clears PC, registers and status.
//
// From the datasheet: the control-word fields and their meanings, the bus
// sources, the K literal, the ALU-to-RAM-address and register-B-to-RAM-data
// connections. This design's choices: the AND-OR bus, the carry-input rule and
// byte addressing of the RAM (ALU result bits [RAM_AW+2:3] select a 64-bit word).
module datapath
  import legv8_pkg::*;
#(
  parameter int unsigned RAM_AW = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  ctrl_word_t        cw,
  input  logic [XLEN-1:0]   k,
  input  logic [1:0]        zbr,        // compare-and-branch: {active, on nonzero}
  output logic [XLEN-1:0]   pc,         // to instruction memory
  output status_t           flags,      // status register
  // data RAM
  output logic [RAM_AW-1:0] ram_addr,
  output logic              ram_we,
  output logic [XLEN-1:0]   ram_wdata,
  input  logic [XLEN-1:0]   ram_rdata,
  // observation
  output logic [XLEN-1:0]   bus
);

  logic [XLEN-1:0] rd_a, rd_b, alu_b, alu_f, pc_in, pc4;
  status_t         alu_st;
  ps_e             ps;

  regfile u_regfile (
    .clk       (clk),
    .rst       (rst),
    .rd_addr_a (cw.sa),
    .rd_addr_b (cw.sb),
    .rd_data_a (rd_a),
    .rd_data_b (rd_b),
    .wr_en     (cw.reg_w),
    .wr_addr   (cw.da),
    .wr_data   (bus)
  );

  assign alu_b = cw.sel_b ? k : rd_b;

  alu u_alu (
    .a      (rd_a),
    .b      (alu_b),
    .fs     (cw.fs),
    .c0     (cw.fs[1] | cw.fs[0]),
    .f      (alu_f),
    .status (alu_st),
    .cout   ()
  );

  // CBZ / CBNZ: take the branch only when the zero flag matches
  assign ps = (zbr[1] && (alu_st.z == zbr[0])) ? PS_INC : cw.ps;

  assign pc_in = cw.pc_sel ? k : rd_a;

  program_counter u_pc (
    .clk    (clk),
    .rst    (rst),
    .ps     (ps),
    .pc_in  (pc_in),
    .pc_out (pc),
    .pc4    (pc4)
  );

  // Data bus: one source at a time
  assign bus = ({XLEN{cw.en_mem}} & ram_rdata)
             | ({XLEN{cw.en_alu}} & alu_f)
             | ({XLEN{cw.en_b}}   & rd_b)
             | ({XLEN{cw.en_pc}}  & pc4);

  // Status register
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        flags <= '0;
    else if (cw.sl) flags <= alu_st;
  end

  assign ram_addr  = alu_f[RAM_AW+2:3];
  assign ram_we    = cw.ram_w;
  assign ram_wdata = rd_b;

  a_one_bus_driver: assert property (@(posedge clk) disable iff (rst)
    $countones({cw.en_mem, cw.en_alu, cw.en_b, cw.en_pc}) <= 1)
    else $error("datapath: more than one data bus source enabled");

endmodule
