// cpu: the complete processor, a single-cycle 64-bit machine for a LEGv8
// instruction subset (arithmetic, logic, shifts, immediates, MOVZ/MOVK,
// loads/stores, branches).
//
// The program counter addresses the instruction memory; the control unit
// decodes the instruction into a control word and a literal K; the datapath
// executes it against the register file, the ALU and the 255-word data RAM.
// Most instructions take one clock. MOVZ and MOVK take two, LSL/LSR #n take
// n cycles (one for n = 0); during the extra cycles the PC holds.
//
// Interface: imem_load_* writes the program into instruction memory (word
// index, hold rst high while loading). The remaining outputs expose the PC, the
// instruction, the status register, the control-unit state and the data bus.
// Timing: rising-edge clocked, asynchronous active-high reset; the data RAM
// delivers read data on the falling edge.
//
// The block structure (PC, instruction memory, register file, ALU, data
// memory, control unit) follows the datasheet; the size of the instruction
// memory and its load port are this design's choices.
module cpu
  import legv8_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned IMEM_AW    = $clog2(IMEM_DEPTH),
  parameter int unsigned RAM_DEPTH  = 255,
  parameter int unsigned RAM_AW     = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_load_en,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [ILEN-1:0]    imem_load_data,
  output logic [XLEN-1:0]    pc,
  output logic [ILEN-1:0]    instr,
  output status_t            flags,
  output logic [1:0]         cu_state,
  output logic [XLEN-1:0]    bus
);

  ctrl_word_t        cw;
  logic [XLEN-1:0]   k, ram_wdata, ram_rdata;
  logic [RAM_AW-1:0] ram_addr;
  logic              ram_we;
  logic [1:0]        zbr;

  instr_mem #(.DEPTH(IMEM_DEPTH), .AW(IMEM_AW)) u_imem (
    .clk       (clk),
    .pc        (pc),
    .instr     (instr),
    .load_en   (imem_load_en),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  control_unit u_cu (
    .clk      (clk),
    .rst      (rst),
    .instr    (instr),
    .flags    (flags),
    .cw       (cw),
    .k        (k),
    .zbr      (zbr),
    .state    (cu_state)
  );

  datapath #(.RAM_AW(RAM_AW)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .cw        (cw),
    .k         (k),
    .zbr       (zbr),
    .pc        (pc),
    .flags     (flags),
    .ram_addr  (ram_addr),
    .ram_we    (ram_we),
    .ram_wdata (ram_wdata),
    .ram_rdata (ram_rdata),
    .bus       (bus)
  );

  data_ram #(.DEPTH(RAM_DEPTH), .AW(RAM_AW)) u_ram (
    .clk     (clk),
    .rst     (rst),
    .addr    (ram_addr),
    .we      (ram_we),
    .wr_data (ram_wdata),
    .rd_data (ram_rdata)
  );

endmodule
