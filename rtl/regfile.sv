// regfile: 32 x 64-bit register file with two read ports and one write port.
//
// A write decoder enables one row of flip-flops; two multiplexers pick the
// rows read on ports A and B. Reads are combinational: rd_data_a/b follow
// rd_addr_a/b in the same cycle. A write takes effect at the rising clock edge
// when wr_en is high, so a read of the register being written returns the old
// value until that edge. Reset (asynchronous, active high) clears every
// register to zero.
//
// The size, the port set and the decoder/flip-flop/multiplexer organisation
// follow the datasheet; the reset and the read-during-write behaviour are
// this design's choices. All 32 registers are ordinary storage: register 31 is
// not wired to zero.
module regfile
  import legv8_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned N     = NREGS,
  parameter int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] rd_addr_a,
  input  logic [AW-1:0] rd_addr_b,
  output logic [W-1:0]  rd_data_a,
  output logic [W-1:0]  rd_data_b,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign rd_data_a = regs[rd_addr_a];
  assign rd_data_b = regs[rd_addr_b];

endmodule
