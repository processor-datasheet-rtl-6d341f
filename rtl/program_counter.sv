// program_counter: 64-bit program counter.
//
// The two PS bits choose the next value at each rising clock edge:
//   00 hold           PC <- PC
//   01 increment      PC <- PC + 4
//   10 load           PC <- pc_in
//   11 offset         PC <- PC + 4 + pc_in*4
// pc_out addresses instruction memory; pc4 (PC + 4) is the return address a
// branch-with-link writes through the data bus. Reset (asynchronous, active
// high) clears the PC so execution restarts at the first instruction.
//
// The four modes, the +4 step and the two outputs follow the datasheet; the
// asynchronous reset style is this design's choice.
module program_counter
  import legv8_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic         clk,
  input  logic         rst,
  input  ps_e          ps,
  input  logic [W-1:0] pc_in,
  output logic [W-1:0] pc_out,
  output logic [W-1:0] pc4
);

  logic [W-1:0] pc_next;

  assign pc4 = pc_out + W'(4);

  always_comb begin
    unique case (ps)
      PS_HOLD:   pc_next = pc_out;
      PS_INC:    pc_next = pc4;
      PS_LOAD:   pc_next = pc_in;
      default:   pc_next = pc4 + {pc_in[W-3:0], 2'b00};
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pc_out <= '0;
    else     pc_out <= pc_next;
  end

endmodule
