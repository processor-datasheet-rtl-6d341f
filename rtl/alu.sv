// alu: 64-bit arithmetic logic unit of the processor.
//
// Each operand passes through an optional inverter (FS[1] inverts A, FS[0]
// inverts B), then FS[2+:3] picks one of eight results: AND, OR, ADD, XOR,
// shift right by one, shift left by one, the constant 0 and the constant
// 16'hFFFF. The inverters plus the carry input give the arithmetic forms:
// A-B is FS=01001 with c0=1, A+1 is ADD of B=0 with c0=1, -A is ADD of an
// inverted A with B=0 and c0=1. Shifts act on the (possibly inverted) A and
// shift in a zero.
//
// Status (bit 0 Z, bit 1 N, bit 2 C, bit 3 V): Z and N describe every result;
// C (unsigned carry out) and V (signed overflow) come from the adder and are
// 0 for the other operations.
//
// Purely combinational. The operation codes, the inverter bits, the status
// layout and the inverter/mux structure follow the datasheet. The 16-bit
// all-ones constant is read literally from its function table (the upper
// 48 bits are 0); the explicit carry input and zero C/V for non-adder results
// are this design's choices.
module alu
  import legv8_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   fs,      // [4:2] operation, [1] invert A, [0] invert B
  input  logic         c0,      // carry into the adder
  output logic [W-1:0] f,
  output status_t      status,
  output logic         cout     // carry out of the adder
);

  logic [W-1:0] aa, bb, sum;
  logic         carry;
  alu_op_e      op;

  assign aa = fs[1] ? ~a : a;
  assign bb = fs[0] ? ~b : b;
  assign op = alu_op_e'(fs[4:2]);
  assign {carry, sum} = {1'b0, aa} + {1'b0, bb} + {{W{1'b0}}, c0};

  always_comb begin
    unique case (op)
      OP_AND:  f = aa & bb;
      OP_OR:   f = aa | bb;
      OP_ADD:  f = sum;
      OP_XOR:  f = aa ^ bb;
      OP_SHR:  f = {1'b0, aa[W-1:1]};
      OP_SHL:  f = {aa[W-2:0], 1'b0};
      OP_ZERO: f = '0;
      default: f = W'(16'hFFFF);
    endcase
  end

  assign cout     = carry;
  assign status.z = (f == '0);
  assign status.n = f[W-1];
  assign status.c = (op == OP_ADD) ? carry : 1'b0;
  assign status.v = (op == OP_ADD) ? ((aa[W-1] == bb[W-1]) && (sum[W-1] != aa[W-1])) : 1'b0;

endmodule
