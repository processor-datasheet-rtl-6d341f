// alu_tb: self-checking test of the 64-bit ALU.
//
// Runs the worked examples of the ALU description (A=1101, B=0110 for ADD and
// XOR; A=1101, B=1 for OR), the derived arithmetic and logic forms (A+1, A-1,
// -A, A, ~A, A-B), corner cases for carry and overflow, and then random
// operands for every function select, inverter setting and carry input. The
// expected result and status are computed here from the definitions, not from
// the design.
module alu_tb;
  import legv8_pkg::*;

  logic [63:0] a, b, f;
  logic [4:0]  fs;
  logic        c0, cout;
  status_t     st;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .fs(fs), .c0(c0), .f(f), .status(st), .cout(cout));

  function automatic logic [67:0] model(input logic [63:0] x, input logic [63:0] y,
                                        input logic [4:0] s, input logic ci);
    logic [63:0] xa, yb, r;
    logic [64:0] wide;
    logic z, n, c, v;
    xa = s[1] ? ~x : x;
    yb = s[0] ? ~y : y;
    wide = {1'b0, xa} + {1'b0, yb} + 65'(ci);
    c = 1'b0; v = 1'b0;
    case (s[4:2])
      3'd0: r = xa & yb;
      3'd1: r = xa | yb;
      3'd2: begin
        r = wide[63:0];
        c = wide[64];
        v = ($signed(xa) >= 0 && $signed(yb) >= 0 && $signed(r) < 0) ||
            ($signed(xa) < 0 && $signed(yb) < 0 && $signed(r) >= 0);
      end
      3'd3: r = xa ^ yb;
      3'd4: r = xa >> 1;
      3'd5: r = xa << 1;
      3'd6: r = 64'd0;
      default: r = 64'h0000_0000_0000_FFFF;
    endcase
    z = (r == 0);
    n = r[63];
    return {v, c, n, z, r};
  endfunction

  task automatic check(input string what);
    logic [67:0] exp;
    #1;
    exp = model(a, b, fs, c0);
    checks++;
    if ({st, f} !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h fs=%b c0=%b f=%h st=%b exp f=%h st=%b",
               what, a, b, fs, c0, f, st, exp[63:0], exp[67:64]);
    end
  endtask

  task automatic expect_f(input string what, input logic [63:0] ef, input logic [3:0] est);
    #1;
    checks++;
    if (f !== ef || st !== est) begin
      failures++;
      $display("FAIL %s: f=%h st=%b expected f=%h st=%b", what, f, st, ef, est);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked examples
    a = 64'b1101; b = 64'b0110; fs = 5'b01000; c0 = 0; expect_f("A+B", 64'b10011, 4'b0000);
    fs = 5'b01100; expect_f("A^B", 64'b1011, 4'b0000);
    b = 64'b1; fs = 5'b00100; c0 = 1; expect_f("A|B", 64'b1101, 4'b0000);
    // Derived forms
    a = 64'd100; b = 64'd0;
    fs = 5'b01000; c0 = 1; expect_f("A+1", 64'd101, 4'b0000);
    fs = 5'b01001; c0 = 0; expect_f("A-1", 64'd99, 4'b0100);
    fs = 5'b01010; c0 = 1; expect_f("-A", -64'd100, 4'b0010);
    fs = 5'b00001; c0 = 0; expect_f("A", 64'd100, 4'b0000);
    fs = 5'b00110; c0 = 0; expect_f("~A", ~64'd100, 4'b0010);
    b = 64'd100; fs = 5'b01001; c0 = 1; expect_f("A-B zero", 64'd0, 4'b0101);
    fs = 5'b11000; expect_f("zero", 64'd0, 4'b0001);
    fs = 5'b11100; expect_f("ones", 64'hFFFF, 4'b0000);
    a = 64'h8000_0000_0000_0001; fs = 5'b10000; expect_f("A>>1", 64'h4000_0000_0000_0000, 4'b0000);
    fs = 5'b10100; expect_f("A<<1", 64'h2, 4'b0000);
    // Overflow corners
    a = 64'h7FFF_FFFF_FFFF_FFFF; b = 64'd1; fs = 5'b01000; c0 = 0;
    expect_f("signed ovf", 64'h8000_0000_0000_0000, 4'b1010);
    a = 64'hFFFF_FFFF_FFFF_FFFF; b = 64'd1; expect_f("carry", 64'd0, 4'b0101);
    a = 64'h8000_0000_0000_0000; b = 64'd1; fs = 5'b01001; c0 = 1;
    expect_f("sub ovf", 64'h7FFF_FFFF_FFFF_FFFF, 4'b1100);
    // Random sweep over all selects
    for (int i = 0; i < 4000; i++) begin
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      if (i % 7 == 0) b = ~a;
      if (i % 11 == 0) a = 64'(1) << ($urandom % 64);
      fs = 5'($urandom);
      c0 = 1'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
