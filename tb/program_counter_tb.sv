// program_counter_tb: self-checking test of the program counter.
//
// Checks that reset clears the PC, that PS=01 counts by 4 every clock (one
// step per cycle), that PS=00 holds, PS=10 loads pc_in and PS=11 adds
// 4 + pc_in*4 (with negative offsets too), and that pc4 is always PC + 4.
// Random PS/pc_in sequences are checked against a model in the testbench.
module program_counter_tb;
  import legv8_pkg::*;

  logic        clk = 0, rst;
  ps_e         ps;
  logic [63:0] pin, pout, pc4, model;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .ps(ps), .pc_in(pin), .pc_out(pout), .pc4(pc4));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step(input ps_e p, input logic [63:0] v);
    @(negedge clk);
    ps = p; pin = v;
    case (p)
      PS_HOLD:   model = model;
      PS_INC:    model = model + 4;
      PS_LOAD:   model = v;
      default:   model = model + 4 + v * 4;
    endcase
    @(posedge clk); #1;
    chk("pc", pout, model);
    chk("pc4", pc4, model + 4);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ps = PS_HOLD; pin = 0; model = 0;
    #12;
    chk("reset", pout, 0);
    rst = 0;
    for (int i = 0; i < 10; i++) step(PS_INC, 64'h55);
    chk("ten increments", pout, 40);
    step(PS_HOLD, 64'h1);
    step(PS_HOLD, 64'h2);
    step(PS_LOAD, 64'h1000);
    step(PS_OFFSET, 64'd3);                       // 0x1000 + 4 + 12
    chk("offset", pout, 64'h1010);
    step(PS_OFFSET, -64'd5);                      // back 16
    chk("negative offset", pout, 64'h1000);
    for (int i = 0; i < 300; i++) step(ps_e'($urandom % 4), {$urandom, $urandom});
    // Reset returns to zero
    @(negedge clk); rst = 1; #1;
    chk("reset again", pout, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
