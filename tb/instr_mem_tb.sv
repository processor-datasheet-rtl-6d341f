// instr_mem_tb: self-checking test of the instruction memory.
//
// Loads a random program through the load port, then reads every word by its
// byte address (PC = 4 * index) and checks the low PC bits are ignored and
// that addresses beyond the memory read zero.
module instr_mem_tb;
  import legv8_pkg::*;

  logic        clk = 0, le;
  logic [63:0] pc;
  logic [31:0] instr, ld;
  logic [7:0]  la;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  instr_mem dut (.clk(clk), .pc(pc), .instr(instr), .load_en(le), .load_addr(la), .load_data(ld));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    le = 0; la = 0; ld = 0; pc = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      le = 1; la = 8'(i); ld = $urandom; shadow[i] = ld;
    end
    @(negedge clk); le = 0;
    for (int i = 0; i < 256; i++) begin
      pc = 64'(4 * i) + 64'($urandom % 4); #1;
      chk("read", instr, shadow[i]);
    end
    pc = 64'd1024; #1 chk("beyond end", instr, 0);
    pc = 64'h8000_0000_0000_0000; #1 chk("far beyond end", instr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
