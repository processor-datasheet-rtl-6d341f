// data_ram_tb: self-checking test of the 255 x 64-bit data RAM.
//
// Writes a random word to every address in turn (address incremented each
// clock, write high), checks the read register shows the addressed word after
// the falling edge and not before, then reads everything back with write low.
// It also checks that reset clears the output register, that a word written at
// a rising edge is read at the following falling edge, and that address 255
// (beyond the 255 words) reads zero and ignores writes.
module data_ram_tb;
  import legv8_pkg::*;

  logic        clk = 0, rst, we;
  logic [7:0]  addr;
  logic [63:0] wd, rd;
  logic [63:0] shadow [255];
  int checks = 0, failures = 0;

  data_ram dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .wr_data(wd), .rd_data(rd));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
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
    rst = 1; we = 0; addr = 0; wd = 0;
    #11 chk("reset output", rd, 0);
    #1 rst = 0;
    // Write pass: address and data change after each rising edge
    for (int i = 0; i < 255; i++) begin
      @(posedge clk); #1;
      addr = 8'(i); we = 1; wd = {$urandom, $urandom};
      shadow[i] = wd;
      @(posedge clk); #1;         // written at this edge
      we = 0;
      wd = ~wd;
      @(negedge clk); #1;
      chk("read after write", rd, shadow[i]);
    end
    // Output changes only on the falling edge
    @(posedge clk); #1;
    addr = 8'd3;
    @(negedge clk); #1;
    chk("negedge read", rd, shadow[3]);
    @(posedge clk); #1;
    addr = 8'd4;
    #2 chk("no change before negedge", rd, shadow[3]);
    @(negedge clk); #1;
    chk("changed at negedge", rd, shadow[4]);
    // Read pass, random order
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      addr = 8'($urandom % 255);
      @(negedge clk); #1;
      chk("read back", rd, shadow[addr]);
    end
    // Out of range
    @(posedge clk); #1;
    addr = 8'd255; we = 1; wd = 64'h1234;
    @(negedge clk); #1;
    chk("out of range reads zero", rd, 0);
    @(posedge clk); #1;
    we = 0; addr = 8'd254;
    @(negedge clk); #1;
    chk("out of range write ignored", rd, shadow[254]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
