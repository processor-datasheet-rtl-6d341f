// regfile_tb: self-checking test of the 32 x 64-bit register file.
//
// After reset every register must read zero on both ports. The test then
// writes random 64-bit values to registers 0..31 one per clock (write enable
// high), reading each back on both ports, and checks a write is not visible
// before its clock edge. With write enable low it drives new data and
// addresses and checks nothing changes. A final phase mixes random writes and
// reads against a shadow copy kept in the testbench.
module regfile_tb;
  import legv8_pkg::*;

  logic        clk = 0, rst;
  logic [4:0]  ra, rb, wa;
  logic [63:0] da, db, wd;
  logic        we;
  logic [63:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst(rst), .rd_addr_a(ra), .rd_addr_b(rb), .rd_data_a(da),
               .rd_data_b(db), .wr_en(we), .wr_addr(wa), .wr_data(wd));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    #12 rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      chk("reset A", da, 0);
      chk("reset B", db, 0);
      shadow[i] = 0;
    end
    // Write every register in turn
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; wa = 5'(i); wd = {$urandom, $urandom}; ra = 5'(i); rb = 5'(i);
      #1 chk("before edge", da, shadow[i]);
      shadow[i] = wd;
      @(posedge clk); #1;
      chk("written A", da, shadow[i]);
      chk("written B", db, shadow[i]);
    end
    // Write enable low: nothing changes
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 0; wa = 5'(i); wd = ~shadow[i]; ra = 5'(i); rb = 5'((i + 7) % 32);
      @(posedge clk); #1;
      chk("hold A", da, shadow[i]);
      chk("hold B", db, shadow[(i + 7) % 32]);
    end
    // Random mix
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = {$urandom, $urandom};
      ra = 5'($urandom); rb = 5'($urandom);
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      chk("mix A", da, shadow[ra]);
      chk("mix B", db, shadow[rb]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
