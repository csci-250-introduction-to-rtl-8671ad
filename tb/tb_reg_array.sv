// tb_reg_array: self-checking test of reg_array.
// After reset every register must read 0000h except R7, which reads the
// RESET_PC given here (0100h). Then 1000 cycles of random writes (random
// enable, register and data) and random read addresses on the three ports;
// a reference array tracks what each register should hold, and every read
// port and the pc output are compared with it in every cycle. Writes must
// become visible only after the clock edge.
module tb_reg_array;
  logic        clk = 0, rst_n = 1;
  logic [2:0]  ra_a = 0, ra_b = 0, ra_c = 0, wa = 0;
  logic [15:0] rd_a, rd_b, rd_c, wd = 0, pc;
  logic        we = 0;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  reg_array #(.WIDTH(16), .RESET_PC(16'h0100)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_reads();
    #1;
    check(rd_a, model[ra_a], $sformatf("port A R%0d", ra_a));
    check(rd_b, model[ra_b], $sformatf("port B R%0d", ra_b));
    check(rd_c, model[ra_c], $sformatf("port C R%0d", ra_c));
    check(pc, model[7], "pc");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) model[i] = 16'h0000;
    model[7] = 16'h0100;
    #1 rst_n = 0;     // asynchronous reset, before any clock edge
    #2;
    for (int i = 0; i < 8; i++) begin
      ra_a = 3'(i); ra_b = 3'(7 - i); ra_c = 3'(i);
      check_reads();
    end
    #5 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we   = ($urandom % 4) != 0;
      wa   = 3'($urandom);
      wd   = 16'($urandom);
      ra_a = 3'($urandom);
      ra_b = 3'($urandom);
      ra_c = wa;                 // read the register being written: old value
      check_reads();
      @(posedge clk);
      if (we) model[wa] = wd;
      check_reads();             // new value after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
