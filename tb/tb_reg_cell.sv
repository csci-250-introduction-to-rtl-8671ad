// tb_reg_cell: self-checking test of reg_cell.
// Checks the reset value, then drives random data with a random load enable
// for 500 cycles and compares q after every edge with a reference copy that
// only changes when load was high. A second cell with a non-zero reset value
// checks that RESET_VAL is honoured.
module tb_reg_cell;
  logic        clk = 0, rst_n = 1, load = 0;
  logic [15:0] d = '0, q, q2, ref_q;
  int checks = 0, failures = 0;

  reg_cell #(.WIDTH(16)) dut (.clk, .rst_n, .load, .d, .q);
  reg_cell #(.WIDTH(16), .RESET_VAL(16'hA5C3)) dut2 (.clk, .rst_n, .load(1'b0), .d, .q(q2));

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;     // asynchronous reset, before any clock edge
    #11;
    check(q, 16'h0000, "reset value");
    check(q2, 16'hA5C3, "RESET_VAL");
    rst_n = 1;
    ref_q = 16'h0000;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 16'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1;
      check(q, ref_q, "after edge");
      check(q2, 16'hA5C3, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
