// tb_main_memory: self-checking test of main_memory at its full size
// (65536 words of 16 bits).
// Writes 3000 random words at random addresses, including the extremes
// 0000h and FFFFh and the addresses FF03h/FF04h of the instruction set
// examples, keeps a reference in an associative array, and reads them all
// back. Also checks that the read is combinational (same cycle) and that a
// write shows only after the clock edge.
module tb_main_memory;
  logic        clk = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] model [logic [15:0]];
  int checks = 0, failures = 0;

  main_memory #(.DW(16), .AW(16)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s addr=%h: got %h expected %h", what, addr, got, exp);
    end
  endtask

  task automatic write(input logic [15:0] a, d);
    @(negedge clk);
    addr = a; wdata = d; we = 1;
    @(posedge clk);
    #1;
    we = 0;
    model[a] = d;
    check(rdata, d, "visible after edge");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] old;
    write(16'h0000, 16'h1111);
    write(16'hFFFF, 16'h2222);
    write(16'hFF03, 16'hFF07);
    write(16'hFF04, 16'hFF07);
    // a write is not visible before its edge
    @(negedge clk);
    addr = 16'hFF03; wdata = 16'h3333; we = 1;
    #1 check(rdata, 16'hFF07, "old value before edge");
    @(posedge clk); #1 we = 0; model[16'hFF03] = 16'h3333;
    check(rdata, 16'h3333, "new value after edge");
    for (int i = 0; i < 3000; i++) write(16'($urandom), 16'($urandom));
    @(negedge clk);
    foreach (model[a]) begin
      addr = a;
      #1 check(rdata, model[a], "read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
