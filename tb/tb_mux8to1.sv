// tb_mux8to1: self-checking test of mux8to1.
// For 200 random sets of eight 16-bit inputs, every select value is applied
// and the output is compared with the input of that index.
module tb_mux8to1;
  logic [7:0][15:0] d;
  logic [2:0]       sel;
  logic [15:0]      y;
  logic [15:0]      vals [8];
  int checks = 0, failures = 0;

  mux8to1 #(.WIDTH(16)) dut (.d, .sel, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 8; i++) begin
        vals[i] = 16'($urandom);
        d[i]    = vals[i];
      end
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (y !== vals[s]) begin
          failures++;
          $display("FAIL sel=%0d got %h expected %h", s, y, vals[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
