// mux8to1: 8-to-1 multiplexer of WIDTH-bit words.
//
// Purely combinational: y = d[sel]. The register array uses one of these per
// read port to pick one of R0..R7. Width 16 and eight inputs follow the
// lecture; the packed-array input is this design's choice of bundling.
module mux8to1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [7:0][WIDTH-1:0] d,
  input  logic [2:0]            sel,
  output logic [WIDTH-1:0]      y
);

  always_comb begin
    unique case (sel)
      3'd0: y = d[0];
      3'd1: y = d[1];
      3'd2: y = d[2];
      3'd3: y = d[3];
      3'd4: y = d[4];
      3'd5: y = d[5];
      3'd6: y = d[6];
      default: y = d[7];
    endcase
  end

endmodule
