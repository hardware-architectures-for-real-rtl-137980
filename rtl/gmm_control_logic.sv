// gmm_control_logic: orders the three Gaussians by fitness and picks the one
// to update.
//
// Three comparators on the inverse fitness give b1 = (IF1 <= IF2),
// b2 = (IF2 <= IF3), b3 = (IF1 <= IF3); a small "Sort" decoder turns them
// into G1, G2, G3, the indices (0..2) of the first, second and third Gaussian
// in decreasing fitness (increasing IF). "Select Gaussian" then returns GU,
// the matched Gaussian that comes first in that order, and NM = 1 when none
// matches. Three comparators and a few gates follow the published circuit;
// breaking ties in favour of the lower index is this design's choice.
//
// Interface: ifit[3], m[3] -> g1, g2, g3, gu (2 bits each), nm.
// Timing: combinational.
module gmm_control_logic
  import gmm_pkg::*;
(
  input  logic [IF_W-1:0] ifit [NG],
  input  logic [NG-1:0]   m,
  output logic [1:0]      g1,
  output logic [1:0]      g2,
  output logic [1:0]      g3,
  output logic [1:0]      gu,
  output logic            nm
);
  logic b1, b2, b3;

  always_comb begin
    b1 = (ifit[0] <= ifit[1]);
    b2 = (ifit[1] <= ifit[2]);
    b3 = (ifit[0] <= ifit[2]);
    // Sort: six possible orders
    unique case ({b1, b2, b3})
      3'b111:  begin g1 = 2'd0; g2 = 2'd1; g3 = 2'd2; end // 1<=2<=3
      3'b101:  begin g1 = 2'd0; g2 = 2'd2; g3 = 2'd1; end // 1<=3<2
      3'b100:  begin g1 = 2'd2; g2 = 2'd0; g3 = 2'd1; end // 3<1<=2
      3'b011:  begin g1 = 2'd1; g2 = 2'd0; g3 = 2'd2; end // 2<1<=3
      3'b010:  begin g1 = 2'd1; g2 = 2'd2; g3 = 2'd0; end // 2<=3<1
      3'b000:  begin g1 = 2'd2; g2 = 2'd1; g3 = 2'd0; end // 3<2<1
      // 3'b110 and 3'b001 are impossible for a total order
      default: begin g1 = 2'd0; g2 = 2'd1; g3 = 2'd2; end
    endcase
    // Select Gaussian
    nm = (m == '0);
    if (m[g1])      gu = g1;
    else if (m[g2]) gu = g2;
    else            gu = g3;   // when nm = 1, gu is don't-care (g3)
  end
endmodule
