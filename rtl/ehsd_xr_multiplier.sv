// ehsd_xr_multiplier -- precomputes every product x*R_mi of the real 16-QAM
// alphabet x in {-3,-1,+1,+3} with the upper-triangular channel matrix R.
//
// All level processing blocks of a level share the same products, so they
// are formed once per problem here, with a shift and adders only and no
// multiplier: 3R = R + 2R, and the negative products are the two's
// complement negations.  Entries below the diagonal are never used and are
// driven to zero.
//
// Interface: r_mat[m][i] is R_(m+1)(i+1), 15-bit signed; xr[m][i][c] is the
// product for symbol code c (value 2c-3), 17-bit signed.  One register
// stage: xr is valid one clock after r_mat.
module ehsd_xr_multiplier import ehsd_pkg::*; #(
  parameter int unsigned L = 8
) (
  input  logic                   clk,
  input  logic signed [R_W-1:0]  r_mat [L][L],
  output logic signed [XR_W-1:0] xr    [L][L][NSYM]
);

  always_ff @(posedge clk) begin
    for (int m = 0; m < L; m++) begin
      for (int i = 0; i < L; i++) begin
        if (i >= m) begin
          logic signed [XR_W-1:0] r1, r3;
          r1 = XR_W'(r_mat[m][i]);
          r3 = r1 + (r1 <<< 1);
          xr[m][i][0] <= -r3;
          xr[m][i][1] <= -r1;
          xr[m][i][2] <=  r1;
          xr[m][i][3] <=  r3;
        end else begin
          for (int c = 0; c < NSYM; c++) xr[m][i][c] <= '0;
        end
      end
    end
  end

endmodule
