// tb_ehsd_xr_multiplier -- checks all x*R products of random matrices,
// including the extreme values of the 15-bit format, and the one-clock
// latency: the products of the matrix applied before a clock edge must
// appear right after it.
module tb_ehsd_xr_multiplier;
  import ehsd_pkg::*;
  localparam int L = 8;

  logic clk = 1'b0;
  logic signed [R_W-1:0]  r_mat [L][L];
  logic signed [XR_W-1:0] xr    [L][L][NSYM];

  ehsd_xr_multiplier #(.L(L)) dut (.clk(clk), .r_mat(r_mat), .xr(xr));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    longint rv [L][L];
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      foreach (r_mat[m, i]) begin
        case (t)
          0: rv[m][i] = 16383;
          1: rv[m][i] = -16384;
          default: rv[m][i] = longint'($urandom % 32768) - 16384;
        endcase
        r_mat[m][i] = R_W'(rv[m][i]);
      end
      @(negedge clk);
      foreach (xr[m, i, c]) begin
        longint want;
        want = (i >= m) ? rv[m][i] * (2 * c - 3) : 0;
        checks++;
        if (longint'(xr[m][i][c]) != want) begin
          failures++;
          if (failures < 10) $display("xr[%0d][%0d][%0d]=%0d want %0d", m, i, c, xr[m][i][c], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
