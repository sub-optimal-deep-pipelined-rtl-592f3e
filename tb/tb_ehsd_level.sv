// tb_ehsd_level -- level 5 of the 4x4 detector (8 parents, 32 LPBs): random
// parent sets, R row 5 and (Q^H y)_5 are streamed in; child 4p+c must be
// parent p with symbol code c at level 5 and radius
// r_p^2 - ((Q^H y)_5 - sum_(i>=5) R_5i x_i)^2, exactly 3 clocks later.
module tb_ehsd_level;
  import ehsd_pkg::*;
  localparam int L = 8, M = 5, P = 8, RAD_W = 32, NODE_W = RAD_W + 2 * L, LAT = 3;
  localparam longint RMIN = -(64'sd1 <<< (RAD_W - 1));

  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0, out_vld;
  logic [NODE_W-1:0] in_nodes [P];
  logic [NODE_W-1:0] out_nodes [NSYM*P];
  logic signed [XR_W-1:0] xr_row [L][NSYM];
  logic signed [Y_W-1:0] y_m;

  ehsd_level #(.L(L), .M(M), .P(P), .RAD_W(RAD_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [NODE_W-1:0] v [NSYM*P]; int t; } exp_t;
  exp_t q[$];

  always @(negedge clk) if (out_vld) begin
    exp_t e;
    checks++;
    if (q.size() == 0) failures++;
    else begin
      e = q.pop_front();
      if (cycle - e.t != LAT) failures++;
      foreach (out_nodes[j]) begin
        checks++;
        if (out_nodes[j] !== e.v[j]) failures++;
      end
    end
  end

  initial begin
    foreach (in_nodes[p]) in_nodes[p] = '0;
    foreach (xr_row[i, c]) xr_row[i][c] = '0;
    y_m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) in_vld = 1'b0;
      else begin
        exp_t e;
        longint r [L];
        for (int i = 0; i < L; i++) begin
          r[i] = longint'($urandom % 4096) - 2048;
          for (int c = 0; c < NSYM; c++) xr_row[i][c] = XR_W'(r[i] * (2 * c - 3));
        end
        y_m = Y_W'(int'($urandom % 40000) - 20000);
        foreach (in_nodes[p]) begin
          in_nodes[p] = {RAD_W'(int'($urandom % 400000000) - 20000000), 16'($urandom)};
          for (int c = 0; c < NSYM; c++) begin
            logic [NODE_W-1:0] ch;
            longint s, res, rad;
            ch = in_nodes[p];
            ch[2*(M-1) +: 2] = 2'(c);
            s = 0;
            for (int i = M; i <= L; i++) s += r[i-1] * (2 * int'(ch[2*(i-1) +: 2]) - 3);
            res = longint'(y_m) - s;
            rad = longint'($signed(ch[NODE_W-1 -: RAD_W])) - res * res;
            if (rad < RMIN) rad = RMIN;
            e.v[NSYM*p+c] = {RAD_W'(rad), ch[2*L-1:0]};
          end
        end
        e.t = cycle;
        q.push_back(e);
        in_vld = 1'b1;
      end
    end
    @(negedge clk);
    in_vld = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
