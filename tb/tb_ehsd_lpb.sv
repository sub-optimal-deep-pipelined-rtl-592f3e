// tb_ehsd_lpb -- three level processing blocks of an 8-level tree (top
// level 8, a middle level 4 and the bottom level 1, each with a different
// child symbol) receive a stream of random parent nodes, product rows built
// from random R rows, and (Q^H y)_m values.  Each child node is compared with
// r^2 - ((Q^H y)_m - sum_(i>=m) R_mi x_i)^2, saturated at the most negative
// radius, and must appear exactly 3 clocks after its parent.  Saturation,
// nodes leaving the sphere and nodes staying inside are all counted and
// must occur.
module tb_ehsd_lpb;
  import ehsd_pkg::*;
  localparam int L = 8, RAD_W = 32, NODE_W = RAD_W + 2 * L, LAT = 3, NI = 3;
  localparam int CM   [NI] = '{8, 4, 1};
  localparam int CSYM [NI] = '{3, 0, 2};
  localparam longint RMIN = -(64'sd1 <<< (RAD_W - 1));

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_sat = 0, n_out = 0, n_in = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar g = 0; g < NI; g++) begin : g_inst
    localparam int M = CM[g], SYM = CSYM[g];
    logic in_vld = 1'b0, out_vld;
    logic [NODE_W-1:0] in_node, out_node;
    logic signed [XR_W-1:0] xr_row [L][NSYM];
    logic signed [Y_W-1:0] y_m;

    ehsd_lpb #(.L(L), .M(M), .SYM(SYM), .RAD_W(RAD_W)) dut (
      .clk(clk), .rst_n(rst_n), .in_vld(in_vld), .in_node(in_node),
      .xr_row(xr_row), .y_m(y_m), .out_vld(out_vld), .out_node(out_node));

    typedef struct { logic [NODE_W-1:0] v; int t; } exp_t;
    exp_t q[$];

    always @(negedge clk) if (out_vld) begin
      exp_t e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (out_node !== e.v || cycle - e.t != LAT) begin
          failures++;
          if (failures < 10)
            $display("M=%0d out %h want %h latency %0d", M, out_node, e.v, cycle - e.t);
        end
      end
    end

    initial begin
      in_node = '0;
      y_m = '0;
      foreach (xr_row[i, c]) xr_row[i][c] = '0;
      @(posedge rst_n);
      for (int t = 0; t < 2000; t++) begin
        @(negedge clk);
        if ($urandom % 5 == 0) in_vld = 1'b0;
        else begin
          exp_t e;
          longint r [L];
          longint rad, s, res;
          logic [NODE_W-1:0] ch;
          for (int i = 0; i < L; i++) begin
            r[i] = (t % 50 == 1) ? ((i % 2) ? 16383 : -16384)
                                 : longint'($urandom % 32768) - 16384;
            for (int c = 0; c < NSYM; c++) xr_row[i][c] = XR_W'(r[i] * (2 * c - 3));
          end
          y_m = (t % 50 == 1) ? Y_W'(-65536) : Y_W'($urandom);
          case (t % 4)
            0: rad = longint'($urandom % 64'd2147483647);
            1: rad = longint'($urandom % 2000000) - 1000000;
            2: rad = RMIN + longint'($urandom % 1000);
            default: rad = 64'd1 << 30;
          endcase
          in_node = {RAD_W'(rad), 16'($urandom)};
          ch = in_node;
          ch[2*(M-1) +: 2] = 2'(SYM);
          s = 0;
          for (int i = M; i <= L; i++) s += r[i-1] * (2 * int'(ch[2*(i-1) +: 2]) - 3);
          res = longint'(y_m) - s;
          rad = rad - res * res;
          if (rad < RMIN) begin
            rad = RMIN;
            n_sat++;
          end
          if (rad < 0) n_out++;
          else n_in++;
          e.v = {RAD_W'(rad), ch[2*L-1:0]};
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
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2020) @(negedge clk);
    $display("saturated=%0d outside=%0d inside=%0d", n_sat, n_out, n_in);
    checks += 3;
    if (n_sat == 0) failures++;
    if (n_out == 0) failures++;
    if (n_in == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
