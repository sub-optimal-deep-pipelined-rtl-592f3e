// tb_ehsd_batcher_sorter -- 32-input network with a register every two
// compare stages: streams random sets (some with many equal keys and
// negative keys) back to back and checks that every output set is ordered
// by descending signed key, is a permutation of its input set (each word
// carries a unique index) and appears exactly 7 clocks after its input.
module tb_ehsd_batcher_sorter;
  localparam int N = 32, KEY_W = 16, W = KEY_W + 8, LAT = 7;

  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0, out_vld;
  logic [W-1:0] din [N], dout [N];

  ehsd_batcher_sorter #(.N(N), .W(W), .KEY_W(KEY_W), .REG_EVERY(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [W-1:0] v [N]; int t; } exp_t;
  exp_t q[$];

  always @(negedge clk) if (out_vld) begin
    exp_t e;
    bit seen [N];
    checks++;
    if (q.size() == 0) failures++;
    else begin
      e = q.pop_front();
      if (cycle - e.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - e.t);
      end
      foreach (seen[i]) seen[i] = 0;
      for (int i = 0; i < N; i++) begin
        int id;
        id = int'(dout[i][7:0]);
        checks++;
        if (id >= N || seen[id] || dout[i] !== e.v[id]) failures++;
        else seen[id] = 1;
        if (i > 0) begin
          checks++;
          if ($signed(dout[i][W-1 -: KEY_W]) > $signed(dout[i-1][W-1 -: KEY_W])) failures++;
        end
      end
    end
  end

  initial begin
    foreach (din[i]) din[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if ($urandom % 6 == 0) in_vld = 1'b0;
      else begin
        exp_t e;
        foreach (din[i]) begin
          din[i][W-1 -: KEY_W] = (t % 5 == 0) ? KEY_W'($urandom % 3) - KEY_W'(1)
                                               : KEY_W'($urandom);
          din[i][7:0] = 8'(i);
          e.v[i] = din[i];
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
