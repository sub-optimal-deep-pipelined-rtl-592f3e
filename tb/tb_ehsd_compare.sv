// tb_ehsd_compare -- 16-input final compare: a stream of random node sets,
// including sets with equal keys and negative keys; the output must be the
// first node of largest key and arrive exactly 4 clocks after its set.
module tb_ehsd_compare;
  localparam int NIN = 16, W = 24, KEY_W = 16, LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0, out_vld;
  logic [W-1:0] din [NIN];
  logic [W-1:0] best;

  ehsd_compare #(.NIN(NIN), .W(W), .KEY_W(KEY_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [W-1:0] v; int t; } exp_t;
  exp_t q[$];

  always @(negedge clk) if (out_vld) begin
    exp_t e;
    checks++;
    if (q.size() == 0) failures++;
    else begin
      e = q.pop_front();
      if (best !== e.v || cycle - e.t != LAT) begin
        failures++;
        $display("best %h want %h, latency %0d", best, e.v, cycle - e.t);
      end
    end
  end

  initial begin
    foreach (din[i]) din[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) in_vld = 1'b0;
      else begin
        exp_t e;
        int bi;
        foreach (din[i]) begin
          din[i] = W'($urandom);
          if (t % 7 == 0) din[i][W-1 -: KEY_W] = KEY_W'($urandom % 4);
        end
        bi = 0;
        for (int i = 1; i < NIN; i++)
          if ($signed(din[i][W-1 -: KEY_W]) > $signed(din[bi][W-1 -: KEY_W])) bi = i;
        e.v = din[bi];
        e.t = cycle;
        q.push_back(e);
        in_vld = 1'b1;
      end
    end
    @(negedge clk);
    in_vld = 1'b0;
    repeat (10) @(negedge clk);
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
