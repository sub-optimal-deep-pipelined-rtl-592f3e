// tb_ehsd_delay -- streams random words through a 5-stage and a 0-stage
// delay and checks that each comes out exactly D clocks later.
module tb_ehsd_delay;
  localparam int W = 12;
  localparam int D = 5;

  logic clk = 1'b0;
  logic [W-1:0] din, dout5, dout0;

  ehsd_delay #(.W(W), .D(D)) dut  (.clk(clk), .din(din), .dout(dout5));
  ehsd_delay #(.W(W), .D(0)) dut0 (.clk(clk), .din(din), .dout(dout0));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  initial begin
    din = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      din = W'($urandom);
      hist.push_back(din);
      #1;
      checks++;
      if (dout0 != din) failures++;
      if (hist.size() > D) begin
        checks++;
        // dout5 shows the word applied D clocks before the current one
        if (dout5 != hist[hist.size() - 1 - D]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
