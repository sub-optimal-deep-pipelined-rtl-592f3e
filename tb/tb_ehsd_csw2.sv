// tb_ehsd_csw2 -- random and equal-key pairs: x must carry the word with the
// larger signed key (a on a tie), y the other, payloads untouched.
module tb_ehsd_csw2;
  localparam int W = 20, KEY_W = 12;
  logic [W-1:0] a, b, x, y;

  ehsd_csw2 #(.W(W), .KEY_W(KEY_W)) dut (.a(a), .b(b), .x(x), .y(y));

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ka, kb;
      a = W'($urandom);
      b = W'($urandom);
      if (t % 10 == 0) b[W-1 -: KEY_W] = a[W-1 -: KEY_W];
      #1;
      ka = $signed(a[W-1 -: KEY_W]);
      kb = $signed(b[W-1 -: KEY_W]);
      checks++;
      if (ka >= kb) begin
        if (x !== a || y !== b) failures++;
      end else begin
        if (x !== b || y !== a) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
