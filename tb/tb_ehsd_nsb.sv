// tb_ehsd_nsb -- node selection blocks of the 4x4 detector, 64->8 (10
// clocks), 32->8 and 32->4 (7 clocks), 16->4 (5 clocks), plus a padded
// 48->12 block (10 clocks) and a deep-pipelined 64->8 block with a register
// after every compare stage (21 clocks), and two recursive global sorts:
// 64->8 from 16-input groups (15 clocks) and 32->4 from 8-input groups (9
// clocks).  Each receives a stream of random node sets with distinct keys;
// the K outputs must be the K largest keys of the set, best first, with
// their payloads, at exactly the stated latency.
module tb_ehsd_nsb;
  localparam int KEY_W = 20, W = KEY_W + 8;
  localparam int NCFG = 8;
  localparam int CNIN [NCFG] = '{64, 32, 32, 16, 48, 64, 64, 32};
  localparam int CK   [NCFG] = '{ 8,  8,  4,  4, 12,  8,  8,  4};
  localparam int CLAT [NCFG] = '{10,  7,  7,  5, 10, 21, 15,  9};
  localparam int CREG [NCFG] = '{ 2,  2,  2,  2,  2,  1,  2,  2};
  localparam int CGRP [NCFG] = '{ 0,  0,  0,  0,  0,  0, 16,  8};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NIN = CNIN[g], K = CK[g], LAT = CLAT[g], RE = CREG[g], GR = CGRP[g];
    logic in_vld = 1'b0, out_vld;
    logic [W-1:0] din [NIN];
    logic [W-1:0] dout [K];

    ehsd_nsb #(.NIN(NIN), .K(K), .W(W), .KEY_W(KEY_W), .REG_EVERY(RE), .GROUP(GR)) dut (
      .clk(clk), .rst_n(rst_n), .in_vld(in_vld), .din(din),
      .out_vld(out_vld), .dout(dout));

    typedef struct { logic [W-1:0] v [K]; int t; } exp_t;
    exp_t q[$];

    always @(negedge clk) if (out_vld) begin
      exp_t e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (cycle - e.t != LAT) begin
          failures++;
          $display("NSB %0d->%0d latency %0d", NIN, K, cycle - e.t);
        end
        for (int i = 0; i < K; i++) begin
          checks++;
          if (dout[i] !== e.v[i]) failures++;
        end
      end
    end

    initial begin
      foreach (din[i]) din[i] = '0;
      @(posedge rst_n);
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        if ($urandom % 4 == 0) in_vld = 1'b0;
        else begin
          exp_t e;
          logic [W-1:0] srt [NIN];
          // distinct keys: a random permutation of spaced values, some negative
          foreach (din[i]) begin
            din[i][W-1 -: KEY_W] = KEY_W'(int'(($urandom % 64) * NIN + i) - 16 * NIN);
            din[i][7:0] = 8'($urandom);
            srt[i] = din[i];
          end
          for (int i = 1; i < NIN; i++) begin
            logic [W-1:0] tmp;
            int j;
            tmp = srt[i];
            j = i - 1;
            while (j >= 0 && $signed(srt[j][W-1 -: KEY_W]) < $signed(tmp[W-1 -: KEY_W])) begin
              srt[j+1] = srt[j];
              j--;
            end
            srt[j+1] = tmp;
          end
          for (int i = 0; i < K; i++) e.v[i] = srt[i];
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
    repeat (360) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
