// tb_mmp_ratios -- runs the published divide modes of the multi-modulus
// prescaler (ratios 8, 7, 9 and 13) against this design's mode table.
//
// It sweeps all eight settings of {mc1, mc2, mc3}, measures the steady
// output period of each in fin periods, and then checks:
//   * ratios 8, 7 and 9 are each produced by some setting, namely 011/111,
//     010 and 100 respectively;
//   * no setting produces 13, and the longest period is 4 x 3 = 12 fin
//     periods, the bound for a 3/4 stage feeding a 2/3 stage;
//   * the set of ratios is exactly {6, 7, 8, 9, 11, 12}.
module tb_mmp_ratios;
  logic fin, rst, mc1, mc2, mc3, fout;
  int checks = 0, failures = 0;
  int ratio [8];

  multi_modulus_prescaler dut (.rst(rst), .fin(fin), .mc1(mc1), .mc2(mc2), .mc3(mc3),
                               .fout(fout));

  initial fin = 1'b0;
  always #5 fin = ~fin;

  initial begin
    repeat (5000) @(posedge fin);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Period between two rising edges of fout, sampled on falling edges of fin.
  task automatic one_period(output int period);
    logic prev;
    prev = fout;
    forever begin
      @(negedge fin);
      if (fout && !prev) break;
      prev = fout;
    end
    period = 0;
    prev = 1'b1;
    forever begin
      @(negedge fin);
      period++;
      if (fout && !prev) break;
      prev = fout;
    end
  endtask

  task automatic expect_setting(input int want, input logic [2:0] setting);
    checks++;
    if (ratio[setting] != want) begin
      failures++;
      $display("FAIL divide by %0d expected at mc1,mc2,mc3=%03b, got %0d", want, setting,
               ratio[setting]);
    end
  endtask

  initial begin
    int p, p2, longest;
    bit [15:0] seen;
    rst = 1'b0;
    #1;
    for (int m = 0; m < 8; m++) begin
      {mc1, mc2, mc3} = 3'(m);
      rst = 1'b1;
      @(negedge fin);
      rst = 1'b0;
      one_period(p);
      one_period(p);
      one_period(p2);
      checks++;
      if (p != p2) begin
        failures++;
        $display("FAIL mc1,mc2,mc3=%03b: period not steady (%0d then %0d)", 3'(m), p, p2);
      end
      ratio[m] = p2;
      $display("mc1,mc2,mc3=%03b: fin / %0d", 3'(m), p2);
    end
    expect_setting(8, 3'b011);
    expect_setting(8, 3'b111);
    expect_setting(7, 3'b010);
    expect_setting(9, 3'b100);
    seen = '0;
    longest = 0;
    for (int m = 0; m < 8; m++) begin
      if (ratio[m] < 16) seen[ratio[m]] = 1'b1;
      if (ratio[m] > longest) longest = ratio[m];
    end
    checks++;
    if (seen[13]) begin
      failures++;
      $display("FAIL a setting divides by 13");
    end
    checks++;
    if (longest != 12) begin
      failures++;
      $display("FAIL longest period %0d, expected 12", longest);
    end
    checks++;
    if (seen != 16'((1 << 6) | (1 << 7) | (1 << 8) | (1 << 9) | (1 << 11) | (1 << 12))) begin
      failures++;
      $display("FAIL set of ratios %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
