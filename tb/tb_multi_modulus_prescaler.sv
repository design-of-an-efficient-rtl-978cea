// tb_multi_modulus_prescaler -- end-to-end test of the multi-modulus
// prescaler at its default (and only) configuration.
//
// For each of the eight settings of {mc1, mc2, mc3} it resets the divider,
// lets it settle, and measures 40 output periods in fin periods. The
// expected values come from the cascade's arithmetic, not from the RTL:
// the 2/3 stage spans P = 2 (mc2 = 1) or 3 (mc2 = 0) cycles of the 3/4
// stage, and the 3/4 stage divides by 3 when ~mc3 & (fout | mc1), else by 4:
//   period = mc3 ? 4P : mc1 ? 3P : 4P - 1
//   high   = mc3 ? 4 : 3    (fout is high for one 3/4 cycle, which runs
//                            while fout = 1)
// It then changes the mode 30 times at random without a reset and checks
// that the ratio after one settling period is the new one.
// It counts how often each mechanism happened: every mode, the 3/4 stage
// dividing by 3 and by 4, the 2/3 stage dividing by 2 and by 3, an on-the-fly
// mode change and a reset; any that never happened counts as a failure.
module tb_multi_modulus_prescaler;
  logic fin, rst, mc1, mc2, mc3, fout;
  int checks = 0, failures = 0;

  int mode_seen [8];
  int p34_div3 = 0, p34_div4 = 0;   // 3/4 stage output periods by length
  int p23_div2 = 0, p23_div3 = 0;   // 2/3 stage output periods by length
  int mode_changes = 0, resets = 0;

  multi_modulus_prescaler dut (.rst(rst), .fin(fin), .mc1(mc1), .mc2(mc2), .mc3(mc3),
                               .fout(fout));

  initial fin = 1'b0;
  always #5 fin = ~fin;

  initial begin
    repeat (20000) @(posedge fin);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the internal stages: lengths of the 3/4 stage's output periods
  // in fin periods, and of the 2/3 stage's in 3/4-stage periods.
  int   n34, n23;
  logic prev34, prev23;
  initial begin
    n34 = 0; n23 = 0; prev34 = 1'b0; prev23 = 1'b0;
    forever begin
      @(negedge fin);
      n34++;
      if (dut.f34 && !prev34) begin
        if (!rst) begin
          if (n34 == 3) p34_div3++;
          if (n34 == 4) p34_div4++;
          n23++;
          if (fout && !prev23) begin
            if (n23 == 2) p23_div2++;
            if (n23 == 3) p23_div3++;
            n23 = 0;
          end
        end
        n34 = 0;
      end
      prev34 = dut.f34;
      prev23 = fout;
    end
  end

  function automatic int exp_period(input logic m1, input logic m2, input logic m3);
    int p = m2 ? 2 : 3;
    if (m3)      return 4 * p;
    else if (m1) return 3 * p;
    else         return 4 * p - 1;
  endfunction

  task automatic measure(input int n);
    int period, high, ep, eh;
    logic prev;
    ep = exp_period(mc1, mc2, mc3);
    eh = mc3 ? 4 : 3;
    prev = fout;
    forever begin
      @(negedge fin);
      if (fout && !prev) break;
      prev = fout;
    end
    repeat (n) begin
      period = 0; high = 0; prev = 1'b1;
      forever begin
        if (fout) high++;
        @(negedge fin);
        period++;
        if (fout && !prev) break;
        prev = fout;
      end
      checks++;
      if (period != ep || high != eh) begin
        failures++;
        $display("FAIL mc1=%b mc2=%b mc3=%b: period=%0d high=%0d expected %0d/%0d",
                 mc1, mc2, mc3, period, high, ep, eh);
      end else begin
        mode_seen[{mc1, mc2, mc3}]++;
      end
    end
  endtask

  task automatic count(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst = 1'b0;
    {mc1, mc2, mc3} = 3'b000;
    #1;
    for (int m = 0; m < 8; m++) begin
      {mc1, mc2, mc3} = 3'(m);
      rst = 1'b1;
      resets++;
      @(negedge fin);
      checks++;
      if (fout !== 1'b0 || dut.f34 !== 1'b0) begin
        failures++;
        $display("FAIL reset does not clear the divider");
      end
      rst = 1'b0;
      measure(40);
      $display("mc1=%b mc2=%b mc3=%b divides by %0d", mc1, mc2, mc3,
               exp_period(mc1, mc2, mc3));
    end
    for (int k = 0; k < 30; k++) begin
      logic [2:0] nm;
      nm = 3'($urandom);
      if (nm != {mc1, mc2, mc3}) mode_changes++;
      {mc1, mc2, mc3} = nm;
      // one output period to settle on the new ratio
      measure(1);
      checks--;
      measure(4);
    end
    for (int m = 0; m < 8; m++)
      count(mode_seen[m], $sformatf("mode mc1,mc2,mc3=%03b", 3'(m)));
    count(p34_div3, "3/4 stage dividing by 3");
    count(p34_div4, "3/4 stage dividing by 4");
    count(p23_div2, "2/3 stage dividing by 2");
    count(p23_div3, "2/3 stage dividing by 3");
    count(mode_changes, "mode change without reset");
    count(resets, "reset");
    $display("3/4 periods: /3 %0d, /4 %0d; 2/3 periods: /2 %0d, /3 %0d; mode changes %0d",
             p34_div3, p34_div4, p23_div2, p23_div3, mode_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
