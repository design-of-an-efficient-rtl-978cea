// tb_prescaler_2_3 -- runs the 2/3 prescaler in both modes and checks, for
// every output period, its length in fin periods (2 for mc = 1, 3 for
// mc = 0) and its high time (one fin period in both modes). Also checks that
// reset clears the output, that the first output pulse comes on the first
// rising edge of fin after reset, and that a mode change without reset
// settles to the new ratio within one output period.
module tb_prescaler_2_3;
  logic fin, rst, mc, fout;
  int checks = 0, failures = 0;

  prescaler_2_3 dut (.rst(rst), .fin(fin), .mc(mc), .fout(fout));

  initial fin = 1'b0;
  always #5 fin = ~fin;

  initial begin
    repeat (2000) @(posedge fin);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure n output periods; fout is sampled on falling edges of fin,
  // half a period after it can change.
  task automatic measure(input int n, input int exp_period, input int exp_high);
    int period, high;
    logic prev;
    // align to a rising edge of fout
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
      if (period != exp_period || high != exp_high) begin
        failures++;
        $display("FAIL mc=%b period=%0d high=%0d expected %0d/%0d", mc, period, high,
                 exp_period, exp_high);
      end
    end
  endtask

  initial begin
    rst = 1'b0;
    #1;
    for (int m = 0; m < 2; m++) begin
      mc  = logic'(m == 0);
      rst = 1'b1;
      @(negedge fin);
      checks++;
      if (fout !== 1'b0) begin
        failures++;
        $display("FAIL reset does not clear fout");
      end
      rst = 1'b0;
      // both flip-flops at 0: the first rising edge of fin sets the output
      // only in divide-by-2 mode; in divide-by-3 mode it comes one edge later
      @(negedge fin);
      checks++;
      if (fout !== mc) begin
        failures++;
        $display("FAIL first edge after reset: fout=%b mc=%b", fout, mc);
      end
      measure(50, mc ? 2 : 3, 1);
    end
    // mode changes without reset
    for (int k = 0; k < 20; k++) begin
      mc = 1'($urandom);
      repeat (3) @(negedge fin);
      measure(5, mc ? 2 : 3, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
