// tb_tspc_dff -- checks the flip-flop against a reference register: q takes
// d on every rising clock edge (random d), qbar is always ~q, and an
// asynchronous reset pulse between clock edges clears q at once and holds
// it while asserted.
module tb_tspc_dff;
  logic clk, rst, d, q, qbar;
  logic ref_q;
  int checks = 0, failures = 0;

  tspc_dff dut (.clk(clk), .rst(rst), .d(d), .q(q), .qbar(qbar));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || qbar !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b qbar=%b expected q=%b at %0t", what, q, qbar, exp, $time);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;
    d   = 1'b1;
    #1 rst = 1'b1;
    #1;
    check(1'b0, "reset");
    @(negedge clk);
    rst = 1'b0;
    ref_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      @(posedge clk);
      ref_q = d;
      #1;
      check(ref_q, "capture");
      // between edges a change of d must not reach q
      d = ~d;
      #1;
      check(ref_q, "hold");
      if (i % 37 == 36) begin
        // asynchronous reset away from the clock edge
        d = 1'b1;
        #1 rst = 1'b1;
        #1;
        check(1'b0, "async reset");
        @(posedge clk);
        #1;
        check(1'b0, "reset held over clock edge");
        @(negedge clk);
        rst = 1'b0;
        ref_q = 1'b0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
