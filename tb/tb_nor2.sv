// tb_nor2 -- exhaustive check of the two-input NOR gate against its truth
// table, written out as constants.
module tb_nor2;
  logic a, b, y;
  int checks = 0, failures = 0;
  // expected y for {a,b} = 00, 01, 10, 11
  localparam logic [3:0] TRUTH = 4'b0001;

  nor2 dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
