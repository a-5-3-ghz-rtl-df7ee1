// tb_full_adder: exhaustive check of the one-bit full adder against the
// integer sum a + b + cin = 2*cout + sum over all eight input patterns.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (2 * int'(cout) + int'(sum) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> sum=%0b cout=%0b", a, b, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
