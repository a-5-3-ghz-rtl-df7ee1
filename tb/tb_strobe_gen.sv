// tb_strobe_gen: drives the store input with random levels (short and long
// pulses, back-to-back requests) and checks every load pulse against a
// model built from the sampled store history: str[k] is high after clock n
// exactly when store was sampled high at clock n-k and low at n-k-1.
// Also checks that a store held high for many cycles yields one pulse.
module tb_strobe_gen;
  localparam int M = 8, NCYC = 2000;
  logic clk = 0, rst_n = 0, store = 0;
  logic [M-1:0] str;
  int checks = 0, failures = 0, pulses0 = 0;
  logic hist [0:NCYC];  // store value sampled at clock n

  strobe_gen #(.STAGES(M)) dut (.clk(clk), .rst_n(rst_n), .store(store), .str(str));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic h(int j);
    return (j >= 1) ? hist[j] : 1'b0;
  endfunction

  initial begin
    int run;
    repeat (2) @(negedge clk);
    checks++;
    if (str != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    hist[0] = 0;
    run = 0;
    for (int n = 1; n <= NCYC; n++) begin
      // first 100 cycles: one long request (held 60 cycles)
      if (n < 100) store = (n >= 10 && n < 70);
      else if (run == 0) begin
        store = ~store;
        run = 1 + ($urandom % 12);
      end
      run--;
      hist[n] = store;
      @(negedge clk);
      for (int k = 0; k < M; k++) begin
        checks++;
        if (str[k] != (h(n - k) & ~h(n - k - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL clock %0d str[%0d]=%0b", n, k, str[k]);
        end
      end
      if (str[0]) pulses0++;
      if (n == 99) begin
        checks++;
        if (pulses0 != 1) begin
          failures++;
          $display("FAIL long request gave %0d pulses", pulses0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
