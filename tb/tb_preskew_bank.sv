// tb_preskew_bank: random FCW words and random load-pulse patterns; each
// cycle checks the registered FCW against a model that copies slice k of
// the input when str[k] was high at the previous clock and holds it
// otherwise. Then runs one ordered load (str[0..7] one cycle apart, input
// changing every cycle) and checks that slice k took the word present k
// cycles after the first pulse.
module tb_preskew_bank;
  localparam int N = 32, M = 8, W = N / M;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] fcw, fcw_skewed, model;
  logic [M-1:0] str;
  logic [N-1:0] words [0:M-1];
  int checks = 0, failures = 0;

  preskew_bank #(.N(N), .M(M)) dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .str(str),
                                    .fcw_skewed(fcw_skewed));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] expect_w;
    fcw = '0; str = '0; model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (fcw_skewed != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      fcw = N'($urandom);
      str = M'($urandom);
      for (int k = 0; k < M; k++) if (str[k]) model[k*W +: W] = fcw[k*W +: W];
      @(negedge clk);
      checks++;
      if (fcw_skewed != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %h exp %h", n, fcw_skewed, model);
      end
    end
    // ordered load
    for (int k = 0; k < M; k++) begin
      words[k] = N'($urandom);
      fcw = words[k];
      str = M'(1) << k;
      @(negedge clk);
    end
    str = '0;
    for (int k = 0; k < M; k++) expect_w[k*W +: W] = words[k][k*W +: W];
    checks++;
    if (fcw_skewed != expect_w) begin
      failures++;
      $display("FAIL ordered load: %h exp %h", fcw_skewed, expect_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
