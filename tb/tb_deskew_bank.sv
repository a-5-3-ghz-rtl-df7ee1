// tb_deskew_bank: presents a skewed stream (slice k carries bits of word
// V[n-k] in cycle n, V random each cycle) and checks that the 11-bit output
// in cycle n equals V[n-7][31:21], i.e. all kept bits are re-aligned to the
// most delayed, top slice.
module tb_deskew_bank;
  localparam int N = 32, M = 8, W = N / M, OUT = 11, NCYC = 1000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] acc_skewed;
  logic [OUT-1:0] phase;
  logic [N-1:0] V [0:NCYC];
  int checks = 0, failures = 0;

  deskew_bank #(.N(N), .M(M), .OUT(OUT)) dut (.clk(clk), .rst_n(rst_n),
                                              .acc_skewed(acc_skewed), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= NCYC; n++) V[n] = N'($urandom);
    acc_skewed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = M; n <= NCYC; n++) begin
      for (int k = 0; k < M; k++) acc_skewed[k*W +: W] = V[n-k][k*W +: W];
      #1;
      if (n >= 2 * M) begin
        checks++;
        if (phase != V[n-(M-1)][N-1 -: OUT]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: %h exp %h", n, phase,
                                      V[n-(M-1)][N-1 -: OUT]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
