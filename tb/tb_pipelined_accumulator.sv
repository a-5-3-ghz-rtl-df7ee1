// tb_pipelined_accumulator: feeds the 32-bit, 8-slice pipelined accumulator
// a pre-skewed stream of FCW words that changes every cycle and checks
// every slice and the MSB carry against a plain 32-bit accumulator model.
//
// Model: F[n] is the word slice 0 adds at clock n, A[n] = A[n-1] + F[n]
// (mod 2^32) and C[n] its carry out. Slice k is given bits of F[n-k] before
// clock n; after clock n it must hold bits of A[n-k], and msb_carry must
// equal C[n-7]. This checks the carry hand-off between slices and the
// seven-cycle skew of the top slice.
module tb_pipelined_accumulator;
  localparam int N = 32, M = 8, W = N / M, NCYC = 3000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] fcw_skewed, acc_skewed;
  logic msb_carry;
  int checks = 0, failures = 0, wraps = 0;

  logic [N-1:0] F [0:NCYC];
  logic [N-1:0] A [0:NCYC];
  logic         C [0:NCYC];

  pipelined_accumulator #(.N(N), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .fcw_skewed(fcw_skewed),
    .acc_skewed(acc_skewed), .msb_carry(msb_carry));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] fval(int j);
    return (j >= 1) ? F[j] : '0;
  endfunction
  function automatic logic [N-1:0] aval(int j);
    return (j >= 1) ? A[j] : '0;
  endfunction

  initial begin
    logic [N:0] s;
    F[0] = '0; A[0] = '0; C[0] = 0;
    for (int n = 1; n <= NCYC; n++) begin
      // mostly large words so the MSB wraps often, sometimes all-ones
      // words so carries ripple through every slice
      F[n] = ($urandom % 8 == 0) ? '1 : N'($urandom);
      s = {1'b0, A[n-1]} + {1'b0, F[n]};
      A[n] = s[N-1:0];
      C[n] = s[N];
    end
    fcw_skewed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= NCYC; n++) begin
      // drive the inputs used at clock n
      for (int k = 0; k < M; k++) begin
        logic [N-1:0] fw;
        fw = fval(n - k);
        fcw_skewed[k*W +: W] = fw[k*W +: W];
      end
      @(negedge clk);
      for (int k = 0; k < M; k++) begin
        logic [N-1:0] av;
        av = aval(n - k);
        checks++;
        if (acc_skewed[k*W +: W] != av[k*W +: W]) begin
          failures++;
          if (failures < 10) $display("FAIL clock %0d slice %0d: %h exp %h",
                                      n, k, acc_skewed[k*W +: W], av[k*W +: W]);
        end
      end
      checks++;
      if (msb_carry != ((n - (M-1) >= 1) ? C[n-(M-1)] : 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d msb_carry=%0b", n, msb_carry);
      end
      if (msb_carry) wraps++;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no MSB carry seen"); end
    $display("MSB wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
