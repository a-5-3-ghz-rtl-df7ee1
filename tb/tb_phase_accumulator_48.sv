// tb_phase_accumulator_48: the accumulator widened to 48 bits (12 slices of
// 4 bits, 11-bit output), the high-resolution size the architecture is
// meant to scale to. Random words are loaded at random intervals and the
// phase and MSB carry are checked every cycle against a plain 48-bit
// accumulator A[n] = A[n-1] + F[n], delayed by M-1 = 11 cycles. A store
// first seen at clock T makes the word the new F from clock T+2 on.
module tb_phase_accumulator_48;
  localparam int N = 48, M = 12, OUT = 11, NMAX = 6000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] fcw;
  logic fcw_store;
  logic [OUT-1:0] phase;
  logic carry_out;

  phase_accumulator_top #(.N(N), .M(M), .OUT(OUT)) dut (
    .clk(clk), .rst_n(rst_n), .fcw(fcw), .fcw_store(fcw_store),
    .phase(phase), .carry_out(carry_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n = 0, wraps = 0, loads = 0;
  logic [N-1:0] Ahist [0:NMAX];
  logic         Chist [0:NMAX];
  logic [N-1:0] A = '0, Fcur = '0, pend = '0;
  int pend_at = -1;
  logic store_last = 0;

  initial begin
    repeat (NMAX + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    logic [N:0] s;
    logic [N-1:0] a_exp;
    logic c_exp;
    n++;
    if (fcw_store && !store_last) begin pend = fcw; pend_at = n + 2; loads++; end
    store_last = fcw_store;
    if (n == pend_at) Fcur = pend;
    s = {1'b0, A} + {1'b0, Fcur};
    A = s[N-1:0];
    Ahist[n] = A;
    Chist[n] = s[N];
    @(negedge clk);
    a_exp = (n - (M-1) >= 1) ? Ahist[n-(M-1)] : '0;
    c_exp = (n - (M-1) >= 1) ? Chist[n-(M-1)] : 1'b0;
    checks++;
    if (phase != a_exp[N-1 -: OUT] || carry_out != c_exp) begin
      failures++;
      if (failures < 10) $display("FAIL clock %0d: phase=%h exp %h carry=%0b exp %0b",
                                  n, phase, a_exp[N-1 -: OUT], carry_out, c_exp);
    end
    if (carry_out) wraps++;
  endtask

  initial begin
    fcw = '0;
    fcw_store = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n < NMAX - 100) begin
      fcw = N'({$urandom, $urandom});
      if ($urandom % 3 == 0) fcw[N-1 -: 4] = 4'hF;  // fast wraps
      fcw_store = 1;
      for (int i = 0; i < M + 1; i++) begin
        tick();
        fcw_store = 0;
      end
      repeat ($urandom % 80) tick();
    end
    checks++;
    if (wraps == 0 || loads < 10) begin
      failures++;
      $display("FAIL too little exercised: %0d wraps, %0d loads", wraps, loads);
    end
    $display("loads %0d, MSB wraps %0d", loads, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
