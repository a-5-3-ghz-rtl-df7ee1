// tb_phase_accumulator_top: end-to-end test of the phase accumulator at its
// default sizes (32 bits, 8 slices, 11-bit output).
//
// A plain 32-bit accumulator A[n] = A[n-1] + F[n] serves as the model. A
// store request first seen at clock T makes the word present at T the new
// F from clock T+2 on; the 11-bit phase output after clock n must equal
// A[n-7][31:21] and carry_out the carry of A's update at clock n-7. The
// test checks both every cycle through:
//   1. reset (all outputs zero, no accumulation before the first load);
//   2. FCW = 0x00214AC3: the MSB carry must recur every 1968 or 1969
//      cycles (2^32 / FCW = 1968.52), i.e. at FCW * f_clk / 2^32;
//   3. a switch to FCW = 0x7F161391 without reset (phase continuous): the
//      carry must recur every 2 or 3 cycles (2^32 / FCW = 2.014);
//   4. random words loaded with random spacing, store held high for one or
//      many cycles, and the fcw input scrambled between loads.
// Each mechanism (loads, long store levels, frequency switches on a
// running phase, carries crossing slice boundaries, MSB wraps, ignored fcw
// changes) is counted; one that never happened counts as a failure.
module tb_phase_accumulator_top;
  localparam int N = 32, M = 8, W = N / M, OUT = 11;
  localparam int NMAX = 40000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] fcw;
  logic fcw_store;
  logic [OUT-1:0] phase;
  logic carry_out;

  phase_accumulator_top dut (
    .clk(clk), .rst_n(rst_n), .fcw(fcw), .fcw_store(fcw_store),
    .phase(phase), .carry_out(carry_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n = 0;                       // clocks since reset release
  logic [N-1:0] Ahist [0:NMAX];
  logic         Chist [0:NMAX];
  logic [N-1:0] A = '0, Fcur = '0, pending_word = '0;
  int pending_at = -1;
  logic store_last = 0;

  // mechanism counters
  int n_loads = 0, n_long_store = 0, n_switch_running = 0;
  int n_slice_carries = 0, n_wraps = 0, n_ignored_fcw = 0;
  int last_wrap = -1;
  int min_gap = 1 << 30, max_gap = 0;

  initial begin
    repeat (NMAX + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] a_at(int j);
    return (j >= 1) ? Ahist[j] : '0;
  endfunction
  function automatic logic c_at(int j);
    return (j >= 1) ? Chist[j] : 1'b0;
  endfunction

  // One clock: update the model for the coming edge, then check after it.
  task automatic tick();
    logic [N:0] s;
    n++;
    if (fcw_store && !store_last) begin
      pending_word = fcw;
      pending_at   = n + 2;
      n_loads++;
    end else if (fcw_store && store_last) begin
      n_long_store++;
    end
    store_last = fcw_store;
    if (n == pending_at) begin
      if (A != '0 && pending_word != Fcur) n_switch_running++;
      Fcur = pending_word;
    end
    for (int k = 1; k < M; k++) begin
      logic [N:0] mask;
      mask = (33'd1 << (k*W)) - 33'd1;
      if ((({1'b0, A} & mask) + ({1'b0, Fcur} & mask)) >> (k*W) != 0) n_slice_carries++;
    end
    s = {1'b0, A} + {1'b0, Fcur};
    A = s[N-1:0];
    Ahist[n] = A;
    Chist[n] = s[N];
    @(negedge clk);
    checks++;
    if (phase != a_at(n - (M-1))[N-1 -: OUT] || carry_out != c_at(n - (M-1))) begin
      failures++;
      if (failures < 10)
        $display("FAIL clock %0d: phase=%h exp %h carry=%0b exp %0b", n, phase,
                 a_at(n - (M-1))[N-1 -: OUT], carry_out, c_at(n - (M-1)));
    end
    if (carry_out) begin
      n_wraps++;
      if (last_wrap >= 0) begin
        if (n - last_wrap < min_gap) min_gap = n - last_wrap;
        if (n - last_wrap > max_gap) max_gap = n - last_wrap;
      end
      last_wrap = n;
    end
  endtask

  // Load a word: store held high for `hold` cycles, fcw kept for M+1
  // cycles after the request, then scrambled.
  task automatic load(logic [N-1:0] word, int hold);
    fcw = word;
    fcw_store = 1;
    for (int i = 0; i < M + 1; i++) begin
      tick();
      if (i + 1 >= hold) fcw_store = 0;
    end
    fcw_store = 0;
    fcw = N'($urandom);
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      if ($urandom % 4 == 0) begin
        fcw = N'($urandom);
        n_ignored_fcw++;
      end
      tick();
    end
  endtask

  task automatic expect_gaps(int lo, int hi, string what);
    checks++;
    if (min_gap < lo || max_gap > hi || n_wraps < 2) begin
      failures++;
      $display("FAIL %s: carry gaps %0d..%0d (expected %0d..%0d), %0d wraps",
               what, min_gap, max_gap, lo, hi, n_wraps);
    end else
      $display("%s: carry period %0d..%0d cycles over %0d wraps", what, min_gap, max_gap,
               n_wraps);
  endtask

  task automatic check_seen(int cnt, string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("%s: %0d", what, cnt);
  endtask

  initial begin
    int wraps_before;
    fcw = N'($urandom);
    fcw_store = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (phase != '0 || carry_out != 0) begin failures++; $display("FAIL reset outputs"); end
    rst_n = 1;
    run(20);  // no load yet: phase must stay at zero

    // Workload 1: FCW = 0x00214AC3 (5.3 GHz clock in the reference measurement)
    load(32'h00214AC3, 1);
    run(M + 1);
    n_wraps = 0; last_wrap = -1; min_gap = 1 << 30; max_gap = 0;
    run(8000);
    expect_gaps(1968, 1969, "FCW 0x00214AC3");

    // Workload 2: switch to 0x7F161391 while running (4.7 GHz measurement)
    load(32'h7F161391, 3);
    run(M + 1);
    wraps_before = n_wraps;
    n_wraps = 0; last_wrap = -1; min_gap = 1 << 30; max_gap = 0;
    run(2000);
    expect_gaps(2, 3, "FCW 0x7F161391");
    // over 2000 cycles: 2000 * FCW / 2^32 = 992.86 wraps expected
    checks++;
    if (n_wraps < 992 || n_wraps > 993) begin
      failures++;
      $display("FAIL wrap count %0d, expected 992 or 993", n_wraps);
    end
    n_wraps += wraps_before;

    // Random loads
    for (int r = 0; r < 200; r++) begin
      logic [N-1:0] w;
      case ($urandom % 4)
        0: w = '1;                       // longest carry ripples
        1: w = N'($urandom) & 32'h000F_FFFF;
        default: w = N'($urandom);
      endcase
      load(w, 1 + ($urandom % 12));
      run($urandom % 60);
    end

    check_seen(n_loads, "FCW loads");
    check_seen(n_long_store, "cycles of store held high after its edge");
    check_seen(n_switch_running, "frequency switches on a running phase");
    check_seen(n_slice_carries, "carries across slice boundaries");
    check_seen(n_wraps, "MSB carry-out pulses");
    check_seen(n_ignored_fcw, "fcw changes outside a load");
    $display("clocks simulated: %0d", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
