// phase_accumulator_top: 32-bit, 8-stage carry-ripple pipelined phase
// accumulator for a direct digital frequency synthesizer, with the reduced
// pre-skewing FCW interface.
//
// Each clock the accumulator adds the frequency control word (FCW) to the
// phase. The add is split into M slices of N/M bits; each slice's carry is
// registered, so the clock period is set by one N/M-bit ripple, and slice k
// works k cycles after slice 0. A new FCW is written slice by slice: the
// store request produces a one-cycle pulse str[0], which a register cascade
// turns into str[1..M-1], one cycle apart; str[k] loads FCW slice k. This
// gives every slice its new FCW exactly when its part of the running sum
// arrives, so frequency changes are phase continuous, with one register
// per FCW bit plus M+1 pulse registers (41 for 32 bits) instead of the
// N*(M+1)/2 (144) of delay chains in a conventional pipelined accumulator.
// The top OUT bits of the phase are re-aligned by a small de-skew bank.
//
// Interface and timing (all on clk, reset asynchronous active low):
//   fcw, fcw_store : raise fcw_store (a level; its rising edge counts) with
//                    fcw valid and hold fcw for M+1 cycles. If edge T is
//                    the first to see fcw_store high, the new word is added
//                    from edge T+2 on (slice 0).
//   phase          : accumulator bits [N-1 -: OUT], valid M-1 cycles after
//                    the edge whose addition they contain (slice 0 time).
//   carry_out      : carry out of the MSB, high for one cycle each time the
//                    accumulator wraps; aligned with phase. Its average
//                    frequency is FCW * f_clk / 2**N, the synthesizer's
//                    output frequency.
// Sizes follow the reference design; the reset, the use of clock enables
// instead of pulse-clocked registers and the synchronous store input are
// this design's choices.
module phase_accumulator_top #(
  parameter int unsigned N   = pa_pkg::N_BITS,
  parameter int unsigned M   = pa_pkg::STAGES,
  parameter int unsigned OUT = pa_pkg::OUT_BITS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   fcw,
  input  logic           fcw_store,
  output logic [OUT-1:0] phase,
  output logic           carry_out
);

  logic [M-1:0] str;
  logic [N-1:0] fcw_skewed;
  logic [N-1:0] acc_skewed;

  strobe_gen #(.STAGES(M)) u_strobe (
    .clk  (clk),
    .rst_n(rst_n),
    .store(fcw_store),
    .str  (str)
  );

  preskew_bank #(.N(N), .M(M)) u_preskew (
    .clk       (clk),
    .rst_n     (rst_n),
    .fcw       (fcw),
    .str       (str),
    .fcw_skewed(fcw_skewed)
  );

  pipelined_accumulator #(.N(N), .M(M)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .fcw_skewed(fcw_skewed),
    .acc_skewed(acc_skewed),
    .msb_carry (carry_out)
  );

  deskew_bank #(.N(N), .M(M), .OUT(OUT)) u_deskew (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_skewed(acc_skewed),
    .phase     (phase)
  );

  // Interface rule: while the load pulses travel down the slices, the fcw
  // input must not change, or the slices would take parts of different
  // words. Checked only outside reset, when the pulse registers are known;
  // this reset qualifier is the only synchronous use of rst_n, which is why
  // lint reports rst_n as used both synchronously and asynchronously.
  a_fcw_stable_during_load : assert property (
    @(posedge clk) disable iff (!rst_n) (|str[M-1:1]) |-> fcw == $past(fcw)
  ) else $error("fcw changed while a load was in progress");

endmodule
