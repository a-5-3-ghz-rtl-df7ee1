// pipelined_accumulator: N_BITS-wide carry-ripple pipelined phase
// accumulator made of STAGES slices of N_BITS/STAGES bits.
//
// Slice k accumulates FCW bits [k*W +: W]; its carry out is registered and
// enters slice k+1 on the next clock, so slice k runs k cycles behind
// slice 0. To add one FCW word coherently, slice k must therefore see its
// FCW bits k cycles after slice 0 does: the input fcw_skewed is expected
// pre-skewed that way, and the output acc_skewed is skewed the same way
// (slice k of acc_skewed after clock n holds bits of the true accumulator
// value k cycles older than slice 0 does). msb_carry is the registered
// carry out of the most significant slice: it is high for exactly one
// clock each time the full N_BITS accumulator wraps, i.e. at an average
// rate FCW * f_clk / 2**N_BITS.
//
// Defaults: 32 bits, 8 slices of 4 bits, as in the reference design. The
// carry into slice 0 is tied to 0.
module pipelined_accumulator
#(
  parameter int unsigned N  = pa_pkg::N_BITS,
  parameter int unsigned M  = pa_pkg::STAGES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fcw_skewed,  // slice k delayed k cycles
  output logic [N-1:0] acc_skewed,  // slice k delayed k cycles
  output logic         msb_carry    // registered carry out of the top slice
);

  localparam int unsigned W = N / M;

  logic [M:0] carry;  // carry[k] enters slice k; carry[M] leaves the top

  assign carry[0] = 1'b0;

  for (genvar k = 0; k < M; k++) begin : g_stage
    rca_pipe_stage #(.WIDTH(W)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .fcw  (fcw_skewed[k*W +: W]),
      .cin  (carry[k]),
      .acc  (acc_skewed[k*W +: W]),
      .cout (carry[k+1])
    );
  end

  assign msb_carry = carry[M];

  initial begin
    assert (N % M == 0)
      else $error("pipelined_accumulator: N (%0d) must be a multiple of M (%0d)", N, M);
  end

endmodule
