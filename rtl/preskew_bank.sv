// preskew_bank: the reduced set of pre-skewing registers, one flip-flop per
// FCW bit.
//
// Slice k of the FCW (bits [k*W +: W], W = N/M) is written from the fcw
// input when its load pulse str[k] is high and holds otherwise. Because
// strobe_gen issues str[k] one cycle after str[k-1], a new FCW reaches
// slice k exactly k cycles after slice 0, which is the skew the pipelined
// accumulator needs for a coherent, phase-continuous frequency change. A
// conventional design gets the same skew from a chain of k+1 registers per
// bit of slice k; here each bit needs one.
//
// Timing: the registered output changes on the edge that ends str[k]. The
// fcw input must stay unchanged from the edge that first sees the store
// request until str[M-1] has ended (M cycles), otherwise the slices load
// parts of different words. Reset clears the FCW to 0 (design choice).
module preskew_bank #(
  parameter int unsigned N = pa_pkg::N_BITS,
  parameter int unsigned M = pa_pkg::STAGES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fcw,      // external frequency control word
  input  logic [M-1:0] str,      // per-slice load pulses
  output logic [N-1:0] fcw_skewed
);

  localparam int unsigned W = N / M;

  for (genvar k = 0; k < M; k++) begin : g_slice
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      fcw_skewed[k*W +: W] <= '0;
      else if (str[k]) fcw_skewed[k*W +: W] <= fcw[k*W +: W];
    end
  end

endmodule
