// deskew_bank: re-aligns the truncated phase word taken from the skewed
// pipelined accumulator.
//
// Slice k of the accumulator lags slice 0 by k cycles, so the top slice
// (k = M-1) is the most delayed. Only the OUT bits that address the
// phase-to-amplitude stage are kept; each kept bit of slice k is delayed
// by M-1-k further registers so that all of them describe the same
// accumulator value as the top slice. With the default sizes (32 bits, 8
// slices, 11 output bits) the kept bits are [31:21]: bits 31:28 pass
// straight through, 27:24 are delayed one cycle and 23:21 two cycles, ten
// flip-flops in all. The truncation width is the reference design's; the
// delay-chain structure is the direct way to realise the de-skewing it
// calls for.
//
// Timing: if slice k of acc_skewed holds bits of accumulator value A(j)
// k cycles after slice 0 holds them, phase holds A(j)[N-1 -: OUT] in the
// same cycle as the top slice of acc_skewed. No added latency for the top
// slice. Reset clears the delay registers.
module deskew_bank #(
  parameter int unsigned N   = pa_pkg::N_BITS,
  parameter int unsigned M   = pa_pkg::STAGES,
  parameter int unsigned OUT = pa_pkg::OUT_BITS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   acc_skewed,
  output logic [OUT-1:0] phase       // = kept accumulator bits, aligned
);

  localparam int unsigned W = N / M;

  for (genvar i = 0; i < OUT; i++) begin : g_bit
    localparam int unsigned BIT   = N - OUT + i;     // accumulator bit index
    localparam int unsigned DELAY = M - 1 - BIT / W; // registers needed
    if (DELAY == 0) begin : g_direct
      assign phase[i] = acc_skewed[BIT];
    end else begin : g_delay
      logic [DELAY-1:0] dly;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) dly <= '0;
        else begin
          dly[0] <= acc_skewed[BIT];
          for (int j = 1; j < DELAY; j++) dly[j] <= dly[j-1];
        end
      end
      assign phase[i] = dly[DELAY-1];
    end
  end

endmodule
