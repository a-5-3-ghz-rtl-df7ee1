// strobe_gen: makes the pipelined load pulses str[0..STAGES-1] that write
// the FCW into the pre-skewing registers slice by slice.
//
// The external FCW store signal is sampled by two flip-flops; the first
// pulse, str[0], is the rising-edge detect (first sample high, second
// still low) and so lasts exactly one clock cycle however long the store
// signal stays high. Each further pulse str[k] is str[k-1] delayed by one
// register, so the pulses march down the pipeline one cycle apart, at the
// same pace as the carries between slices. This replaces the conventional
// chains that delay the FCW bits themselves: the cost is 2 + (STAGES-1)
// flip-flops (9 for 8 stages) instead of a delay chain per FCW bit.
//
// Timing: if store is first seen high at clock edge T, str[k] is high from
// edge T+k to edge T+k+1. A new rising edge on store may begin a new load
// at any time; pulses of successive loads move independently.
//
// The reference circuit clocks the slice registers directly with these
// pulses; in this synchronous design they are clock enables of registers
// on the single accumulator clock, which gives the same cycle behaviour.
// The store signal is assumed synchronous to clk (the reference samples an
// external differential trigger; its receiver is analog and not modelled).
module strobe_gen #(
  parameter int unsigned STAGES = pa_pkg::STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              store,  // FCW store request, level, synchronous
  output logic [STAGES-1:0] str     // one-cycle load pulse per slice
);

  logic store_q, store_qq;
  logic [STAGES-1:1] str_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store_q  <= 1'b0;
      store_qq <= 1'b0;
    end else begin
      store_q  <= store;
      store_qq <= store_q;
    end
  end

  assign str[0] = store_q & ~store_qq;

  if (STAGES > 1) begin : g_cascade
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) str_q <= '0;
      else        str_q <= str[STAGES-2:0];
    end
    assign str[STAGES-1:1] = str_q;
  end

endmodule
