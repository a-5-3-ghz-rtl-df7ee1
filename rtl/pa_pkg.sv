// pa_pkg: shared sizes of the pipelined DDFS phase accumulator.
//
// The accumulator is N_BITS wide and split into STAGES carry-ripple slices
// of SLICE_BITS bits each; the phase word leaving the accumulator is
// truncated to OUT_BITS most significant bits before it addresses the
// phase-to-amplitude stage. The defaults (32 bits, 8 stages of 4 bits,
// 11-bit output) are those of the reference design.
package pa_pkg;

  localparam int unsigned N_BITS     = 32;  // accumulator / FCW width
  localparam int unsigned STAGES     = 8;   // pipeline depth
  localparam int unsigned SLICE_BITS = N_BITS / STAGES;  // bits per carry-ripple slice
  localparam int unsigned OUT_BITS   = 11;  // truncated phase width

  // Register budget at these sizes: a conventional pipelined accumulator
  // delays the FCW through N*(M+1)/2 = 144 pre-skewing flip-flops; the
  // pulse-loaded scheme needs N + 2 + (M-1) = 41.

endpackage
