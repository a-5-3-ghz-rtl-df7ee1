// rca_pipe_stage: one pipeline slice of the phase accumulator, a WIDTH-bit
// carry-ripple adder closed on its own sum register.
//
// Every clock edge the slice adds its FCW bits, its registered phase bits
// and the carry registered by the previous slice in the previous cycle:
//
//   {cout, acc} <= acc + fcw + cin
//
// The carry ripples combinationally through WIDTH full adders and is caught
// in a flip-flop, so the next slice sees it one cycle later; this is what
// makes the whole accumulator a pipeline whose clock period is set by one
// slice's carry chain rather than the full word. The reference design uses
// 4-bit slices (WIDTH = 4): four sum flip-flops and one carry flip-flop.
//
// Timing: acc and cout are registered outputs, valid one cycle after the
// inputs that produced them. Reset (asynchronous, active low) clears both;
// the reset is this design's choice, the source circuit shows none.
module rca_pipe_stage #(
  parameter int unsigned WIDTH = pa_pkg::SLICE_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] fcw,   // this slice's (pre-skewed) FCW bits
  input  logic             cin,   // registered carry from the previous slice
  output logic [WIDTH-1:0] acc,   // registered phase bits of this slice
  output logic             cout   // registered carry out to the next slice
);

  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] sum;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (fcw[i]),
      .b   (acc[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cout <= 1'b0;
    end else begin
      acc  <= sum;
      cout <= carry[WIDTH];
    end
  end

endmodule
