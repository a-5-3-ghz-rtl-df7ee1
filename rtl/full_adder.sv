// full_adder: one-bit full adder, the sum cell and carry cell of every
// accumulator slice.
//
//   sum  = a ^ b ^ cin
//   cout = a&b | b&cin | cin&a   (majority)
//
// The two functions are the textbook full-adder equations used by the
// reference design, where each is realised as a single three-level
// current-mode gate so that the carry path, which sets the clock rate,
// passes through only one gate per bit. Here it is purely combinational;
// the carry is the critical path when slices ripple through it.
module full_adder (
  input  logic a,     // FCW bit
  input  logic b,     // accumulated phase bit
  input  logic cin,   // carry from the next less significant bit
  output logic sum,
  output logic cout
);

  // Sum cell
  assign sum  = a ^ b ^ cin;
  // Carry cell
  assign cout = (a & b) | (b & cin) | (cin & a);

endmodule
