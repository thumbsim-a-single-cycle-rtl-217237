// thumb_adder: 32-bit adder with explicit carry in, carry out and overflow.
//
// r = a + b + cin. The carry and overflow flags are formed from the sign bits
// of the two operands and of the result, following the truth table that
// defines them for this machine:
//   C = (a31 & b31) | (a31 & ~r31) | (b31 & ~r31)
//   V = (a31 & b31 & ~r31) | (~a31 & ~b31 & r31)
// Subtraction is obtained by the caller passing ~b and cin = 1.
// Purely combinational.
module thumb_adder
  import thumb_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  cin,
  output word_t r,
  output logic  cout,
  output logic  vout
);
  always_comb begin
    r    = a + b + {31'd0, cin};
    cout = (a[31] & b[31]) | (a[31] & ~r[31]) | (b[31] & ~r[31]);
    vout = (a[31] & b[31] & ~r[31]) | (~a[31] & ~b[31] & r[31]);
  end
endmodule
