// awc_digit -- one digit of the adder of binary codes without carry.
//
// Computes digit i of the sum as S_i = XOR over j of (d_ij AND a_j): every bit a_j of
// the first code is kept or masked by its coefficient d_ij, and the kept bits are
// XORed by a pairing tree. No signal passes from one digit to another, so all digits
// of a sum are formed side by side. The gate structure follows the digit schemes of
// the document: one AND per code bit, then a pyramid of two-input XOR gates (4-bit
// and 8-bit schemes); or, in the dual OR_XAND form of the 16-bit scheme, one OR per
// code bit and a pyramid of XNOR gates, fed with complemented coefficients and codes.
//
// Interface (combinational):
//   d_row[j] = d_{i,j+1}, the coefficients of this digit over a_1..a_N
//   a_dig[j] = a_{j+1}, the code bits in digit order (a_1 first, at index 0)
//   s        = the digit of the sum
// Depth: one AND/OR level plus ceil(log2 N) XOR/XNOR levels.
module awc_digit
  import awc_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter awc_logic_e  LOGIC = AND_XOR
) (
  input  logic [N-1:0] d_row,
  input  logic [N-1:0] a_dig,
  output logic         s
);

  logic [N-1:0] terms;

  // Substitution of the code bits into the coefficient vector: "&" gates, or "1"
  // (OR) gates in the dual form.
  always_comb begin
    if (LOGIC == AND_XOR) terms = d_row & a_dig;
    else                  terms = d_row | a_dig;
  end

  awc_pair_tree #(.N(N), .INVERT(LOGIC == OR_XAND)) u_tree (.terms(terms), .y(s));

endmodule
