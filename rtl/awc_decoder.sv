// awc_decoder -- decoder of the code D(x) into a unitary (one-hot) code.
//
// Each of the 2^K output lines is a K-input AND of the code bits, taken true or
// inverted according to the line number, so exactly one line is high: line r for
// code value r. The one-hot line then selects the matching row of coefficients in
// the coefficient memory. The document draws this as inverters plus multi-input AND
// gates; a wide AND may itself be built as a cascade of smaller ANDs.
//
// Interface (combinational): code[K-1:0] in, line[2**K-1:0] out, line[r] = (code == r).
module awc_decoder #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0]      code,
  output logic [2**K-1:0]   line
);

  for (genvar r = 0; r < 2**K; r++) begin : g_line
    localparam logic [K-1:0] LIT = K'(r);
    // Inverter on every code bit that is 0 in r, then one AND over all K literals.
    assign line[r] = &(~(code ^ LIT));
  end

endmodule
