// awc_adder -- N-bit adder of binary codes without carry (decoder, memory, digits).
//
// The codes A(x) and D(x) belong to one ring code system (see awc_pkg). The sum C(x)
// is A(x) slid along the ring by the position of D(x). The decoder turns D(x) into a
// one-hot line, the line reads the coefficient row D'(x) out of the static memory,
// and N independent digits each form S_i = XOR_j (d_ij AND a_j). There is no carry
// between digits; all digits settle in parallel, in one clock cycle.
//
// Positions add modulo 2^N - 1 (the ring closes). The document gives the useful range
// as position(A) + position(D) <= 2^N - 2; beyond it the sum wraps round the ring.
//
// Interface:
//   a, d   codes to add, first digit (a1, d1) in the most significant bit
//   s      sum code, first digit (S1) in the most significant bit; combinational
//   clk, rst_n, mem_we, mem_wdata
//          the memory's clock, synchronous reset (loads the table for INIT, TAPS,
//          LOGIC) and recording: with mem_we high, mem_wdata is stored at the clock edge
//          into the row of the code on d (the decoder selects the row)
// Parameters: N code width; TAPS recursion key (bit t-1 for x_{j-t}); INIT initial code
// of the system; LOGIC AND_XOR or OR_XAND. The 4-bit key 4'b1001 and INIT 4'b1111 are
// the document's main example; other widths need a key that gives 2^N - 1 codes.
module awc_adder
  import awc_pkg::*;
#(
  parameter int unsigned  N     = 4,
  parameter logic [N-1:0] TAPS  = N'(4'b1001),
  parameter logic [N-1:0] INIT  = '1,
  parameter awc_logic_e   LOGIC = AND_XOR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    d,
  output logic [N-1:0]    s,
  input  logic            mem_we,
  input  logic [N*N-1:0]  mem_wdata
);

  logic [2**N-1:0] line;
  logic [N*N-1:0]  row;
  logic [N-1:0]    a_dig;

  awc_decoder #(.K(N)) u_dec (.code(d), .line(line));

  awc_coeff_mem #(.N(N), .TAPS(TAPS), .INIT(INIT), .LOGIC(LOGIC)) u_mem (
    .clk, .rst_n, .line_sel(line), .rd_row(row),
    .we(mem_we), .wdata(mem_wdata)
  );

  // Code bits in digit order: a_dig[j] = a_{j+1}.
  always_comb
    for (int unsigned j = 0; j < N; j++) a_dig[j] = a[N-1-j];

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic [N-1:0] d_row;
    // Coefficients of digit i+1: d_{i+1,j+1} is row bit j*N + i.
    always_comb
      for (int unsigned j = 0; j < N; j++) d_row[j] = row[j*N + i];

    awc_digit #(.N(N), .LOGIC(LOGIC)) u_digit (.d_row(d_row), .a_dig(a_dig), .s(s[N-1-i]));
  end

endmodule
