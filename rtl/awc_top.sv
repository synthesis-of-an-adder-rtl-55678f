// awc_top -- adders of binary codes without carry: the 4-bit adder and the first
// digits of the 8-bit and 16-bit schemes.
//
// u_add4 is the complete 4-bit adder: a decoder of D(x), the static memory of the
// coefficient rows D'(x) and four independent digits. Its code system is the ring of
// the key x_j = x_{j-4} XOR x_{j-1} started from the initial code 1111; another system
// is chosen by re-recording the memory (mem_we with the row's code on d4 and the row on
// mem_wdata) or, at build time, by the INIT4 parameter. Sum digits are combinational from a4/d4 to s4.
//
// u_dig8 and u_dig16 are the single-digit schemes the document draws for wider
// adders: the first digit of an 8-bit adder on AND and XOR gates, and the first digit of
// a 16-bit adder on OR and XAND (XNOR) gates. Their coefficient inputs d8_1 / d16_1
// (bit j = d_{1,j+1}) come from the memory of a full adder of that width, which the
// document does not draw; they are brought out as ports here. Code bit vectors of these
// digits are in digit order: bit j = a_{j+1}.
//
// Clock and reset only serve the 4-bit adder's memory (synchronous, active-low reset
// loads the table of the initial code).
module awc_top
  import awc_pkg::*;
#(
  parameter logic [3:0] INIT4 = 4'b1111
) (
  input  logic         clk,
  input  logic         rst_n,
  // 4-bit adder: codes with the first digit in the most significant bit
  input  logic [3:0]   a4,
  input  logic [3:0]   d4,
  output logic [3:0]   s4,
  input  logic         mem_we,
  input  logic [15:0]  mem_wdata,
  // first digit of the 8-bit AND/XOR adder
  input  logic [7:0]   d8_1,
  input  logic [7:0]   a8,
  output logic         s8_1,
  // first digit of the 16-bit OR/XAND adder
  input  logic [15:0]  d16_1,
  input  logic [15:0]  a16,
  output logic         s16_1
);

  awc_adder #(.N(4), .TAPS(4'b1001), .INIT(INIT4), .LOGIC(AND_XOR)) u_add4 (
    .clk, .rst_n, .a(a4), .d(d4), .s(s4),
    .mem_we, .mem_wdata
  );

  awc_digit #(.N(8), .LOGIC(AND_XOR)) u_dig8 (.d_row(d8_1), .a_dig(a8), .s(s8_1));

  awc_digit #(.N(16), .LOGIC(OR_XAND)) u_dig16 (.d_row(d16_1), .a_dig(a16), .s(s16_1));

endmodule
