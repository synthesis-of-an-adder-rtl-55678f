// awc_sram_cell -- one bit of the static coefficient memory.
//
// The cell is chosen by a line select (from the decoder of lines) and a column select
// (from the decoder of columns). While both are high, a high `record` stores data_in
// at the rising clock edge, and a high `read` puts the stored bit on data_out. When the
// cell is not chosen, or not read, data_out is 0, so the outputs of all cells of a
// column can be ORed together.
//
// The original cell is a latch of cross-coupled gates with read, record and data-input
// lines. Here the stored bit is a flip-flop: the same behaviour at the clock edge,
// without a level-sensitive latch. The active-high polarity of all controls and the
// synchronous, active-low reset to RESET_VALUE (the bit of the built-in coefficient
// table) are this design's choices.
//
// Interface: clk, rst_n; row_sel, col_sel, read, record, data_in in; data_out out.
// Timing: write takes effect one clock edge after record; read is combinational.
module awc_sram_cell #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic row_sel,
  input  logic col_sel,
  input  logic read,
  input  logic record,
  input  logic data_in,
  output logic data_out
);

  logic bit_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                               bit_q <= RESET_VALUE;
    else if (row_sel && col_sel && record)    bit_q <= data_in;
  end

  assign data_out = row_sel & col_sel & read & bit_q;

endmodule
