// awc_coeff_mem -- static memory of the coefficient rows D'(x), one row per code D(x).
//
// The memory has 2^N rows of N*N bits. Row r holds the coefficients d_ij that slide a
// code by the ring position of code r in the chosen code system: d_ij sits at bit
// (j-1)*N + (i-1). The row of the code missing from the system (all zeros in the XOR
// system, all ones in the XAND system) holds the zero matrix. In the OR_XAND family
// every stored bit is complemented, as the OR/XNOR digits expect.
//
// The memory is an array of awc_sram_cell bits. The decoder's one-hot line is the
// line select of every cell in its row; all columns are selected together, so a whole
// row is read or recorded at once.
//
// Reading: every cell is read continuously; only the cells of the selected row drive a
// 1, and rd_row is the OR of each column, the wired-OR columns of the document's
// structure. Combinational from line_sel to rd_row.
//
// Recording: with we high, wdata is stored into the row whose line is selected (the
// row of the code on the decoder input) at the rising clock edge. Re-recording all rows
// switches the adder to another initial code or key without changing the circuit.
//
// Reset: a synchronous, active-low rst_n loads every cell with its bit of the table for
// the parameters (INIT, the initial code of the system; TAPS, the recursion key; LOGIC,
// the family). The document says only that the rows are recorded into static memory;
// the reset load, and recording through the same line select as reading, are this
// design's choices.
module awc_coeff_mem
  import awc_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter logic [N-1:0] TAPS = N'(4'b1001),
  parameter logic [N-1:0] INIT = '1,
  parameter awc_logic_e  LOGIC = AND_XOR
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2**N-1:0]     line_sel,
  output logic [N*N-1:0]      rd_row,
  input  logic                we,
  input  logic [N*N-1:0]      wdata
);

  localparam int unsigned ROWS = 2**N;
  typedef logic [N*N-1:0] row_t;
  typedef row_t           table_t [ROWS];

  // Flatten a coefficient matrix into a memory row, complemented for OR_XAND.
  function automatic row_t flatten(coeff_t m);
    row_t r;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        r[j*N + i] = m[i][j];
    return (LOGIC == OR_XAND) ? ~r : r;
  endfunction

  // Walk the ring once from INIT: the code met after q slides gets D'(q).
  function automatic table_t build_table();
    table_t  t;
    code_t   c;
    coeff_t  m;
    for (int unsigned r = 0; r < ROWS; r++) t[r] = flatten('0);
    c = code_t'(INIT);
    m = coeff_identity(N);
    for (int unsigned q = 0; q < ring_len(N); q++) begin
      t[c[N-1:0]] = flatten(m);
      c = ring_step(c, N, code_t'(TAPS), LOGIC);
      m = coeff_step(m, N, code_t'(TAPS));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  // Cell outputs, one word per row; only the selected row is non-zero.
  row_t cell_out [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar b = 0; b < N*N; b++) begin : g_bit
      awc_sram_cell #(.RESET_VALUE(TABLE[r][b])) u_cell (
        .clk, .rst_n,
        .row_sel (line_sel[r]),
        .col_sel (1'b1),
        .read    (1'b1),
        .record  (we),
        .data_in (wdata[b]),
        .data_out(cell_out[r][b])
      );
    end
  end

  always_comb begin
    rd_row = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      rd_row |= cell_out[r];
  end

endmodule
