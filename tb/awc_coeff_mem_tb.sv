// awc_coeff_mem_tb -- checks the coefficient memory of the 4-bit system.
//
// After reset every row read through a one-hot line must equal the reference row of
// the code's ring number (column j = unit code j slid that many steps), and the row
// of the missing code 0000 must be zero. A second instance in the OR_XAND family
// started from 0000 must hold the complemented rows of the matching XOR system
// (initial code 1111). Then rows are re-recorded (the line select picks the row), read
// back, and a new reset must restore the table. Writes take effect one clock after we.
module awc_coeff_mem_tb;
  import awc_pkg::*;
  import awc_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [15:0] line;
  logic [15:0] row, row_x;
  logic [15:0] wdata = '0;

  always #5 clk = ~clk;

  awc_coeff_mem #(.N(4), .TAPS(4'b1001), .INIT(4'b1111), .LOGIC(AND_XOR)) u_mem (
    .clk, .rst_n, .line_sel(line), .rd_row(row), .we, .wdata);
  awc_coeff_mem #(.N(4), .TAPS(4'b1001), .INIT(4'b0000), .LOGIC(OR_XAND)) u_memx (
    .clk, .rst_n, .line_sel(line), .rd_row(row_x), .we(1'b0), .wdata('0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_table();
    int q;
    logic [15:0] exp_row;
    for (int v = 0; v < 16; v++) begin
      line = 16'(1) << v; #1;
      q = ref_index(tcode_t'(v), 16'hF, 4, 16'h9);
      exp_row = (q < 0) ? 16'h0 : ref_row(q, 4, 16'h9)[15:0];
      check(row == exp_row, $sformatf("row of code %b: %h, expected %h", 4'(v), row, exp_row));
      // XAND code v is the complement of XOR code ~v.
      q = ref_index(tcode_t'(~v & 15), 16'hF, 4, 16'h9);
      exp_row = (q < 0) ? 16'hFFFF : ~ref_row(q, 4, 16'h9)[15:0];
      check(row_x == exp_row, $sformatf("XAND row of code %b", 4'(v)));
    end
  endtask

  initial begin
    line = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_table();
    // D = 0110 (number 6 in the 1111 system): digit 1 = b1^b2^b3^b4, digit 4 = b1^b3.
    line = 16'(1) << 6; #1;
    check({row[12], row[8], row[4], row[0]} == 4'b1111, "D'(6) digit 1");
    check({row[15], row[11], row[7], row[3]} == 4'b0101, "D'(6) digit 4");
    // Re-record two rows.
    @(negedge clk); we = 1'b1; line = 16'(1) << 3; wdata = 16'hA5C3;
    @(negedge clk);
    check(row == 16'hA5C3, "row 3 written one clock after we");
    line = 16'(1) << 0; wdata = 16'h1234;
    @(negedge clk); we = 1'b0;
    check(row == 16'h1234, "row 0 written");
    line = 16'(1) << 3; #1;
    check(row == 16'hA5C3, "row 3 kept");
    line = 16'(1) << 5; #1;
    check(row == ref_row(ref_index(16'h5, 16'hF, 4, 16'h9), 4, 16'h9)[15:0], "row 5 untouched");
    line = '0; #1;
    check(row == '0, "no line selected reads zero");
    // Reset restores the table.
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    check_table();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
