// awc_sram_cell_tb -- checks one bit of the static coefficient memory.
//
// Two cells, reset to 0 and to 1. Random line/column selects, read and record strobes
// and data are applied for 400 clocks; a plain model of the stored bit predicts
// data_out, which must be the stored bit only while the cell is chosen and read.
module awc_sram_cell_tb;
  int checks = 0, failures = 0, n_writes = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic row_sel = 1'b0, col_sel = 1'b0, read = 1'b0, record = 1'b0, data_in = 1'b0;
  logic out0, out1;
  logic m0, m1;

  always #5 clk = ~clk;

  awc_sram_cell #(.RESET_VALUE(1'b0)) u0 (.clk, .rst_n, .row_sel, .col_sel, .read, .record,
                                          .data_in, .data_out(out0));
  awc_sram_cell #(.RESET_VALUE(1'b1)) u1 (.clk, .rst_n, .row_sel, .col_sel, .read, .record,
                                          .data_in, .data_out(out1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m0 = 1'b0; m1 = 1'b1;
    row_sel = 1'b1; col_sel = 1'b1; read = 1'b1; #1;
    check(out0 == 1'b0 && out1 == 1'b1, "reset values");
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      {row_sel, col_sel, read, record, data_in} = 5'($urandom);
      #1;
      check(out0 == (row_sel & col_sel & read & m0), $sformatf("cell0 read, cycle %0d", k));
      check(out1 == (row_sel & col_sel & read & m1), $sformatf("cell1 read, cycle %0d", k));
      @(posedge clk);
      if (row_sel && col_sel && record) begin
        m0 = data_in; m1 = data_in; n_writes++;
      end
    end
    check(n_writes > 0, "some records happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
