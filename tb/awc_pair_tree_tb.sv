// awc_pair_tree_tb -- checks the pairing tree against a reduction operator.
//
// Trees of 4 (exhaustive), 5 (exhaustive, odd count), 8 and 16 terms (random) with
// XOR gates, and 16 terms with XNOR gates. The XNOR tree must return the complement
// of the XOR of the complemented terms.
module awc_pair_tree_tb;
  int checks = 0, failures = 0;

  logic [3:0]  t4;  logic y4;
  logic [4:0]  t5;  logic y5;
  logic [7:0]  t8;  logic y8;
  logic [15:0] t16; logic y16, y16n;

  awc_pair_tree #(.N(4))                 u4   (.terms(t4),  .y(y4));
  awc_pair_tree #(.N(5))                 u5   (.terms(t5),  .y(y5));
  awc_pair_tree #(.N(8))                 u8   (.terms(t8),  .y(y8));
  awc_pair_tree #(.N(16))                u16  (.terms(t16), .y(y16));
  awc_pair_tree #(.N(16), .INVERT(1'b1)) u16n (.terms(t16), .y(y16n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      t4 = 4'(v); #1;
      check(y4 == ^t4, $sformatf("N=4 %b", t4));
    end
    for (int v = 0; v < 32; v++) begin
      t5 = 5'(v); #1;
      check(y5 == ^t5, $sformatf("N=5 %b", t5));
    end
    for (int k = 0; k < 300; k++) begin
      t8 = 8'($urandom); t16 = 16'($urandom); #1;
      check(y8 == ^t8, $sformatf("N=8 %b", t8));
      check(y16 == ^t16, $sformatf("N=16 %b", t16));
      check(y16n == ~(^(~t16)), $sformatf("N=16 XNOR %b", t16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
