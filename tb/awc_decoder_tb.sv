// awc_decoder_tb -- exhaustive check of the code decoder: exactly line r high for
// code r, for K = 4 (the adder's size) and K = 3.
module awc_decoder_tb;
  int checks = 0, failures = 0;

  logic [3:0] c4; logic [15:0] l4;
  logic [2:0] c3; logic [7:0]  l3;

  awc_decoder #(.K(4)) u4 (.code(c4), .line(l4));
  awc_decoder #(.K(3)) u3 (.code(c3), .line(l3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      c4 = 4'(v); c3 = 3'(v); #1;
      for (int r = 0; r < 16; r++)
        check(l4[r] == (r == v), $sformatf("K=4 code %0d line %0d", v, r));
      if (v < 8)
        for (int r = 0; r < 8; r++)
          check(l3[r] == (r == v), $sformatf("K=3 code %0d line %0d", v, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
