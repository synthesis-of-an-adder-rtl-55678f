// awc_digit_tb -- checks single digits of the carry-free adder.
//
// 4-bit AND/XOR digit: exhaustive over coefficients and code, and the first digit of the
// worked example 0101 + 0110 = 0100 in the system of 1111 (coefficients of D'(6),
// digit 1 = b1^b2^b3^b4, giving 0). 8-bit AND/XOR digit: random. 16-bit OR/XAND digit:
// fed with complemented coefficients and code, it must return the complement of the
// true-domain digit.
module awc_digit_tb;
  import awc_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  d4, a4;   logic s4;
  logic [7:0]  d8, a8;   logic s8;
  logic [15:0] d16, a16; logic s16;

  awc_digit #(.N(4))                    u4  (.d_row(d4),  .a_dig(a4),  .s(s4));
  awc_digit #(.N(8))                    u8  (.d_row(d8),  .a_dig(a8),  .s(s8));
  awc_digit #(.N(16), .LOGIC(OR_XAND))  u16 (.d_row(d16), .a_dig(a16), .s(s16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic ref_dig(logic [15:0] d, logic [15:0] a, int n);
    logic r;
    r = 1'b0;
    for (int j = 0; j < n; j++) r ^= d[j] & a[j];
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      {d4, a4} = 8'(v); #1;
      check(s4 == ref_dig(16'(d4), 16'(a4), 4), $sformatf("N=4 d=%b a=%b", d4, a4));
    end
    // Example: A = 0101 in digit order a1..a4 = 0,1,0,1 -> a_dig = 4'b1010;
    // digit 1 of D'(6) uses all four bits -> d = 4'b1111; sum digit 1 is 0.
    d4 = 4'b1111; a4 = 4'b1010; #1;
    check(s4 == 1'b0, "example digit 1");
    for (int k = 0; k < 500; k++) begin
      logic [15:0] dt, at;
      d8 = 8'($urandom); a8 = 8'($urandom);
      dt = 16'($urandom); at = 16'($urandom);
      d16 = ~dt; a16 = ~at; #1;
      check(s8 == ref_dig(16'(d8), 16'(a8), 8), $sformatf("N=8 d=%h a=%h", d8, a8));
      check(s16 == ~ref_dig(dt, at, 16), $sformatf("N=16 XAND d=%h a=%h", dt, at));
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
