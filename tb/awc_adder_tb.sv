// awc_adder_tb -- checks complete adders of binary codes without carry.
//
// u4: 4-bit AND/XOR adder in the system of the initial code 1111. All 256 input
//     pairs are compared with the reference (the code whose ring number is the sum of
//     the two numbers, modulo 15; zero where an input is the missing code 0000), then
//     rows of the computation protocol and the first worked example are checked
//     literally. The memory is then re-recorded for the systems of 1000 and 1011 and
//     the other two worked examples and all pairs are checked again.
// u4x: 4-bit OR/XAND adder in the XAND system of 0000, all pairs.
// u8:  8-bit AND/XOR adder, key x_j = x_{j-8}^x_{j-6}^x_{j-5}^x_{j-4}, random pairs.
// The sum is combinational: it is sampled 1 time unit after the inputs change, with no
// clock edge in between, which is the document's "one cycle".
module awc_adder_tb;
  import awc_pkg::*;
  import awc_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_in_range = 0, n_wrap = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a, d, s, sx;
  logic [7:0] a8, d8, s8;
  logic       we = 1'b0;
  logic [15:0] wdata = '0;

  always #5 clk = ~clk;

  awc_adder #(.N(4), .TAPS(4'b1001), .INIT(4'b1111), .LOGIC(AND_XOR)) u4 (
    .clk, .rst_n, .a, .d, .s, .mem_we(we), .mem_wdata(wdata));
  awc_adder #(.N(4), .TAPS(4'b1001), .INIT(4'b0000), .LOGIC(OR_XAND)) u4x (
    .clk, .rst_n, .a, .d, .s(sx), .mem_we(1'b0), .mem_wdata('0));
  awc_adder #(.N(8), .TAPS(8'hB8), .INIT(8'h01), .LOGIC(AND_XOR)) u8 (
    .clk, .rst_n, .a(a8), .d(d8), .s(s8), .mem_we(1'b0), .mem_wdata('0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected 4-bit XOR-system sum in the system of init.
  function automatic logic [3:0] exp_sum(logic [3:0] av, logic [3:0] dv, logic [3:0] init);
    int p, q;
    p = ref_index(tcode_t'(av), tcode_t'(init), 4, 16'h9);
    q = ref_index(tcode_t'(dv), tcode_t'(init), 4, 16'h9);
    if (p < 0 || q < 0) return 4'b0000;
    return 4'(ref_slide(tcode_t'(init), (p + q) % 15, 4, 16'h9));
  endfunction

  // Expected XAND-system sum, from the two-tap XNOR key started at 0000.
  function automatic logic [3:0] exp_sum_xand(logic [3:0] av, logic [3:0] dv);
    logic [3:0] ring [15];
    tcode_t c;
    int p, q;
    c = '0; p = -1; q = -1;
    for (int k = 0; k < 15; k++) begin
      ring[k] = 4'(c);
      if (4'(c) == av) p = k;
      if (4'(c) == dv) q = k;
      c = ref_next_xand4(c);
    end
    if (p < 0 || q < 0) return 4'b1111;
    return ring[(p + q) % 15];
  endfunction

  task automatic all_pairs(logic [3:0] init, bit with_xand);
    int p, q;
    for (int va = 0; va < 16; va++)
      for (int vd = 0; vd < 16; vd++) begin
        a = 4'(va); d = 4'(vd); #1;
        check(s == exp_sum(a, d, init), $sformatf("sys %b: %b + %b = %b", init, a, d, s));
        if (with_xand)
          check(sx == exp_sum_xand(a, d), $sformatf("XAND: %b + %b = %b", a, d, sx));
        p = ref_index(tcode_t'(a), tcode_t'(init), 4, 16'h9);
        q = ref_index(tcode_t'(d), tcode_t'(init), 4, 16'h9);
        if (p >= 0 && q >= 0) begin
          if (p + q <= 14) n_in_range++; else n_wrap++;
        end
      end
  endtask

  // Record the table of another initial code: each row is chosen by its code on d.
  task automatic record_system(logic [3:0] init);
    int q;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      q = ref_index(tcode_t'(v), tcode_t'(init), 4, 16'h9);
      we = 1'b1; d = 4'(v);
      wdata = (q < 0) ? 16'h0 : ref_row(q, 4, 16'h9)[15:0];
    end
    @(negedge clk); we = 1'b0;
  endtask

  task automatic lit(logic [3:0] av, logic [3:0] dv, logic [3:0] sv, string what);
    a = av; d = dv; #1;
    check(s == sv, $sformatf("%s: %b + %b = %b, expected %b", what, av, dv, s, sv));
  endtask

  initial begin
    a = '0; d = '0; a8 = '0; d8 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    all_pairs(4'b1111, 1'b1);
    // Computation protocol rows (initial code 1111).
    lit(4'b1111, 4'b1110, 4'b1110, "protocol row 2");
    lit(4'b1111, 4'b0111, 4'b0111, "protocol row 15");
    lit(4'b1110, 4'b1110, 4'b1101, "protocol row 17");
    lit(4'b1110, 4'b0011, 4'b0111, "protocol row 29");
    lit(4'b1101, 4'b1010, 4'b1011, "protocol row 33");
    lit(4'b1010, 4'b0101, 4'b1100, "protocol row 47");
    lit(4'b0101, 4'b1111, 4'b0101, "protocol row 55");
    // Worked example 1: 0101 (4) + 0110 (6) = 0100 (10).
    lit(4'b0101, 4'b0110, 4'b0100, "example 1");

    record_system(4'b1000);
    lit(4'b1111, 4'b1101, 4'b0110, "example 3 (system 1000)");
    all_pairs(4'b1000, 1'b0);
    record_system(4'b1011);
    lit(4'b1100, 4'b0001, 4'b0111, "example 4 (system 1011)");
    all_pairs(4'b1011, 1'b0);

    // 8-bit adder, random pairs of ring codes.
    for (int k = 0; k < 200; k++) begin
      int p, q;
      p = $urandom_range(0, 254); q = $urandom_range(0, 254);
      a8 = 8'(ref_slide(16'h01, p, 8, 16'hB8));
      d8 = 8'(ref_slide(16'h01, q, 8, 16'hB8));
      #1;
      check(s8 == 8'(ref_slide(16'h01, (p + q) % 255, 8, 16'hB8)),
            $sformatf("8-bit: #%0d + #%0d", p, q));
    end

    check(n_in_range > 0 && n_wrap > 0, "both in-range and wrapping sums exercised");
    $display("in-range sums %0d, wrapping sums %0d", n_in_range, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
