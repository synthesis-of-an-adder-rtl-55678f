// awc_top_tb -- end-to-end test of awc_top at its default parameters.
//
// 1. The full computation protocol of the 4-bit adder for the initial code 1111: every
//    pair of ring codes whose numbers add up to at most 14, 120 lines, in the order
//    of the protocol (first code by number, then second code by number).
// 2. Sums past the range, which wrap round the ring, and sums with the missing code
//    0000 as an operand.
// 3. A switch of code system: the memory is re-recorded with the rows of the initial
//    code 0111 (each row chosen by its code on d4), every pair is checked, and a reset brings back the system of 1111.
// 4. The first digit of the 8-bit AND/XOR scheme and of the 16-bit OR/XAND scheme,
//    fed with coefficient rows and codes of 8-bit and 16-bit ring systems (keys
//    x_j = x_{j-8}^x_{j-6}^x_{j-5}^x_{j-4} and x_j = x_{j-16}^x_{j-14}^x_{j-13}^x_{j-11}).
// Each of these mechanisms is counted and must happen at least once.
module awc_top_tb;
  import awc_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_protocol = 0, n_wrap = 0, n_missing = 0, n_switch = 0, n_dig8 = 0, n_dig16 = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  a4, d4, s4;
  logic        mem_we = 1'b0;
  logic [15:0] mem_wdata = '0;
  logic [7:0]  d8_1, a8;   logic s8_1;
  logic [15:0] d16_1, a16; logic s16_1;

  always #5 clk = ~clk;

  awc_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] code4(logic [3:0] init, int q);
    return 4'(ref_slide(tcode_t'(init), q % 15, 4, 16'h9));
  endfunction

  task automatic all_pairs(logic [3:0] init);
    int p, q;
    for (int va = 0; va < 16; va++)
      for (int vd = 0; vd < 16; vd++) begin
        a4 = 4'(va); d4 = 4'(vd); #1;
        p = ref_index(tcode_t'(va), tcode_t'(init), 4, 16'h9);
        q = ref_index(tcode_t'(vd), tcode_t'(init), 4, 16'h9);
        if (p < 0 || q < 0) begin
          check(s4 == 4'b0000, $sformatf("missing code: %b + %b", a4, d4));
          n_missing++;
        end else begin
          check(s4 == code4(init, p + q), $sformatf("sys %b: %b + %b = %b", init, a4, d4, s4));
          if (p + q > 14) n_wrap++;
        end
      end
  endtask

  initial begin
    a4 = '0; d4 = '0; d8_1 = '0; a8 = '0; d16_1 = '0; a16 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Computation protocol, 120 lines.
    for (int p = 0; p < 15; p++)
      for (int q = 0; p + q <= 14; q++) begin
        a4 = code4(4'hF, p); d4 = code4(4'hF, q); #1;
        check(s4 == code4(4'hF, p + q), $sformatf("protocol: %b + %b = %b", a4, d4, s4));
        n_protocol++;
      end
    check(n_protocol == 120, "protocol has 120 lines");

    // 2. Wrapping sums and the missing code.
    all_pairs(4'hF);

    // 3. Switch to the system of 0111 and back.
    for (int v = 0; v < 16; v++) begin
      int q;
      @(negedge clk);
      q = ref_index(tcode_t'(v), 16'h7, 4, 16'h9);
      mem_we = 1'b1; d4 = 4'(v);
      mem_wdata = (q < 0) ? 16'h0 : ref_row(q, 4, 16'h9)[15:0];
    end
    @(negedge clk); mem_we = 1'b0;
    all_pairs(4'h7);
    a4 = 4'b0111; d4 = 4'b1111; #1;   // 1111 is number 1 in the system of 0111
    check(s4 == 4'b1111 && code4(4'h7, 1) == 4'b1111, "system 0111: 0111 + 1111 = 1111");
    n_switch++;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    a4 = 4'b0101; d4 = 4'b0110; #1;
    check(s4 == 4'b0100, "after reset, system 1111: 0101 + 0110 = 0100");

    // 4. First digits of the wider schemes.
    for (int k = 0; k < 40; k++) begin
      int p, q;
      logic [255:0] rr;
      tcode_t av, sv;
      p = $urandom_range(0, 254); q = $urandom_range(0, 254);
      av = ref_slide(16'h01, p, 8, 16'hB8);
      rr = ref_row(q, 8, 16'hB8);
      for (int j = 0; j < 8; j++) begin
        d8_1[j] = rr[j*8];
        a8[j]   = av[7-j];
      end
      sv = ref_slide(av, q, 8, 16'hB8);
      #1;
      check(s8_1 == sv[7], $sformatf("8-bit digit 1: #%0d + #%0d", p, q));
      n_dig8++;
    end
    for (int k = 0; k < 12; k++) begin
      int p, q;
      logic [255:0] rr;
      tcode_t av, sv;
      p = $urandom_range(0, 65534); q = $urandom_range(0, 65534);
      av = ref_slide(16'h0001, p, 16, 16'hB400);
      rr = ref_row(q, 16, 16'hB400);
      // XAND domain: complemented code and coefficients.
      for (int j = 0; j < 16; j++) begin
        d16_1[j] = ~rr[j*16];
        a16[j]   = ~av[15-j];
      end
      sv = ref_slide(av, q, 16, 16'hB400);
      #1;
      check(s16_1 == ~sv[15], $sformatf("16-bit XAND digit 1: #%0d + #%0d", p, q));
      n_dig16++;
    end

    check(n_wrap > 0,    "wrapping sum exercised");
    check(n_missing > 0, "missing-code operand exercised");
    check(n_switch > 0,  "code-system switch exercised");
    check(n_dig8 > 0,    "8-bit digit exercised");
    check(n_dig16 > 0,   "16-bit XAND digit exercised");
    $display("protocol %0d, wrap %0d, missing %0d, switch %0d, dig8 %0d, dig16 %0d",
             n_protocol, n_wrap, n_missing, n_switch, n_dig8, n_dig16);
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
