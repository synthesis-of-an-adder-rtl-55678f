// awc_pkg_tb -- checks the code-ring functions of awc_pkg.
//
// The coefficient matrices for every slide 0..14 of the 4-bit system are compared
// with the algebraic table of the document, typed in here as 4-bit masks over b1..b4
// (b1 = 8, b4 = 1). The ring step is compared with the 1111 and 1000 columns of the
// code tables and with an independent shift-register model, for both families.
module awc_pkg_tb;
  import awc_pkg::*;
  import awc_tb_pkg::*;

  int checks = 0, failures = 0;

  // D'(q) of the 4-bit system: digit 1..4 of row q, as masks over b1..b4.
  localparam logic [15:0] TABLE8 [15] = '{
    16'h8421, 16'h4219, 16'h219D, 16'h19DF, 16'h9DFE,
    16'hDFE7, 16'hFE7A, 16'hE7A5, 16'h7A5B, 16'hA5BC,
    16'h5BC6, 16'hBC63, 16'hC638, 16'h6384, 16'h3842 };

  // Column 1111 of the code table, rows 0..14.
  localparam logic [3:0] COL1111 [15] = '{4'hF, 4'hE, 4'hD, 4'hA, 4'h5, 4'hB, 4'h6, 4'hC,
                                          4'h9, 4'h2, 4'h4, 4'h8, 4'h1, 4'h3, 4'h7};
  // Column 1000 of the code table, rows 0..14.
  localparam logic [3:0] COL1000 [15] = '{4'h8, 4'h1, 4'h3, 4'h7, 4'hF, 4'hE, 4'hD, 4'hA,
                                          4'h5, 4'hB, 4'h6, 4'hC, 4'h9, 4'h2, 4'h4};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    coeff_t m;
    code_t  c, r;
    logic [3:0] mask;

    // Coefficient matrices against the algebraic table.
    for (int q = 0; q < 15; q++) begin
      m = coeff_matrix(q, 4, code_t'(4'b1001));
      for (int i = 0; i < 4; i++) begin
        mask = TABLE8[q][15-4*i -: 4];
        for (int j = 0; j < 4; j++)
          check(m[i][j] == mask[3-j], $sformatf("D'(%0d) digit %0d b%0d", q, i+1, j+1));
      end
    end

    // Ring step against the code tables.
    c = code_t'(4'hF);
    for (int q = 0; q < 15; q++) begin
      check(c[3:0] == COL1111[q], $sformatf("ring 1111 row %0d", q));
      c = ring_step(c, 4, code_t'(4'b1001), AND_XOR);
    end
    check(c[3:0] == 4'hF, "ring 1111 closes after 15 steps");
    c = code_t'(4'h8);
    for (int q = 0; q < 15; q++) begin
      check(c[3:0] == COL1000[q], $sformatf("ring 1000 row %0d", q));
      c = ring_step(c, 4, code_t'(4'b1001), AND_XOR);
    end

    // XAND family against the two-tap XNOR key, from the all-zero code.
    c = '0;
    r = '0;
    for (int q = 0; q < 15; q++) begin
      check(c == r, $sformatf("XAND ring step %0d", q));
      c = ring_step(c, 4, code_t'(4'b1001), OR_XAND);
      r = ref_next_xand4(r);
    end

    // Wider systems: step and matrix against the shift-register model.
    for (int k = 0; k < 40; k++) begin
      logic [7:0] v;
      int q;
      v = 8'($urandom_range(1, 255));
      q = $urandom_range(0, 254);
      check(ring_step(code_t'(v), 8, code_t'(8'hB8), AND_XOR) == ref_next(tcode_t'(v), 8, 16'hB8),
            "8-bit step");
      m = coeff_matrix(q, 8, code_t'(8'hB8));
      begin
        logic [255:0] rr;
        rr = ref_row(q, 8, 16'hB8);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            check(m[i][j] == rr[j*8 + i], $sformatf("8-bit D'(%0d)[%0d][%0d]", q, i, j));
      end
    end
    check(ring_len(4) == 15 && ring_len(8) == 255, "ring lengths");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the checks above take no simulated time.
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
