// tb_isa_top: end-to-end testbench of the top level at its default size
// (16-bit operands, 4-bit blocks, both sub-adder variants).
// First the two example additions 42282 + 19026 = 61308 and
// 21801 + 21824 = 43625 are run and their results checked exactly, then two
// hand-worked cases (0x0C8 + 0x038, corrected to the exact 0x100, and
// 0xFC8 + 0x038, balanced to 0x0FF0 instead of 0x1000); then a
// long stream of random and block-propagating operands, partly back to back
// and partly with idle cycles. Both variants are checked by scoreboards
// (result, carries, flags, 5-cycle latency) and against each other. It counts
// every mechanism of the design - error-free additions, mis-speculation up and
// down, exact correction, balancing, gated idle cycles and full-rate streaming
// - and any that never happens is a failure.
module tb_isa_top;

  logic        clk = 1'b0;
  logic        rst_n, in_valid, cin;
  logic [15:0] a, b;

  always #5 clk = ~clk;

  logic        cla_valid, bka_valid;
  logic [16:0] cla_sum, bka_sum;
  logic [3:1]  cla_spec_c, cla_real_c, cla_err, cla_bal;
  logic [3:1]  bka_spec_c, bka_real_c, bka_err, bka_bal;

  isa_top dut (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .cla_valid, .cla_sum, .cla_spec_c, .cla_real_c, .cla_err, .cla_bal,
    .bka_valid, .bka_sum, .bka_spec_c, .bka_real_c, .bka_err, .bka_bal);

  int ck [2], fl [2], nres [2], nclean [2], nup [2], ndown [2], ncorr [2], nbal [2],
      ngate [2], nexact [2];

  isa_scoreboard #(.NAME("cla")) sb_cla (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(cla_valid), .sum(cla_sum), .spec_c(cla_spec_c), .real_c(cla_real_c),
    .err(cla_err), .bal(cla_bal),
    .checks(ck[0]), .failures(fl[0]), .n_results(nres[0]), .n_exact_err_free(nclean[0]),
    .n_err_up(nup[0]), .n_err_down(ndown[0]), .n_corrected(ncorr[0]),
    .n_balanced(nbal[0]), .n_gated(ngate[0]), .n_exact_after_corr(nexact[0]));
  isa_scoreboard #(.NAME("bka")) sb_bka (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(bka_valid), .sum(bka_sum), .spec_c(bka_spec_c), .real_c(bka_real_c),
    .err(bka_err), .bal(bka_bal),
    .checks(ck[1]), .failures(fl[1]), .n_results(nres[1]), .n_exact_err_free(nclean[1]),
    .n_err_up(nup[1]), .n_err_down(ndown[1]), .n_corrected(ncorr[1]),
    .n_balanced(nbal[1]), .n_gated(ngate[1]), .n_exact_after_corr(nexact[1]));

  int checks = 0, failures = 0;
  int n_agree = 0, n_stream = 0, run = 0, n_out = 0;

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Both variants must agree on everything; the two example additions are
  // the first two results.
  always @(negedge clk) begin
    if (rst_n) begin
      check("variants valid together", longint'(cla_valid), longint'(bka_valid));
      if (cla_valid) begin
        check("variants agree",
              longint'({cla_sum, cla_spec_c, cla_real_c, cla_err, cla_bal}),
              longint'({bka_sum, bka_spec_c, bka_real_c, bka_err, bka_bal}));
        n_agree++;
        if (n_out == 0) check("42282 + 19026", longint'(cla_sum), 61308);
        if (n_out == 1) check("21801 + 21824", longint'(cla_sum), 43625);
        // Mis-speculation at bit 8 repaired by correction: exact 0x100.
        if (n_out == 2) check("0x0C8 + 0x038", longint'(cla_sum), 'h100);
        // Balancing at bit 8 and a downward correction at bit 12:
        // exact 0x1000, delivered 0x0FF0.
        if (n_out == 3) check("0xFC8 + 0x038", longint'(cla_sum), 'h0FF0);
        n_out++;
        run++;
        if (run >= 8) n_stream++;       // results delivered one per cycle
      end else run = 0;
    end
  end

  task automatic drive(logic [15:0] x, logic [15:0] y, logic c);
    a = x; b = y; cin = c; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    drive(16'd42282, 16'd19026, 1'b0);
    drive(16'd21801, 16'd21824, 1'b0);
    drive(16'h00C8, 16'h0038, 1'b0);
    drive(16'h0FC8, 16'h0038, 1'b0);
    repeat (6) @(negedge clk);
    for (int t = 0; t < 20000; t++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom);
      if ($urandom_range(1))
        for (int i = 0; i < 4; i++)
          if ($urandom_range(2) != 0) y[i*4 +: 4] = ~x[i*4 +: 4];
      drive(x, y, 1'($urandom));
      // Long back-to-back bursts with occasional idle gaps.
      if ($urandom_range(31) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      checks += ck[k]; failures += fl[k];
      $display("%s: results %0d, error-free %0d, errors up %0d down %0d, corrected %0d, balanced %0d, exact after correction %0d, gated cycles %0d",
               k == 0 ? "CLA" : "BKA", nres[k], nclean[k], nup[k], ndown[k], ncorr[k],
               nbal[k], nexact[k], ngate[k]);
      checks++;
      if (nres[k] != 20004 || nclean[k] == 0 || nup[k] == 0 || ndown[k] == 0 ||
          ncorr[k] == 0 || nbal[k] == 0 || ngate[k] == 0 || nexact[k] == 0) begin
        failures++;
        $display("FAIL a mechanism never occurred or results are missing");
      end
    end
    $display("variant comparisons %0d, full-rate results %0d", n_agree, n_stream);
    checks++;
    if (n_agree == 0 || n_stream == 0) begin
      failures++;
      $display("FAIL no comparisons or no full-rate streaming");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
