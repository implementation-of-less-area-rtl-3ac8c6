// tb_isa_adder: self-checking testbench of the inexact speculative adder.
// Three adders see the same kind of traffic: the default 16-bit adder with
// carry look-ahead blocks, the same with Brent-Kung blocks, and a 32-bit
// adder with 8-bit Brent-Kung blocks and a 3-bit speculation window. Each is
// checked by a scoreboard (result, carries, flags, 5-cycle latency). The
// stimulus starts with two fixed additions (42282 + 19026 and 21801 + 21824),
// then mixes random operands with operands whose blocks all propagate, so
// that carries ripple across blocks and speculation fails in both directions,
// and inserts idle cycles so that the gated ranks must hold. A mechanism that
// never occurs counts as a failure.
module tb_isa_adder;
  import isa_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, in_valid, cin;
  logic [15:0] a, b;
  logic [31:0] a32, b32;

  always #5 clk = ~clk;

  logic        v_c, v_b, v_w;
  logic [16:0] s_c, s_b;
  logic [32:0] s_w;
  logic [3:1]  sc_c, rc_c, e_c, bl_c, sc_b, rc_b, e_b, bl_b;
  logic [3:1]  sc_w, rc_w, e_w, bl_w;

  isa_adder #(.ADDER(ADDER_CLA)) dut_cla (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(v_c), .sum(s_c), .spec_c(sc_c), .real_c(rc_c), .err(e_c), .bal(bl_c));
  isa_adder #(.ADDER(ADDER_BKA)) dut_bka (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(v_b), .sum(s_b), .spec_c(sc_b), .real_c(rc_b), .err(e_b), .bal(bl_b));
  isa_adder #(.N(32), .BLK(8), .SPEC_BITS(3), .ADDER(ADDER_BKA)) dut_wide (
    .clk, .rst_n, .in_valid, .a(a32), .b(b32), .cin,
    .out_valid(v_w), .sum(s_w), .spec_c(sc_w), .real_c(rc_w), .err(e_w), .bal(bl_w));

  int ck [3], fl [3], nres [3], nclean [3], nup [3], ndown [3], ncorr [3], nbal [3],
      ngate [3], nexact [3];

  isa_scoreboard #(.NAME("cla")) sb_cla (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(v_c), .sum(s_c), .spec_c(sc_c), .real_c(rc_c), .err(e_c), .bal(bl_c),
    .checks(ck[0]), .failures(fl[0]), .n_results(nres[0]), .n_exact_err_free(nclean[0]),
    .n_err_up(nup[0]), .n_err_down(ndown[0]), .n_corrected(ncorr[0]),
    .n_balanced(nbal[0]), .n_gated(ngate[0]), .n_exact_after_corr(nexact[0]));
  isa_scoreboard #(.NAME("bka")) sb_bka (.clk, .rst_n, .in_valid, .a, .b, .cin,
    .out_valid(v_b), .sum(s_b), .spec_c(sc_b), .real_c(rc_b), .err(e_b), .bal(bl_b),
    .checks(ck[1]), .failures(fl[1]), .n_results(nres[1]), .n_exact_err_free(nclean[1]),
    .n_err_up(nup[1]), .n_err_down(ndown[1]), .n_corrected(ncorr[1]),
    .n_balanced(nbal[1]), .n_gated(ngate[1]), .n_exact_after_corr(nexact[1]));
  isa_scoreboard #(.N(32), .BLK(8), .SPEC_BITS(3), .NAME("wide")) sb_wide (
    .clk, .rst_n, .in_valid, .a(a32), .b(b32), .cin,
    .out_valid(v_w), .sum(s_w), .spec_c(sc_w), .real_c(rc_w), .err(e_w), .bal(bl_w),
    .checks(ck[2]), .failures(fl[2]), .n_results(nres[2]), .n_exact_err_free(nclean[2]),
    .n_err_up(nup[2]), .n_err_down(ndown[2]), .n_corrected(ncorr[2]),
    .n_balanced(nbal[2]), .n_gated(ngate[2]), .n_exact_after_corr(nexact[2]));

  int checks = 0, failures = 0;

  // Random operand of w bits; with probability 1/2 make chosen blocks of b the
  // complement of a so that they propagate.
  function automatic void gen(int w, int blk, output longint unsigned x, output longint unsigned y);
    x = {$urandom, $urandom};
    y = {$urandom, $urandom};
    if ($urandom_range(1)) begin
      for (int i = 0; i < w / blk; i++)
        if ($urandom_range(2) != 0)
          for (int k = 0; k < blk; k++) y[i*blk + k] = ~x[i*blk + k];
    end
    x &= (64'd1 << w) - 1;
    y &= (64'd1 << w) - 1;
  endfunction

  task automatic drive(logic [15:0] x, logic [15:0] y, logic c, logic [31:0] xw, logic [31:0] yw);
    a = x; b = y; cin = c; a32 = xw; b32 = yw; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; cin = 1'b0; a32 = '0; b32 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    drive(16'd42282, 16'd19026, 1'b0, 32'd42282, 32'd19026);
    drive(16'd21801, 16'd21824, 1'b0, 32'd21801, 32'd21824);
    for (int t = 0; t < 3000; t++) begin
      longint unsigned x, y, xw, yw;
      gen(16, 4, x, y);
      gen(32, 8, xw, yw);
      drive(16'(x), 16'(y), 1'($urandom), 32'(xw), 32'(yw));
      if ($urandom_range(7) == 0) repeat ($urandom_range(4)) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks += ck[k]; failures += fl[k];
      $display("adder %0d: results %0d, error-free %0d, errors up %0d down %0d, corrected %0d, balanced %0d, exact after correction %0d, gated cycles %0d",
               k, nres[k], nclean[k], nup[k], ndown[k], ncorr[k], nbal[k], nexact[k], ngate[k]);
      checks++;
      if (nres[k] != 3002 || nclean[k] == 0 || nup[k] == 0 || ndown[k] == 0 ||
          ncorr[k] == 0 || nbal[k] == 0 || ngate[k] == 0 || nexact[k] == 0) begin
        failures++;
        $display("FAIL adder %0d: a mechanism never occurred or results are missing", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
