// tb_pcomp: self-checking testbench of the error compensation unit.
// Feeds random speculative block sums, carry-out, speculated and real carries
// (with blocks often forced to all ones or all zeros so that balancing is
// needed) into the default 16-bit, 4-block unit, one set per cycle, and checks
// the result, error and balance flags at the second clock edge against the
// arithmetic model. Also checks directly that a boundary whose speculation
// was right leaves the sum untouched, and that gated ranks hold.
module tb_pcomp;
  import isa_ref_pkg::*;

  localparam int N = 16, BLK = 4, NB = N / BLK;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [1:0]    ce;
  logic [N-1:0]  sum_in;
  logic          cout_in;
  logic [NB-1:1] spec, real_c, err_q, bal_q;
  logic [N:0]    sum_q;
  int checks = 0, failures = 0;
  int n_corr = 0, n_bal = 0, n_clean = 0;

  always #5 clk = ~clk;

  pcomp #(.N(N), .BLK(BLK)) dut (.clk, .rst_n, .ce, .sum_in, .cout_in, .spec,
                                 .real_c, .sum_q, .err_q, .bal_q);

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    isa_ref_t exp_r;
    logic [N:0] raw;
    bit have = 0;
    rst_n = 1'b0; ce = 2'b11; sum_in = '0; cout_in = 1'b0; spec = '0; real_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      isa_ref_t r;
      sum_in = N'($urandom);
      for (int i = 0; i < NB; i++)
        case ($urandom_range(3))
          0: sum_in[i*BLK +: BLK] = '1;
          1: sum_in[i*BLK +: BLK] = '0;
          default: ;
        endcase
      cout_in = 1'($urandom);
      spec    = (NB-1)'($urandom);
      real_c  = (NB-1)'($urandom);
      r = ref_comp(longint'(sum_in), cout_in, longint'({spec, 1'b0}),
                   longint'({real_c, 1'b0}), N, BLK);
      @(negedge clk);
      if (have) begin
        check("sum", longint'(sum_q), exp_r.sum);
        check("err", longint'({err_q, 1'b0}), exp_r.err);
        check("bal", longint'({bal_q, 1'b0}), exp_r.bal);
        if (exp_r.err == 0) begin
          n_clean++;
          check("clean sum untouched", longint'(sum_q), longint'(raw));
        end
        if (exp_r.bal != 0) n_bal++;
        if ((exp_r.err & ~exp_r.bal) != 0) n_corr++;
      end
      exp_r = r; raw = {cout_in, sum_in}; have = 1;
    end
    // Clock gating.
    begin
      logic [N:0] held;
      held = sum_q;
      ce = 2'b00;
      repeat (5) begin
        sum_in = N'($urandom); spec = ~spec;
        @(negedge clk);
        check("gated sum", longint'(sum_q), longint'(held));
      end
    end
    $display("corrections %0d, balancing %0d, clean %0d", n_corr, n_bal, n_clean);
    checks++;
    if (n_corr == 0 || n_bal == 0 || n_clean == 0) begin
      failures++;
      $display("FAIL a compensation case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
