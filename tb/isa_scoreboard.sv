// isa_scoreboard: checker for one isa_adder, used by the adder and top-level
// testbenches. It samples every operand set the adder accepts (in_valid at a
// rising edge), predicts the result with the arithmetic model, and checks
// each result the adder delivers (out_valid) in order: sum, speculated and
// real carries, error and balance flags, and the latency of exactly LAT
// cycles from the capturing edge. Whenever no error is flagged the sum must
// also equal a + b + cin exactly. While out_valid is low the outputs must
// hold (the gated output rank). It counts how often each mechanism occurred.
module isa_scoreboard
  import isa_ref_pkg::*;
#(
  parameter int N = 16,
  parameter int BLK = 4,
  parameter int SPEC_BITS = 2,
  parameter int LAT = 5,
  parameter string NAME = "isa",
  localparam int NB = N / BLK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  logic          out_valid,
  input  logic [N:0]    sum,
  input  logic [NB-1:1] spec_c,
  input  logic [NB-1:1] real_c,
  input  logic [NB-1:1] err,
  input  logic [NB-1:1] bal,
  output int            checks,
  output int            failures,
  output int            n_results,
  output int            n_exact_err_free,
  output int            n_err_up,
  output int            n_err_down,
  output int            n_corrected,
  output int            n_balanced,
  output int            n_gated,
  output int            n_exact_after_corr
);

  isa_ref_t        exp_q   [$];
  longint unsigned exact_q [$];
  int              issue_q [$];
  int              cyc = 0;
  logic [N:0]      last_sum;
  bit              last_ok = 0;

  initial begin
    checks = 0; failures = 0; n_results = 0; n_exact_err_free = 0;
    n_err_up = 0; n_err_down = 0; n_corrected = 0; n_balanced = 0;
    n_gated = 0; n_exact_after_corr = 0;
  end

  function automatic void check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s %s: got %0h expected %0h", NAME, what, got, exp);
    end
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      exp_q.push_back(ref_isa(longint'(a), longint'(b), cin, N, BLK, SPEC_BITS));
      exact_q.push_back(longint'(a) + longint'(b) + longint'(cin));
      issue_q.push_back(cyc);
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL %s: result with no operands outstanding", NAME);
      end else begin
        isa_ref_t        e;
        longint unsigned x;
        int              t0;
        e = exp_q.pop_front(); x = exact_q.pop_front(); t0 = issue_q.pop_front();
        n_results++;
        check("sum",     longint'(sum), e.sum);
        check("spec_c",  longint'({spec_c, 1'b0}), e.spec);
        check("real_c",  longint'({real_c, 1'b0}), e.realc);
        check("err",     longint'({err, 1'b0}), e.err);
        check("bal",     longint'({bal, 1'b0}), e.bal);
        check("latency", longint'(cyc - t0), longint'(LAT));
        if (e.err == 0) begin
          n_exact_err_free++;
          check("error-free sum is exact", longint'(sum), x);
        end else begin
          for (int i = 1; i < NB; i++) begin
            if (e.err[i] && e.realc[i])  n_err_up++;
            if (e.err[i] && !e.realc[i]) n_err_down++;
            if (e.err[i] && !e.bal[i])   n_corrected++;
            if (e.bal[i])                n_balanced++;
          end
          if (e.bal == 0 && longint'(sum) == x) n_exact_after_corr++;
        end
      end
      last_sum = sum;
      last_ok  = 1;
    end else if (rst_n && last_ok) begin
      n_gated++;
      check("gated output holds", longint'(sum), longint'(last_sum));
    end
  end

endmodule
