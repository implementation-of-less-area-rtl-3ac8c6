// tb_pspec: self-checking testbench of the carry speculator.
// Drives random block operands every cycle into two speculators (the default
// 2-bit window with a guess bit, and a whole-block window with guess 0) and
// checks the stage-2 combinational guess one cycle later and the registered
// guess two cycles later against the arithmetic model (carry out of the
// window sum). It also holds the enables low and checks that both ranks keep
// their values (clock gating).
module tb_pspec;
  import isa_ref_pkg::*;

  localparam int BLK = 4;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] ce;
  logic [BLK-1:0] a_prev, b_prev;
  logic spec_c2, spec_q2, spec_c4, spec_q4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pspec #(.BLK(BLK), .SPEC_BITS(2))   dut2 (.clk, .rst_n, .ce, .a_prev, .b_prev,
                                            .spec_c(spec_c2), .spec_q(spec_q2));
  pspec #(.BLK(BLK), .SPEC_BITS(BLK)) dut4 (.clk, .rst_n, .ce, .a_prev, .b_prev,
                                            .spec_c(spec_c4), .spec_q(spec_q4));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Expected guesses of the operands driven 1 and 2 cycles ago.
  bit e2 [2], e4 [2];

  initial begin
    rst_n = 1'b0; ce = 2'b11; a_prev = '0; b_prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      bit n2, n4;
      a_prev = BLK'($urandom);
      b_prev = BLK'($urandom);
      n2 = ref_spec(longint'(a_prev), longint'(b_prev), 1, BLK, 2);
      n4 = ref_spec(longint'(a_prev), longint'(b_prev), 1, BLK, BLK);
      @(negedge clk);
      check("spec_c window 2", spec_c2, n2);
      check("spec_c window 4", spec_c4, n4);
      if (t > 0) begin
        check("spec_q window 2", spec_q2, e2[0]);
        check("spec_q window 4", spec_q4, e4[0]);
      end
      e2[0] = n2; e4[0] = n4;
    end
    // Clock gating: freeze both ranks while the operands keep changing.
    begin
      logic c2, q2;
      c2 = spec_c2; q2 = spec_q2;
      ce = 2'b00;
      repeat (10) begin
        a_prev = BLK'($urandom); b_prev = BLK'($urandom);
        @(negedge clk);
        check("gated spec_c", spec_c2, c2);
        check("gated spec_q", spec_q2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
