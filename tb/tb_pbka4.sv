// tb_pbka4: self-checking testbench of the pipelined Brent-Kung sub-adder.
// Streams every 4-bit operand pair with both carry-in values through the
// default 4-bit adder, and random operands through an 8-bit and a 2-bit
// instance, one addition per cycle. The carry-in of an addition is driven one
// cycle after its operands, as the adder's second stage expects, and the sum
// and carry-out are checked at the second clock edge after the operands against a + b + cin.
// Finally the rank enables are held low and the outputs must not move.
module tb_pbka4;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] ce;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic [1:0] a2, b2, s2;
  logic       cin, co4, co8, co2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pbka4 #(.W(4)) dut4 (.clk, .rst_n, .ce, .a(a4), .b(b4), .cin, .sum_q(s4), .cout_q(co4));
  pbka4 #(.W(8)) dut8 (.clk, .rst_n, .ce, .a(a8), .b(b8), .cin, .sum_q(s8), .cout_q(co8));
  pbka4 #(.W(2)) dut2 (.clk, .rst_n, .ce, .a(a2), .b(b2), .cin, .sum_q(s2), .cout_q(co2));

  // Operands driven in the previous cycle.
  logic [3:0] pa4 [1], pb4 [1];
  logic [7:0] pa8 [1], pb8 [1];
  logic [1:0] pa2 [1], pb2 [1];

  task automatic check(string what, logic [8:0] got, logic [8:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int total;
    rst_n = 1'b0; ce = 2'b11; cin = 1'b0;
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a2 = '0; b2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    total = 512;
    for (int t = 0; t < total + 1; t++) begin
      bit nc;
      // Carry-in for the operands driven last cycle.
      nc  = (t >= 1) ? bit'(((t - 1) >> 8) & 1) : 1'b0;
      cin = nc;
      // New operands.
      a4 = 4'(t); b4 = 4'(t >> 4);
      a8 = 8'($urandom); b8 = 8'($urandom);
      a2 = 2'($urandom); b2 = 2'($urandom);
      @(negedge clk);
      if (t >= 1) begin
        check("4-bit sum", {co4, s4}, 9'(pa4[0]) + 9'(pb4[0]) + 9'(nc));
        check("8-bit sum", {co8, s8}, 9'(pa8[0]) + 9'(pb8[0]) + 9'(nc));
        check("2-bit sum", {co2, s2}, 9'(pa2[0]) + 9'(pb2[0]) + 9'(nc));
      end
      pa4[0] = a4; pb4[0] = b4; pa8[0] = a8; pb8[0] = b8; pa2[0] = a2; pb2[0] = b2;
    end
    // Clock gating.
    begin
      logic [4:0] held;
      held = {co4, s4};
      ce = 2'b00;
      repeat (8) begin
        a4 = 4'($urandom); b4 = 4'($urandom); cin = ~cin;
        @(negedge clk);
        check("gated 4-bit sum", {co4, s4}, 9'(held));
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
