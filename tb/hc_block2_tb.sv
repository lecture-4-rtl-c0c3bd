// hc_block2_tb: exhaustive self-checking testbench for the 2-bit leaf of
// the dual-level carry-select adder.
//
// All 128 combinations of a, b, cin2_0, cin2_1 and cin16 are applied, one per
// clock. Expected values are worked out arithmetically: the carry that
// reaches the pair is cin2_1 when cin16 = 1 and cin2_0 otherwise, r is the
// low two bits of a + b + that carry, g2 is the carry out of a + b alone and
// p2 says that every bit has a or b set.
module hc_block2_tb;

  logic       clk = 1'b0;
  logic [1:0] a, b, r;
  logic       cin2_0, cin2_1, cin16, g2, p2;
  logic       cin;
  logic [2:0] sum;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hc_block2 dut (.a(a), .b(b), .cin2_0(cin2_0), .cin2_1(cin2_1), .cin16(cin16),
                 .g2(g2), .p2(p2), .r(r));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH %s a=%b b=%b cin2_0=%b cin2_1=%b cin16=%b", what, a, b, cin2_0,
                 cin2_1, cin16);
    end
  endtask

  initial begin
    for (int v = 0; v < 128; v++) begin
      {a, b, cin2_0, cin2_1, cin16} = 7'(v);
      @(posedge clk);
      cin = cin16 ? cin2_1 : cin2_0;
      sum = 3'(a) + 3'(b) + 3'(cin);
      check(r == sum[1:0], "r");
      sum = 3'(a) + 3'(b);
      check(g2 == sum[2], "g2");
      check(p2 == &(a | b), "p2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
