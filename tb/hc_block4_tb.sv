// hc_block4_tb: exhaustive self-checking testbench for the 4-bit block of
// the dual-level carry-select adder.
//
// All 2048 combinations of a, b, cin4_0, cin4_1 and cin16 are applied, one
// per clock. r must be the low four bits of a + b + (cin16 ? cin4_1 :
// cin4_0), g4 the carry out of a + b and p4 the AND of a | b. It also counts
// the vectors whose carry into the upper pair differs between the two
// speculative paths, which is what the block's second carry computation is
// for, and fails if there were none.
module hc_block4_tb;

  logic       clk = 1'b0;
  logic [3:0] a, b, r;
  logic       cin4_0, cin4_1, cin16, g4, p4;
  logic       cin;
  logic [4:0] sum;
  int         checks = 0, failures = 0, spec_differs = 0;

  always #5 clk = ~clk;

  hc_block4 dut (.a(a), .b(b), .cin4_0(cin4_0), .cin4_1(cin4_1), .cin16(cin16),
                 .g4(g4), .p4(p4), .r(r));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH %s a=%h b=%h cin4_0=%b cin4_1=%b cin16=%b", what, a, b, cin4_0,
                 cin4_1, cin16);
    end
  endtask

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {a, b, cin4_0, cin4_1, cin16} = 11'(v);
      @(posedge clk);
      cin = cin16 ? cin4_1 : cin4_0;
      sum = 5'(a) + 5'(b) + 5'(cin);
      check(r == sum[3:0], "r");
      sum = 5'(a) + 5'(b);
      check(g4 == sum[4], "g4");
      check(p4 == &(a | b), "p4");
      // carry into bits 3:2 depends on the guess
      if (cin4_0 != cin4_1 && (a[1:0] ^ b[1:0]) == 2'b11) spec_differs++;
    end
    if (spec_differs == 0) begin
      failures++;
      $display("speculative carries never differed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
