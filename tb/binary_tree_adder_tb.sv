// binary_tree_adder_tb: self-checking testbench for the 8-bit binary tree adder.
//
// Applies one operand pair per clock cycle and compares the result with the
// integer sum a + b + cin worked out by the testbench.
// Every input combination is applied.
// It counts how many vectors carried through the whole word, and fails if
// none did. A watchdog ends the run with a failure if it takes too long.
module binary_tree_adder_tb;

  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic [N-1:0] a, b, s;
  logic         cin;
  logic         cout;
  logic [N:0]   exp;
  int           checks = 0, failures = 0, long_carry = 0;

  always #5 clk = ~clk;

  binary_tree_adder dut (
    .a   (a),
    .b   (b),
    .cin (cin),
    .s   (s),
    .cout(cout)
  );

  function automatic logic [N-1:0] rnd();
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v[N-1:0];
  endfunction

  task automatic apply(logic [N-1:0] ta, logic [N-1:0] tb, logic tc);
    a   = ta;
    b   = tb;
    cin = tc;
    @(posedge clk);
    exp = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
    // the carry out of bit 0 travels through every bit above it
    if (&(a[N-1:1] ^ b[N-1:1]) && ((a[0] & b[0]) | ((a[0] ^ b[0]) & cin))) long_carry++;
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH a=%h b=%h cin=%0d got=%h exp=%h", a, b, cin, {cout, s}, exp);
    end
  endtask

  initial begin
    int k;
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++)
        for (int c = 0; c < 2; c++)
          apply(N'(x), N'(y), c[0]);
    if (long_carry == 0) begin
      failures++;
      $display("no vector carried through the whole word");
    end
    $display("full-length carries: %0d", long_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
