// carry_select_adder_tb: self-checking testbench for the 16-bit carry-select adder (4-bit groups).
//
// Applies one operand pair per clock cycle and compares the result with the
// integer sum a + b + cin worked out by the testbench.
// Stimulus mixes uniformly random operands with operands built to make a
// carry run the whole word (b = ~a with a carry entering at bit 0, or a
// generate at a random bit), and the corner cases 0, all-ones and 1.
// It counts how many vectors carried through the whole word, and fails if
// none did. A watchdog ends the run with a failure if it takes too long.
module carry_select_adder_tb;

  localparam int unsigned N = 16;

  logic         clk = 1'b0;
  logic [N-1:0] a, b, s;
  logic         cin;
  logic         cout;
  logic [N:0]   exp;
  int           checks = 0, failures = 0, long_carry = 0;

  always #5 clk = ~clk;

  carry_select_adder dut (
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
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, N'(1), 1'b0);
    apply('1, '0, 1'b1);
    for (int i = 0; i < 4000; i++) begin
      logic [N-1:0] x, y;
      x = rnd();
      y = rnd();
      k = int'($urandom % N);
      case ($urandom % 4)
        0: apply(x, y, 1'($urandom));
        1: apply(x, ~x, 1'b1);                       // carry-in propagates all the way
        2: apply(x | N'(1), ~x | N'(1), 1'b0);      // bit 0 generates, rest propagate
        default: begin                               // long propagate above a generate at k
          y = ~x;
          x[k] = 1'b1;
          y[k] = 1'b1;
          apply(x, y, 1'($urandom));
        end
      endcase
    end
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
