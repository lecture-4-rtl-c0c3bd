// hc_block16_tb: self-checking testbench for the 16-bit carry-select block.
//
// One vector per clock: random operands, operands whose carry chain crosses
// the whole block (b = ~a), and operands with a generate at a random bit under
// a long propagate run, each with cin16 random. r must equal the low 16 bits
// of a + b + cin16, g16 the carry out of a + b, p16 the AND of a | b. Counts
// vectors where cin16 = 1 ran through all 16 bits and fails if none did.
module hc_block16_tb;

  logic        clk = 1'b0;
  logic [15:0] a, b, r;
  logic        cin16, g16, p16;
  logic [16:0] sum;
  int          checks = 0, failures = 0, through = 0;

  always #5 clk = ~clk;

  hc_block16 dut (.a(a), .b(b), .cin16(cin16), .g16(g16), .p16(p16), .r(r));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("MISMATCH %s a=%h b=%h cin16=%b", what, a, b, cin16);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a     = 16'($urandom);
      cin16 = 1'($urandom);
      case (i % 3)
        0: b = 16'($urandom);
        1: b = ~a;
        default: begin
          int k;
          k    = int'($urandom % 16);
          b    = ~a;
          a[k] = 1'b1;
          b[k] = 1'b1;
        end
      endcase
      @(posedge clk);
      sum = 17'(a) + 17'(b) + 17'(cin16);
      check(r == sum[15:0], "r");
      if (&(a ^ b) && cin16) through++;
      sum = 17'(a) + 17'(b);
      check(g16 == sum[16], "g16");
      check(p16 == &(a | b), "p16");
    end
    if (through == 0) begin
      failures++;
      $display("no carry ran through the block");
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
