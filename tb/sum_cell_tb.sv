// sum_cell_tb: exhaustive self-checking testbench for the dual-rail sum
// cell. All eight values of A, B, C are applied with their complements on
// the _n rails; S must be A ^ B ^ C and S_bar its complement.
module sum_cell_tb;

  logic clk = 1'b0;
  logic a, b, c, s, s_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sum_cell dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .s(s), .s_n(s_n));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks += 2;
      if (s != (a ^ b ^ c)) begin
        failures++;
        $display("MISMATCH s a=%b b=%b c=%b s=%b", a, b, c, s);
      end
      if (s_n != ~(a ^ b ^ c)) begin
        failures++;
        $display("MISMATCH s_n a=%b b=%b c=%b s_n=%b", a, b, c, s_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
