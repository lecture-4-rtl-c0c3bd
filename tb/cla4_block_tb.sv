// cla4_block_tb: exhaustive self-checking testbench for the radix-4
// carry-lookahead block.
//
// All 512 combinations of g, p and c0 are applied, one per clock. The
// reference is a plain ripple: c(i+1) = g(i) + p(i) c(i). The block's C1..C3
// must match it, G3:0 must equal the ripple carry out with c0 = 0 and P3:0
// the AND of the four propagates.
module cla4_block_tb;

  logic       clk = 1'b0;
  logic [3:0] g, p;
  logic       c0, gg, pg;
  logic [3:1] c;
  logic [4:0] rc;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  cla4_block dut (.g(g), .p(p), .c0(c0), .gg(gg), .pg(pg), .c(c));

  function automatic logic [4:0] ripple(logic [3:0] gi, logic [3:0] pi, logic ci);
    logic [4:0] r;
    r[0] = ci;
    for (int i = 0; i < 4; i++) r[i+1] = gi[i] | (pi[i] & r[i]);
    return r;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("MISMATCH %s g=%b p=%b c0=%b", what, g, p, c0);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {g, p, c0} = 9'(v);
      @(posedge clk);
      rc = ripple(g, p, c0);
      check(c == rc[3:1], "carries");
      rc = ripple(g, p, 1'b0);
      check(gg == rc[4], "G3:0");
      check(pg == &p, "P3:0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
