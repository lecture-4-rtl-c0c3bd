// adders_top_tb: end-to-end testbench for the whole adder collection, at the
// default sizes.
//
// Each clock every adder gets a fresh operand pair, drawn from three kinds:
// uniformly random, b = ~a (a carry entering at bit 0 must run the whole
// word) and a generate at a random bit under a long propagate run. Results
// are compared with a + b + cin worked out here. Alongside, the testbench
// counts, from the operands alone, how often each adder's distinctive
// mechanism was exercised, and fails for any that never occurred:
//   hc_cin16    a 16-bit block of the 64-bit adder received a carry of 1, so
//               its cin = 1 speculative sums were selected
//   hc_through  a carry crossed all four 16-bit blocks
//   cla_c0_c64  C0 travelled up and down the whole lookahead tree to C64
//   cf_c0_c32   Cin of the 32-bit folded tree reached Cout through both halves
//   skip_bypass a bypass group had all bits propagating and a carry of 1 at
//               its input, so the bypass path carried it
//   sel_one     a 4-bit carry-select group took its carry-in-1 results
//   sm_sel1     a 4-bit slice of the sparse adder selected its cin = 1 sum
//   ling_long   a Ling pseudo-carry chain reached the top bit from cin
//   tree_long   a carry ran the full width of each prefix-tree adder
// The dual-rail sum cell is swept through all input values as well.
module adders_top_tb;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  int          hc_cin16 = 0, hc_through = 0, cla_c0_c64 = 0, skip_bypass = 0;
  int          sel_one = 0, sm_sel1 = 0, ling_long = 0, tree_long = 0;
  int          cf_c0_c32 = 0;

  localparam int SKIP_BASE [5] = '{0, 2, 5, 9, 13};
  localparam int SKIP_SIZE [5] = '{2, 3, 4, 4, 3};

  logic [63:0] a, b;
  logic        cin;

  logic [63:0] hc_r, cla_s;
  logic        cla_cout;
  logic [15:0] skip_s, sel_s, ks2_s, ks4_s, hcl_s, lf_s, ling_s;
  logic        skip_cout, sel_cout, ks2_cout, ks4_cout, hcl_cout, lf_cout, ling_cout;
  logic [7:0]  bt_s;
  logic        bt_cout;
  logic [31:0] sm_s, cf_s;
  logic        cf_cout;
  logic        sm_cout;
  logic        ca, cb, cc, cs, cs_n;

  always #5 clk = ~clk;

  adders_top dut (
    .hc_a  (a),        .hc_b  (b),        .hc_r     (hc_r),
    .cla_a (a),        .cla_b (b),        .cla_cin  (cin),
    .cla_s (cla_s),    .cla_cout (cla_cout),
    .cf_a  (a[31:0]),  .cf_b  (b[31:0]),  .cf_cin   (cin),
    .cf_s  (cf_s),     .cf_cout  (cf_cout),
    .skip_a(a[15:0]),  .skip_b(b[15:0]),  .skip_cin (cin),
    .skip_s(skip_s),   .skip_cout(skip_cout),
    .sel_a (a[15:0]),  .sel_b (b[15:0]),  .sel_cin  (cin),
    .sel_s (sel_s),    .sel_cout (sel_cout),
    .bt_a  (a[7:0]),   .bt_b  (b[7:0]),   .bt_cin   (cin),
    .bt_s  (bt_s),     .bt_cout  (bt_cout),
    .ks2_a (a[15:0]),  .ks2_b (b[15:0]),  .ks2_s    (ks2_s),  .ks2_cout (ks2_cout),
    .ks4_a (a[15:0]),  .ks4_b (b[15:0]),  .ks4_s    (ks4_s),  .ks4_cout (ks4_cout),
    .hcl_a (a[15:0]),  .hcl_b (b[15:0]),  .hcl_s    (hcl_s),  .hcl_cout (hcl_cout),
    .lf_a  (a[15:0]),  .lf_b  (b[15:0]),  .lf_s     (lf_s),   .lf_cout  (lf_cout),
    .sm_a  (a[31:0]),  .sm_b  (b[31:0]),  .sm_s     (sm_s),   .sm_cout  (sm_cout),
    .ling_a(a[15:0]),  .ling_b(b[15:0]),  .ling_cin (cin),
    .ling_s(ling_s),   .ling_cout(ling_cout),
    .cell_a(ca), .cell_a_n(~ca), .cell_b(cb), .cell_b_n(~cb), .cell_c(cc), .cell_c_n(~cc),
    .cell_s(cs), .cell_s_n(cs_n)
  );

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("MISMATCH %s a=%h b=%h cin=%b", what, a, b, cin);
    end
  endtask

  // carry into every bit of a + b + ci (bit i of the result: carry into i)
  function automatic logic [64:0] carries(logic [63:0] x, logic [63:0] y, logic ci, int n);
    logic [64:0] c;
    c = '0;
    c[0] = ci;
    for (int i = 0; i < n; i++) c[i+1] = (x[i] & y[i]) | ((x[i] | y[i]) & c[i]);
    return c;
  endfunction

  // the carry into bit 0 (or made at bit 0) reaches bit n
  function automatic logic full_run(logic [63:0] x, logic [63:0] y, logic ci, int n);
    logic r;
    r = (x[0] & y[0]) | ((x[0] ^ y[0]) & ci);
    for (int i = 1; i < n; i++) r &= x[i] ^ y[i];
    return r;
  endfunction

  task automatic check_all();
    logic [64:0] e, c;
    // 64-bit dual-level carry-select (no carry in)
    e = 65'(a) + 65'(b);
    check(hc_r == e[63:0], "hc_adder64");
    c = carries(a, b, 1'b0, 64);
    for (int k = 1; k < 4; k++) if (c[16*k]) hc_cin16++;
    if (full_run(a, b, 1'b0, 64)) hc_through++;
    // 64-bit radix-4 CLA
    e = 65'(a) + 65'(b) + 65'(cin);
    check({cla_cout, cla_s} == e, "cla64_radix4");
    if (cin && &(a ^ b)) cla_c0_c64++;
    // 32-bit folded-tree CLA
    e = 65'(a[31:0]) + 65'(b[31:0]) + 65'(cin);
    check({cf_cout, cf_s} == e[32:0], "cla_folded32");
    if (cin && &(a[31:0] ^ b[31:0])) cf_c0_c32++;
    // 16-bit carry skip and carry select
    e = 65'(a[15:0]) + 65'(b[15:0]) + 65'(cin);
    check({skip_cout, skip_s} == e[16:0], "carry_skip_adder");
    check({sel_cout, sel_s} == e[16:0], "carry_select_adder");
    check({ling_cout, ling_s} == e[16:0], "ling_adder");
    c = carries(a, b, cin, 16);
    for (int k = 0; k < 5; k++)   // bypass groups: bits 1:0, 4:2, 8:5, 12:9, 15:13
      if (c[SKIP_BASE[k]] && &((a ^ b) >> SKIP_BASE[k] | ~((64'd1 << SKIP_SIZE[k]) - 1)))
        skip_bypass++;
    for (int k = 0; k < 4; k++) if (c[4*k]) sel_one++;
    if (full_run(a, b, cin, 16) && cin) ling_long++;
    // 8-bit binary tree
    e = 65'(a[7:0]) + 65'(b[7:0]) + 65'(cin);
    check({bt_cout, bt_s} == e[8:0], "binary_tree_adder");
    // 16-bit prefix trees without carry in
    e = 65'(a[15:0]) + 65'(b[15:0]);
    check({ks2_cout, ks2_s} == e[16:0], "kogge_stone_r2");
    check({ks4_cout, ks4_s} == e[16:0], "kogge_stone_r4");
    check({hcl_cout, hcl_s} == e[16:0], "han_carlson");
    check({lf_cout, lf_s} == e[16:0], "ladner_fischer");
    if (full_run(a, b, 1'b0, 16)) tree_long++;
    // 32-bit sparse carry-merge
    e = 65'(a[31:0]) + 65'(b[31:0]);
    check({sm_cout, sm_s} == e[32:0], "sparse_merge_adder32");
    c = carries(a, b, 1'b0, 32);
    for (int k = 1; k < 8; k++) if (c[4*k]) sm_sel1++;
  endtask

  task automatic need(int count, string what);
    $display("  %-12s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    ca = 1'b0; cb = 1'b0; cc = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      a   = {$urandom, $urandom};
      cin = 1'($urandom);
      case (i % 3)
        0: b = {$urandom, $urandom};
        1: b = ~a;
        default: begin
          int k;
          k    = int'($urandom % 64);
          b    = ~a;
          a[k] = 1'b1;
          b[k] = 1'b1;
        end
      endcase
      {ca, cb, cc} = 3'(i);
      @(posedge clk);
      check_all();
      check(cs == (ca ^ cb ^ cc) && cs_n == ~cs, "sum_cell");
    end
    $display("mechanism counts:");
    need(hc_cin16, "hc_cin16");
    need(hc_through, "hc_through");
    need(cla_c0_c64, "cla_c0_c64");
    need(cf_c0_c32, "cf_c0_c32");
    need(skip_bypass, "skip_bypass");
    need(sel_one, "sel_one");
    need(sm_sel1, "sm_sel1");
    need(ling_long, "ling_long");
    need(tree_long, "tree_long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
