// adders_top: every adder of the collection, side by side.
//
// The adders are independent designs; they share nothing, so each keeps its
// own operand and result ports here, prefixed by the adder's name:
//   hc_*   64-bit dual-level carry-select adder (no carry in or out)
//   cla_*  64-bit three-level radix-4 carry-lookahead adder
//   cf_*   32-bit two-level carry-lookahead adder drawn as a folded tree
//   skip_* 16-bit carry-bypass adder, groups of 2, 3, 4, 4, 3 bits
//   sel_*  16-bit carry-select adder, 4-bit groups
//   bt_*   8-bit binary tree adder (PG tree + carry tree)
//   ks2_*  16-bit radix-2 Kogge-Stone adder
//   ks4_*  16-bit radix-4 Kogge-Stone adder
//   hcl_*  16-bit Han-Carlson sparse-tree adder
//   lf_*   16-bit Ladner-Fischer adder
//   sm_*   32-bit sparse carry-merge adder with carry-select sums
//   ling_* 16-bit Ling adder
//   cell_* dual-rail sum cell
// All paths are combinational; there is no clock.
module adders_top (
  input  logic [63:0] hc_a,   input  logic [63:0] hc_b,   output logic [63:0] hc_r,
  input  logic [63:0] cla_a,  input  logic [63:0] cla_b,  input  logic        cla_cin,
  output logic [63:0] cla_s,  output logic        cla_cout,
  input  logic [31:0] cf_a,   input  logic [31:0] cf_b,   input  logic        cf_cin,
  output logic [31:0] cf_s,   output logic        cf_cout,
  input  logic [15:0] skip_a, input  logic [15:0] skip_b, input  logic        skip_cin,
  output logic [15:0] skip_s, output logic        skip_cout,
  input  logic [15:0] sel_a,  input  logic [15:0] sel_b,  input  logic        sel_cin,
  output logic [15:0] sel_s,  output logic        sel_cout,
  input  logic [7:0]  bt_a,   input  logic [7:0]  bt_b,   input  logic        bt_cin,
  output logic [7:0]  bt_s,   output logic        bt_cout,
  input  logic [15:0] ks2_a,  input  logic [15:0] ks2_b,
  output logic [15:0] ks2_s,  output logic        ks2_cout,
  input  logic [15:0] ks4_a,  input  logic [15:0] ks4_b,
  output logic [15:0] ks4_s,  output logic        ks4_cout,
  input  logic [15:0] hcl_a,  input  logic [15:0] hcl_b,
  output logic [15:0] hcl_s,  output logic        hcl_cout,
  input  logic [15:0] lf_a,   input  logic [15:0] lf_b,
  output logic [15:0] lf_s,   output logic        lf_cout,
  input  logic [31:0] sm_a,   input  logic [31:0] sm_b,
  output logic [31:0] sm_s,   output logic        sm_cout,
  input  logic [15:0] ling_a, input  logic [15:0] ling_b, input  logic        ling_cin,
  output logic [15:0] ling_s, output logic        ling_cout,
  input  logic        cell_a, input  logic        cell_a_n,
  input  logic        cell_b, input  logic        cell_b_n,
  input  logic        cell_c, input  logic        cell_c_n,
  output logic        cell_s, output logic        cell_s_n
);

  hc_adder64 u_hc (.a(hc_a), .b(hc_b), .r(hc_r));

  cla64_radix4 u_cla (.a(cla_a), .b(cla_b), .cin(cla_cin), .s(cla_s), .cout(cla_cout));

  cla_folded32 u_cf (.a(cf_a), .b(cf_b), .cin(cf_cin), .s(cf_s), .cout(cf_cout));

  carry_skip_adder u_skip (.a(skip_a), .b(skip_b), .cin(skip_cin), .s(skip_s),
                           .cout(skip_cout));

  carry_select_adder u_sel (.a(sel_a), .b(sel_b), .cin(sel_cin), .s(sel_s), .cout(sel_cout));

  binary_tree_adder u_bt (.a(bt_a), .b(bt_b), .cin(bt_cin), .s(bt_s), .cout(bt_cout));

  kogge_stone_r2 u_ks2 (.a(ks2_a), .b(ks2_b), .s(ks2_s), .cout(ks2_cout));

  kogge_stone_r4 u_ks4 (.a(ks4_a), .b(ks4_b), .s(ks4_s), .cout(ks4_cout));

  han_carlson u_hcl (.a(hcl_a), .b(hcl_b), .s(hcl_s), .cout(hcl_cout));

  ladner_fischer u_lf (.a(lf_a), .b(lf_b), .s(lf_s), .cout(lf_cout));

  sparse_merge_adder32 u_sm (.a(sm_a), .b(sm_b), .s(sm_s), .cout(sm_cout));

  ling_adder u_ling (.a(ling_a), .b(ling_b), .cin(ling_cin), .s(ling_s), .cout(ling_cout));

  sum_cell u_cell (.a(cell_a), .a_n(cell_a_n), .b(cell_b), .b_n(cell_b_n), .c(cell_c),
                   .c_n(cell_c_n), .s(cell_s), .s_n(cell_s_n));

endmodule
