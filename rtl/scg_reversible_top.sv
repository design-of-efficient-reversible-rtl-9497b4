// Top level: the SCG-gate circuits side by side.
//
//   mul_*  4 x 4 reversible multiplier (Toffoli partial products, SCG
//          full-adder network): mul_p = mul_x * mul_y.
//   as_*   ADDSUB_N-bit parallel adder/subtractor of ADDSUB_N SCG gates:
//          as_mode = 0 gives as_a + as_b + as_cin, 1 gives
//          as_a - as_b - as_cin; as_cout is the carry or borrow out.
//   fa_*   single-gate full adder,      fa_in = {a, b, cin}, fa_out = {cout, sum}
//   fs_*   single-gate full subtractor, fs_in = {a, b, bin}, fs_out = {bout, diff}
//   lg_*   the three single-gate logic cells (OR/AND/copy/XOR,
//          NAND/B.A'/XOR/XNOR, 1/copy/copy/NOT) on operands lg_a, lg_b.
// The circuits share no signals. Everything is combinational.
module scg_reversible_top
  import rev_pkg::*;
#(
  parameter int unsigned ADDSUB_N = 4
) (
  input  mul_operand_t        mul_x,
  input  mul_operand_t        mul_y,
  output mul_product_t        mul_p,

  input  logic                as_mode,
  input  logic [ADDSUB_N-1:0] as_a,
  input  logic [ADDSUB_N-1:0] as_b,
  input  logic                as_cin,
  output logic [ADDSUB_N-1:0] as_result,
  output logic                as_cout,

  input  logic [2:0]          fa_in,
  output logic [1:0]          fa_out,
  input  logic [2:0]          fs_in,
  output logic [1:0]          fs_out,

  input  logic                lg_a,
  input  logic                lg_b,
  output logic_out_t          lg_out
);

  rev_multiplier_4x4 u_mul (.x(mul_x), .y(mul_y), .p(mul_p));

  scg_addsub #(.N(ADDSUB_N)) u_addsub (
    .mode(as_mode), .a(as_a), .b(as_b), .cin(as_cin),
    .result(as_result), .cout(as_cout)
  );

  logic fa_g1, fa_g2, fs_g1, fs_g2;

  scg_full_adder u_fa (
    .a(fa_in[2]), .b(fa_in[1]), .cin(fa_in[0]),
    .cout(fa_out[1]), .sum(fa_out[0]), .g1(fa_g1), .g2(fa_g2)
  );

  scg_full_subtractor u_fs (
    .a(fs_in[2]), .b(fs_in[1]), .bin(fs_in[0]),
    .bout(fs_out[1]), .diff(fs_out[0]), .g1(fs_g1), .g2(fs_g2)
  );

  scg_and_or_xor u_aox (
    .a(lg_a), .b(lg_b),
    .o_or(lg_out.o_or), .o_and(lg_out.o_and), .o_a(lg_out.o_a), .o_xor(lg_out.o_xor)
  );

  scg_nand_xnor u_nx (
    .a(lg_a), .b(lg_b),
    .o_nand(lg_out.o_nand), .o_bna(lg_out.o_bna), .o_xor(lg_out.o_xor2), .o_xnor(lg_out.o_xnor)
  );

  scg_not_copy u_nc (
    .a(lg_a),
    .o_one(lg_out.o_one), .o_copy1(lg_out.o_copy1), .o_copy2(lg_out.o_copy2), .o_not(lg_out.o_not)
  );

endmodule
