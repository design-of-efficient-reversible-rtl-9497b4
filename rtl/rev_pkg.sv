// Shared types for the SCG reversible-logic circuits.
//
// The multiplier is fixed at 4 x 4 bits (MUL_W), the size of the
// gate-level structure it is built from; the product is 2*MUL_W bits.
// logic_out_t bundles the outputs of the three single-gate logic cells
// (AND/OR/XOR, NAND/XNOR, NOT/COPY) so the top level can bring them out
// as one port.
package rev_pkg;

  localparam int MUL_W = 4;

  typedef logic [MUL_W-1:0]   mul_operand_t;
  typedef logic [2*MUL_W-1:0] mul_product_t;

  typedef struct packed {
    // SCG inputs (0, A, B, 0)
    logic o_or;
    logic o_and;
    logic o_a;
    logic o_xor;
    // SCG inputs (A, B, 1, 0)
    logic o_nand;
    logic o_bna;      // B AND NOT A
    logic o_xor2;
    logic o_xnor;
    // SCG inputs (0, A, 1, 0)
    logic o_one;
    logic o_copy1;
    logic o_copy2;
    logic o_not;
  } logic_out_t;

endpackage
