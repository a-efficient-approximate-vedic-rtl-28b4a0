// avmt_pkg: widths and types shared by the approximate Vedic multiplier.
//
// The multiplier works on 4-bit unsigned operands built from 2-bit
// sub-multipliers (AVM2) and produces an 8-bit product. These widths are fixed
// by the architecture: the 4x4 structure is the one the design describes, and
// nothing here generalises it to other sizes.
package avmt_pkg;

  localparam int unsigned SUB_W  = 2;          // AVM2 operand width
  localparam int unsigned SUBP_W = 2 * SUB_W;  // AVM2 product width
  localparam int unsigned OP_W   = 4;          // AVMT operand width
  localparam int unsigned PROD_W = 2 * OP_W;   // AVMT product width

  typedef logic [SUB_W-1:0]  sub_op_t;
  typedef logic [SUBP_W-1:0] sub_prod_t;
  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;

endpackage
