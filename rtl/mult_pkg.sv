// mult_pkg: sizes and bundle types shared by the 4x4 two-stage pipelined
// multiplier. The operand split follows the design's scheme of four 2x2
// sub-products: each 4-bit operand is cut into two 2-bit digits, every 2x2
// sub-product is 4 bits wide, and the reduction adders work on a 6-bit slice
// (product columns 2..7) because each CSA and CPA is a row of six full adders.
// The struct layouts (which register bit holds what) are this design's own.
package mult_pkg;

  localparam int unsigned OP_W    = 4;  // operand width (4x4 multiplier)
  localparam int unsigned DIGIT_W = 2;  // 2x2 sub-multiplier digit width
  localparam int unsigned PP_W    = 4;  // width of one 2x2 partial product
  localparam int unsigned ADD_W   = 6;  // full adders per CSA / CPA row
  localparam int unsigned PROD_W  = 8;  // product width

  typedef logic [OP_W-1:0]    operand_t;
  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [PP_W-1:0]    pp_t;
  typedef logic [ADD_W-1:0]   slice_t;
  typedef logic [PROD_W-1:0]  product_t;

  // Stage-1 register contents: the four 2x2 partial products.
  // ppXY = (digit X of the multiplicand) * (digit Y of the multiplier),
  // weight 2^(2X+2Y).
  typedef struct packed {
    pp_t pp11;
    pp_t pp10;
    pp_t pp01;
    pp_t pp00;
  } pp_set_t;

  // Stage-2 register contents: carry-save pair for product columns 2..7
  // and product bits 1..0, which need no addition.
  typedef struct packed {
    slice_t      sum;
    slice_t      carry;  // bit i has the weight of column i+3
    logic [1:0]  low;
  } cs_pair_t;

endpackage
