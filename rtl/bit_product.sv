// bit_product: bit-level multiplier. The product of two bits is their
// logical AND (0x0 = 0x1 = 1x0 = 0, 1x1 = 1), so one AND gate forms each
// bit product p_j*q_k of an array multiplier. Combinational.
module bit_product (
  input  logic p,
  input  logic q,
  output logic s
);
  assign s = p & q;
endmodule
