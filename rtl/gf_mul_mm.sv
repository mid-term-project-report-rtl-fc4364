// gf_mul_mm: multi-mode finite-field multiplier, GF(2^8) or GF(2^7).
//
// The product is split, as in the multi-mode FFM of the RS decoder, into one
// shared carry-less multiplier followed by one modular-reduction unit per field
// polynomial; the current mode selects which reduced result is driven out.
// Only the reduction depends on the primitive polynomial, so supporting a
// second field costs one reduction network and a multiplexer.
//
// Interface: a, b, p are 8-bit field elements (GF(2^7) operands must have
// bit 7 clear); f7 = 1 selects GF(2^7). Purely combinational, no latency.
module gf_mul_mm
  import fec_pkg::*;
(
  input  gf_t  a,
  input  gf_t  b,
  input  logic f7,
  output gf_t  p
);
  logic [14:0] prod;
  gf_t         mod8, mod7;

  always_comb begin
    prod = clmul(a, b);
    mod8 = gf_mod(prod, 1'b0);
    mod7 = gf_mod(prod, 1'b1);
    p    = f7 ? mod7 : mod8;
  end
endmodule
