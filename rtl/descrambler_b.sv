// descrambler_b: annex-B derandomiser of the FEC decoder, working on 7-bit
// symbols before the de-interleaver.
//
// The randomiser is a three-stage linear feedback register over GF(2^7) with
// the polynomial x^3 + x + alpha^3 (from the comparison table of the annexes):
// c(n+3) = c(n+1) + alpha^3 * c(n). Each symbol is XORed with c(n). All three
// stages are loaded with 0x7F at every frame start (in_sync), which is this
// design's assumption for the reload point and value.
//
// Interface: in_valid/in_sync/in_sym (7 bits in an 8-bit word); out_* one
// cycle later. Bit 7 of out_sym is always 0 (symbols are 7 bits wide; the
// 8-bit word is the field-element type shared with the GF(2^8) modes).
module descrambler_b
  import fec_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sync,
  input  gf_t  in_sym,
  output logic out_valid,
  output gf_t  out_sym
);
  gf_t c0, c1, c2, a0, a1, a2, prod;

  // stage values used for this symbol (reloaded on a frame start)
  assign a0 = in_sync ? 8'h7F : c0;
  assign a1 = in_sync ? 8'h7F : c1;
  assign a2 = in_sync ? 8'h7F : c2;

  gf_mul_mm u_mul (.a(a0), .b(gf_alpha_pow(3, 1'b1)), .f7(1'b1), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= 8'h7F; c1 <= 8'h7F; c2 <= 8'h7F;
      out_valid <= 1'b0; out_sym <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= (in_sym ^ a0) & 8'h7F;
        c0 <= a1;
        c1 <= a2;
        c2 <= a1 ^ prod;
      end
    end
  end
endmodule
