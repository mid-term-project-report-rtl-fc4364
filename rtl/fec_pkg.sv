// fec_pkg: types, mode table and Galois-field helper functions shared by the
// multi-mode FEC decoder (RS decoder, de-interleaver, descramblers, Viterbi).
//
// Two fields are supported, as the multi-mode RS decoder needs them:
//   GF(2^8) with p8(x) = x^8+x^4+x^3+x^2+1 (ITU-T J.83 annexes A/C/D, DVB)
//   GF(2^7) with p7(x) = x^7+x^3+1         (ITU-T J.83 annex B)
// The field polynomials and the first consecutive root of each code are this
// design's choice (the standards' usual values); the code sizes (n,k,t) and the
// interleaver depths follow the comparison table of the J.83 annexes.
// Elements are always carried in 8-bit words; in GF(2^7) bit 7 is zero.
package fec_pkg;

  typedef enum logic [2:0] {
    MODE_A    = 3'd0,   // J.83 annex A: RS(204,188) t=8, (I,J)=(12,17)
    MODE_B    = 3'd1,   // J.83 annex B: RS over GF(2^7) t=3 (non-extended part)
    MODE_C    = 3'd2,   // J.83 annex C: as annex A
    MODE_D    = 3'd3,   // J.83 annex D: RS(207,187) t=10, (I,J)=(52,4)
    MODE_DVBT = 3'd4    // DVB-T: K=7 Viterbi + annex-A outer code
  } fec_mode_e;

  typedef logic [7:0] gf_t;

  // Code rates of the punctured K=7 inner code (DVB-T).
  typedef enum logic [2:0] {
    RATE_1_2 = 3'd0,
    RATE_2_3 = 3'd1,
    RATE_3_4 = 3'd2,
    RATE_5_6 = 3'd3,
    RATE_7_8 = 3'd4
  } vit_rate_e;

  // Puncturing period (trellis steps) and which of X/Y is sent at step p.
  function automatic logic [2:0] punct_period(input vit_rate_e r);
    case (r)
      RATE_2_3: return 3'd2;
      RATE_3_4: return 3'd3;
      RATE_5_6: return 3'd5;
      RATE_7_8: return 3'd7;
      default:  return 3'd1;
    endcase
  endfunction

  // Patterns, step 0 in bit 0: 2/3 X:10 Y:11, 3/4 X:101 Y:110,
  // 5/6 X:10101 Y:11010, 7/8 X:1000101 Y:1111010.
  function automatic logic punct_keep_x(input vit_rate_e r, input logic [2:0] p);
    logic [6:0] m;
    case (r)
      RATE_2_3: m = 7'b0000001;
      RATE_3_4: m = 7'b0000101;
      RATE_5_6: m = 7'b0010101;
      RATE_7_8: m = 7'b1010001;
      default:  m = 7'b0000001;
    endcase
    return m[p];
  endfunction

  function automatic logic punct_keep_y(input vit_rate_e r, input logic [2:0] p);
    logic [6:0] m;
    case (r)
      RATE_2_3: m = 7'b0000011;
      RATE_3_4: m = 7'b0000011;
      RATE_5_6: m = 7'b0001011;
      RATE_7_8: m = 7'b0101111;
      default:  m = 7'b0000001;
    endcase
    return m[p];
  endfunction

  localparam int unsigned T_MAX  = 10;          // largest t of all modes (annex D)
  localparam logic [8:0]  POLY8  = 9'h11D;
  localparam logic [8:0]  POLY7  = 9'h089;

  function automatic logic is_gf7(input fec_mode_e m);
    return m == MODE_B;
  endfunction

  function automatic int unsigned rs_n(input fec_mode_e m);
    case (m)
      MODE_B:  return 127;
      MODE_D:  return 207;
      default: return 204;
    endcase
  endfunction

  function automatic int unsigned rs_t(input fec_mode_e m);
    case (m)
      MODE_B:  return 3;
      MODE_D:  return 10;
      default: return 8;
    endcase
  endfunction

  // Annex B sends each codeword with one extra (extension) symbol after the
  // 127 symbols of the cyclic code.
  function automatic logic rs_ext(input fec_mode_e m);
    return m == MODE_B;
  endfunction

  // First consecutive root exponent b of the generator polynomial.
  function automatic logic rs_b1(input fec_mode_e m);
    return m == MODE_B;
  endfunction

  // Carry-less product of two field elements (degree <= 14).
  function automatic logic [14:0] clmul(input gf_t a, input gf_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) p ^= 15'(a) << i;
    return p;
  endfunction

  // Reduction of a product modulo p8(x) or p7(x).
  function automatic gf_t gf_mod(input logic [14:0] p, input logic f7);
    logic [14:0] r;
    r = p;
    for (int i = 14; i >= 8; i--)
      if (r[i]) r ^= 15'(POLY8) << (i - 8);
    if (f7) begin
      r = p;
      for (int i = 14; i >= 7; i--)
        if (r[i]) r ^= 15'(POLY7) << (i - 7);
      return {1'b0, r[6:0]};
    end
    return r[7:0];
  endfunction

  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input logic f7);
    return gf_mod(clmul(a, b), f7);
  endfunction

  // alpha^e, alpha = x; meant for constant arguments.
  function automatic gf_t gf_alpha_pow(input int unsigned e, input logic f7);
    gf_t r;
    int unsigned ee;
    ee = f7 ? e % 127 : e % 255;
    r = 8'd1;
    for (int unsigned i = 0; i < ee; i++) r = gf_mul(r, 8'd2, f7);
    return r;
  endfunction

  // Multiplicative inverse a^(2^m - 2); returns 0 for a = 0.
  function automatic gf_t gf_inv(input gf_t a, input logic f7);
    gf_t sq, r;
    sq = a;
    r  = 8'd1;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq, f7);
      if (!(f7 && i == 7)) r = gf_mul(r, sq, f7);
    end
    return r;
  endfunction

endpackage
