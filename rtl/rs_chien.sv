// rs_chien: multi-mode Chien search of the RS decoder.
//
// One term per locator coefficient sigma_i holds sigma_i * x^i for the current
// trial point x; the sum of all cells is sigma(x) and a zero sum ("trap")
// marks an error location. Cells 0..3 are dual-field cells; the others are
// GF(2^8)-only, as in the document's term arrangement. A separate location
// term (C2L) tracks x itself for the error-value evaluator.
//
// Symbols are examined in the order they were received, highest degree first:
// step k tests position n-1-k, i.e. x = alpha^-(n-1-k). At load the cells take
// sigma_i * alpha^(i*(2^m-n)) (x0 = alpha^-(n-1), a per-mode constant) and
// every step multiplies term i by alpha^i. Starting at the shortened code's
// first position, rather than stepping through the unused positions, is this
// design's choice.
//
// Interface: load (with sigma[] valid) initialises the cells; each step cycle
// advances to the next position. root, x_loc and odd_sum (= x*sigma'(x), the
// odd-degree part of sigma(x)) describe the current position combinationally.
module rs_chien
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      load,
  input  logic      step,
  input  gf_t       sigma [T_MAX+1],
  output logic      root,
  output gf_t       x_loc,
  output gf_t       odd_sum
);
  logic f7;
  gf_t  term [T_MAX+1];
  gf_t  stepped [T_MAX+1];
  gf_t  loaded  [T_MAX+1];
  gf_t  x_next, x0;

  assign f7 = is_gf7(mode);

  // x0 = alpha^(2^m - n) for each mode
  always_comb begin
    case (mode)
      MODE_B:  x0 = gf_alpha_pow(128 - 127, 1'b1);
      MODE_D:  x0 = gf_alpha_pow(256 - 207, 1'b0);
      default: x0 = gf_alpha_pow(256 - 204, 1'b0);
    endcase
  end

  for (genvar i = 0; i <= T_MAX; i++) begin : g_cell
    gf_t k_step, k_load;
    assign k_step = (f7 && i <= 3) ? gf_alpha_pow(i, 1'b1) : gf_alpha_pow(i, 1'b0);
    always_comb begin
      case (mode)
        MODE_B:  k_load = gf_alpha_pow(i * (128 - 127), 1'b1);
        MODE_D:  k_load = gf_alpha_pow(i * (256 - 207), 1'b0);
        default: k_load = gf_alpha_pow(i * (256 - 204), 1'b0);
      endcase
    end
    gf_mul_mm u_step (.a(term[i]),  .b(k_step), .f7(f7), .p(stepped[i]));
    gf_mul_mm u_load (.a(sigma[i]), .b(k_load), .f7(f7), .p(loaded[i]));
  end

  gf_mul_mm u_loc (.a(x_loc), .b(8'd2), .f7(f7), .p(x_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= T_MAX; i++) term[i] <= '0;
      x_loc <= 8'd1;
    end else if (load) begin
      for (int i = 0; i <= T_MAX; i++) term[i] <= loaded[i];
      x_loc <= x0;
    end else if (step) begin
      for (int i = 0; i <= T_MAX; i++) term[i] <= stepped[i];
      x_loc <= x_next;
    end
  end

  always_comb begin
    gf_t even_sum;
    even_sum = '0;
    odd_sum  = '0;
    for (int i = 0; i <= T_MAX; i++)
      if (i % 2 == 1) odd_sum ^= term[i];
      else            even_sum ^= term[i];
    root = (even_sum ^ odd_sum) == 8'd0;
  end
endmodule
