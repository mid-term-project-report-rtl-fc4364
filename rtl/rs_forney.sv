// rs_forney: error-value evaluator of the RS decoder (Forney algorithm).
//
// For a root x = beta of sigma(x) the error value is
//   e = Omega(beta) / (beta * sigma'(beta))   when the code's first root is alpha^0
//   e = Omega(beta) / sigma'(beta)            when it is alpha^1 (annex B),
// the two forms the document gives. beta*sigma'(beta) is the odd-degree part
// of sigma(beta), which the Chien search already forms, so one inversion and
// one or two multiplications finish the job; the mode picks the form.
// Omega(beta) is evaluated by a bank of cells stepped in lockstep with the
// Chien cells (same load constants and step constants). This differs from the
// document's evaluator, which forms sigma'(beta) and Omega(beta) by Horner
// steps through a shared multiplier; the results are the same.
//
// Interface: load/step as in rs_chien; root, x_loc and odd_sum come from the
// Chien search for the same position. err is the value to add to the symbol at
// that position (zero where root is low). Combinational from the term state.
module rs_forney
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      load,
  input  logic      step,
  input  gf_t       omega [T_MAX],
  input  logic      root,
  input  gf_t       x_loc,
  input  gf_t       odd_sum,
  output gf_t       err
);
  logic f7;
  gf_t  term    [T_MAX];
  gf_t  stepped [T_MAX];
  gf_t  loaded  [T_MAX];
  gf_t  om_val, inv_den, quot, quot_x;

  assign f7 = is_gf7(mode);

  for (genvar i = 0; i < T_MAX; i++) begin : g_cell
    gf_t k_step, k_load;
    assign k_step = f7 ? gf_alpha_pow(i, 1'b1) : gf_alpha_pow(i, 1'b0);
    always_comb begin
      case (mode)
        MODE_B:  k_load = gf_alpha_pow(i * (128 - 127), 1'b1);
        MODE_D:  k_load = gf_alpha_pow(i * (256 - 207), 1'b0);
        default: k_load = gf_alpha_pow(i * (256 - 204), 1'b0);
      endcase
    end
    gf_mul_mm u_step (.a(term[i]),  .b(k_step), .f7(f7), .p(stepped[i]));
    gf_mul_mm u_load (.a(omega[i]), .b(k_load), .f7(f7), .p(loaded[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < T_MAX; i++) term[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < T_MAX; i++) term[i] <= loaded[i];
    end else if (step) begin
      for (int i = 0; i < T_MAX; i++) term[i] <= stepped[i];
    end
  end

  always_comb begin
    om_val = '0;
    for (int i = 0; i < T_MAX; i++) om_val ^= term[i];
    inv_den = gf_inv(odd_sum, f7);
  end

  gf_mul_mm u_q  (.a(om_val), .b(inv_den), .f7(f7), .p(quot));
  gf_mul_mm u_qx (.a(quot),   .b(x_loc),   .f7(f7), .p(quot_x));

  assign err = !root ? 8'd0 : (rs_b1(mode) ? quot_x : quot);
endmodule
