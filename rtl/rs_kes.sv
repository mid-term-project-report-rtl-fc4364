// rs_kes: key-equation solver of the RS decoder (decomposed, inversion-free
// Berlekamp-Massey).
//
// Finds the error-locator sigma(x) and then the error-evaluator
// Omega(x) = sigma(x) S(x) mod x^2t. Each of the 2t BM iterations is spread over
// t+1 cycles, one coefficient j per cycle, using three field multipliers:
//   sigma_j' = gamma*sigma_j + Delta*tau_(j-1)
//   Delta'  += sigma_j' * S_(r+1-j)        (discrepancy of the next iteration)
// tau is either the old sigma (when the length L grows) or x*tau. After sigma
// is found, Omega_i = sum_j sigma_j S_(i-j) is formed coefficient by
// coefficient with the third multiplier, which the document notes costs fewer
// operations than carrying Omega through the BM recursion. The coefficient
// order, the one-coefficient-per-cycle schedule and the initial values
// (sigma = tau = gamma = 1) are this design's choices.
//
// Interface: start (with syn[] valid) begins a solve; done pulses when sigma[],
// omega[] and deg (= L, the number of errors the locator claims) are valid.
// Latency: 2t(t+1) + t(t+1)/2 + 2 cycles (178 for t=8, 277 for t=10).
module rs_kes
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      start,
  input  gf_t       syn   [2*T_MAX],
  output gf_t       sigma [T_MAX+1],
  output gf_t       omega [T_MAX],
  output logic [4:0] deg,
  output logic      busy,
  output logic      done
);
  typedef enum logic [1:0] {S_IDLE, S_BM, S_OMEGA} state_e;
  state_e state;

  gf_t  s   [2*T_MAX];
  gf_t  tau [T_MAX+1];
  gf_t  gamma_q, delta_q, dacc, tau_prev;
  logic [4:0] r;
  logic [3:0] j, i_om;
  logic [4:0] len;
  logic       f7;
  logic [4:0] t;
  logic       grow;

  assign f7 = is_gf7(mode);
  assign t  = 5'(rs_t(mode));
  assign busy = state != S_IDLE;
  assign deg  = len;

  // Three multipliers of the solver.
  gf_t m1, m2, m3, sig_new, m3a, m3b, syn_sel;
  logic [5:0] sidx;
  gf_mul_mm u_m1 (.a(gamma_q), .b(sigma[j]), .f7(f7), .p(m1));
  gf_mul_mm u_m2 (.a(delta_q), .b(tau_prev), .f7(f7), .p(m2));
  gf_mul_mm u_m3 (.a(m3a),     .b(m3b),      .f7(f7), .p(m3));

  assign sig_new = m1 ^ m2;
  assign grow    = (delta_q != 8'd0) && ({len, 1'b0} <= {1'b0, r});

  always_comb begin
    syn_sel = 8'd0;
    if (state == S_BM) begin
      // S_(r+1-j), zero outside 0..2t-1
      sidx = 6'(r) + 6'd1 - 6'(j);
      if (!sidx[5] && sidx < 6'(2 * t)) syn_sel = s[sidx[4:0]];
      m3a = sig_new;
      m3b = syn_sel;
    end else begin
      // Omega phase: sigma_j * S_(i-j)
      sidx = 6'(i_om) - 6'(j);
      if (!sidx[5]) syn_sel = s[sidx[4:0]];
      m3a = sigma[j];
      m3b = syn_sel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      r <= '0; j <= '0; i_om <= '0; len <= '0;
      gamma_q <= 8'd1; delta_q <= '0; dacc <= '0; tau_prev <= '0;
      for (int k = 0; k <= T_MAX; k++) begin sigma[k] <= '0; tau[k] <= '0; end
      for (int k = 0; k < T_MAX; k++) omega[k] <= '0;
      for (int k = 0; k < 2*T_MAX; k++) s[k] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < 2*T_MAX; k++) s[k] <= syn[k];
          for (int k = 0; k <= T_MAX; k++) begin
            sigma[k] <= (k == 0) ? 8'd1 : 8'd0;
            tau[k]   <= (k == 0) ? 8'd1 : 8'd0;
          end
          for (int k = 0; k < T_MAX; k++) omega[k] <= '0;
          gamma_q  <= 8'd1;
          delta_q  <= syn[0];
          dacc     <= 8'd0;
          tau_prev <= 8'd0;
          len <= '0; r <= '0; j <= '0;
          state <= S_BM;
        end
        S_BM: begin
          // coefficient j of iteration r
          sigma[j] <= sig_new;
          tau[j]   <= grow ? sigma[j] : tau_prev;
          tau_prev <= tau[j];
          if (5'(j) == t) begin
            // end of iteration r
            j        <= '0;
            tau_prev <= 8'd0;
            if (grow) begin
              gamma_q <= delta_q;
              len     <= r + 5'd1 - len;
            end
            delta_q <= dacc ^ m3;
            dacc    <= 8'd0;
            if (r == 2 * t - 1) begin
              state <= S_OMEGA;
              i_om  <= '0;
            end else begin
              r <= r + 5'd1;
            end
          end else begin
            dacc <= dacc ^ m3;
            j    <= j + 4'd1;
          end
        end
        S_OMEGA: begin
          // omega[i_om] accumulated over j = 0..i_om
          omega[i_om] <= ((j == 0) ? 8'd0 : omega[i_om]) ^ m3;
          if (j == i_om) begin
            j <= '0;
            if (5'(i_om) == t - 5'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              i_om <= i_om + 4'd1;
            end
          end else begin
            j <= j + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
