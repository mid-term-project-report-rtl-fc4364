// viterbi_decoder: Viterbi decoder for the constraint-length-7 convolutional
// code G = (171, 133) octal with DVB-T puncturing (rates 1/2 to 7/8).
//
// Four parts, as in the document's block diagram: the de-puncture de-MUX
// (vit_depuncture), the transition-metric unit (TMU), the add-compare-select
// unit (ACSU) with its path-metric registers, and the survivor-memory unit
// (SMU). The TMU forms the four possible branch metrics of a trellis step from
// the soft X/Y values (an erased bit adds nothing). The ACSU updates all 64
// states in one cycle; path metrics are unsigned and compared modulo 2^PMW, so
// they never need rescaling. The SMU is a register-exchange memory of TB_LEN
// decisions per state; each step the oldest bit of the best state's
// survivor is output. Soft-input width, survivor depth, register exchange and
// the start in state 0 are this design's choices; the document fixes K = 7,
// the rates and the TMU/ACSU/SMU split.
//
// Encoder convention: v = {u, d1..d6} (u the new bit, d1 the previous one),
// X = parity(v & 171o), Y = parity(v & 133o); state = {d1..d6}.
// Interface: in_valid/in_soft as in vit_depuncture. out_valid/out_bit give
// decoded bits in order, the bit of trellis step s leaving TB_LEN-1 steps
// later (plus 2 cycles of pipeline).
module viterbi_decoder
  import fec_pkg::*;
#(
  parameter int unsigned SW     = 3,
  parameter int unsigned TB_LEN = 48,
  parameter int unsigned PMW    = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vit_rate_e     rate,
  input  logic          in_valid,
  input  logic [SW-1:0] in_soft,
  output logic          out_valid,
  output logic          out_bit
);
  localparam int unsigned NS   = 64;
  localparam logic [SW-1:0] SMAX = '1;

  logic          dp_valid, ex, ey;
  logic [SW-1:0] sx, sy;

  vit_depuncture #(.SW(SW)) u_dp (
    .clk, .rst_n, .rate, .in_valid, .in_soft,
    .out_valid(dp_valid), .out_x(sx), .out_y(sy), .out_ex(ex), .out_ey(ey)
  );

  // ---- TMU: metric for code pair c = {cx, cy}
  logic [SW:0] bm [4];
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [SW:0] mx, my;
      mx = ex ? '0 : (c[1] ? {1'b0, SMAX - sx} : {1'b0, sx});
      my = ey ? '0 : (c[0] ? {1'b0, SMAX - sy} : {1'b0, sy});
      bm[c] = mx + my;
    end
  end

  // ---- ACSU
  logic [PMW-1:0]    pm      [NS];
  logic [PMW-1:0]    pm_n    [NS];
  logic [TB_LEN-1:0] surv    [NS];
  logic [TB_LEN-1:0] surv_n  [NS];

  always_comb begin
    for (int ns = 0; ns < NS; ns++) begin
      logic [6:0] v0, v1;
      logic [5:0] p0, p1;
      logic [PMW-1:0] m0, m1, diff;
      v0 = {6'(ns), 1'b0};
      v1 = {6'(ns), 1'b1};
      p0 = v0[5:0];
      p1 = v1[5:0];
      m0 = pm[p0] + PMW'(bm[{^(v0 & 7'o171), ^(v0 & 7'o133)}]);
      m1 = pm[p1] + PMW'(bm[{^(v1 & 7'o171), ^(v1 & 7'o133)}]);
      diff = m1 - m0;
      if (diff[PMW-1]) begin
        pm_n[ns]   = m1;
        surv_n[ns] = {surv[p1][TB_LEN-2:0], v1[6]};
      end else begin
        pm_n[ns]   = m0;
        surv_n[ns] = {surv[p0][TB_LEN-2:0], v0[6]};
      end
    end
  end

  // ---- best state of the updated metrics (modulo comparison)
  logic [5:0]     best;
  logic [PMW-1:0] best_m;
  always_comb begin
    best   = '0;
    best_m = pm_n[0];
    for (int s = 1; s < NS; s++) begin
      logic [PMW-1:0] d;
      d = pm_n[s] - best_m;
      if (d[PMW-1]) begin
        best   = 6'(s);
        best_m = pm_n[s];
      end
    end
  end

  // ---- path-metric registers and SMU
  logic [$clog2(TB_LEN):0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]   <= (s == 0) ? '0 : PMW'(64);
        surv[s] <= '0;
      end
      fill <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (dp_valid) begin
        for (int s = 0; s < NS; s++) begin
          pm[s]   <= pm_n[s];
          surv[s] <= surv_n[s];
        end
        if (fill == ($clog2(TB_LEN)+1)'(TB_LEN - 1)) begin
          out_valid <= 1'b1;
          out_bit   <= surv_n[best][TB_LEN-1];
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end
endmodule
