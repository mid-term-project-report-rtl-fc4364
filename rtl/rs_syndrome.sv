// rs_syndrome: multi-mode syndrome calculator of the RS decoder.
//
// 2*T_MAX Horner cells run in parallel, one received symbol per valid cycle,
// highest-degree symbol first. Cell i holds S_i = R(alpha^i): each cycle it
// multiplies its value by the constant alpha^i and adds the new symbol. Cells
// 1..6 are dual-field cells whose constant multiplier is switched between
// GF(2^8) and GF(2^7) by the mode; the others exist only in GF(2^8), as in
// the document's term arrangement. For a code whose first root is alpha^1
// (annex B) the outputs are re-indexed so that syn[j] = S_(b+j) always.
//
// Besides the syndromes the block reports whether the first t of them are
// zero. Following the document, that alone is taken to mean an error-free
// codeword, which lets the decoder skip the key-equation solver.
//
// Interface: in_valid/in_first/in_sym feed one symbol per cycle; in_first
// marks the first symbol of a codeword, in_last its last one. One cycle after
// in_last, syn_valid pulses with syn[] and zero_t valid (held until the next).
module rs_syndrome
  import fec_pkg::*;
#(
  parameter int unsigned NSYN = 2 * T_MAX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      in_valid,
  input  logic      in_first,
  input  logic      in_last,
  input  gf_t       in_sym,
  output gf_t       syn [NSYN],
  output logic      zero_t,
  output logic      syn_valid
);
  gf_t  term [NSYN];
  gf_t  nxt  [NSYN];
  logic f7;

  assign f7 = is_gf7(mode);

  for (genvar i = 0; i < NSYN; i++) begin : g_cell
    gf_t k, prod;
    // Dual-field constant for cells 1..6, GF(2^8) constant elsewhere.
    assign k = (f7 && i >= 1 && i <= 6) ? gf_alpha_pow(i, 1'b1) : gf_alpha_pow(i, 1'b0);
    gf_mul_mm u_mul (.a(term[i]), .b(k), .f7(f7), .p(prod));
    assign nxt[i] = (in_first ? 8'd0 : prod) ^ in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSYN; i++) term[i] <= '0;
      syn_valid <= 1'b0;
    end else begin
      syn_valid <= in_valid && in_last;
      if (in_valid)
        for (int i = 0; i < NSYN; i++) term[i] <= nxt[i];
    end
  end

  // Output re-indexing and the "first t syndromes are zero" test.
  always_comb begin
    int unsigned t;
    t = rs_t(mode);
    zero_t = 1'b1;
    for (int j = 0; j < NSYN; j++) begin
      if (f7) syn[j] = (j < 6) ? term[j+1] : 8'd0;
      else    syn[j] = (j < 2 * t) ? term[j] : 8'd0;
      if (j < t && syn[j] != 8'd0) zero_t = 1'b0;
    end
  end
endmodule
