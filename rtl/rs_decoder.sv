// rs_decoder: multi-mode Reed-Solomon decoder (annex A/C/DVB-T RS(204,188) t=8,
// annex D RS(207,187) t=10, annex B (128,122) extended code over GF(2^7), t=3,
// decoded on its 127-symbol cyclic part).
//
// Four steps, as in the document: syndrome calculator, key-equation solver
// (inversion-free Berlekamp-Massey), Chien search and Forney error-value
// evaluator, all built on the multi-mode field multiplier. When the first t
// syndromes are zero the codeword is passed on uncorrected without running
// the solver (the document's early error detection).
//
// The received codeword is kept in a two-half dual-port buffer (this design's
// choice of size: 2 x 256 symbols): while one codeword is being corrected and
// read out, the next one is written into the other half. Decoding a codeword
// takes about 2t(t+1) + t(t+1)/2 + n + 8 cycles (~390 for t=8, ~490 for t=10), so the
// input may carry at most one symbol every 2 to 3 cycles on average; the
// document runs the decoder far faster than the symbol rate. A codeword that
// completes while the previous one is still being decoded is dropped and
// flagged on `overrun`.
//
// Interface: in_valid/in_sym, no back-pressure; the first symbol after reset
// starts a codeword and codewords follow back to back (mode is static). In
// annex B each input codeword is 128 symbols: the 127 of the cyclic code,
// then the extension symbol, which is dropped (the t=3 correction power is
// that of the cyclic part; an error in the extension symbol does not matter
// because it carries no data). The output has 127 symbols per codeword.
// Output: out_valid/out_sym with out_first/out_last framing; on out_last,
// out_fail is set when the errors exceed the code's correction power
// (locator degree above t, or fewer roots found than its degree).
// stat_skip pulses for each codeword that took the early error-free path.
module rs_decoder
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      in_valid,
  input  gf_t       in_sym,
  output logic      out_valid,
  output gf_t       out_sym,
  output logic      out_first,
  output logic      out_last,
  output logic      out_fail,
  output logic      stat_skip,
  output logic      overrun
);
  typedef enum logic [1:0] {D_IDLE, D_KES, D_LOAD, D_OUT} dstate_e;

  localparam int unsigned HALF = 256;

  logic [7:0] wcnt;
  logic       whalf, cw_half, rhalf;
  logic [7:0] n_m1;
  logic [4:0] t;
  gf_t        mem [2*HALF];
  gf_t        rdata;

  assign n_m1 = 8'(rs_n(mode) - 1);
  assign t    = 5'(rs_t(mode));

  // ---------------- input side: buffer write + syndromes ----------------
  // In annex B the symbol after the last one of the cyclic code is the
  // extension symbol: it carries no data and is not used for decoding, so it
  // is neither buffered nor passed to the syndrome calculator.
  logic in_first, in_last, in_ext, cw_valid;
  assign in_first = (wcnt == 8'd0);
  assign in_last  = (wcnt == n_m1);
  assign in_ext   = rs_ext(mode) && wcnt == n_m1 + 8'd1;
  assign cw_valid = in_valid && !in_ext;

  always_ff @(posedge clk) begin
    if (cw_valid) mem[{whalf, wcnt}] <= in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; whalf <= 1'b0; cw_half <= 1'b0;
    end else if (in_valid) begin
      if (in_last) cw_half <= whalf;
      if ((in_last && !rs_ext(mode)) || in_ext) begin
        wcnt    <= '0;
        whalf   <= ~whalf;
      end else begin
        wcnt <= wcnt + 8'd1;
      end
    end
  end

  gf_t  syn [2*T_MAX];
  logic zero_t, syn_valid;
  rs_syndrome u_syn (
    .clk, .rst_n, .mode, .in_valid(cw_valid), .in_first, .in_last, .in_sym,
    .syn, .zero_t, .syn_valid
  );

  // ---------------- decode side ----------------
  dstate_e    dstate;
  gf_t        sigma [T_MAX+1];
  gf_t        omega [T_MAX];
  logic [4:0] deg;
  logic       kes_busy, kes_done, kes_start;
  logic       correct_en, loc_fail;
  logic [7:0] rcnt;
  logic [4:0] nroot;
  logic       chien_load, chien_step;
  logic       root;
  gf_t        x_loc, odd_sum, err;

  assign kes_start  = syn_valid && dstate == D_IDLE && !zero_t;
  assign chien_load = dstate == D_LOAD;
  assign chien_step = dstate == D_OUT;

  rs_kes u_kes (
    .clk, .rst_n, .mode, .start(kes_start), .syn,
    .sigma, .omega, .deg, .busy(kes_busy), .done(kes_done)
  );

  rs_chien u_chien (
    .clk, .rst_n, .mode, .load(chien_load), .step(chien_step),
    .sigma, .root, .x_loc, .odd_sum
  );

  rs_forney u_forney (
    .clk, .rst_n, .mode, .load(chien_load), .step(chien_step),
    .omega, .root, .x_loc, .odd_sum, .err
  );

  // synchronous read port of the codeword buffer
  always_ff @(posedge clk) rdata <= mem[{rhalf, rcnt}];

  // one-cycle pipeline between the position being tested and the buffer data
  logic p_valid, p_first, p_last, p_fail;
  gf_t  p_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate <= D_IDLE; rhalf <= 1'b0; rcnt <= '0; correct_en <= 1'b0; loc_fail <= 1'b0;
      nroot <= '0; stat_skip <= 1'b0; overrun <= 1'b0;
      p_valid <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_fail <= 1'b0; p_err <= '0;
    end else begin
      stat_skip <= 1'b0;
      overrun   <= 1'b0;
      p_valid   <= 1'b0;
      p_first   <= 1'b0;
      p_last    <= 1'b0;
      if (syn_valid && (dstate != D_IDLE || kes_busy)) overrun <= 1'b1;
      case (dstate)
        D_IDLE: if (syn_valid) begin
          rhalf <= cw_half;
          rcnt  <= '0;
          nroot <= '0;
          if (zero_t) begin
            correct_en <= 1'b0;
            loc_fail   <= 1'b0;
            stat_skip  <= 1'b1;
            dstate     <= D_LOAD;
          end else begin
            dstate <= D_KES;
          end
        end
        D_KES: if (kes_done) begin
          correct_en <= deg <= t;
          loc_fail   <= deg > t;
          dstate     <= D_LOAD;
        end
        D_LOAD: dstate <= D_OUT;
        D_OUT: begin
          p_valid <= 1'b1;
          p_first <= rcnt == 8'd0;
          p_last  <= rcnt == n_m1;
          p_err   <= correct_en ? err : 8'd0;
          if (correct_en && root) nroot <= nroot + 5'd1;
          if (rcnt == n_m1) begin
            // failure: uncorrectable locator or missing roots
            p_fail <= loc_fail || (correct_en && (nroot + 5'(root)) != deg);
            dstate <= D_IDLE;
          end else begin
            rcnt <= rcnt + 8'd1;
          end
        end
        default: dstate <= D_IDLE;
      endcase
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sym <= '0; out_first <= 1'b0; out_last <= 1'b0; out_fail <= 1'b0;
    end else begin
      out_valid <= p_valid;
      out_sym   <= rdata ^ p_err;
      out_first <= p_first;
      out_last  <= p_last;
      out_fail  <= p_last && p_fail;
    end
  end
endmodule
