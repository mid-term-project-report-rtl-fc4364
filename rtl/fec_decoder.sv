// fec_decoder: multi-mode FEC decoder platform for ITU-T J.83 annexes A/B/C/D
// and DVB-T, built from one de-interleaver, one multi-mode RS decoder, two
// descramblers and a Viterbi decoder, chained by mode multiplexers.
//
//   DVB-T   : soft bits -> Viterbi (punctured K=7) -> byte packer ->
//             de-interleaver (12,17) -> RS(204,188) -> descrambler A/C
//   A / C   : bytes -> de-interleaver (12,17) -> RS(204,188) -> descrambler A/C
//   D       : bytes -> de-interleaver (52,4)  -> RS(207,187) -> descrambler D
//   B       : 7-bit symbols -> descrambler B -> de-interleaver (cfg_i,cfg_j) ->
//             RS over GF(2^7), t=3 (no output descrambler)
// The order of the blocks and the mode multiplexers follow the document's
// platform figure. The annex-B trellis decoder (G = 25, 37 octal) is not part
// of this design: in mode B the input goes straight to descrambler B. The
// K=7 Viterbi decoder takes the trellis-decoder position in DVB-T mode.
//
// Framing (this design's assumption): the first symbol after reset starts an
// RS codeword and belongs to de-interleaver branch 0 (for DVB-T: the first
// decoded bit is the MSB of that byte). The first I*(I-1)*J de-interleaver
// outputs are the memory's initial contents and are dropped; after that the
// codewords are aligned. RS parity is removed; out_sync marks the first byte of
// each packet. Byte modes may present at most one symbol every 3 clock cycles
// (the RS decoder is not pipelined between solver and search); DVB-T mode at
// most one soft bit per cycle. rs_fail pulses for each uncorrectable codeword,
// rs_skip for each one found error-free by its first t syndromes, overrun if a
// codeword arrives before the previous one is decoded.
module fec_decoder
  import fec_pkg::*;
#(
  parameter int unsigned TB_LEN    = 48,
  parameter int unsigned MEM_DEPTH = 65032
) (
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  vit_rate_e rate,
  input  logic [7:0] cfg_i_b,     // annex-B interleaver depth I
  input  logic [4:0] cfg_j_b,     // annex-B interleaver delay unit J
  input  logic      in_valid,
  input  logic [7:0] in_data,     // byte (A/C/D) or 7-bit symbol (B)
  input  logic [2:0] in_soft,     // soft bit (DVB-T)
  output logic      out_valid,
  output logic      out_sync,
  output logic [7:0] out_data,
  output logic      rs_fail,
  output logic      rs_skip,
  output logic      overrun
);
  // ---------------- inner decoder (DVB-T) and byte packer ----------------
  logic vit_valid, vit_bit;
  viterbi_decoder #(.TB_LEN(TB_LEN)) u_vit (
    .clk, .rst_n, .rate, .in_valid(in_valid && mode == MODE_DVBT), .in_soft,
    .out_valid(vit_valid), .out_bit(vit_bit)
  );

  logic [2:0] pk_cnt;
  logic [6:0] pk_sr;
  logic       pk_valid;
  logic [7:0] pk_byte;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_cnt <= '0; pk_sr <= '0; pk_valid <= 1'b0; pk_byte <= '0;
    end else begin
      pk_valid <= 1'b0;
      if (vit_valid) begin
        pk_sr  <= {pk_sr[5:0], vit_bit};
        pk_cnt <= pk_cnt + 3'd1;
        if (pk_cnt == 3'd7) begin
          pk_valid <= 1'b1;
          pk_byte  <= {pk_sr, vit_bit};
        end
      end
    end
  end

  // ---------------- annex-B derandomiser ----------------
  logic db_valid;
  gf_t  db_sym;
  logic [7:0] b_cnt;
  descrambler_b u_descr_b (
    .clk, .rst_n, .in_valid(in_valid && mode == MODE_B), .in_sync(in_valid && mode == MODE_B && b_cnt == 8'd0),
    .in_sym({1'b0, in_data[6:0]}), .out_valid(db_valid), .out_sym(db_sym)
  );
  // frame start for the annex-B derandomiser: every 128 input symbols, the
  // length of one extended codeword (this design's assumption)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_cnt <= '0;
    else if (in_valid && mode == MODE_B) b_cnt <= (b_cnt == 8'(rs_n(MODE_B))) ? '0 : b_cnt + 8'd1;
  end

  // ---------------- input MUX to the de-interleaver ----------------
  logic       di_valid;
  logic [7:0] di_data;
  always_comb begin
    case (mode)
      MODE_DVBT: begin di_valid = pk_valid; di_data = pk_byte; end
      MODE_B:    begin di_valid = db_valid; di_data = db_sym;  end
      default:   begin di_valid = in_valid; di_data = in_data; end
    endcase
  end

  logic [7:0] cfg_i;
  logic [4:0] cfg_j;
  always_comb begin
    case (mode)
      MODE_B:  begin cfg_i = cfg_i_b; cfg_j = cfg_j_b; end
      MODE_D:  begin cfg_i = 8'd52;   cfg_j = 5'd4;    end
      default: begin cfg_i = 8'd12;   cfg_j = 5'd17;   end
    endcase
  end

  logic       do_valid;
  logic [7:0] do_data;
  conv_deinterleaver #(.I_MAX(128), .MEM_DEPTH(MEM_DEPTH)) u_deint (
    .clk, .rst_n, .cfg_i, .cfg_j, .in_valid(di_valid), .in_sync(1'b0), .in_data(di_data),
    .out_valid(do_valid), .out_data(do_data)
  );

  // drop the de-interleaver's fill-up outputs
  logic [16:0] fill_cnt, fill_len;
  logic        filled;
  assign fill_len = 17'(32'(cfg_i) * (32'(cfg_i) - 1) * 32'(cfg_j));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fill_cnt <= '0;
    else if (do_valid && !filled) fill_cnt <= fill_cnt + 17'd1;
  end
  assign filled = fill_cnt == fill_len;

  // ---------------- RS decoder ----------------
  logic rs_valid, rs_first, rs_last, rs_fail_i;
  gf_t  rs_sym;
  rs_decoder u_rs (
    .clk, .rst_n, .mode, .in_valid(do_valid && filled), .in_sym(do_data),
    .out_valid(rs_valid), .out_sym(rs_sym), .out_first(rs_first), .out_last(rs_last),
    .out_fail(rs_fail_i), .stat_skip(rs_skip), .overrun
  );
  assign rs_fail = rs_valid && rs_last && rs_fail_i;

  // strip the parity symbols
  logic [7:0] rs_idx;
  logic       keep;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rs_idx <= '0;
    else if (rs_valid) rs_idx <= rs_last ? '0 : rs_idx + 8'd1;
  end
  assign keep = rs_valid && (rs_first || rs_idx < 8'(rs_n(mode) - 2 * rs_t(mode)));

  // ---------------- output descrambler and output MUX ----------------
  logic       da_valid, da_sync;
  logic [7:0] da_data;
  descrambler_acd u_descr_acd (
    .clk, .rst_n, .mode, .in_valid(keep && mode != MODE_B), .in_sync(rs_first), .in_data(rs_sym),
    .out_valid(da_valid), .out_sync(da_sync), .out_data(da_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sync <= 1'b0; out_data <= '0;
    end else if (mode == MODE_B) begin
      out_valid <= keep; out_sync <= rs_first; out_data <= rs_sym;
    end else begin
      out_valid <= da_valid; out_sync <= da_sync; out_data <= da_data;
    end
  end
endmodule
