// dvbt_core_top: the receiver core - the multi-mode FEC decoder and the 8K
// FFT processor side by side, each with its own ports. The two datapaths are
// independent here: in a full receiver the FFT output would go through
// channel estimation, equalisation and demapping (not part of this design)
// before its soft bits reach the FEC decoder's DVB-T input.
//
// FEC ports: mode (0 = annex A, 1 = annex B, 2 = annex C, 3 = annex D,
// 4 = DVB-T), rate (DVB-T code rate: 0 = 1/2, 1 = 2/3, 2 = 3/4, 3 = 5/6,
// 4 = 7/8), annex-B interleaver depth/delay (fec_cfg_i, fec_cfg_j),
// fec_in_valid with a byte/symbol (fec_in_data) or a 3-bit soft bit
// (fec_in_soft), and the decoded packet bytes with a sync marker and the
// uncorrectable / error-free / overrun flags. A mode or rate change must be
// followed by a reset of the core (fec_rst_n), because the de-interleaver,
// Viterbi and RS framing all restart from the first symbol.
// FFT ports: one complex sample per cycle while fft_in_ready is high (natural
// order, 11-bit two's complement); results come out in natural order, one per
// cycle, as mantissa * 2^fft_out_exp.
// Timing: see fec_decoder and fft_processor. All registers are reset
// asynchronously by their reset input; the two halves have separate resets.
module dvbt_core_top
  import fec_pkg::*;
#(
  parameter int unsigned FFT_N     = 8192,
  parameter int unsigned FFT_DW    = 11,
  parameter int unsigned TB_LEN    = 48,
  parameter int unsigned MEM_DEPTH = 65032
) (
  input  logic        clk,
  input  logic        fec_rst_n,
  input  logic        fft_rst_n,
  // FEC decoder
  input  logic [2:0]  fec_mode,
  input  logic [2:0]  fec_rate,
  input  logic [7:0]  fec_cfg_i,
  input  logic [4:0]  fec_cfg_j,
  input  logic        fec_in_valid,
  input  logic [7:0]  fec_in_data,
  input  logic [2:0]  fec_in_soft,
  output logic        fec_out_valid,
  output logic        fec_out_sync,
  output logic [7:0]  fec_out_data,
  output logic        fec_rs_fail,
  output logic        fec_rs_skip,
  output logic        fec_overrun,
  // FFT processor
  input  logic                     fft_in_valid,
  output logic                     fft_in_ready,
  input  logic signed [FFT_DW-1:0] fft_in_re,
  input  logic signed [FFT_DW-1:0] fft_in_im,
  output logic                     fft_out_valid,
  output logic signed [FFT_DW-1:0] fft_out_re,
  output logic signed [FFT_DW-1:0] fft_out_im,
  output logic [4:0]               fft_out_exp,
  output logic                     fft_out_last,
  output logic                     fft_busy
);
  fec_decoder #(.TB_LEN(TB_LEN), .MEM_DEPTH(MEM_DEPTH)) u_fec (
    .clk, .rst_n(fec_rst_n),
    .mode(fec_mode_e'(fec_mode)), .rate(vit_rate_e'(fec_rate)),
    .cfg_i_b(fec_cfg_i), .cfg_j_b(fec_cfg_j),
    .in_valid(fec_in_valid), .in_data(fec_in_data), .in_soft(fec_in_soft),
    .out_valid(fec_out_valid), .out_sync(fec_out_sync), .out_data(fec_out_data),
    .rs_fail(fec_rs_fail), .rs_skip(fec_rs_skip), .overrun(fec_overrun)
  );

  fft_processor #(.N(FFT_N), .DW(FFT_DW), .TW(12), .EW(5)) u_fft (
    .clk, .rst_n(fft_rst_n),
    .in_valid(fft_in_valid), .in_ready(fft_in_ready),
    .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(fft_out_valid), .out_re(fft_out_re), .out_im(fft_out_im),
    .out_exp(fft_out_exp), .out_last(fft_out_last), .busy(fft_busy)
  );
endmodule
