// descrambler_acd: output descrambler of the FEC decoder for J.83 annexes A, C
// (and DVB) and D, removing the transmitter's energy-dispersal randomisation.
//
// Annex A/C and DVB-T: PRBS 1 + x^14 + x^15 (from the comparison table of the
// annexes). This block follows the DVB convention for it: the generator is
// loaded with 100101010000000 at the first byte after each inverted sync byte
// (0xB8, once every 8 packets), sync bytes are passed unscrambled (an inverted
// one is restored to 0x47) while the generator keeps running through the other
// seven, and every data byte is XORed with the next 8 PRBS bits, first bit in
// the MSB.
// Annex D: 16-bit PRBS 1 + x + x^3 + x^6 + x^7 + x^11 + x^12 + x^13 + x^16 (from
// the same table), run here as a Galois register loaded with 0xF180 at each
// marked byte (the first byte of an RS codeword), every byte, the marked one
// included, being XORed with the next 8 register bits. Bit order and reload
// point for annex D are this design's assumption.
//
// Interface: in_valid/in_sync/in_data, in_sync marking the packet's sync byte;
// out_* follow one cycle later.
module descrambler_acd
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fec_mode_e mode,
  input  logic      in_valid,
  input  logic      in_sync,
  input  logic [7:0] in_data,
  output logic      out_valid,
  output logic      out_sync,
  output logic [7:0] out_data
);
  localparam logic [15:1] DVB_INIT = 15'b000000010101001; // stage1..15 = 100101010000000
  localparam logic [15:0] D_INIT   = 16'hF180;
  localparam logic [15:0] D_TAPS   = 16'h38CB;           // x^13+x^12+x^11+x^7+x^6+x^3+x+1

  logic [15:1] dvb_q, dvb_n;
  logic [15:0] d_q, d_n, d_src;
  logic [7:0]  dvb_byte, d_byte;

  // eight steps of each generator
  always_comb begin
    dvb_n = dvb_q;
    d_src = in_sync ? D_INIT : d_q;
    d_n   = d_src;
    for (int k = 7; k >= 0; k--) begin
      logic fb, ob;
      fb = dvb_n[14] ^ dvb_n[15];
      dvb_byte[k] = fb;
      dvb_n = {dvb_n[14:1], fb};
      ob = d_n[15];
      d_byte[k] = ob;
      d_n = {d_n[14:0], 1'b0} ^ (ob ? D_TAPS : 16'h0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvb_q <= DVB_INIT; d_q <= D_INIT;
      out_valid <= 1'b0; out_sync <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sync <= in_sync;
        if (mode == MODE_D) begin
          d_q      <= d_n;
          out_data <= in_data ^ d_byte;
        end else begin
          if (in_sync && in_data == 8'hB8) begin
            dvb_q    <= DVB_INIT;
            out_data <= 8'h47;
          end else if (in_sync) begin
            dvb_q    <= dvb_n;
            out_data <= in_data;
          end else begin
            dvb_q    <= dvb_n;
            out_data <= in_data ^ dvb_byte;
          end
        end
      end
    end
  end
endmodule
