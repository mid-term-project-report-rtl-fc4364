// vit_depuncture: de-puncturing front end (de-MUX) of the Viterbi decoder.
//
// The punctured stream carries, per trellis step, the X and/or Y code bits the
// rate's pattern keeps, X before Y. This block regroups the incoming soft
// values into one (X, Y) pair per trellis step and marks the bits the
// transmitter deleted as erasures, which the branch-metric unit then ignores.
// The pattern tables are the DVB-T ones (fec_pkg); the datapath is the same
// for every rate.
//
// Interface: in_valid/in_soft, one soft bit per cycle at most (SW-bit
// magnitude, 0 = confident '0', all ones = confident '1'). out_valid pulses
// one cycle after the input that completes a pair. Change rate only in reset.
module vit_depuncture
  import fec_pkg::*;
#(
  parameter int unsigned SW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vit_rate_e     rate,
  input  logic          in_valid,
  input  logic [SW-1:0] in_soft,
  output logic          out_valid,
  output logic [SW-1:0] out_x,
  output logic [SW-1:0] out_y,
  output logic          out_ex,
  output logic          out_ey
);
  logic [2:0]    p;
  logic          slot_y;
  logic [SW-1:0] x_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; slot_y <= 1'b0; x_hold <= '0;
      out_valid <= 1'b0; out_x <= '0; out_y <= '0; out_ex <= 1'b0; out_ey <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!slot_y && punct_keep_x(rate, p) && punct_keep_y(rate, p)) begin
          x_hold <= in_soft;
          slot_y <= 1'b1;
        end else begin
          out_valid <= 1'b1;
          slot_y    <= 1'b0;
          p         <= (p == punct_period(rate) - 3'd1) ? 3'd0 : p + 3'd1;
          if (slot_y) begin
            out_x <= x_hold; out_ex <= 1'b0; out_y <= in_soft; out_ey <= 1'b0;
          end else if (punct_keep_x(rate, p)) begin
            out_x <= in_soft; out_ex <= 1'b0; out_y <= '0; out_ey <= 1'b1;
          end else begin
            out_x <= '0; out_ex <= 1'b1; out_y <= in_soft; out_ey <= 1'b0;
          end
        end
      end
    end
  end
endmodule
