// fft_bu8: radix-8 butterfly unit of the FFT processor.
//
// Computes the 8-point DFT y(k) = sum_n x(n) W8^(nk) of eight complex inputs
// as three radix-2 steps (decimation in frequency): pairs (n, n+4) with the
// W8^n rotations, then pairs (n, n+2) with the W4 rotation (-j), then pairs
// (n, n+1); the outputs are returned in natural order. W8^1 and W8^3 need a
// multiplication by 1/sqrt(2), done with the constant 11585/2^14 and
// rounding to nearest (halves away from zero, so no DC bias). With r2 = 1 the unit instead performs four independent radix-2
// butterflies on (x0,x1), (x2,x3), (x4,x5), (x6,x7), used for the final
// radix-2 pass of a 2*8^p-point transform.
//
// Interface: x_re/x_im are IW-bit signed; y_re/y_im are IW+4 bits (an 8-point
// DFT grows by at most 8*sqrt(2) per real component, which needs 4 extra
// bits). Purely combinational.
module fft_bu8 #(
  parameter int unsigned IW = 11
) (
  input  logic                 r2,
  input  logic signed [IW-1:0] x_re [8],
  input  logic signed [IW-1:0] x_im [8],
  output logic signed [IW+3:0] y_re [8],
  output logic signed [IW+3:0] y_im [8]
);
  localparam int unsigned OW = IW + 4;
  typedef logic signed [OW-1:0] w_t;

  function automatic w_t mul_r2(input w_t v);
    logic signed [OW+14:0] p;
    p = (OW+15)'(v) * (OW+15)'(11585);
    p = p + (OW+15)'(1 << 13) - ((p < 0) ? (OW+15)'(1) : (OW+15)'(0));
    return w_t'(p >>> 14);
  endfunction

  always_comb begin
    w_t ar [8], ai [8], br [8], bi [8], cr [8], ci [8];
    w_t tr, ti;
    // step 1: pairs (n, n+4), lower output rotated by W8^n
    for (int n = 0; n < 4; n++) begin
      ar[n]   = w_t'(x_re[n]) + w_t'(x_re[n+4]);
      ai[n]   = w_t'(x_im[n]) + w_t'(x_im[n+4]);
      tr      = w_t'(x_re[n]) - w_t'(x_re[n+4]);
      ti      = w_t'(x_im[n]) - w_t'(x_im[n+4]);
      case (n)
        0: begin ar[4] = tr; ai[4] = ti; end
        1: begin ar[5] = mul_r2(tr + ti); ai[5] = mul_r2(ti - tr); end   // * (1-j)/sqrt2
        2: begin ar[6] = ti; ai[6] = -tr; end                           // * -j
        default: begin ar[7] = mul_r2(ti - tr); ai[7] = -mul_r2(tr + ti); end // * -(1+j)/sqrt2
      endcase
    end
    // step 2: pairs (n, n+2) inside each half, lower output of the second pair * -j
    for (int h = 0; h < 8; h += 4) begin
      for (int n = 0; n < 2; n++) begin
        br[h+n] = ar[h+n] + ar[h+n+2];
        bi[h+n] = ai[h+n] + ai[h+n+2];
        tr      = ar[h+n] - ar[h+n+2];
        ti      = ai[h+n] - ai[h+n+2];
        if (n == 0) begin br[h+2] = tr; bi[h+2] = ti; end
        else        begin br[h+3] = ti; bi[h+3] = -tr; end
      end
    end
    // step 3: pairs (n, n+1)
    for (int n = 0; n < 8; n += 2) begin
      cr[n]   = br[n] + br[n+1];
      ci[n]   = bi[n] + bi[n+1];
      cr[n+1] = br[n] - br[n+1];
      ci[n+1] = bi[n] - bi[n+1];
    end
    // bit-reversed to natural order: position p holds y(bitrev(p))
    for (int p = 0; p < 8; p++) begin
      logic [2:0] pb, k;
      pb = 3'(p);
      k  = {pb[0], pb[1], pb[2]};
      y_re[k] = cr[p];
      y_im[k] = ci[p];
    end
    if (r2) begin
      for (int n = 0; n < 8; n += 2) begin
        y_re[n]   = w_t'(x_re[n]) + w_t'(x_re[n+1]);
        y_im[n]   = w_t'(x_im[n]) + w_t'(x_im[n+1]);
        y_re[n+1] = w_t'(x_re[n]) - w_t'(x_re[n+1]);
        y_im[n+1] = w_t'(x_im[n]) - w_t'(x_im[n+1]);
      end
    end
  end
endmodule
