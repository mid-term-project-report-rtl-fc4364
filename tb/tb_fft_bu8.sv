// tb_fft_bu8: checks the radix-8 butterfly against a direct 8-point DFT in
// double precision (radix-8 mode) and against exact pairwise sums and
// differences (radix-2 mode). Inputs are random full-scale values plus the
// all-extreme corner cases that give the largest growth. The unit rounds its
// 1/sqrt(2) products, so each output may differ from the exact DFT by a
// small bound (1.5 LSB per component here).
module tb_fft_bu8;
  localparam int IW = 11;
  localparam real PI = 3.14159265358979323846;
  logic r2;
  logic signed [IW-1:0] x_re [8], x_im [8];
  logic signed [IW+3:0] y_re [8], y_im [8];
  int checks = 0, failures = 0;

  fft_bu8 #(.IW(IW)) dut (.r2, .x_re, .x_im, .y_re, .y_im);

  task automatic check_one();
    #1;
    for (int k = 0; k < 8; k++) begin
      real er, ei, dr, di;
      if (!r2) begin
        er = 0; ei = 0;
        for (int n = 0; n < 8; n++) begin
          real c = $cos(2.0 * PI * n * k / 8), s = $sin(2.0 * PI * n * k / 8);
          er += x_re[n] * c + x_im[n] * s;
          ei += x_im[n] * c - x_re[n] * s;
        end
      end else begin
        int b = k & 6;
        int ar = x_re[b], br = x_re[b+1], ai = x_im[b], bi = x_im[b+1];
        er = (k % 2 == 0) ? ar + br : ar - br;
        ei = (k % 2 == 0) ? ai + bi : ai - bi;
      end
      dr = y_re[k] - er; di = y_im[k] - ei;
      checks++;
      if (dr > 1.5 || dr < -1.5 || di > 1.5 || di < -1.5) begin
        failures++;
        if (failures < 10) $display("r2=%0d k=%0d got %0d,%0d exp %f,%f", r2, k, y_re[k], y_im[k], er, ei);
      end
    end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      r2 = it % 3 == 0;
      for (int n = 0; n < 8; n++) begin
        if (it < 200) begin
          // extreme corner cases: each component at +max or -min
          x_re[n] = $urandom_range(1) ? IW'(1023) : IW'(-1024);
          x_im[n] = $urandom_range(1) ? IW'(1023) : IW'(-1024);
        end else begin
          x_re[n] = IW'($urandom);
          x_im[n] = IW'($urandom);
        end
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
