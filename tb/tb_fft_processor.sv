// tb_fft_processor: runs full 8192-point transforms through the FFT processor
// and compares each output bin, taken as mantissa * 2^exponent, with a
// double-precision reference FFT (iterative radix-2, written independently).
// Frames: random full-scale complex noise (OFDM-like), a single tone, an
// impulse and a full-scale constant (largest possible growth, all in bin 0). Checks every bin against an error bound relative to the largest
// bin, the signal-to-quantisation-noise ratio of each frame, the tone's bin,
// the number of outputs, and the processing time (cycles from the last input
// to the last output).
module tb_fft_processor;
  localparam int N  = 8192;
  localparam int DW = 11;
  localparam int EW = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_last, busy;
  logic signed [DW-1:0] out_re, out_im;
  logic [EW-1:0] out_exp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fft_processor dut (.clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
                     .out_valid, .out_re, .out_im, .out_exp, .out_last, .busy);

  real xr [N], xi [N];
  real hr [N], hi [N];
  int  nout;
  int  cyc, cyc_last_in, cyc_last_out;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (out_valid) begin
    if (nout < N) begin
      hr[nout] = real'(out_re) * (2.0 ** out_exp);
      hi[nout] = real'(out_im) * (2.0 ** out_exp);
    end
    nout++;
    if (out_last) cyc_last_out = cyc;
  end

  task automatic ref_fft();
    int j = 0;
    for (int i = 0; i < N - 1; i++) begin
      int m;
      if (i < j) begin
        real tr = xr[i], ti = xi[i];
        xr[i] = xr[j]; xi[i] = xi[j]; xr[j] = tr; xi[j] = ti;
      end
      m = N / 2;
      while (m >= 1 && j >= m) begin j -= m; m /= 2; end
      j += m;
    end
    for (int len = 2; len <= N; len *= 2)
      for (int s = 0; s < N; s += len)
        for (int k = 0; k < len / 2; k++) begin
          real wr = $cos(2.0 * PI * k / len), wi = -$sin(2.0 * PI * k / len);
          int a = s + k, b = s + k + len / 2;
          real br = xr[b] * wr - xi[b] * wi, bi = xr[b] * wi + xi[b] * wr;
          xr[b] = xr[a] - br; xi[b] = xi[a] - bi;
          xr[a] = xr[a] + br; xi[a] = xi[a] + bi;
        end
  endtask

  task automatic frame(int kind, real min_snr);
    int ir [N], ii [N];
    real pmax, es, en;
    int kmax;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin ir[n] = $urandom_range(2046) - 1023; ii[n] = $urandom_range(2046) - 1023; end
        1: begin ir[n] = $rtoi(700.0 * $cos(2.0 * PI * 100 * n / N)); ii[n] = $rtoi(700.0 * $sin(2.0 * PI * 100 * n / N)); end
        3: begin ir[n] = 1023; ii[n] = -1023; end
        default: begin ir[n] = (n == 5) ? 1000 : 0; ii[n] = (n == 5) ? -600 : 0; end
      endcase
      xr[n] = ir[n]; xi[n] = ii[n];
    end
    ref_fft();
    nout = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_re = DW'(ir[n]); in_im = DW'(ii[n]);
    end
    @(negedge clk);
    in_valid = 0;
    cyc_last_in = cyc;
    while (nout < N) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nout != N) begin failures++; $display("outputs %0d", nout); end
    pmax = 0; kmax = 0; es = 0; en = 0;
    for (int k = 0; k < N; k++) begin
      real p = xr[k] * xr[k] + xi[k] * xi[k];
      if (p > pmax) begin pmax = p; kmax = k; end
    end
    for (int k = 0; k < N; k++) begin
      real er = hr[k] - xr[k], ei = hi[k] - xi[k];
      es += xr[k] * xr[k] + xi[k] * xi[k];
      en += er * er + ei * ei;
      checks++;
      if (er * er + ei * ei > pmax * 1.0e-4) begin
        failures++;
        if (failures < 10) $display("frame %0d bin %0d got %f,%f exp %f,%f", kind, k, hr[k], hi[k], xr[k], xi[k]);
      end
    end
    $display("frame %0d: SQNR %0.1f dB, %0d cycles from last input to last output",
             kind, 10.0 * $log10(es / en), cyc_last_out - cyc_last_in);
    checks++;
    if (10.0 * $log10(es / en) < min_snr) begin failures++; $display("SQNR too low"); end
    if (kind == 1) begin
      real p100 = hr[100] * hr[100] + hi[100] * hi[100];
      checks++;
      if (p100 < 0.9 * pmax) begin failures++; $display("tone bin wrong"); end
    end
    checks++;
    if (cyc_last_out - cyc_last_in > 30000) begin failures++; $display("too slow"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    frame(0, 40.0);
    frame(1, 40.0);
    frame(2, 40.0);
    frame(3, 40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
