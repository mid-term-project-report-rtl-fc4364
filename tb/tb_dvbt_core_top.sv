// tb_dvbt_core_top: full-size end-to-end test of the receiver core at its
// default parameters (8192-point FFT, 65,032-byte de-interleaver memory,
// 48-step Viterbi survivors). Two processes run at the same time:
//  - FEC: for every mode and every DVB-T code rate, a reference transmitter
//    (tb_fec_model) randomises, RS-encodes, interleaves and (DVB-T)
//    convolutionally encodes and punctures random packets, with symbol errors
//    injected: none in packet 0, t in packet 1, 2t+3 (uncorrectable) in
//    packets 2 to 4, up to t/2 elsewhere. Decoded packets must equal the
//    originals (packets 2 to 4 excepted), with out_sync on each first byte.
//    Annex B is run with its largest interleaver, (I,J) = (128,1).
//  - FFT: random full-scale frames and a tone, compared bin by bin with a
//    double-precision reference FFT.
// Each mechanism is counted - each FEC mode, each code rate, the early
// error-free path, error correction, the failure flag, FFT frames, block
// floating-point scaling - and any mechanism that never happens is a failure.
// The de-interleaver overrun flag must never rise.
module tb_dvbt_core_top;
  import fec_pkg::*;
  import tb_gf_model::*;
  import tb_fec_model::*;

  logic clk = 0, rst_n = 0;
  fec_mode_e mode = MODE_A;
  vit_rate_e rate = RATE_1_2;
  logic [7:0] cfg_i_b = 8'd16;
  logic [4:0] cfg_j_b = 5'd8;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic [2:0] in_soft = 0;
  logic out_valid, out_sync, rs_fail, rs_skip, overrun;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int n_skip = 0, n_fail = 0, n_modes = 0;
  always #5 clk = ~clk;

  // FFT side
  localparam int N = 8192;
  localparam real PI = 3.14159265358979323846;
  logic fft_rst_n = 0, fft_in_valid = 0, fft_in_ready, fft_out_valid, fft_out_last, fft_busy;
  logic signed [10:0] fft_in_re = 0, fft_in_im = 0, fft_out_re, fft_out_im;
  logic [4:0] fft_out_exp;
  int m_mode [5], m_rate [5], m_corr = 0, m_fft = 0, m_bfp = 0;
  bit pkt_has_err [$];

  dvbt_core_top dut (
    .clk, .fec_rst_n(rst_n), .fft_rst_n,
    .fec_mode(3'(mode)), .fec_rate(3'(rate)), .fec_cfg_i(cfg_i_b), .fec_cfg_j(cfg_j_b),
    .fec_in_valid(in_valid), .fec_in_data(in_data), .fec_in_soft(in_soft),
    .fec_out_valid(out_valid), .fec_out_sync(out_sync), .fec_out_data(out_data),
    .fec_rs_fail(rs_fail), .fec_rs_skip(rs_skip), .fec_overrun(overrun),
    .fft_in_valid, .fft_in_ready, .fft_in_re, .fft_in_im,
    .fft_out_valid, .fft_out_re, .fft_out_im, .fft_out_exp, .fft_out_last, .fft_busy);

  byte unsigned exp_b[$];
  bit           exp_chk[$];
  bit           exp_first[$];
  int           nout;
  bit           pkt_ok = 1;

  always @(negedge clk) begin
    if (rs_skip) n_skip++;
    if (rs_fail) n_fail++;
    if (overrun) begin failures++; $display("overrun"); end
    if (out_valid && exp_b.size() > 0) begin
      if (exp_chk[0]) begin
        checks++;
        if (out_data !== exp_b[0] || out_sync !== exp_first[0]) begin
          failures++; pkt_ok = 0;
          if (failures < 10) $display("%s byte %0d got %h/%0d exp %h/%0d", mode.name(), nout, out_data, out_sync, exp_b[0], exp_first[0]);
        end
      end
      if (exp_first.size() > 1 && exp_first[1] || exp_first.size() == 1)
        if (exp_chk[0] && pkt_has_err[0] && pkt_ok) m_corr++;
      if (exp_first.size() > 1 && exp_first[1] || exp_first.size() == 1) begin
        void'(pkt_has_err.pop_front()); pkt_ok = 1;
      end
      void'(exp_b.pop_front()); void'(exp_chk.pop_front()); void'(exp_first.pop_front());
      nout++;
    end
  end

  task automatic run(fec_mode_e m, vit_rate_e r, int I, int J, int npk);
    int n, t, b, k, nfl, fail0;
    bit f7;
    byte unsigned syms[$];
    interleaver il;
    b_randomiser br;
    conv_punct cp;
    mode = m; rate = r; rst_n = 0;
    n = rs_n(m); t = rs_t(m); b = rs_b1(m); f7 = is_gf7(m); k = n - 2 * t;
    il = new(I, J); br = new(); cp = new(int'(r));
    nfl = (I * (I - 1) * J) / n + 2;
    exp_b.delete(); exp_chk.delete(); exp_first.delete(); pkt_has_err.delete(); nout = 0; pkt_ok = 1;
    fail0 = n_fail;
    for (int p = 0; p < npk + nfl; p++) begin
      byte unsigned pkt[];
      int unsigned msg[], cw[];
      int ne;
      pkt = new[k];
      foreach (pkt[i]) pkt[i] = f7 ? 8'($urandom_range(127)) : 8'($urandom);
      if (m != MODE_B && m != MODE_D) pkt[0] = 8'h47;
      if (p < npk)
        foreach (pkt[i]) begin
          exp_b.push_back(pkt[i]); exp_chk.push_back(p < 2 || p > 4); exp_first.push_back(i == 0);
        end
      if (m == MODE_D) d_randomise(pkt);
      else if (m != MODE_B) dvb_randomise(pkt, p);
      msg = new[k];
      foreach (msg[i]) msg[i] = pkt[i];
      encode(msg, n, t, b, f7, cw);
      ne = (p == 0) ? 0 : (p == 1) ? t : (p >= 2 && p <= 4) ? 2 * t + 3 : $urandom_range(t / 2);
      if (p < npk) pkt_has_err.push_back(ne > 0);
      begin
        bit used[] = new[n];
        for (int e = 0; e < ne; e++) begin
          int ps;
          do ps = $urandom_range(n - 1); while (used[ps]);
          used[ps] = 1;
          cw[ps] ^= $urandom_range(f7 ? 127 : 255, 1);
        end
      end
      if (rs_ext(m)) begin
        extend(cw);
        if (p % 2 == 1) cw[n] ^= 1;   // a damaged extension symbol is harmless
      end
      foreach (cw[i]) begin
        byte unsigned s;
        s = il.push(byte'(cw[i]));
        if (m == MODE_B) s = br.push(s);
        if (m == MODE_DVBT) for (int bb = 7; bb >= 0; bb--) cp.push_bit(s[bb], syms);
        else syms.push_back(s);
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (syms[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = syms[i]; in_soft = 3'(syms[i]);
      if (m != MODE_DVBT) begin
        @(negedge clk); in_valid = 0;
        @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (1000) @(posedge clk);
    checks++;
    if (exp_b.size() != 0) begin failures++; $display("%s: %0d bytes missing", m.name(), exp_b.size()); end
    checks++;
    if (n_fail == fail0) begin failures++; $display("%s: failure flag never raised", m.name()); end
    n_modes++;
    if (exp_b.size() == 0 && failures == 0) begin
      m_mode[int'(m)]++;
      if (m == MODE_DVBT) m_rate[int'(r)]++;
    end
  endtask

  // ---------------- FFT process ----------------
  real xr [N], xi [N], hr [N], hi [N];
  int  fnout;
  always @(negedge clk) if (fft_out_valid) begin
    if (fnout < N) begin
      hr[fnout] = real'(fft_out_re) * (2.0 ** fft_out_exp);
      hi[fnout] = real'(fft_out_im) * (2.0 ** fft_out_exp);
    end
    if (fft_out_exp != '0) m_bfp++;
    fnout++;
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

  task automatic fft_frame(bit tone);
    int ir [N], ii [N];
    real pmax, es, en;
    for (int n = 0; n < N; n++) begin
      if (tone) begin
        ir[n] = $rtoi(600.0 * $cos(2.0 * PI * 1234 * n / N));
        ii[n] = $rtoi(600.0 * $sin(2.0 * PI * 1234 * n / N));
      end else begin
        ir[n] = $urandom_range(2046) - 1023; ii[n] = $urandom_range(2046) - 1023;
      end
      xr[n] = ir[n]; xi[n] = ii[n];
    end
    ref_fft();
    fnout = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!fft_in_ready) @(negedge clk);
      fft_in_valid = 1; fft_in_re = 11'(ir[n]); fft_in_im = 11'(ii[n]);
    end
    @(negedge clk);
    fft_in_valid = 0;
    while (fnout < N) @(negedge clk);
    pmax = 0; es = 0; en = 0;
    for (int k = 0; k < N; k++)
      if (xr[k] * xr[k] + xi[k] * xi[k] > pmax) pmax = xr[k] * xr[k] + xi[k] * xi[k];
    for (int k = 0; k < N; k++) begin
      real er = hr[k] - xr[k], ei = hi[k] - xi[k];
      es += xr[k] * xr[k] + xi[k] * xi[k];
      en += er * er + ei * ei;
      checks++;
      if (er * er + ei * ei > pmax * 1.0e-4) begin
        failures++;
        if (failures < 10) $display("FFT bin %0d got %f,%f exp %f,%f", k, hr[k], hi[k], xr[k], xi[k]);
      end
    end
    $display("FFT frame (tone=%0d): SQNR %0.1f dB", tone, 10.0 * $log10(es / en));
    checks++;
    if (10.0 * $log10(es / en) < 40.0) begin failures++; $display("FFT SQNR too low"); end
    m_fft++;
  endtask

  initial begin
    build();
    fork
      begin
        run(MODE_A, RATE_1_2, 12, 17, 6);
        run(MODE_D, RATE_1_2, 52, 4, 6);
        cfg_i_b = 8'd128; cfg_j_b = 5'd1;
        run(MODE_B, RATE_1_2, 128, 1, 6);
        run(MODE_C, RATE_1_2, 12, 17, 6);
        for (int r = 0; r < 5; r++) run(MODE_DVBT, vit_rate_e'(r), 12, 17, 6);
      end
      begin
        repeat (3) @(posedge clk);
        fft_rst_n <= 1;
        fft_frame(0);
        fft_frame(1);
        fft_frame(0);
      end
    join
    checks++;
    if (n_skip == 0) begin failures++; $display("early error-free path never taken"); end
    checks++;
    if (m_corr == 0) begin failures++; $display("no corrected packet"); end
    checks++;
    if (n_fail == 0) begin failures++; $display("failure flag never raised"); end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (m_mode[i] == 0) begin failures++; $display("mode %0d never decoded", i); end
      checks++;
      if (m_rate[i] == 0) begin failures++; $display("rate %0d never decoded", i); end
    end
    checks++;
    if (m_fft == 0) begin failures++; $display("no FFT frame"); end
    checks++;
    if (m_bfp == 0) begin failures++; $display("block floating point never scaled"); end
    $display("modes=%0d skip=%0d corrected=%0d fail=%0d fft=%0d bfp_outputs=%0d",
             n_modes, n_skip, m_corr, n_fail, m_fft, m_bfp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
