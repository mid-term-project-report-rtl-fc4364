// tb_rs_kes: gives the key-equation solver the syndromes of random error
// patterns of up to t errors and checks that (1) the locator degree equals the
// number of errors, (2) sigma(X^-1) = 0 at every error location X and (3)
// Forney's formula with the returned sigma and Omega gives back each injected
// error value. Also checks the solver's latency 2t(t+1) + t(t+1)/2 + 2 cycles.
module tb_rs_kes;
  import fec_pkg::*;
  import tb_gf_model::*;
  logic clk = 0, rst_n = 0;
  fec_mode_e mode;
  logic start = 0;
  logic [7:0] syn [2*T_MAX];
  logic [7:0] sigma [T_MAX+1];
  logic [7:0] omega [T_MAX];
  logic [4:0] deg;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rs_kes dut (.clk, .rst_n, .mode, .start, .syn, .sigma, .omega, .deg, .busy, .done);

  task automatic one(fec_mode_e m, int ne);
    int n, t, b, cyc; bit f7;
    int unsigned r[], pos[], val[], sg[], om[];
    mode = m; n = rs_n(m); t = rs_t(m); b = rs_b1(m); f7 = is_gf7(m);
    r = new[n]; pos = new[ne]; val = new[ne];
    for (int e = 0; e < ne; e++) begin
      bit dup;
      do begin
        pos[e] = $urandom_range(n-1); dup = 0;
        for (int k = 0; k < e; k++) if (pos[k] == pos[e]) dup = 1;
      end while (dup);
      val[e] = $urandom_range(f7 ? 127 : 255, 1);
      r[n-1-pos[e]] = val[e];          // pos = power of x
    end
    for (int j = 0; j < 2*T_MAX; j++) syn[j] = (j < 2*t) ? 8'(synd(r, j, b, f7)) : 8'd0;
    start <= 1; @(posedge clk); start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != 2*t*(t+1) + t*(t+1)/2 + 2) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (deg != ne) begin failures++; $display("%s deg %0d exp %0d", m.name(), deg, ne); end
    sg = new[T_MAX+1]; om = new[T_MAX];
    foreach (sg[i]) sg[i] = sigma[i];
    foreach (om[i]) om[i] = omega[i];
    for (int e = 0; e < ne; e++) begin
      int unsigned xi, dsum, ev;
      xi = apow(-int'(pos[e]), f7);
      checks++;
      if (peval(sg, xi, f7) != 0) begin failures++; $display("sigma not zero at error"); end
      // x*sigma'(x) = odd part of sigma
      dsum = 0;
      for (int i = 1; i <= T_MAX; i += 2) dsum ^= mul(sg[i], apow(i * -int'(pos[e]), f7), f7);
      ev = mul(peval(om, xi, f7), inv(dsum, f7), f7);
      if (b == 1) ev = mul(ev, xi, f7);
      checks++;
      if (ev != val[e]) begin failures++; $display("%s error value %h exp %h", m.name(), ev, val[e]); end
    end
  endtask

  initial begin
    build();
    mode = MODE_A;
    foreach (syn[j]) syn[j] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 1; r <= 10; r++) begin
      one(MODE_A, 1 + r % 8); one(MODE_D, r); one(MODE_B, 1 + r % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
