// tb_rs_forney: the reference model computes, for a random error pattern, the
// syndromes, sigma(x) = prod(1 + X_k x) and Omega(x) = sigma(x)S(x) mod x^2t,
// loads Omega into the evaluator and steps it across the codeword while
// driving root, x_loc and odd_sum from the model. The error value must equal
// the injected value at each error position and zero elsewhere.
module tb_rs_forney;
  import fec_pkg::*;
  import tb_gf_model::*;
  logic clk = 0, rst_n = 0;
  fec_mode_e mode;
  logic load = 0, step = 0, root = 0;
  logic [7:0] omega [T_MAX];
  logic [7:0] x_loc = 0, odd_sum = 0, err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rs_forney dut (.clk, .rst_n, .mode, .load, .step, .omega, .root, .x_loc, .odd_sum, .err);

  task automatic one(fec_mode_e m, int ne);
    int n, t, b; bit f7;
    int unsigned sg[], r[], s[], om[], ev[];
    mode = m; n = rs_n(m); t = rs_t(m); b = rs_b1(m); f7 = is_gf7(m);
    sg = new[T_MAX+1]; r = new[n]; ev = new[n];
    sg[0] = 1;
    for (int e = 0; e < ne; e++) begin
      int p; int unsigned X;
      do p = $urandom_range(n-1); while (ev[p] != 0);
      ev[p] = $urandom_range(f7 ? 127 : 255, 1);
      r[n-1-p] = ev[p];
      X = apow(p, f7);
      for (int i = T_MAX; i > 0; i--) sg[i] ^= mul(sg[i-1], X, f7);
    end
    s = new[2*t];
    foreach (s[j]) s[j] = synd(r, j, b, f7);
    om = new[T_MAX];
    for (int i = 0; i < T_MAX; i++) begin
      om[i] = 0;
      if (i < 2*t) for (int j = 0; j <= i && j <= T_MAX; j++) om[i] ^= mul(sg[j], s[i-j], f7);
      omega[i] = 8'(om[i]);
    end
    load <= 1; @(posedge clk); load <= 0;
    for (int k = 0; k < n; k++) begin
      int p; int unsigned od;
      p = n - 1 - k;
      od = 0;
      for (int i = 1; i <= T_MAX; i += 2) od ^= mul(sg[i], apow(-p * i, f7), f7);
      root = ev[p] != 0; x_loc = 8'(apow(-p, f7)); odd_sum = 8'(od);
      #1;
      checks++;
      if (err !== 8'(ev[p])) begin failures++; $display("%s pos %0d err %h exp %h", m.name(), p, err, ev[p]); end
      step <= 1; @(posedge clk); step <= 0;
    end
  endtask

  initial begin
    build();
    mode = MODE_A;
    foreach (omega[i]) omega[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 4; r++) begin one(MODE_A, 1 + r*2); one(MODE_D, 10 - r); one(MODE_B, 1 + r % 3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
