// tb_rs_chien: builds sigma(x) = prod(1 + X_k x) for random error locations,
// loads it into the Chien search and steps through the whole codeword, checking
// that root is raised exactly at the error positions, that x_loc tracks
// alpha^-(position) and that odd_sum equals the odd part of sigma(x_loc).
module tb_rs_chien;
  import fec_pkg::*;
  import tb_gf_model::*;
  logic clk = 0, rst_n = 0;
  fec_mode_e mode;
  logic load = 0, step = 0;
  logic [7:0] sigma [T_MAX+1];
  logic root;
  logic [7:0] x_loc, odd_sum;
  int checks = 0, failures = 0, nroots = 0;
  always #5 clk = ~clk;

  rs_chien dut (.clk, .rst_n, .mode, .load, .step, .sigma, .root, .x_loc, .odd_sum);

  task automatic one(fec_mode_e m, int ne);
    int n, t; bit f7;
    int unsigned sg[];
    bit is_err[];
    mode = m; n = rs_n(m); t = rs_t(m); f7 = is_gf7(m);
    sg = new[T_MAX+1]; is_err = new[n];
    sg[0] = 1;
    for (int e = 0; e < ne; e++) begin
      int p; int unsigned X;
      do p = $urandom_range(n-1); while (is_err[p]);
      is_err[p] = 1;
      X = apow(p, f7);
      for (int i = T_MAX; i > 0; i--) sg[i] ^= mul(sg[i-1], X, f7);
    end
    // arbitrary nonzero scale, as the solver produces
    begin
      int unsigned sc = $urandom_range(f7 ? 127 : 255, 1);
      foreach (sg[i]) sigma[i] = 8'(mul(sg[i], sc, f7));
    end
    load <= 1; @(posedge clk); load <= 0;
    for (int k = 0; k < n; k++) begin
      int p; int unsigned xv, od;
      p = n - 1 - k;
      #1;
      xv = apow(-p, f7);
      od = 0;
      for (int i = 1; i <= T_MAX; i += 2) od ^= mul(sigma[i], apow(-p * i, f7), f7);
      checks += 3;
      if (root !== is_err[p]) begin failures++; $display("%s root at %0d = %0d", m.name(), p, root); end
      if (x_loc !== 8'(xv)) begin failures++; $display("x_loc"); end
      if (odd_sum !== 8'(od)) begin failures++; $display("odd_sum"); end
      if (root) nroots++;
      step <= 1; @(posedge clk); step <= 0;
    end
  endtask

  initial begin
    build();
    mode = MODE_A;
    foreach (sigma[i]) sigma[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 4; r++) begin one(MODE_A, 8); one(MODE_D, 10); one(MODE_B, 3); one(MODE_C, r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
