// tb_rs_decoder: end-to-end test of the multi-mode RS decoder. For each mode
// (annex A, B, D and DVB-T) random messages are encoded with a reference
// systematic encoder, hit with 0..t random symbol errors (and one codeword
// with 2t+2 errors), streamed in at one symbol every 3 cycles and compared
// with the original codeword on the way out. Also checks the early
// error-free path (stat_skip), the failure flag and that no overrun occurs.
module tb_rs_decoder;
  import fec_pkg::*;
  import tb_gf_model::*;

  logic clk = 0, rst_n = 0;
  fec_mode_e mode;
  logic in_valid = 0;
  logic [7:0] in_sym = 0;
  logic out_valid, out_first, out_last, out_fail, stat_skip, overrun;
  logic [7:0] out_sym;
  int checks = 0, failures = 0;
  int n_skip = 0, n_fail = 0, n_corr_cw = 0;

  always #5 clk = ~clk;

  rs_decoder dut (.clk, .rst_n, .mode, .in_valid, .in_sym, .out_valid, .out_sym,
                  .out_first, .out_last, .out_fail, .stat_skip, .overrun);

  // expected codewords queue
  int unsigned exp_q[$][];
  bit          exp_bad[$];
  int unsigned cur[];
  int          opos;

  always @(posedge clk) begin
    if (stat_skip) n_skip++;
    if (overrun) begin failures++; $display("overrun"); end
    if (out_valid) begin
      if (out_first) begin
        if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
        else cur = exp_q[0];
        opos = 0;
      end
      if (!exp_bad[0]) begin
        checks++;
        if (out_sym !== 8'(cur[opos])) begin
          failures++;
          if (failures < 10) $display("mode %s pos %0d got %h exp %h", mode.name(), opos, out_sym, cur[opos]);
        end
      end
      opos++;
      if (out_last) begin
        checks++;
        if (out_fail !== exp_bad[0] && !exp_bad[0]) begin
          failures++; $display("fail flag wrong mode %s", mode.name());
        end
        if (out_fail) n_fail++;
        if (opos != cur.size()) begin failures++; $display("length %0d", opos); end
        void'(exp_q.pop_front());
        void'(exp_bad.pop_front());
      end
    end
  end

  task automatic run_mode(fec_mode_e m, int ncw);
    int n, t, b, k;
    bit f7;
    int unsigned msg[], cw[], rx[];
    mode = m;
    n = rs_n(m); t = rs_t(m); b = rs_b1(m); f7 = is_gf7(m);
    k = n - 2 * t;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < ncw; c++) begin
      int ne;
      bit used[];
      msg = new[k];
      foreach (msg[i]) msg[i] = $urandom_range(f7 ? 127 : 255);
      encode(msg, n, t, b, f7, cw);
      rx = cw;
      ne = (c == 0) ? 0 : (c == ncw - 1) ? 2 * t + 2 : $urandom_range(t);
      if (c == 1) ne = t;
      used = new[n];
      for (int e = 0; e < ne; e++) begin
        int p;
        do p = $urandom_range(n - 1); while (used[p]);
        used[p] = 1;
        rx[p] ^= $urandom_range(f7 ? 127 : 255, 1);
      end
      if (ne > 0 && ne <= t) n_corr_cw++;
      exp_q.push_back(cw);
      exp_bad.push_back(ne > t);
      if (rs_ext(m)) begin
        extend(rx);
        rx[n] ^= c % 2;   // the extension symbol is not used by the decoder
      end
      for (int i = 0; i < rx.size(); i++) begin
        in_valid <= 1; in_sym <= 8'(rx[i]);
        @(posedge clk);
        in_valid <= 0;
        repeat (2) @(posedge clk);
      end
    end
    while (exp_q.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    build();
    mode = MODE_A;
    run_mode(MODE_A, 8);
    run_mode(MODE_D, 8);
    run_mode(MODE_B, 8);
    run_mode(MODE_DVBT, 4);
    checks++;
    if (n_skip < 4) begin failures++; $display("early error-free path seen %0d times", n_skip); end
    $display("skip=%0d fail=%0d corrected codewords=%0d", n_skip, n_fail, n_corr_cw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
