// tb_fec_decoder: end-to-end test of the multi-mode FEC decoder. For each mode
// a reference transmitter (tb_fec_model) randomises, RS-encodes, interleaves
// and (DVB-T) convolutionally encodes and punctures random packets, with
// symbol errors injected into the RS codewords: none in packet 0, t in packet 1,
// 2t+3 (uncorrectable) in packets 2 to 4, up to t/2 elsewhere. The decoded packets
// must equal the originals (packets 2 to 4 excepted) with out_sync on each first
// byte. Counts the early error-free path, the failure flag, every mode and
// two puncturing rates; overrun must never occur.
module tb_fec_decoder;
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

  fec_decoder dut (.clk, .rst_n, .mode, .rate, .cfg_i_b, .cfg_j_b, .in_valid, .in_data, .in_soft,
                   .out_valid, .out_sync, .out_data, .rs_fail, .rs_skip, .overrun);

  byte unsigned exp_b[$];
  bit           exp_chk[$];
  bit           exp_first[$];
  int           nout;

  always @(negedge clk) begin
    if (rs_skip) n_skip++;
    if (rs_fail) n_fail++;
    if (overrun) begin failures++; $display("overrun"); end
    if (out_valid && exp_b.size() > 0) begin
      if (exp_chk[0]) begin
        checks++;
        if (out_data !== exp_b[0] || out_sync !== exp_first[0]) begin
          failures++;
          if (failures < 10) $display("%s byte %0d got %h/%0d exp %h/%0d", mode.name(), nout, out_data, out_sync, exp_b[0], exp_first[0]);
        end
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
    exp_b.delete(); exp_chk.delete(); exp_first.delete(); nout = 0;
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
  endtask

  initial begin
    build();
    run(MODE_A, RATE_1_2, 12, 17, 7);
    run(MODE_D, RATE_1_2, 52, 4, 6);
    run(MODE_B, RATE_1_2, 16, 8, 7);
    run(MODE_DVBT, RATE_2_3, 12, 17, 6);
    run(MODE_DVBT, RATE_7_8, 12, 17, 6);
    run(MODE_C, RATE_1_2, 12, 17, 6);
    checks++;
    if (n_skip == 0) begin failures++; $display("early error-free path never taken"); end
    $display("modes=%0d skip=%0d fail=%0d", n_modes, n_skip, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
