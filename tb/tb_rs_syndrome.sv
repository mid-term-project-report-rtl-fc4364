// tb_rs_syndrome: streams random received words (valid codewords plus random
// errors) into the syndrome calculator and compares every syndrome with direct
// evaluation R(alpha^(b+j)); also checks the "first t syndromes zero" flag and
// that syn_valid follows the last symbol by one cycle.
module tb_rs_syndrome;
  import fec_pkg::*;
  import tb_gf_model::*;
  logic clk = 0, rst_n = 0;
  fec_mode_e mode;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] in_sym = 0;
  logic [7:0] syn [2*T_MAX];
  logic zero_t, syn_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rs_syndrome dut (.clk, .rst_n, .mode, .in_valid, .in_first, .in_last, .in_sym, .syn, .zero_t, .syn_valid);

  task automatic one(fec_mode_e m, int ne);
    int n, t, b; bit f7;
    int unsigned msg[], cw[];
    mode = m; n = rs_n(m); t = rs_t(m); b = rs_b1(m); f7 = is_gf7(m);
    msg = new[n - 2*t];
    foreach (msg[i]) msg[i] = $urandom_range(f7 ? 127 : 255);
    encode(msg, n, t, b, f7, cw);
    for (int e = 0; e < ne; e++) cw[$urandom_range(n-1)] ^= $urandom_range(f7 ? 127 : 255, 1);
    for (int i = 0; i < n; i++) begin
      in_valid <= 1; in_first <= (i == 0); in_last <= (i == n-1); in_sym <= 8'(cw[i]);
      @(posedge clk);
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    @(posedge clk);
    checks++;
    if (!syn_valid) begin failures++; $display("syn_valid late"); end
    begin
      bit z = 1;
      for (int j = 0; j < 2*t; j++) begin
        int unsigned s = synd(cw, j, b, f7);
        if (j < t && s != 0) z = 0;
        checks++;
        if (syn[j] !== 8'(s)) begin failures++; $display("%s S%0d got %h exp %h", m.name(), j, syn[j], s); end
      end
      checks++;
      if (zero_t !== z) begin failures++; $display("zero_t wrong"); end
    end
  endtask

  initial begin
    build();
    mode = MODE_A;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 6; r++) begin
      one(MODE_A, r % 3); one(MODE_D, r % 4); one(MODE_B, r % 2);
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
