// tb_descrambler_b: a reference GF(2^7) randomiser (log/antilog tables) with
// recurrence c(n+3) = c(n+1) + alpha^3 c(n) scrambles random 7-bit symbols in
// frames of random length; the descrambler must return the original symbols.
module tb_descrambler_b;
  import tb_gf_model::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sync = 0;
  logic [7:0] in_sym = 0;
  logic out_valid;
  logic [7:0] out_sym;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  descrambler_b dut (.clk, .rst_n, .in_valid, .in_sync, .in_sym, .out_valid, .out_sym);

  byte unsigned expq[$];
  always @(negedge clk) if (out_valid) begin
    checks++;
    if (out_sym !== expq[0]) begin
      failures++;
      if (failures < 10) $display("got %h exp %h", out_sym, expq[0]);
    end
    void'(expq.pop_front());
  end

  initial begin
    build();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 6; f++) begin
      int unsigned c[$];
      int len = $urandom_range(200, 40);
      c = '{127, 127, 127};
      for (int i = 0; i < len; i++) begin
        byte unsigned d;
        c.push_back(c[i+1] ^ mul(apow(3, 1), c[i], 1));
        d = 8'($urandom_range(127));
        expq.push_back(d);
        @(negedge clk);
        in_valid = 1; in_sync = (i == 0); in_sym = 8'(d ^ c[i]);
        if ($urandom_range(2) == 0) begin @(negedge clk); in_valid = 0; in_sync = 0; end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
