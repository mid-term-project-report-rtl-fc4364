// tb_gf_mul_mm: checks the multi-mode field multiplier against log/antilog
// tables in both fields, exhaustively for a = alpha^k against random b.
module tb_gf_mul_mm;
  import tb_gf_model::*;
  logic [7:0] a, b, p;
  logic       f7;
  int checks = 0, failures = 0;

  gf_mul_mm dut (.a, .b, .f7, .p);

  initial begin
    build();
    for (int f = 0; f < 2; f++) begin
      f7 = f[0];
      for (int ia = 0; ia < (f7 ? 128 : 256); ia++) begin
        for (int r = 0; r < 16; r++) begin
          a = 8'(ia);
          b = 8'($urandom_range(f7 ? 127 : 255));
          #1;
          checks++;
          if (p !== 8'(mul(a, b, f7))) begin
            failures++;
            if (failures < 5) $display("mismatch f7=%0d %h*%h got %h exp %h", f7, a, b, p, mul(a, b, f7));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
