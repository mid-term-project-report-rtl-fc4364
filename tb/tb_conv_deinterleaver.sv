// tb_conv_deinterleaver: a reference (I,J) convolutional interleaver (one
// queue of b*J bytes per branch) scrambles a random byte stream; the
// de-interleaver under test must return byte k exactly I*(I-1)*J bytes later.
// Runs the annex A/DVB (12,17), annex D (52,4) and annex B (128,1), (8,16)
// and (128,8) configurations - the last fills 65,024 of the 65,032 bytes - with random idle cycles between bytes.
module tb_conv_deinterleaver;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_i = 12;
  logic [4:0] cfg_j = 17;
  logic in_valid = 0, in_sync = 0;
  logic [7:0] in_data = 0;
  logic out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  conv_deinterleaver dut (.clk, .rst_n, .cfg_i, .cfg_j, .in_valid, .in_sync, .in_data, .out_valid, .out_data);

  byte unsigned src[$];
  int nout;

  always @(negedge clk) if (out_valid) begin
    int D;
    D = cfg_i * (cfg_i - 1) * cfg_j;
    if (nout >= D) begin
      checks++;
      if (out_data !== src[nout - D]) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d) out %0d got %h exp %h", cfg_i, cfg_j, nout, out_data, src[nout - D]);
      end
    end
    nout++;
  end

  task automatic run(int I, int J, int extra);
    byte unsigned fifo[$][];
    byte unsigned q[128][$];
    int total, D;
    rst_n = 0; cfg_i = 8'(I); cfg_j = 5'(J);
    src.delete(); nout = 0;
    for (int b = 0; b < I; b++) begin
      q[b].delete();
      for (int k = 0; k < b * J; k++) q[b].push_back(8'h00);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    D = I * (I - 1) * J;
    total = D + extra;
    for (int k = 0; k < total; k++) begin
      byte unsigned v, o;
      int b;
      v = 8'($urandom);
      src.push_back(v);
      b = k % I;
      q[b].push_back(v);
      o = q[b].pop_front();
      @(negedge clk);
      in_valid = 1; in_data = o; in_sync = (b == 0) && (k > 0) && ($urandom_range(1) == 1);
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        in_valid = 0; in_sync = 0;
      end
    end
    @(negedge clk);
    in_valid = 0; in_sync = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != total) begin failures++; $display("count %0d of %0d", nout, total); end
  endtask

  initial begin
    run(12, 17, 3000);
    run(52, 4, 2000);
    run(128, 1, 1000);
    run(8, 16, 1000);
    run(128, 8, 1000);   // deepest annex-B setting: 65,024 of the 65,032 bytes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
