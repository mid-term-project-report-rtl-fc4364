// tb_viterbi_decoder: random data is encoded by a reference K=7 (171,133)
// encoder, punctured with the DVB-T pattern of each rate and sent as 3-bit soft
// values with random soft noise (plus sparse hard bit errors at rate 1/2). The
// decoded bits must equal the source bits, in order. Also checks that the first
// decoded bit appears once TB_LEN trellis steps have been sent.
module tb_viterbi_decoder;
  import fec_pkg::*;
  localparam int TBL = 48;
  logic clk = 0, rst_n = 0;
  vit_rate_e rate = RATE_1_2;
  logic in_valid = 0;
  logic [2:0] in_soft = 0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;
  int nout, nsteps_at_first;
  bit src[$];
  always #5 clk = ~clk;

  viterbi_decoder #(.TB_LEN(TBL)) dut (.clk, .rst_n, .rate, .in_valid, .in_soft, .out_valid, .out_bit);

  int steps_sent;
  int cur_len;
  always @(negedge clk) if (out_valid) begin
    if (nout == 0) nsteps_at_first = steps_sent;
    if (nout < cur_len) begin
      checks++;
      if (out_bit !== src[nout]) begin
        failures++;
        if (failures < 10) $display("%s bit %0d got %0d exp %0d", rate.name(), nout, out_bit, src[nout]);
      end
    end
    nout++;
  end

  function automatic bit keep(vit_rate_e r, int p, bit y);
    string px, py;
    case (r)
      RATE_2_3: begin px = "10"; py = "11"; end
      RATE_3_4: begin px = "101"; py = "110"; end
      RATE_5_6: begin px = "10101"; py = "11010"; end
      RATE_7_8: begin px = "1000101"; py = "1111010"; end
      default:  begin px = "1"; py = "1"; end
    endcase
    return y ? (py[p % py.len()] == "1") : (px[p % px.len()] == "1");
  endfunction

  task automatic send(bit b, bit hard_err);
    int nz = $urandom_range(2);
    logic [2:0] s = b ? 3'(7 - nz) : 3'(nz);
    if (hard_err) s = ~s;
    @(negedge clk);
    in_valid = 1; in_soft = s;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic run(vit_rate_e r, int len);
    bit sr[6];
    rst_n = 0; rate = r; nout = 0; src.delete(); steps_sent = 0; cur_len = len;
    foreach (sr[i]) sr[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < len + 60; k++) begin
      bit u, x, y;
      u = (k < len) ? 1'($urandom) : 1'b0;
      src.push_back(u);
      // 171o: u d1 d2 d3 . . d6   133o: u . d2 d3 . d5 d6
      x = u ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
      y = u ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      for (int i = 5; i > 0; i--) sr[i] = sr[i-1];
      sr[0] = u;
      if (keep(r, k, 0)) send(x, r == RATE_1_2 && (k % 61 == 30));
      if (keep(r, k, 1)) send(y, 0);
      steps_sent++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (nout != len + 60 - (TBL - 1)) begin failures++; $display("%s outputs %0d", r.name(), nout); end
    checks++;
    if (nsteps_at_first != TBL) begin failures++; $display("first output after %0d steps", nsteps_at_first); end
  endtask

  initial begin
    run(RATE_1_2, 600);
    run(RATE_2_3, 400);
    run(RATE_3_4, 400);
    run(RATE_5_6, 400);
    run(RATE_7_8, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
