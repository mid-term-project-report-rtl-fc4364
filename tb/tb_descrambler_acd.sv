// tb_descrambler_acd: a bit-level reference scrambler (list-based shift
// register) randomises groups of eight 188-byte packets the way the
// transmitter does; the descrambler must return the original packets,
// including 0x47 for the inverted sync byte. The first randomising byte after
// a reload is also checked against its known value 0x03. Annex D mode is
// checked against a reference register written with integer arithmetic.
module tb_descrambler_acd;
  import fec_pkg::*;
  logic clk = 0, rst_n = 0;
  fec_mode_e mode = MODE_A;
  logic in_valid = 0, in_sync = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_sync;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  descrambler_acd dut (.clk, .rst_n, .mode, .in_valid, .in_sync, .in_data, .out_valid, .out_sync, .out_data);

  byte unsigned expq[$];
  always @(negedge clk) if (out_valid) begin
    checks++;
    if (out_data !== expq[0]) begin
      failures++;
      if (failures < 10) $display("%s got %h exp %h", mode.name(), out_data, expq[0]);
    end
    void'(expq.pop_front());
  end

  bit sr[1:15];
  function automatic byte unsigned dvb_prbs_byte();
    byte unsigned v = 0;
    for (int k = 0; k < 8; k++) begin
      bit b = sr[14] ^ sr[15];
      for (int s = 15; s > 1; s--) sr[s] = sr[s-1];
      sr[1] = b;
      v = (v << 1) | b;
    end
    return v;
  endfunction

  int unsigned dreg;
  function automatic byte unsigned atsc_byte();
    byte unsigned v = 0;
    for (int k = 0; k < 8; k++) begin
      int unsigned o = (dreg >> 15) & 1;
      dreg = (dreg * 2) % 65536;
      if (o) dreg = dreg ^ ('h2000 + 'h1000 + 'h800 + 'h80 + 'h40 + 'h8 + 'h2 + 'h1);
      v = (v << 1) | byte'(o);
    end
    return v;
  endfunction

  task automatic send(byte unsigned tx, bit sync);
    @(negedge clk);
    in_valid = 1; in_sync = sync; in_data = tx;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // DVB / annex A: two groups of 8 packets
    mode = MODE_A;
    for (int g = 0; g < 2; g++)
      for (int p = 0; p < 8; p++) begin
        if (p == 0) begin
          sr = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
          expq.push_back(8'h47); send(8'hB8, 1);
        end else begin
          void'(dvb_prbs_byte());
          expq.push_back(8'h47); send(8'h47, 1);
        end
        for (int i = 1; i < 188; i++) begin
          byte unsigned d, r;
          d = 8'($urandom);
          r = dvb_prbs_byte();
          if (p == 0 && i == 1) begin
            checks++;
            if (r != 8'h03) begin failures++; $display("first PRBS byte %h", r); end
          end
          expq.push_back(d); send(d ^ r, 0);
        end
      end
    // annex D
    @(negedge clk); in_valid = 0;
    mode = MODE_D;
    for (int p = 0; p < 4; p++) begin
      dreg = 'hF180;
      for (int i = 0; i < 187; i++) begin
        byte unsigned d;
        d = 8'($urandom);
        expq.push_back(d); send(d ^ atsc_byte(), i == 0);
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
