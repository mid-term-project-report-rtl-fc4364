// tb_fec_model: reference transmitter for the FEC decoder testbenches. Builds
// the coded symbol stream of each mode from random packets: energy-dispersal
// randomisation (DVB/annex A and annex D), systematic RS encoding (via
// tb_gf_model), (I,J) convolutional interleaving, annex-B randomisation, and
// for DVB-T the K=7 (171,133) encoder with puncturing and soft mapping.
package tb_fec_model;
  import tb_gf_model::*;

  typedef byte unsigned bq_t[$];

  // DVB PRBS 1+x^14+x^15, stages as a bit array
  bit dvb_sr[1:15];
  function automatic byte unsigned dvb_byte();
    byte unsigned v = 0;
    for (int k = 0; k < 8; k++) begin
      bit b = dvb_sr[14] ^ dvb_sr[15];
      for (int s = 15; s > 1; s--) dvb_sr[s] = dvb_sr[s-1];
      dvb_sr[1] = b;
      v = (v << 1) | b;
    end
    return v;
  endfunction

  // ATSC-style 16-bit register, Galois form
  int unsigned d_reg;
  function automatic byte unsigned d_byte();
    byte unsigned v = 0;
    for (int k = 0; k < 8; k++) begin
      int unsigned o = (d_reg >> 15) & 1;
      d_reg = (d_reg * 2) % 65536;
      if (o) d_reg ^= 'h38CB;
      v = (v << 1) | byte'(o);
    end
    return v;
  endfunction

  // Randomise one 188-byte packet (index p within its group of 8), DVB style.
  function automatic void dvb_randomise(ref byte unsigned pkt[], input int p);
    if (p % 8 == 0) begin
      dvb_sr = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
      pkt[0] = 8'hB8;
    end else begin
      void'(dvb_byte());
    end
    for (int i = 1; i < pkt.size(); i++) pkt[i] ^= dvb_byte();
  endfunction

  function automatic void d_randomise(ref byte unsigned pkt[]);
    d_reg = 'hF180;
    for (int i = 0; i < pkt.size(); i++) pkt[i] ^= d_byte();
  endfunction

  // (I,J) convolutional interleaver with zero-filled branches
  class interleaver;
    int I, J, k;
    byte unsigned q[][$];
    function new(int i_, int j_);
      I = i_; J = j_; k = 0;
      q = new[I];
      for (int b = 0; b < I; b++) for (int n = 0; n < b * J; n++) q[b].push_back(0);
    endfunction
    function byte unsigned push(byte unsigned v);
      int b = k % I;
      k++;
      q[b].push_back(v);
      return q[b].pop_front();
    endfunction
  endclass

  // annex-B randomiser over GF(2^7), restarted every 128 symbols
  class b_randomiser;
    int unsigned c[$];
    int n;
    function new(); n = 0; endfunction
    function byte unsigned push(byte unsigned v);
      byte unsigned o;
      if (n % 128 == 0) c = '{127, 127, 127};
      o = v ^ byte'(c[0]);
      c.push_back(c[1] ^ mul(apow(3, 1), c[0], 1));
      void'(c.pop_front());
      n++;
      return o;
    endfunction
  endclass

  // K=7 convolutional encoder + DVB-T puncturing, soft output 0..7
  class conv_punct;
    bit sr[6];
    int step;
    string px, py;
    function new(int rate);
      case (rate)
        1: begin px = "10"; py = "11"; end
        2: begin px = "101"; py = "110"; end
        3: begin px = "10101"; py = "11010"; end
        4: begin px = "1000101"; py = "1111010"; end
        default: begin px = "1"; py = "1"; end
      endcase
      step = 0;
    endfunction
    function automatic void push_bit(bit u, ref byte unsigned sq[$]);
      bit x, y;
      x = u ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
      y = u ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      for (int i = 5; i > 0; i--) sr[i] = sr[i-1];
      sr[0] = u;
      if (px[step % px.len()] == "1") sq.push_back(x ? 8'(7 - $urandom_range(2)) : 8'($urandom_range(2)));
      if (py[step % py.len()] == "1") sq.push_back(y ? 8'(7 - $urandom_range(2)) : 8'($urandom_range(2)));
      step++;
    endfunction
  endclass
endpackage
