// fft_processor: memory-based N-point FFT (default 8192, DVB-T 8K mode) with
// radix-8 butterflies, an 8x8 matrix prefetch buffer, a single-port main
// memory and block floating point with one scale factor per 64-point block.
//
// Algorithm. N = 8^p (or 2*8^p) points are transformed in place by p radix-8
// decimation-in-frequency passes (a final radix-2 pass when N = 2*8^p; 8192 =
// 8^4 * 2). In pass s the sub-transforms have length L = N/8^s; butterfly j of
// a sub-transform takes the 8 points j + m*L/8 and its output k is rotated by
// W_L^(j*k) before being written back where input k came from. The result is
// left in digit-reversed order and is read out in natural order.
//
// Memory and matrix buffer. One memory row holds 8 complex samples (8 x 2 x
// DW bits: 1024 rows x 176 bits = 176 Kbit for the default, the chip's SRAM
// size). A group of 64 points - 8 rows - is fetched into the 8x8 matrix
// buffer, its 8 butterflies are computed from the buffer, and the 8 rows are
// written back; in the early passes the rows are 8*L/8 apart and each
// butterfly takes one buffer column, so one single-port access per row serves
// 8 butterflies. Reads, butterflies and writes of a group are done one after
// the other, so a single-port memory is enough.
//
// Block floating point. Every stored row carries an exponent in a scale table
// (value = mantissa * 2^exp). When a group is fetched its rows are aligned to
// the largest exponent; when its 64 results are done, the smallest right
// shift that brings them all back into DW bits is applied and the new
// exponent is stored for all 8 rows - one scale factor per 64-point block, as
// in the document, determined when the block is finished and used when the
// data are next operated on. Outputs come with their exponent.
//
// Timing: loading takes N cycles (one sample per cycle, in_ready high), each
// pass N/64 groups of about 26 cycles, read-out N cycles plus 2 cycles of
// latency. That is ~33,000 cycles for 8192 points here, against the 14,347
// (717.35 us at 20 MHz) of the document's chip, whose I/O and scheduling are
// not described in enough detail to reproduce.
// Twiddle width TW, round-to-nearest (halves away from zero) scaling with saturation and the 1/sqrt(2) constant are this
// design's choices. Interface: in_valid/in_ready/in_re/in_im (natural order),
// out_valid/out_re/out_im/out_exp/out_last (natural order, X = out * 2^out_exp),
// busy while loading is not possible.
module fft_processor #(
  parameter int unsigned N  = 8192,
  parameter int unsigned DW = 11,
  parameter int unsigned TW = 12,
  parameter int unsigned EW = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [EW-1:0]        out_exp,
  output logic                 out_last,
  output logic                 busy
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned NR8    = LOGN / 3;
  localparam bit          HAS_R2 = (LOGN % 3) == 1;
  localparam int unsigned NSTAGE = NR8 + (HAS_R2 ? 1 : 0);
  localparam int unsigned NROWS  = N / 8;
  localparam int unsigned RAW    = $clog2(NROWS);
  localparam int unsigned NGRP   = N / 64;
  localparam int unsigned GW     = $clog2(NGRP);
  localparam int unsigned BW     = DW + 4;         // butterfly output width
  localparam int unsigned RW     = DW + 5;         // after twiddle rotation
  localparam int unsigned SHMAX  = RW - DW;
  localparam int unsigned WONE   = (1 << (TW - 1)) - 1;
  localparam int unsigned WMAX   = (1 << (DW - 1)) - 1;

  typedef logic signed [DW-1:0] d_t;
  typedef logic signed [TW-1:0] tw_t;
  typedef logic signed [RW-1:0] r_t;
  typedef tw_t tab_t [N/4];

  // quarter-wave twiddle tables: cos and sin of 2*pi*r/N, r < N/4
  function automatic tab_t gen_tab(input bit sine);
    tab_t t;
    for (int r = 0; r < N / 4; r++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * r / N;
      t[r] = tw_t'($rtoi($floor((sine ? $sin(a) : $cos(a)) * WONE + 0.5)));
    end
    return t;
  endfunction
  localparam tab_t COS_T = gen_tab(1'b0);
  localparam tab_t SIN_T = gen_tab(1'b1);

  // W_N^e = cos - j sin, from the quarter-wave tables
  function automatic void twiddle(input logic [LOGN-1:0] e, output tw_t wr, output tw_t wi);
    logic [LOGN-3:0] r;
    tw_t c, s;
    r = e[LOGN-3:0];
    c = COS_T[r];
    s = SIN_T[r];
    case (e[LOGN-1:LOGN-2])
      2'd0: begin wr =  c; wi = -s; end
      2'd1: begin wr = -s; wi = -c; end
      2'd2: begin wr = -c; wi =  s; end
      default: begin wr = s; wi = c; end
    endcase
  endfunction

  typedef enum logic [2:0] {S_LOAD, S_RD, S_BF, S_SC, S_WR, S_OUT} state_e;
  typedef enum logic [1:0] {K_WIDE, K_S2, K_S1, K_R2} kind_e;

  state_e state;
  logic [LOGN-1:0] cnt;           // load / read-out counter
  logic [2:0]      sub;           // row or butterfly index inside a group
  logic            rd_pend;       // a read issued last cycle
  logic [2:0]      rd_row;
  logic [GW-1:0]   grp;
  logic [2:0]      stage;

  // ---------------- single-port main memory ----------------
  logic [16*DW-1:0] mem [NROWS];
  logic [16*DW-1:0] rdata, wdata, wdata_mem;
  logic             wdata_load_sel;
  logic [RAW-1:0]   addr;
  logic             we;
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata_mem;
    else    rdata     <= mem[addr];
  end

  // scale-factor table, one exponent per row
  logic [EW-1:0] exp_tab [NROWS];

  // ---------------- stage geometry ----------------
  kind_e           kind;
  logic [LOGN:0]   L, S;
  always_comb begin
    if (32'(stage) < NR8) begin
      L = (LOGN+1)'(N) >> (3 * stage);
      S = L >> 3;
      kind = (S >= 8) ? K_WIDE : (S == 2) ? K_S2 : K_S1;
    end else begin
      L = 2; S = 1; kind = K_R2;
    end
  end

  // row address of row i of the current group, and j0 of a wide group.
  // L, S and the number of groups per sub-transform (S/8) are powers of two,
  // so the divisions are shifts and masks.
  logic [3:0]      lg_l;          // log2(L) in the radix-8 passes
  logic [LOGN:0]   cpb_mask;      // S/8 - 1
  always_comb begin
    lg_l     = 4'(LOGN - 3 * 32'(stage));
    cpb_mask = (S >> 3) - 1'b1;
  end
  logic [LOGN-1:0] j0;
  function automatic logic [RAW-1:0] row_of(input logic [2:0] i);
    logic [LOGN:0] blk, a;
    if (kind == K_WIDE) begin
      blk = (LOGN+1)'(grp) >> (lg_l - 4'd6);
      a   = (blk << lg_l) + (((LOGN+1)'(grp) & cpb_mask) << 3) + ((LOGN+1)'(i) << (lg_l - 4'd3));
      return RAW'(a >> 3);
    end
    return RAW'({grp, i});
  endfunction
  always_comb j0 = LOGN'(((LOGN+1)'(grp) & cpb_mask) << 3);

  // matrix position of element m of butterfly b
  function automatic logic [5:0] pos_of(input logic [2:0] b, input logic [2:0] m);
    case (kind)
      K_WIDE:  return {m, b};
      K_S2:    return {b[2:1], m, b[0]};
      default: return {b, m};
    endcase
  endfunction

  // ---------------- matrix prefetch buffer and result buffer ----------------
  d_t            mx_re [64], mx_im [64];
  logic [EW-1:0] mx_exp [8];
  r_t            rs_re [64], rs_im [64];
  logic [RW-1:0] mag_or;
  logic [EW-1:0] emax;
  logic [2:0]    shift;

  always_comb begin
    emax = mx_exp[0];
    for (int i = 1; i < 8; i++) if (mx_exp[i] > emax) emax = mx_exp[i];
  end

  // arithmetic right shift, rounded to nearest with halves away from zero
  // (no DC bias), saturated to DW bits
  function automatic d_t sat_d(input logic signed [RW:0] v);
    logic signed [RW:0] lim;
    lim = signed'((RW+1)'(WMAX));
    if (v > lim) return d_t'(lim);
    if (v < -lim) return d_t'(-lim);
    return d_t'(v);
  endfunction
  function automatic d_t rnd_d(input d_t v, input logic [EW-1:0] s);
    logic signed [RW:0] t;
    t = (RW+1)'(v);
    if (s != '0) t = (t + ((RW+1)'(1) << (s - 1)) - ((t < 0) ? (RW+1)'(1) : (RW+1)'(0))) >>> s;
    return sat_d(t);
  endfunction
  function automatic d_t rnd_r(input r_t v, input logic [2:0] s);
    logic signed [RW:0] t;
    t = (RW+1)'(v);
    if (s != '0) t = (t + ((RW+1)'(1) << (s - 1)) - ((t < 0) ? (RW+1)'(1) : (RW+1)'(0))) >>> s;
    return sat_d(t);
  endfunction

  // butterfly operands (aligned to emax)
  d_t   op_re [8], op_im [8];
  logic signed [BW-1:0] bu_re [8], bu_im [8];
  always_comb begin
    for (int m = 0; m < 8; m++) begin
      logic [5:0] p;
      logic [EW-1:0] d;
      p = pos_of(sub, 3'(m));
      d = emax - mx_exp[p[5:3]];
      op_re[m] = (d >= EW'(DW)) ? d_t'(0) : rnd_d(mx_re[p], d);
      op_im[m] = (d >= EW'(DW)) ? d_t'(0) : rnd_d(mx_im[p], d);
    end
  end

  fft_bu8 #(.IW(DW)) u_bu (.r2(kind == K_R2), .x_re(op_re), .x_im(op_im), .y_re(bu_re), .y_im(bu_im));

  // twiddle rotation of the butterfly outputs
  r_t tw_re [8], tw_im [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [LOGN-1:0] j, e;
      tw_t wr, wi;
      logic signed [BW+TW:0] pr, pi;
      case (kind)
        K_WIDE:  begin j = j0 + LOGN'(sub); e = LOGN'(j * LOGN'(k)) << (3 * stage); end
        K_S2:    begin j = LOGN'(sub & 3'd1); e = LOGN'(j * LOGN'(k)) * LOGN'(N / 16); end
        default: begin j = '0; e = '0; end
      endcase
      twiddle(e, wr, wi);
      if (e == '0) begin
        tw_re[k] = r_t'(bu_re[k]);
        tw_im[k] = r_t'(bu_im[k]);
      end else begin
        pr = (BW+TW+1)'(bu_re[k]) * (BW+TW+1)'(wr) - (BW+TW+1)'(bu_im[k]) * (BW+TW+1)'(wi);
        pi = (BW+TW+1)'(bu_re[k]) * (BW+TW+1)'(wi) + (BW+TW+1)'(bu_im[k]) * (BW+TW+1)'(wr);
        tw_re[k] = r_t'((pr + (BW+TW+1)'(1 << (TW - 2)) - ((pr < 0) ? (BW+TW+1)'(1) : (BW+TW+1)'(0))) >>> (TW - 1));
        tw_im[k] = r_t'((pi + (BW+TW+1)'(1 << (TW - 2)) - ((pi < 0) ? (BW+TW+1)'(1) : (BW+TW+1)'(0))) >>> (TW - 1));
      end
    end
  end

  // smallest shift that brings every result of the block into DW bits
  always_comb begin
    shift = 3'(SHMAX);
    for (int s = SHMAX; s >= 0; s--)
      if ((mag_or >> (DW - 1 + s)) == '0) shift = 3'(s);
  end

  // write data of row i: results scaled by the block shift
  always_comb begin
    for (int c = 0; c < 8; c++) begin
      d_t vr, vi;
      vr = rnd_r(rs_re[{sub, 3'(c)}], shift);
      vi = rnd_r(rs_im[{sub, 3'(c)}], shift);
      wdata[c*2*DW +: 2*DW] = {vi, vr};
    end
  end

  // ---------------- load: row assembly ----------------
  logic [14*DW-1:0] ld_buf;

  // ---------------- output: digit-reversed address ----------------
  logic [LOGN-1:0] out_addr;
  always_comb begin
    logic [LOGN-1:0] k;
    k = cnt;
    out_addr = '0;
    for (int d = 0; d < NR8; d++) begin
      out_addr = out_addr | (LOGN'(k[2:0]) << (LOGN - 3 * (d + 1)));
      k = k >> 3;
    end
    if (HAS_R2) out_addr = out_addr | LOGN'(k[0]);
  end

  logic       o_pend, o_last;
  logic [2:0] o_col;
  logic [EW-1:0] o_exp;

  // address and write enable
  always_comb begin
    we   = 1'b0;
    addr = '0;
    case (state)
      S_LOAD: begin we = in_valid && cnt[2:0] == 3'd7; addr = RAW'(cnt >> 3);
                    wdata_load_sel = 1'b1; end
      S_RD:   begin addr = row_of(sub); wdata_load_sel = 1'b0; end
      S_WR:   begin we = 1'b1; addr = row_of(sub); wdata_load_sel = 1'b0; end
      S_OUT:  begin addr = RAW'(out_addr >> 3); wdata_load_sel = 1'b0; end
      default: wdata_load_sel = 1'b0;
    endcase
  end
  assign wdata_mem = wdata_load_sel ? {in_im, in_re, ld_buf} : wdata;

  assign in_ready = state == S_LOAD;
  assign busy     = state != S_LOAD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; cnt <= '0; sub <= '0; grp <= '0; stage <= '0;
      rd_pend <= 1'b0; rd_row <= '0; mag_or <= '0; ld_buf <= '0;
      o_pend <= 1'b0; o_last <= 1'b0; o_col <= '0; o_exp <= '0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0; out_exp <= '0; out_last <= 1'b0;
      for (int i = 0; i < 8; i++) mx_exp[i] <= '0;
      for (int i = 0; i < 64; i++) begin
        mx_re[i] <= '0; mx_im[i] <= '0; rs_re[i] <= '0; rs_im[i] <= '0;
      end
    end else begin
      rd_pend   <= 1'b0;
      o_pend    <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      // matrix fill from the previous cycle's read
      if (rd_pend)
        for (int c = 0; c < 8; c++) begin
          mx_re[{rd_row, 3'(c)}] <= rdata[c*2*DW +: DW];
          mx_im[{rd_row, 3'(c)}] <= rdata[c*2*DW + DW +: DW];
        end
      // output pipeline
      if (o_pend) begin
        out_valid <= 1'b1;
        out_re    <= rdata[o_col*2*DW +: DW];
        out_im    <= rdata[o_col*2*DW + DW +: DW];
        out_exp   <= o_exp;
        out_last  <= o_last;
      end
      case (state)
        S_LOAD: if (in_valid) begin
          ld_buf <= {in_im, in_re, ld_buf[14*DW-1:2*DW]};
          if (cnt[2:0] == 3'd7) exp_tab[RAW'(cnt >> 3)] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_RD; sub <= '0; grp <= '0; stage <= '0;
          end
        end
        S_RD: begin
          rd_pend <= 1'b1;
          rd_row  <= sub;
          mx_exp[sub] <= exp_tab[row_of(sub)];
          sub <= sub + 3'd1;
          if (sub == 3'd7) begin
            state <= S_BF; mag_or <= '0;
          end
        end
        S_BF: if (!rd_pend) begin
          for (int k = 0; k < 8; k++) begin
            logic [5:0] p;
            p = pos_of(sub, 3'(k));
            rs_re[p] <= tw_re[k];
            rs_im[p] <= tw_im[k];
          end
          begin
            logic [RW-1:0] acc;
            acc = mag_or;
            for (int k = 0; k < 8; k++) begin
              acc |= tw_re[k][RW-1] ? ~tw_re[k] : tw_re[k];
              acc |= tw_im[k][RW-1] ? ~tw_im[k] : tw_im[k];
            end
            mag_or <= acc;
          end
          sub <= sub + 3'd1;
          if (sub == 3'd7) state <= S_SC;
        end
        S_SC: state <= S_WR;
        S_WR: begin
          exp_tab[row_of(sub)] <= emax + EW'(shift);
          sub <= sub + 3'd1;
          if (sub == 3'd7) begin
            if (grp == GW'(NGRP - 1)) begin
              grp <= '0;
              if (32'(stage) == NSTAGE - 1) begin
                state <= S_OUT; cnt <= '0;
              end else begin
                stage <= stage + 3'd1; state <= S_RD;
              end
            end else begin
              grp <= grp + 1'b1; state <= S_RD;
            end
          end
        end
        S_OUT: begin
          o_pend <= 1'b1;
          o_col  <= out_addr[2:0];
          o_exp  <= exp_tab[RAW'(out_addr >> 3)];
          o_last <= cnt == LOGN'(N - 1);
          cnt    <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
