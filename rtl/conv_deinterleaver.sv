// conv_deinterleaver: universal (I,J) convolutional de-interleaver in one
// single-port RAM.
//
// A symbol-wise (I,J) interleaver sends symbol k to branch k mod I and delays
// branch b by b*J entries of that branch; the de-interleaver delays branch b by
// (I-1-b)*J, so every symbol comes out I*(I-1)*J symbols after it went in.
// Instead of I shift-register FIFOs, each branch owns a circular region of
// (I-1-b)*J bytes in the RAM (J*I*(I-1)/2 bytes in all, with no "don't care"
// bytes stored). A visit to branch b reads the oldest byte of its region and
// writes the new byte in the same place (read-before-write, one access per
// symbol). The base address of the current branch is accumulated as the
// commutator steps, and one pointer register per branch gives the position
// inside its region. Depth I and delay unit J are run-time inputs, which makes
// the one block serve all J.83 annexes and DVB.
//
// The document's own address scheme divides the RAM into J blocks of
// I(I+1)/2 bytes with shared column-address registers; this block keeps the
// same idea (RAM instead of FIFOs, no storage for the initial don't-care
// symbols) with simpler per-branch pointers, a choice of this design.
//
// Interface: in_valid/in_data one byte per cycle at most; in_sync marks a
// byte that belongs to branch 0 (re-aligns the commutator). The first byte
// after reset is taken as branch 0. out_valid/out_data follow one cycle after
// each input byte; the first I*(I-1)*J outputs are the RAM's initial contents.
// cfg_i and cfg_j must stay constant while data flows (reset after a change),
// with 1 <= cfg_i <= I_MAX and cfg_j*cfg_i*(cfg_i-1)/2 <= MEM_DEPTH so that all
// regions fit the RAM.
module conv_deinterleaver #(
  parameter int unsigned I_MAX     = 128,     // deepest interleaver (annex B)
  parameter int unsigned MEM_DEPTH = 65032,   // external memory of the document
  localparam int unsigned AW       = $clog2(MEM_DEPTH),
  localparam int unsigned IW       = $clog2(I_MAX + 1),
  localparam int unsigned PW       = $clog2(I_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] cfg_i,
  input  logic [4:0]    cfg_j,
  input  logic          in_valid,
  input  logic          in_sync,
  input  logic [7:0]    in_data,
  output logic          out_valid,
  output logic [7:0]    out_data
);
  logic [7:0]    mem [MEM_DEPTH];
  logic [AW-1:0] ptr [I_MAX];
  logic [IW-1:0] branch, br;
  logic [AW-1:0] base, bs, addr, dlen;
  logic [7:0]    rdata, in_q;
  logic          bypass_q;

  // branch selected for this byte and the length of its region
  always_comb begin
    br   = in_sync ? '0 : branch;
    bs   = in_sync ? '0 : base;
    dlen = (AW'(cfg_i) - AW'(1) - AW'(br)) * AW'(cfg_j);
    addr = bs + ptr[PW'(br)];
  end

  // single-port RAM, read-before-write
  always_ff @(posedge clk) begin
    if (in_valid && dlen != '0) begin
      rdata     <= mem[addr];
      mem[addr] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      branch <= '0; base <= '0; out_valid <= 1'b0; bypass_q <= 1'b0; in_q <= '0;
      for (int b = 0; b < I_MAX; b++) ptr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bypass_q <= dlen == '0;
        in_q     <= in_data;
        if (dlen != '0) ptr[PW'(br)] <= (ptr[PW'(br)] == dlen - AW'(1)) ? '0 : ptr[PW'(br)] + AW'(1);
        if (br == cfg_i - IW'(1)) begin
          branch <= '0;
          base   <= '0;
        end else begin
          branch <= br + IW'(1);
          base   <= bs + dlen;
        end
      end
    end
  end

  assign out_data = bypass_q ? in_q : rdata;

endmodule
