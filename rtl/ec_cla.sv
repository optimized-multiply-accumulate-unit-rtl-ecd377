// ec_cla: error-correctable carry-lookahead adder (EC-CLA).
//
// sum = a + b + cin over W bits, built from W/BLK blocks of BLK bits.
//
// How it works. Every bit forms generate g = a & b and propagate p = a ^ b.
// Inside a block all carries are produced at once by two-level lookahead
// (each carry is an OR of generate terms masked by the propagates above
// them), not by a ripple chain. Each block starts from a speculative carry-in:
// block 0 takes cin, block j takes the block generate G[j-1] of the block
// below, i.e. the carry that block would produce on its own. The speculation
// is wrong only when a carry enters block j-1 and runs through it because
// all its bits propagate. A block-level lookahead network (G, P of every
// block) computes the true carry into each block alongside; the error
// detector compares it with the speculated one, and the corrector adds one
// to the speculative sum of every block whose carry-in was missed (the
// speculated carry can only be too small, never too large). The corrected
// sum is therefore exact every cycle; the correction costs one BLK-bit
// increment after the speculative sum.
//
// Interface: a, b, cin in; sum, cout (true carry out of the top bit) out.
// err is high when at least one block was corrected in this addition and
// err_blk marks which; err_blk[0] is always 0, since block 0 takes cin
// directly and cannot be wrong. Purely combinational, no latency.
//
// The carry-lookahead organisation and the presence of error detection and
// correction inside the adder follow the design description. The block size
// and the nature of the errors it corrects (missed speculative carries
// between blocks) are this implementation's own choices; the description
// does not say how the correction works.
module ec_cla #(
  parameter int unsigned W   = 64,
  parameter int unsigned BLK = 8,
  localparam int unsigned NB = W / BLK
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          cin,
  output logic [W-1:0]  sum,
  output logic          cout,
  output logic          err,
  output logic [NB-1:0] err_blk
);

  if (BLK < 1 || (W % BLK) != 0) begin : g_bad_block
    $error("ec_cla: W must be a multiple of BLK");
  end

  // Carry into position lo+k given carry c0 into position lo, as the flat
  // lookahead sum of products over g[lo +: k] and p[lo +: k].
  function automatic logic lookahead(input logic [W-1:0] g, input logic [W-1:0] p,
                                     input logic c0, input int lo, input int k);
    logic c;
    logic prop;
    c    = 1'b0;
    for (int m = 0; m < k; m++) begin
      prop = 1'b1;
      for (int l = m + 1; l < k; l++) prop &= p[lo + l];
      c |= g[lo + m] & prop;
    end
    prop = 1'b1;
    for (int l = 0; l < k; l++) prop &= p[lo + l];
    c |= c0 & prop;
    return c;
  endfunction

  logic [W-1:0]  g, p;
  logic [W-1:0]  gb, pb;       // block generate / propagate, bits NB-1:0 used
  logic [NB:0]   c_true;       // true carry into each block, c_true[NB] = cout
  logic [NB-1:0] c_spec;       // speculated carry into each block
  logic [W-1:0]  s_spec;       // sum with speculated block carries

  assign g = a & b;
  assign p = a ^ b;

  // Block generate and propagate.
  always_comb begin
    gb = '0;
    pb = '0;
    for (int j = 0; j < NB; j++) begin
      gb[j] = lookahead(g, p, 1'b0, j * BLK, BLK);
      pb[j] = &p[j*BLK +: BLK];
    end
  end

  // Speculative block carries and the speculative sum.
  always_comb begin
    s_spec = '0;
    for (int j = 0; j < NB; j++) begin
      c_spec[j] = (j == 0) ? cin : gb[j-1];
      for (int k = 0; k < BLK; k++) begin
        s_spec[j*BLK + k] = p[j*BLK + k] ^ lookahead(g, p, c_spec[j], j * BLK, k);
      end
    end
  end

  // Block-level lookahead: true carry into every block.
  always_comb begin
    for (int j = 0; j <= NB; j++) begin
      c_true[j] = lookahead(gb, pb, cin, 0, j);
    end
  end

  // Error detection and correction.
  always_comb begin
    for (int j = 0; j < NB; j++) begin
      err_blk[j]           = c_true[j] & ~c_spec[j];
      sum[j*BLK +: BLK]    = s_spec[j*BLK +: BLK] + BLK'(err_blk[j]);
    end
  end

  assign err  = |err_blk;
  assign cout = c_true[NB];

  // The speculated carry is never above the true one.
  always_comb begin
    assert ((c_spec & ~c_true[NB-1:0]) == '0)
      else $error("ec_cla: speculated carry above true carry");
  end

endmodule
