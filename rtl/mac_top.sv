// mac_top: signed multiply-accumulate unit, out <= out + a*b each enabled cycle.
//
// Three parts in a loop: the radix-4 Modified Booth multiplier (booth_mbm)
// turns a and b into N/2 + 1 partial-product rows; a chain of error-correctable
// carry-lookahead adders (ec_cla) adds those rows to the running sum fed back
// from the accumulator register; the register (data_storage) stores the new
// sum, which is also the output. Each adder of the chain corrects its own
// carry-speculation errors, so the sum is exact every cycle.
//
// Interface: clk; en (high: accumulate a*b on every rising edge; low: clear
// the accumulator to zero on the edge); a, b N-bit two's-complement
// operands; out the 2*N-bit accumulated result, wrapping modulo 2^(2N).
// Timing: the product of the a, b present before a rising edge is in out just
// after it, one accumulation per clock.
//
// The block structure (multiplier, carry-lookahead adder with feedback,
// storage register), N = 32, the 2*N-bit output, the single-cycle
// accumulation and the port list clk, en, a, b, out follow the design
// description. Adding the partial-product rows and the running sum with a
// chain of two-input adders, the adder's block size BLK and clearing on a
// low enable are this implementation's choices.
//
// ec_err collects the correction flags of the adders. It is not a port, to
// keep the interface at clk, en, a, b, out; testbenches read it through the
// hierarchy, so lint reports it as unused here.
module mac_top
  import mac_pkg::*;
#(
  parameter int unsigned N   = MAC_N,
  parameter int unsigned BLK = 8,
  localparam int unsigned W   = 2 * N,
  localparam int unsigned NPP = N / 2 + 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [W-1:0]  out
);

  logic [NPP-1:0][W-1:0] pp;        // partial-product rows
  logic [NPP:0][W-1:0]   part;      // part[0] = accumulator, part[i+1] = part[i] + pp[i]
  logic [NPP-1:0]        ec_err;    // adder i corrected a speculative carry
  logic [W-1:0]          acc_next;

  booth_mbm #(.N(N)) u_mbm (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  assign part[0] = out;

  for (genvar i = 0; i < NPP; i++) begin : g_add
    logic                cout_unused;
    logic [W/BLK-1:0]    err_blk_unused;
    ec_cla #(.W(W), .BLK(BLK)) u_cla (
      .a       (part[i]),
      .b       (pp[i]),
      .cin     (1'b0),
      .sum     (part[i+1]),
      .cout    (cout_unused),
      .err     (ec_err[i]),
      .err_blk (err_blk_unused)
    );
  end

  assign acc_next = part[NPP];

  data_storage #(.W(W)) u_acc (
    .clk (clk),
    .en  (en),
    .d   (acc_next),
    .q   (out)
  );

endmodule
