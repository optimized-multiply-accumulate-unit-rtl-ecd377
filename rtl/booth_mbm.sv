// booth_mbm: radix-4 Modified Booth multiplier front end.
//
// The signed multiplier b is recoded into N/2 radix-4 digits, each in
// {-2, -1, 0, +1, +2}, taken from the overlapping bit groups
// {b[2i+1], b[2i], b[2i-1]} with b[-1] = 0. Each digit selects 0, a or 2*a
// from the signed multiplicand a, giving one partial-product row of weight
// 4^i, so the product needs N/2 rows instead of the N of a shift-and-add
// multiplier. A negative digit is formed as the one's complement of the
// selected magnitude; the missing +1 of each such row is gathered in one
// extra correction row (bit 2i set when digit i is negative), so no row
// needs an adder of its own. Every row is sign-extended to 2*N bits.
//
// Interface: a, b are N-bit two's-complement operands; pp holds N/2 + 1 rows
// of 2*N bits (row N/2 is the correction row). The 2*N-bit sum of all rows,
// modulo 2^(2N), is the signed product a*b. The bits of row i below 2i and
// the odd bits of the correction row are always zero. Purely combinational.
//
// The radix-4 recoding, the signed operands and the hand-over of the rows to
// the carry-lookahead adder follow the design description; the correction
// row for the negative digits is this implementation's choice of how the
// rows are formed.
module booth_mbm
  import mac_pkg::*;
#(
  parameter int unsigned N   = MAC_N,
  localparam int unsigned NPP = N / 2 + 1
) (
  input  logic [N-1:0]                a,
  input  logic [N-1:0]                b,
  output logic [NPP-1:0][2*N-1:0]     pp
);

  // The recoding pairs the multiplier bits, so the width must be even.
  if (N < 4 || (N % 2) != 0) begin : g_bad_width
    $error("booth_mbm: N must be even and at least 4");
  end

  logic [N:0]   b_ext;   // {b, b[-1] = 0}
  logic [N:0]   a_one;   // a, sign-extended to N+1 bits
  logic [N:0]   a_two;   // 2*a in N+1 bits

  assign b_ext = {b, 1'b0};
  assign a_one = {a[N-1], a};
  assign a_two = {a, 1'b0};

  always_comb begin
    booth_digit_t   d;
    logic [N:0]     mag;
    logic [N:0]     row;
    logic [2*N-1:0] row_ext;
    pp[NPP-1] = '0;
    for (int i = 0; i < N / 2; i++) begin
      d = booth_recode(b_ext[2*i +: 3]);
      unique case (d.sel)
        SEL_ONE: mag = a_one;
        SEL_TWO: mag = a_two;
        default: mag = '0;
      endcase
      row     = d.neg ? ~mag : mag;
      row_ext = {{(N - 1){row[N]}}, row};
      pp[i]   = row_ext << (2 * i);
      pp[NPP-1][2*i] = d.neg;
    end
  end

endmodule
