// ec_cla_tb: self-checking test of the error-correctable carry-lookahead adder.
//
// Applies random operands, operands built so that a carry runs through one or
// more whole blocks (the case the speculation misses), and all-ones / zero
// corners. For each it checks the corrected sum and carry-out against the
// simulator's own addition, and checks the per-block error flags against a
// reference: block j is in error when the true carry into it is one while
// the carry the block below produces on its own (carry-in zero) is zero.
// It fails if no correction was ever exercised.
module ec_cla_tb;
  localparam int unsigned W   = 64;
  localparam int unsigned BLK = 8;
  localparam int unsigned NB  = W / BLK;

  logic [W-1:0]  a, b, sum;
  logic          cin, cout, err;
  logic [NB-1:0] err_blk;
  int checks = 0, failures = 0, corrections = 0;

  ec_cla dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .err(err), .err_blk(err_blk));

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0]    full;
    logic [NB-1:0] e_exp;
    logic [BLK:0]  lo_sum;
    logic          c_true_j, c_spec_j;
    a = ta; b = tb_; cin = tc;
    #1;
    full = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    e_exp = '0;
    for (int j = 1; j < NB; j++) begin
      // true carry into block j: bit j*BLK of the sum of the low parts
      c_true_j = ((W+1)'(ta & ((W'(1) << (j*BLK)) - 1)) + (W+1)'(tb_ & ((W'(1) << (j*BLK)) - 1))
                  + (W+1)'(tc)) >> (j*BLK) != 0;
      lo_sum   = {1'b0, ta[(j-1)*BLK +: BLK]} + {1'b0, tb_[(j-1)*BLK +: BLK]};
      c_spec_j = lo_sum[BLK];
      e_exp[j] = c_true_j & ~c_spec_j;
    end
    checks += 3;
    if (sum !== full[W-1:0]) begin
      failures++;
      $display("FAIL sum a=%h b=%h cin=%b got=%h expect=%h", ta, tb_, tc, sum, full[W-1:0]);
    end
    if (cout !== full[W]) begin
      failures++;
      $display("FAIL cout a=%h b=%h cin=%b", ta, tb_, tc);
    end
    if (err_blk !== e_exp || err !== |e_exp) begin
      failures++;
      $display("FAIL err a=%h b=%h got=%b expect=%b", ta, tb_, err_blk, e_exp);
    end
    if (err) corrections++;
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);                 // carry through every block
    check_one('1, 64'd1, 1'b0);
    check_one('1, '1, 1'b1);
    check_one(64'h0000_0000_0000_00FF, 64'h0000_0000_0000_0001, 1'b0);
    check_one(64'h00FF_FF00_FFFF_FF80, 64'h0000_0000_0000_0080, 1'b0);
    repeat (3000) check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // Operands whose sum is all ones in some blocks, with a carry arriving.
    repeat (3000) begin
      logic [W-1:0] x, y;
      x = {$urandom, $urandom};
      y = ~x;
      for (int j = 0; j < NB; j++)
        if ($urandom_range(0, 2) == 0) y[j*BLK +: BLK] = {$urandom} [BLK-1:0];
      check_one(x, y, 1'($urandom));
    end
    checks++;
    if (corrections == 0) begin
      failures++;
      $display("FAIL no correction exercised");
    end
    $display("corrections exercised: %0d", corrections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
