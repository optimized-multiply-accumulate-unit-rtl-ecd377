// booth_mbm_tb: self-checking test of the radix-4 Booth partial-product rows.
//
// Drives booth_mbm at its default width with corner operands (zero, +-1, the
// most negative value, all-ones patterns) and random ones, adds the N/2 + 1
// rows it returns and compares the 2*N-bit sum with the signed product from
// the simulator's own multiplication. It also checks each row against the
// digit the recoding rule gives for its bit group, computed here with
// arithmetic rather than the shared recoding function.
module booth_mbm_tb;
  localparam int unsigned N   = 32;
  localparam int unsigned NPP = N / 2 + 1;

  logic [N-1:0]            a, b;
  logic [NPP-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  booth_mbm dut (.a(a), .b(b), .pp(pp));

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic signed [2*N-1:0] expect_p, got, row_expect;
    logic [2:0] grp;
    int digit;
    logic [N:0] bx;
    a = ta; b = tb_;
    #1;
    got = '0;
    for (int i = 0; i < NPP; i++) got += pp[i];
    expect_p = $signed(ta) * $signed(tb_);
    checks++;
    if (got !== expect_p) begin
      failures++;
      $display("FAIL product a=%0d b=%0d got=%0d expect=%0d",
               $signed(ta), $signed(tb_), got, expect_p);
    end
    // Row i must equal digit_i * a * 4^i, apart from the +1 of negative
    // digits which sits in the correction row.
    bx = {tb_, 1'b0};
    for (int i = 0; i < N / 2; i++) begin
      grp   = bx[2*i +: 3];
      digit = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      row_expect = (64'(signed'(ta)) * digit) <<< (2 * i);
      if (digit < 0) row_expect = row_expect - (64'sd1 <<< (2 * i));
      checks++;
      if ($signed(pp[i]) !== row_expect) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h got=%h expect=%h", i, ta, tb_, pp[i], row_expect);
      end
    end
  endtask

  initial begin
    logic [N-1:0] corner [8];
    corner[0] = '0;
    corner[1] = 1;
    corner[2] = '1;                       // -1
    corner[3] = {1'b1, {(N-1){1'b0}}};    // most negative
    corner[4] = {1'b0, {(N-1){1'b1}}};    // most positive
    corner[5] = 32'h5555_5555;
    corner[6] = 32'hAAAA_AAAA;
    corner[7] = 17;
    foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j]);
    repeat (2000) check_one($urandom, $urandom);
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
