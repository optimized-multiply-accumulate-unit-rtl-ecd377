// mac_top_tb: end-to-end test of the multiply-accumulate unit at its default
// size (32-bit operands, 64-bit accumulator).
//
// First it replays the reference run of the unit: after a cleared start the
// operand pairs (8,17), (17,7), (17,17) are each held for two clocks and
// (5,2) for four, and the accumulator must read 136, 272, 391, 510, 799, 1088,
// 1098, 1108, 1118, 1128 after successive edges. Then it runs random signed
// operands with occasional clears, comparing out after every rising edge with
// a model (out <= en ? out + a*b : 0, modulo 2^64), which also checks the
// one-clock latency. It counts how often each mechanism occurred - an
// accumulation, a clear, a negative product, a carry-speculation correction
// inside the adder chain, a wrap of the accumulator past the signed 64-bit
// range - and fails for any that never did.
module mac_top_tb;
  localparam int unsigned N = 32;
  localparam int unsigned W = 2 * N;

  logic         clk = 1'b0;
  logic         en;
  logic [N-1:0] a, b;
  logic [W-1:0] out;
  logic [W-1:0] model;
  int checks = 0, failures = 0;
  int n_acc = 0, n_clear = 0, n_neg = 0, n_corr = 0, n_wrap = 0;

  mac_top dut (.clk(clk), .en(en), .a(a), .b(b), .out(out));

  always #5 clk = ~clk;

  // Apply one cycle: set inputs after the falling edge, check after the rising one.
  task automatic step(input logic ten, input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic signed [W-1:0] prod;
    logic signed [W-1:0] old_m;
    @(negedge clk);
    en = ten; a = ta; b = tb_;
    prod  = $signed(ta) * $signed(tb_);
    old_m = model;
    #1;
    if (ten && dut.ec_err != '0) n_corr++;
    @(posedge clk);
    #1;
    if (ten) begin
      model = old_m + prod;
      n_acc++;
      if (prod < 0) n_neg++;
      if ((old_m[W-1] == prod[W-1]) && (model[W-1] != old_m[W-1])) n_wrap++;
    end else begin
      model = '0;
      n_clear++;
    end
    checks++;
    if (out !== model) begin
      failures++;
      $display("FAIL en=%b a=%0d b=%0d out=%0d expect=%0d",
               ten, $signed(ta), $signed(tb_), $signed(out), $signed(model));
    end
  endtask

  task automatic expect_out(input logic [W-1:0] v);
    checks++;
    if (out !== v) begin
      failures++;
      $display("FAIL reference run: out=%0d expect=%0d", out, v);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    en = 1'b0; a = '0; b = '0; model = '0;
    // Reference run.
    step(1'b0, 0, 0);              expect_out(0);
    step(1'b1, 8, 17);             expect_out(136);
    step(1'b1, 8, 17);             expect_out(272);
    step(1'b1, 17, 7);             expect_out(391);
    step(1'b1, 17, 7);             expect_out(510);
    step(1'b1, 17, 17);            expect_out(799);
    step(1'b1, 17, 17);            expect_out(1088);
    step(1'b1, 5, 2);              expect_out(1098);
    step(1'b1, 5, 2);              expect_out(1108);
    step(1'b1, 5, 2);              expect_out(1118);
    step(1'b1, 5, 2);              expect_out(1128);
    // Small signed values.
    step(1'b0, 0, 0);
    step(1'b1, -32'sd3, 32'sd7);
    step(1'b1, 32'sd5, -32'sd9);
    step(1'b1, -32'sd1, -32'sd1);
    step(1'b1, 32'h8000_0000, 32'h8000_0000);
    step(1'b1, 32'h8000_0000, 32'h7FFF_FFFF);
    // Random operands and enables.
    repeat (4000) begin
      step(1'($urandom_range(0, 31) != 0), $urandom, $urandom);
    end
    // Long runs of large products of one sign, to wrap the accumulator.
    step(1'b0, 0, 0);
    repeat (8) step(1'b1, 32'h7FFF_FFFF, 32'h7FFF_FFFF);
    repeat (8) step(1'b1, 32'h8000_0000, 32'h7FFF_FFFF);
    need("accumulations", n_acc);
    need("clears", n_clear);
    need("negative products", n_neg);
    need("adder carry corrections", n_corr);
    need("accumulator wraps", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
