// data_storage_tb: self-checking test of the accumulator register.
//
// Clocks the register with random data and a random enable and checks after
// every rising edge that it loaded d when en was high and cleared to zero
// when en was low, and that q does not change between edges.
module data_storage_tb;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;

  data_storage dut (.clk(clk), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    en = 1'b0; d = '0;
    repeat (500) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      d  = {$urandom, $urandom};
      model = en ? d : '0;
      // Before the edge q still holds the previous value.
      #1;
      d = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL en=%b d=%h q=%h", en, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
