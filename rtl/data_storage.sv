// data_storage: the accumulator register of the MAC unit.
//
// A W-bit register clocked on the rising edge of clk. While en is high it
// loads d, the new running sum from the adder, every cycle; q feeds the
// value back to the adder and is the unit's output. While en is low the
// register is cleared to zero on each clock edge, which starts a new
// accumulation; there is no separate reset input.
//
// Timing: q takes the value of d one clock after it is presented.
//
// A register that holds the running sum and is fed back to the adder follows
// the design description; clearing on a low enable (instead of a reset pin)
// is this implementation's reading of the unit's simulated behaviour.
module data_storage #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (en) q <= d;
    else    q <= '0;
  end

endmodule
