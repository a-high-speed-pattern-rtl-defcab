// first_zero_detector: thermometer code of the first '0' of a bit vector,
// scanning from the right end (bit 0) towards the left end (bit W-1).
//
// Output bit i is '1' when any input bit at position 0..i is '0', so the
// output is '0' up to the first zero and '1' from that zero leftwards.
// In the transistor-level original, a pass-transistor chain carries ground
// from the right end until a '0' input switches the node to the supply, and
// the supply then propagates through the rest of the chain. Here the same
// function is written as a prefix OR of the inverted input, which a
// synthesis tool maps to a carry-chain-like structure.
//
// Interface: purely combinational, W-bit in, W-bit out, no clock.
module first_zero_detector #(
  parameter int unsigned W = 18   // 16 shape bits plus the two added '1' bits
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] therm
);

  assign therm[0] = ~din[0];

  for (genvar i = 1; i < W; i++) begin : g_chain
    assign therm[i] = therm[i-1] | ~din[i];
  end

endmodule
