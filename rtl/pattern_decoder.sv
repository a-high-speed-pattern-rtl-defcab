// pattern_decoder: the shape-line decoder of the padding block.
//
// Input a is one shape line of N+2 bits: the N shape bits of a row or column
// in bits 1..N, with an added object bit ('1') in bit 0 and bit N+1. With the
// added bits every line is a run of object bits with zero or more holes, and
// the decoder finds the rightmost hole each time it is used:
//   b = first-zero code of a           (thermometer, '1' from the first hole)
//   c = a NAND b                       ('0' at the object bits left of it)
//   d = first-zero code of c           (thermometer from the second source,
//                                       the object bit that ends the hole)
//   e = b XOR d                        (the hole itself: destination mask)
// b is '1' from the first hole bit upwards; shifted right by one bit it marks
// the first source address (the object bit to the right of the hole).
// That shift is done outside this module.
//
// next is '1' when there is nothing left to pad in the line: its N shape
// bits are all '1' (padded) or all '0' (an empty line, left untouched).
// Then the controller moves on to the next line.
//
// Interface: combinational, no clock. The structure (two first-zero
// detectors, a NAND stage and an XOR stage) follows the published decoder.
// Which of the two added bits the 'next' test looks at is this design's
// choice: it tests only the N real shape bits.
module pattern_decoder #(
  parameter int unsigned N = 16   // pixels per line
) (
  input  logic [N+1:0] a,   // shape line with the added '1' bits at 0 and N+1
  output logic [N+1:0] b,   // first-zero code of a
  output logic [N+1:0] d,   // second source address, thermometer code
  output logic [N+1:0] e,   // destination (write-enable) mask
  output logic         next // line finished: all '1' or all '0'
);

  logic [N+1:0] c;

  first_zero_detector #(.W(N+2)) u_fzd_a (.din(a), .therm(b));

  assign c = ~(a & b);

  first_zero_detector #(.W(N+2)) u_fzd_c (.din(c), .therm(d));

  assign e    = b ^ d;
  assign next = (&a[N:1]) | ~(|a[N:1]);

endmodule
