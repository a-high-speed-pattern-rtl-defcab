// pixel_select: computes the value written into the pixels of a hole.
//
// The two source pixels (rd1 to the right of the hole, rd2 to the left) are
// added. Normally the hole is filled with their average, i.e. the sum
// shifted right by one bit. When one of the sources is an added border bit,
// whose luminance reads as zero, the hole lies at an end of the line and is
// filled by copying the other source, i.e. with the unshifted sum.
//
// Whether a source is an added bit is found by comparing its thermometer
// address with the addresses of the first bit (bit 0, the code with every bit
// set) and the last bit (bit N+1, only the top bit set). The two comparison
// results are combined by exclusive OR and steer the multiplexer: if both
// sources were added bits the line is empty and is never padded.
//
// Interface: combinational. addr_rd1/addr_rd2 are (N+2)-bit thermometer codes
// whose lowest set bit is the source position. The comparators, adder,
// shifter and multiplexer follow the published datapath; the average rounds
// down (sum >> 1), as the shifted sum gives.
module pixel_select
  import padding_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N+1:0]     addr_rd1,
  input  logic [N+1:0]     addr_rd2,
  input  logic [N+1:0]     first_bit_addr,
  input  logic [N+1:0]     last_bit_addr,
  input  logic [PIX_W-1:0] pixel_rd1,
  input  logic [PIX_W-1:0] pixel_rd2,
  output logic [PIX_W-1:0] pixel_wr
);

  logic           src1_is_border;
  logic           src2_is_border;
  logic           use_sum;
  logic [PIX_W:0] sum;

  assign src1_is_border = (addr_rd1 == first_bit_addr);
  assign src2_is_border = (addr_rd2 == last_bit_addr);
  assign use_sum        = src1_is_border ^ src2_is_border;

  assign sum      = {1'b0, pixel_rd1} + {1'b0, pixel_rd2};
  assign pixel_wr = use_sum ? sum[PIX_W-1:0] : sum[PIX_W:1];

endmodule
