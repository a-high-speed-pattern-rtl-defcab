// padding_block: repetitive-padding accelerator for one MPEG-4 macroblock.
//
// A boundary macroblock holds object pixels and non-object pixels, as marked
// by its binary alpha (shape) block. Repetitive padding fills every
// non-object pixel of a row from the nearest object pixels of that row (the
// average of the two when the pixel lies between two of them, a copy of the
// one when it lies towards an end), then does the same along the columns,
// using the rows filled so far as object pixels. Rows or columns with no
// object pixel are left untouched.
//
// The design adds an object bit at each end of every line, so that each line
// looks like a run of object bits with holes. A combinational pattern
// decoder (two first-zero detectors) finds the rightmost hole, its two
// bounding source pixels and the hole's mask in one cycle; the pixel selector
// averages the two sources, or copies one when the other is an added end bit
// (whose pixel reads as zero, so the unshifted sum is the copy). One hole is
// filled per clock cycle, and a line costs (holes + 1) cycles.
//
// Parts: padding_fsm (load / hor_pad / vert_pad / store), pattern_decoder,
// the one-bit shifter on the decoder's first output (here an assignment),
// pixel_select, pixel_memory and shape_memory.
//
// Interface: clk, rst_n (active-low, synchronous). Input stream: one row per
// in_valid & in_ready beat, in_pix[i] / in_shape[i] being pixel i of the row,
// N beats per macroblock, accepted only in the load state. Output stream: the
// N padded rows, one per out_valid & out_ready beat, out_last on the last.
// state shows the controller state. Everything about the streams is this
// design's choice; the parts and the datapath follow the published block
// diagram, except that the decoder addresses and pixel values are wired to
// the memories and the selector directly rather than through the controller.
module padding_block
  import padding_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [N-1:0][PIX_W-1:0] in_pix,
  input  logic [N-1:0]            in_shape,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    out_last,
  output logic [N-1:0][PIX_W-1:0] out_pix,
  output pad_state_e              state
);

  // controller <-> memories
  line_dir_e     shape_rd_dir, shape_wr_dir, pix_dir;
  logic [LW-1:0] shape_rd_sel, shape_wr_sel, pix_line, ld_row, st_row;
  logic [N-1:0]  shape_rd, shape_wr;
  logic          shape_wr_en, pix_wr_en, ld_en;

  // decoder
  logic [N+1:0]  shape_rd_fsm, dec_b, dec_d, dec_e;
  logic          dec_next;
  logic [N+1:0]  addr_rd1, addr_rd2, addr_wr;

  // pixel datapath
  logic [N+1:0]     first_bit_addr, last_bit_addr;
  logic [PIX_W-1:0] pixel_rd1, pixel_rd2, pixel_wr;

  padding_fsm #(.N(N), .LW(LW)) u_fsm (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .out_valid, .out_ready, .out_last,
    .state,
    .shape_rd_dir, .shape_rd_sel, .shape_rd,
    .shape_wr_dir, .shape_wr_sel, .shape_wr_en, .shape_wr,
    .shape_rd_fsm, .dec_e, .dec_next,
    .pix_dir, .pix_line, .pix_wr_en, .ld_en, .ld_row, .st_row,
    .first_bit_addr, .last_bit_addr
  );

  pattern_decoder #(.N(N)) u_decoder (
    .a(shape_rd_fsm), .b(dec_b), .d(dec_d), .e(dec_e), .next(dec_next)
  );

  // Shifter: b is '1' from the first hole bit upwards; one bit lower is the
  // object bit right of the hole, the first source.
  assign addr_rd1 = {dec_b[N+1], dec_b[N+1:1]};
  assign addr_rd2 = dec_d;
  assign addr_wr  = dec_e;

  pixel_select #(.N(N)) u_select (
    .addr_rd1, .addr_rd2, .first_bit_addr, .last_bit_addr,
    .pixel_rd1, .pixel_rd2, .pixel_wr
  );

  pixel_memory #(.N(N), .LW(LW)) u_pix_mem (
    .clk,
    .dir(pix_dir), .line(pix_line),
    .addr_rd1, .addr_rd2, .pixel_rd1, .pixel_rd2,
    .wr_en(pix_wr_en), .addr_wr, .pixel_wr,
    .ld_en, .ld_row, .ld_data(in_pix),
    .st_row, .st_data(out_pix)
  );

  shape_memory #(.N(N), .LW(LW)) u_shape_mem (
    .clk,
    .rd_dir(shape_rd_dir), .rd_sel(shape_rd_sel), .rd_line(shape_rd),
    .wr_dir(shape_wr_dir), .wr_sel(shape_wr_sel), .wr_en(shape_wr_en), .wr_line(shape_wr),
    .ld_en, .ld_row, .ld_data(in_shape)
  );

endmodule
