// padding_pkg: types and constants shared by the repetitive-padding block.
//
// The padding block works on one macroblock of N x N pixels (N = 16 for a
// luminance macroblock). Each row or column ("line") is decoded as an
// (N+2)-bit shape vector: the N shape bits with an extra object bit ('1')
// added at each end, so that every line pattern takes the single
// "starts with 1 and has holes" form. Bit 0 of that vector is the added bit
// at the right end, bit N+1 the added bit at the left end, and bit i+1 holds
// pixel i of the line.
//
// The controller has the four states load, hor_pad, vert_pad and store.
// The state encoding and the pixel width (8 bits) are this design's choices.
package padding_pkg;

  // Pixel width in bits (8-bit luminance / chrominance samples).
  localparam int unsigned PIX_W = 8;

  // Controller states: load the macroblock, pad its rows, pad its columns,
  // stream the result out.
  typedef enum logic [1:0] {
    ST_LOAD     = 2'd0,
    ST_HOR_PAD  = 2'd1,
    ST_VERT_PAD = 2'd2,
    ST_STORE    = 2'd3
  } pad_state_e;

  // Line direction used by the inner memories.
  typedef enum logic {
    DIR_ROW = 1'b0,
    DIR_COL = 1'b1
  } line_dir_e;

endpackage
