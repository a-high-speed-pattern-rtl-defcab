// pixel_memory: the padding block's inner pixel memory for one macroblock.
//
// N x N pixels held in registers so that a whole row or a whole column can be
// reached in one cycle, as line-by-line padding in both directions needs.
//
// Padding port (used in hor_pad / vert_pad): dir and line select a row
// (dir = DIR_ROW, line = row number) or a column (DIR_COL, line = column
// number). Pixel i of the selected line sits at bit i+1 of the (N+2)-bit
// addresses; bits 0 and N+1 are the added border positions, whose pixel
// value reads as zero.
//   - addr_rd1 / addr_rd2 are thermometer codes; the source read is the
//     lowest set bit. pixel_rd1 / pixel_rd2 are combinational reads.
//   - addr_wr is a write mask: when wr_en is high, every pixel of the line
//     whose mask bit is set takes pixel_wr at the clock edge.
// Stream port (used in load / store): ld_en writes row ld_row with ld_data at
// the clock edge; st_data is a combinational read of row st_row.
//
// The two-read / masked-write port follows the published block diagram; the
// register implementation, the row/column port and the stream port are this
// design's choices. Contents are not reset: the load phase writes every row
// before any is read.
module pixel_memory
  import padding_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                       clk,
  // padding port
  input  line_dir_e                  dir,
  input  logic [LW-1:0]              line,
  input  logic [N+1:0]               addr_rd1,
  input  logic [N+1:0]               addr_rd2,
  output logic [PIX_W-1:0]           pixel_rd1,
  output logic [PIX_W-1:0]           pixel_rd2,
  input  logic                       wr_en,
  input  logic [N+1:0]               addr_wr,
  input  logic [PIX_W-1:0]           pixel_wr,
  // stream port
  input  logic                       ld_en,
  input  logic [LW-1:0]              ld_row,
  input  logic [N-1:0][PIX_W-1:0]    ld_data,
  input  logic [LW-1:0]              st_row,
  output logic [N-1:0][PIX_W-1:0]    st_data
);

  logic [PIX_W-1:0] mem [N][N];   // mem[row][column]

  logic [N-1:0][PIX_W-1:0] cur_line;
  logic [N+1:0]            oh_rd1, oh_rd2;

  // the selected row or column
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      cur_line[i] = (dir == DIR_ROW) ? mem[line][i] : mem[i][line];
    end
  end

  // lowest set bit of each thermometer address
  assign oh_rd1 = addr_rd1 & ~(addr_rd1 << 1);
  assign oh_rd2 = addr_rd2 & ~(addr_rd2 << 1);

  always_comb begin
    pixel_rd1 = '0;
    pixel_rd2 = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (oh_rd1[i+1]) pixel_rd1 = pixel_rd1 | cur_line[i];
      if (oh_rd2[i+1]) pixel_rd2 = pixel_rd2 | cur_line[i];
    end
  end

  always_ff @(posedge clk) begin
    if (ld_en) begin
      for (int unsigned i = 0; i < N; i++) mem[ld_row][i] <= ld_data[i];
    end else if (wr_en) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (addr_wr[i+1]) begin
          if (dir == DIR_ROW) mem[line][i] <= pixel_wr;
          else                mem[i][line] <= pixel_wr;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) st_data[i] = mem[st_row][i];
  end

endmodule
