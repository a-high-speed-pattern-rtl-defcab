// shape_memory: the padding block's inner binary-alpha (shape) memory.
//
// N x N shape bits ('1' = object pixel) held in registers, read and written a
// row or a column at a time. During horizontal padding each row is written
// back as it is filled, so that after that pass a row that held any object
// pixel reads as all '1'; the vertical pass then reads columns of this
// updated shape, which is what makes it pad from the horizontally padded
// rows.
//
// Padding port: rd_dir/rd_sel select the row (DIR_ROW) or column (DIR_COL)
// read combinationally on rd_line; wr_dir/wr_sel select the line that wr_en
// writes with wr_line at the clock edge. Read and write selects are separate
// so that the controller can fetch the next line while it writes back the
// current one. Bit i of a line is pixel i. Stream port: ld_en writes row
// ld_row with ld_data at the clock edge.
//
// The memory and its shape read/write connections follow the published block
// diagram; registers, line organisation and the stream port are this
// design's choices. Contents are not reset: the load phase writes every row.
module shape_memory
  import padding_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  line_dir_e     rd_dir,
  input  logic [LW-1:0] rd_sel,
  output logic [N-1:0]  rd_line,
  input  line_dir_e     wr_dir,
  input  logic [LW-1:0] wr_sel,
  input  logic          wr_en,
  input  logic [N-1:0]  wr_line,
  input  logic          ld_en,
  input  logic [LW-1:0] ld_row,
  input  logic [N-1:0]  ld_data
);

  logic [N-1:0] mem [N];   // mem[row][column]

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      rd_line[i] = (rd_dir == DIR_ROW) ? mem[rd_sel][i] : mem[i][rd_sel];
    end
  end

  always_ff @(posedge clk) begin
    if (ld_en) begin
      mem[ld_row] <= ld_data;
    end else if (wr_en) begin
      if (wr_dir == DIR_ROW) begin
        mem[wr_sel] <= wr_line;
      end else begin
        for (int unsigned i = 0; i < N; i++) mem[i][wr_sel] <= wr_line[i];
      end
    end
  end

endmodule
