// padding_fsm: controller of the repetitive-padding block.
//
// States (in this order, then back to load):
//   ST_LOAD     accepts N rows of pixels and shape bits from the input stream,
//               one row per handshake (in_valid & in_ready), into the pixel
//               and shape memories.
//   ST_HOR_PAD  pads the rows. The current row's shape sits in the shape
//               register, which feeds the pattern decoder with a '1' added
//               at each end. While the decoder's next is low, the cycle fills
//               the rightmost hole of the row: the pixel memory writes the
//               selected value under the destination mask, and the register
//               and the shape memory take shape | mask. When next is high the
//               row is finished (all '1', or all '0' and left untouched) and
//               the register loads the following row, which the shape memory
//               already presents on its look-ahead read port.
//   ST_VERT_PAD the same over the columns, reading the shape as updated by
//               the horizontal pass.
//   ST_STORE    streams the N padded rows out, one per out_valid & out_ready.
// A line therefore takes (number of holes + 1) cycles, and a macroblock
// N + N + sum of holes over all rows and columns cycles of padding.
//
// Interface: clk, active-low synchronous reset rst_n. The pixel data path is
// outside; this module drives the memories' selects and enables and the two
// constant border addresses the pixel selector compares with.
//
// The four states and the one-hole-per-cycle schedule follow the published
// controller and its timing example. The stream handshake, the look-ahead
// read and the reset behaviour are this design's choices.
module padding_fsm
  import padding_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  // output stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_last,
  // state, for observation
  output pad_state_e    state,
  // shape memory
  output line_dir_e     shape_rd_dir,
  output logic [LW-1:0] shape_rd_sel,
  input  logic [N-1:0]  shape_rd,
  output line_dir_e     shape_wr_dir,
  output logic [LW-1:0] shape_wr_sel,
  output logic          shape_wr_en,
  output logic [N-1:0]  shape_wr,
  // pattern decoder
  output logic [N+1:0]  shape_rd_fsm,  // decoder input a
  input  logic [N+1:0]  dec_e,         // destination mask
  input  logic          dec_next,
  // pixel memory
  output line_dir_e     pix_dir,
  output logic [LW-1:0] pix_line,
  output logic          pix_wr_en,
  output logic          ld_en,
  output logic [LW-1:0] ld_row,
  output logic [LW-1:0] st_row,
  // pixel selector
  output logic [N+1:0]  first_bit_addr,
  output logic [N+1:0]  last_bit_addr
);

  localparam logic [LW-1:0] LAST = LW'(N - 1);

  pad_state_e    state_q;
  logic [LW-1:0] cnt_q;       // row being loaded/stored, or line being padded
  logic [N-1:0]  shape_q;     // shape register (without the added bits)
  logic          padding;
  logic [N-1:0]  filled;      // shape register with the hole filled

  assign state    = state_q;
  assign padding  = (state_q == ST_HOR_PAD) || (state_q == ST_VERT_PAD);

  assign shape_rd_fsm = {1'b1, shape_q, 1'b1};
  assign filled       = shape_q | dec_e[N:1];

  // the added bit at the right end has every bit of its thermometer code set,
  // the one at the left end only the top bit
  assign first_bit_addr = '1;
  assign last_bit_addr  = {1'b1, {(N+1){1'b0}}};

  // streams
  assign in_ready  = (state_q == ST_LOAD);
  assign ld_en     = in_valid && in_ready;
  assign ld_row    = cnt_q;
  assign out_valid = (state_q == ST_STORE);
  assign out_last  = out_valid && (cnt_q == LAST);
  assign st_row    = cnt_q;

  // padding writes
  assign pix_dir      = (state_q == ST_VERT_PAD) ? DIR_COL : DIR_ROW;
  assign pix_line     = cnt_q;
  assign pix_wr_en    = padding && !dec_next;
  assign shape_wr_dir = pix_dir;
  assign shape_wr_sel = cnt_q;
  assign shape_wr_en  = pix_wr_en;
  assign shape_wr     = filled;

  // look-ahead read of the line the shape register loads next
  always_comb begin
    shape_rd_dir = DIR_ROW;
    shape_rd_sel = '0;
    unique case (state_q)
      ST_LOAD:     begin shape_rd_dir = DIR_ROW; shape_rd_sel = '0; end
      ST_HOR_PAD:  begin
        if (cnt_q == LAST) begin shape_rd_dir = DIR_COL; shape_rd_sel = '0; end
        else               begin shape_rd_dir = DIR_ROW; shape_rd_sel = cnt_q + 1'b1; end
      end
      ST_VERT_PAD: begin shape_rd_dir = DIR_COL; shape_rd_sel = cnt_q + 1'b1; end
      default:     begin shape_rd_dir = DIR_ROW; shape_rd_sel = '0; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_LOAD;
      cnt_q   <= '0;
      shape_q <= '0;
    end else begin
      unique case (state_q)
        ST_LOAD: begin
          if (ld_en) begin
            if (cnt_q == LAST) begin
              // row 0 was written on the first beat and is on the read port
              state_q <= ST_HOR_PAD;
              cnt_q   <= '0;
              shape_q <= shape_rd;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
        end
        ST_HOR_PAD, ST_VERT_PAD: begin
          if (!dec_next) begin
            shape_q <= filled;
          end else if (cnt_q == LAST) begin
            cnt_q   <= '0;
            shape_q <= shape_rd;
            state_q <= (state_q == ST_HOR_PAD) ? ST_VERT_PAD : ST_STORE;
          end else begin
            cnt_q   <= cnt_q + 1'b1;
            shape_q <= shape_rd;
          end
        end
        ST_STORE: begin
          if (out_ready) begin
            if (cnt_q == LAST) begin
              state_q <= ST_LOAD;
              cnt_q   <= '0;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
        end
        default: state_q <= ST_LOAD;
      endcase
    end
  end

  // a hole is written only while a line is being padded
  a_wr_only_when_padding: assert property (@(posedge clk) disable iff (!rst_n)
    pix_wr_en |-> padding);
  // the destination mask never covers an object pixel or an added bit
  a_mask_on_holes_only: assert property (@(posedge clk) disable iff (!rst_n)
    pix_wr_en |-> ((dec_e & shape_rd_fsm) == '0));

endmodule
