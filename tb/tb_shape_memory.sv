// tb_shape_memory: checks the inner shape memory against an array model:
// rows loaded through the stream port, then random row and column reads on
// the look-ahead port together with row and column writes on the write port.
module tb_shape_memory;
  import padding_pkg::*;
  localparam int N  = 16;
  localparam int LW = 4;

  logic clk = 1'b0;
  line_dir_e rd_dir, wr_dir;
  logic [LW-1:0] rd_sel, wr_sel, ld_row;
  logic [N-1:0] rd_line, wr_line, ld_data;
  logic wr_en, ld_en;
  int checks = 0, failures = 0;

  shape_memory #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m [N][N];

  initial begin
    logic [N-1:0] exp;
    wr_en = 0; ld_en = 0; rd_dir = DIR_ROW; wr_dir = DIR_ROW;
    rd_sel = '0; wr_sel = '0; wr_line = '0; ld_row = '0; ld_data = '0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      ld_en = 1; ld_row = LW'(r); ld_data = N'($urandom);
      for (int i = 0; i < N; i++) m[r][i] = ld_data[i];
    end
    @(negedge clk);
    ld_en = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_dir = line_dir_e'($urandom_range(1));
      rd_sel = LW'($urandom_range(N - 1));
      #1;
      for (int i = 0; i < N; i++) exp[i] = (rd_dir == DIR_ROW) ? m[rd_sel][i] : m[i][rd_sel];
      checks++;
      if (rd_line !== exp) begin
        failures++;
        $display("read %s %0d: %b expected %b", rd_dir.name(), rd_sel, rd_line, exp);
      end
      wr_en = ($urandom_range(1) == 1);
      wr_dir = line_dir_e'($urandom_range(1));
      wr_sel = LW'($urandom_range(N - 1));
      wr_line = N'($urandom);
      if (wr_en) for (int i = 0; i < N; i++) begin
        if (wr_dir == DIR_ROW) m[wr_sel][i] = wr_line[i]; else m[i][wr_sel] = wr_line[i];
      end
      @(negedge clk);
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
