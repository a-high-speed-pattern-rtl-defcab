// tb_pixel_memory: checks the inner pixel memory against an array model.
// Loads random rows through the stream port, then mixes random row and
// column accesses: two thermometer-addressed reads (the end positions must
// read zero), masked line writes, and row reads on the store port.
module tb_pixel_memory;
  import padding_pkg::*;
  localparam int N  = 16;
  localparam int LW = 4;
  localparam int W  = N + 2;

  logic clk = 1'b0;
  line_dir_e dir;
  logic [LW-1:0] line, ld_row, st_row;
  logic [W-1:0] addr_rd1, addr_rd2, addr_wr;
  logic [PIX_W-1:0] pixel_rd1, pixel_rd2, pixel_wr;
  logic wr_en, ld_en;
  logic [N-1:0][PIX_W-1:0] ld_data, st_data;
  int checks = 0, failures = 0;

  pixel_memory #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PIX_W-1:0] m [N][N];

  function automatic logic [PIX_W-1:0] at(input line_dir_e d, input int l, input int i);
    return (d == DIR_ROW) ? m[l][i] : m[i][l];
  endfunction

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    wr_en = 0; ld_en = 0; dir = DIR_ROW; line = '0; addr_rd1 = '1; addr_rd2 = '1;
    addr_wr = '0; pixel_wr = '0; ld_row = '0; st_row = '0; ld_data = '0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      ld_en = 1; ld_row = LW'(r);
      for (int i = 0; i < N; i++) begin ld_data[i] = PIX_W'($urandom); m[r][i] = ld_data[i]; end
    end
    @(negedge clk);
    ld_en = 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int p1 = $urandom_range(W - 1), p2 = $urandom_range(W - 1), l = $urandom_range(N - 1);
      @(negedge clk);
      dir = line_dir_e'($urandom_range(1));
      line = LW'(l);
      addr_rd1 = '1 << p1;
      addr_rd2 = '1 << p2;
      st_row = LW'($urandom_range(N - 1));
      #1;
      expect_eq("rd1", int'(pixel_rd1), (p1 == 0 || p1 == W - 1) ? 0 : int'(at(dir, l, p1 - 1)));
      expect_eq("rd2", int'(pixel_rd2), (p2 == 0 || p2 == W - 1) ? 0 : int'(at(dir, l, p2 - 1)));
      begin
        automatic int bad = 0;
        for (int i = 0; i < N; i++) if (st_data[i] != m[st_row][i]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("store row %0d: %0d pixels wrong", st_row, bad);
        end
      end
      // masked write
      wr_en = ($urandom_range(1) == 1);
      addr_wr = W'($urandom);
      pixel_wr = PIX_W'($urandom);
      if (wr_en) for (int i = 0; i < N; i++) if (addr_wr[i+1]) begin
        if (dir == DIR_ROW) m[l][i] = pixel_wr; else m[i][l] = pixel_wr;
      end
      @(negedge clk);
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
