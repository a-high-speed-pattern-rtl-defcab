// tb_padding_fsm: checks the padding controller on its own. The testbench
// plays the shape memory (an array read and written through the
// controller's selects) and the pattern decoder (a loop that finds the
// rightmost hole of the line with an object bit added at each end). For
// random shape blocks, including empty rows and empty and full blocks, it
// checks the state sequence load -> hor_pad -> vert_pad -> store -> load,
// that each line takes (holes + 1) cycles in total, that every hole is
// written once and the shape is written back filled, that the stored shape
// ends as expected (every row that had an object pixel full), and the row
// order and last flag of both streams.
module tb_padding_fsm;
  import padding_pkg::*;
  localparam int N  = 16;
  localparam int LW = 4;
  localparam int W  = N + 2;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready, out_last;
  pad_state_e state;
  line_dir_e shape_rd_dir, shape_wr_dir, pix_dir;
  logic [LW-1:0] shape_rd_sel, shape_wr_sel, pix_line, ld_row, st_row;
  logic [N-1:0] shape_rd, shape_wr;
  logic shape_wr_en, pix_wr_en, ld_en, dec_next;
  logic [W-1:0] shape_rd_fsm, dec_e, first_bit_addr, last_bit_addr;
  logic [N-1:0] ld_shape;
  int checks = 0, failures = 0;

  padding_fsm #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shape memory model
  logic sm [N][N];
  always_comb for (int i = 0; i < N; i++)
    shape_rd[i] = (shape_rd_dir == DIR_ROW) ? sm[shape_rd_sel][i] : sm[i][shape_rd_sel];
  always @(posedge clk) begin
    if (ld_en) for (int i = 0; i < N; i++) sm[ld_row][i] <= ld_shape[i];
    else if (shape_wr_en) for (int i = 0; i < N; i++)
      if (shape_wr_dir == DIR_ROW) sm[shape_wr_sel][i] <= shape_wr[i];
      else                         sm[i][shape_wr_sel] <= shape_wr[i];
  end

  // decoder model
  always_comb begin
    automatic int z = -1;
    dec_e = '0;
    for (int i = 0; i < W; i++) if (!shape_rd_fsm[i]) begin z = i; break; end
    if (z >= 0) for (int i = z; i < W && !shape_rd_fsm[i]; i++) dec_e[i] = 1'b1;
    dec_next = (shape_rd_fsm[N:1] == '0) || (shape_rd_fsm[N:1] == '1);
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  // per-cycle checks and counters
  int n_hor = 0, n_vert = 0, n_wr = 0, n_bad_wr = 0;
  pad_state_e prev_state;
  int n_bad_trans = 0;
  always @(posedge clk) if (rst_n) begin
    if (state == ST_HOR_PAD) n_hor++;
    if (state == ST_VERT_PAD) n_vert++;
    if (pix_wr_en) begin
      n_wr++;
      if (shape_wr !== (shape_rd_fsm[N:1] | dec_e[N:1]) || !shape_wr_en ||
          pix_dir !== ((state == ST_HOR_PAD) ? DIR_ROW : DIR_COL) || shape_wr_dir !== pix_dir ||
          shape_wr_sel !== pix_line || shape_rd_fsm[0] !== 1'b1 || shape_rd_fsm[W-1] !== 1'b1)
        n_bad_wr++;
    end
    if (state != prev_state &&
        !((prev_state == ST_LOAD && state == ST_HOR_PAD) || (prev_state == ST_HOR_PAD && state == ST_VERT_PAD) ||
          (prev_state == ST_VERT_PAD && state == ST_STORE) || (prev_state == ST_STORE && state == ST_LOAD)))
      n_bad_trans++;
    prev_state <= state;
  end

  function automatic int line_cycles(input logic s[N], output int holes);
    int ones = 0;
    logic prev = 1'b1;
    holes = 0;
    for (int k = 0; k < N; k++) begin
      if (s[k]) ones++;
      if (!s[k] && prev) holes++;
      prev = s[k];
    end
    if (ones == 0 || ones == N) begin holes = 0; return 1; end
    return holes + 1;
  endfunction

  initial begin
    logic sh [N][N];
    logic s [N];
    logic rowany [N];
    int exp_hor, exp_vert, exp_wr, h, h0, v0, w0, anyrow;
    rst_n = 0; in_valid = 0; out_ready = 0; ld_shape = '0; prev_state = ST_LOAD;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    expect_eq("first_bit_addr", int'(first_bit_addr == '1), 1);
    expect_eq("last_bit_addr", int'(last_bit_addr == (W'(1) << (W - 1))), 1);
    for (int t = 0; t < 200; t++) begin
      automatic int dens = (t == 0) ? 0 : (t == 1) ? 100 : $urandom_range(100);
      for (int y = 0; y < N; y++) begin
        automatic int rd = (t % 4 == 3 && $urandom_range(2) == 0) ? 0 : dens;
        for (int x = 0; x < N; x++) sh[y][x] = ($urandom_range(99) < rd);
      end
      exp_hor = 0; exp_vert = 0; exp_wr = 0; anyrow = 0;
      for (int y = 0; y < N; y++) begin
        automatic int any = 0;
        for (int x = 0; x < N; x++) begin s[x] = sh[y][x]; any += s[x]; end
        exp_hor += line_cycles(s, h); exp_wr += h;
        rowany[y] = (any != 0); anyrow += (any != 0);
      end
      for (int x = 0; x < N; x++) begin
        for (int y = 0; y < N; y++) s[y] = rowany[y];
        exp_vert += line_cycles(s, h); exp_wr += h;
      end
      h0 = n_hor; v0 = n_vert; w0 = n_wr;
      // load
      for (int y = 0; y < N; y++) begin
        @(negedge clk);
        in_valid = 1;
        for (int x = 0; x < N; x++) ld_shape[x] = sh[y][x];
        #1;
        expect_eq("in_ready", int'(in_ready), 1);
        expect_eq("ld_row", int'(ld_row), y);
      end
      @(negedge clk);
      in_valid = 0;
      wait (state == ST_STORE);
      // shape written back
      for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
        checks++;
        if (sm[y][x] !== (anyrow != 0)) begin
          failures++;
          if (failures < 10) $display("block %0d: shape %0d,%0d = %b", t, y, x, sm[y][x]);
        end
      end
      expect_eq("hor_pad cycles", n_hor - h0, exp_hor);
      expect_eq("vert_pad cycles", n_vert - v0, exp_vert);
      expect_eq("holes written", n_wr - w0, exp_wr);
      // store, with back-pressure
      for (int y = 0; y < N; y++) begin
        @(negedge clk);
        while ($urandom_range(2) == 0) begin
          out_ready = 0;
          expect_eq("out_valid held", int'(out_valid), 1);
          @(negedge clk);
        end
        out_ready = 1;
        #1;
        expect_eq("out_valid", int'(out_valid), 1);
        expect_eq("st_row", int'(st_row), y);
        expect_eq("out_last", int'(out_last), int'(y == N - 1));
      end
      @(negedge clk);
      out_ready = 0;
      expect_eq("back to load", int'(state), int'(ST_LOAD));
    end
    expect_eq("bad writes", n_bad_wr, 0);
    expect_eq("bad transitions", n_bad_trans, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
