// tb_padding_block: end-to-end test of the padding block at its default size
// (16 x 16 macroblock, 8-bit pixels).
//
// Each test streams one macroblock in, lets the block pad it, and compares
// every pixel of the streamed-out result with a reference computed here
// directly from the definition of repetitive padding (for each non-object
// pixel, look left and right for the nearest object pixels; average of the
// two, or copy of the one, or untouched if the line has none; first along the
// rows, then along the columns with every non-empty row counting as object).
// It also checks the padding time: every row and column costs its number of
// holes plus one cycle, holes being counted with an object pixel added at
// both ends of the line.
//
// Directed macroblocks: the timing example (one row 1100011100011000, all
// others full, 4 cycles for that row), an empty and a full macroblock, single
// object pixels. Then random macroblocks of varying density, with random
// gaps on the input stream and random back-pressure on the output stream.
// The test counts how often each mechanism happened (averaged fill, copy
// from either end, empty line skipped, full line, input gap, output stall)
// and fails a mechanism that never did.
module tb_padding_block;
  import padding_pkg::*;

  localparam int N = 16;
  localparam int NUM_RANDOM = 300;
  localparam int EXAMPLE_CYCLES = 4;   // holes + 1 of the example row

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [N-1:0][PIX_W-1:0] in_pix, out_pix;
  logic [N-1:0] in_shape;
  pad_state_e state;

  padding_block dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed on the design
  int n_avg = 0, n_copy_right = 0, n_copy_left = 0, n_empty_line = 0, n_full_line = 0;
  int n_in_gap = 0, n_out_stall = 0, n_pad_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (state == ST_HOR_PAD || state == ST_VERT_PAD) begin
      n_pad_cycles++;
      if (dut.pix_wr_en) begin
        if (dut.addr_rd1 == dut.first_bit_addr)     n_copy_right++;
        else if (dut.addr_rd2 == dut.last_bit_addr) n_copy_left++;
        else                                        n_avg++;
      end else begin
        if (dut.shape_rd_fsm[N:1] == '0) n_empty_line++;
        // a line that arrived already full (not one just finished)
      end
    end
    if (state == ST_LOAD && !in_valid) n_in_gap++;
    if (out_valid && !out_ready)       n_out_stall++;
  end

  // reference model
  typedef logic [PIX_W-1:0] mb_t [N][N];
  typedef logic             sh_t [N][N];

  function automatic void pad_line(ref logic [PIX_W-1:0] p[N], input logic s[N]);
    logic [PIX_W-1:0] q[N];
    for (int x = 0; x < N; x++) begin
      int l = -1, r = -1;
      q[x] = p[x];
      if (s[x]) continue;
      for (int k = x - 1; k >= 0; k--) if (s[k]) begin l = k; break; end
      for (int k = x + 1; k < N; k++)  if (s[k]) begin r = k; break; end
      if (l >= 0 && r >= 0) q[x] = PIX_W'((int'(p[l]) + int'(p[r])) / 2);
      else if (l >= 0)      q[x] = p[l];
      else if (r >= 0)      q[x] = p[r];
    end
    p = q;
  endfunction

  function automatic int line_cycles(input logic s[N]);
    int holes = 0, ones = 0;
    logic prev = 1'b1;
    for (int k = 0; k < N; k++) begin
      if (s[k]) ones++;
      if (!s[k] && prev) holes++;
      prev = s[k];
    end
    if (ones == 0 || ones == N) return 1;
    return holes + 1;
  endfunction

  function automatic void reference(input mb_t pin, input sh_t sin, output mb_t pout, output int cycles);
    logic [PIX_W-1:0] line[N];
    logic s[N];
    logic rowfull[N];
    cycles = 0;
    pout = pin;
    for (int y = 0; y < N; y++) begin
      int any = 0;
      for (int x = 0; x < N; x++) begin line[x] = pout[y][x]; s[x] = sin[y][x]; any += s[x]; end
      cycles += line_cycles(s);
      pad_line(line, s);
      for (int x = 0; x < N; x++) pout[y][x] = line[x];
      rowfull[y] = (any != 0);
    end
    for (int x = 0; x < N; x++) begin
      for (int y = 0; y < N; y++) begin line[y] = pout[y][x]; s[y] = rowfull[y]; end
      cycles += line_cycles(s);
      pad_line(line, s);
      for (int y = 0; y < N; y++) pout[y][x] = line[y];
    end
  endfunction

  int gap_pct = 0, stall_pct = 0;

  task automatic run_mb(input mb_t pin, input sh_t sin, input string name);
    mb_t exp_p;
    int exp_cycles, start_pad, bad, full_lines;
    reference(pin, sin, exp_p, exp_cycles);
    // count lines that arrive already full
    full_lines = 0;
    for (int y = 0; y < N; y++) begin
      int ones = 0;
      for (int x = 0; x < N; x++) ones += sin[y][x];
      if (ones == N) full_lines++;
    end
    n_full_line += full_lines;
    // load
    for (int y = 0; y < N; y++) begin
      while ($urandom_range(99) < gap_pct) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      for (int x = 0; x < N; x++) begin in_pix[x] <= pin[y][x]; in_shape[x] <= sin[y][x]; end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    start_pad = n_pad_cycles;
    // store
    for (int y = 0; y < N; y++) begin
      do begin
        out_ready <= ($urandom_range(99) >= stall_pct);
        @(posedge clk);
      end while (!(out_valid && out_ready));
      bad = 0;
      for (int x = 0; x < N; x++) if (out_pix[x] !== exp_p[y][x]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("%s: row %0d has %0d wrong pixels", name, y, bad);
      end
      checks++;
      if (out_last !== (y == N - 1)) begin
        failures++;
        $display("%s: out_last wrong on row %0d", name, y);
      end
    end
    out_ready <= 1'b0;
    checks++;
    if (n_pad_cycles - start_pad != exp_cycles) begin
      failures++;
      $display("%s: padding took %0d cycles, expected %0d", name, n_pad_cycles - start_pad, exp_cycles);
    end
  endtask

  mb_t p;
  sh_t s;

  task automatic rand_pixels();
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) p[y][x] = PIX_W'($urandom);
  endtask

  initial begin
    automatic int hor0;
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_pix = '0; in_shape = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // timing example: row 0 = 1100011100011000 (pixel 15 .. pixel 0), rest full
    rand_pixels();
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) s[y][x] = 1'b1;
    for (int x = 0; x < N; x++) s[0][x] = 1'(16'b1100011100011000 >> x);
    hor0 = n_pad_cycles;
    fork
      run_mb(p, s, "timing example");
      begin
        wait (state == ST_HOR_PAD);
        @(posedge clk);
        while (state == ST_HOR_PAD && dut.pix_line == 0) @(posedge clk);
        checks++;
        if (n_pad_cycles - hor0 != EXAMPLE_CYCLES) begin
          failures++;
          $display("timing example: row took %0d cycles, expected %0d", n_pad_cycles - hor0, EXAMPLE_CYCLES);
        end
      end
    join

    // empty and full macroblocks
    rand_pixels();
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) s[y][x] = 1'b0;
    run_mb(p, s, "empty");
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) s[y][x] = 1'b1;
    run_mb(p, s, "full");

    // a single object pixel at the corners and the middle
    foreach (s[y, x]) s[y][x] = 1'b0;
    s[0][0] = 1'b1;   rand_pixels(); run_mb(p, s, "corner 0,0");
    s[0][0] = 1'b0; s[N-1][N-1] = 1'b1; rand_pixels(); run_mb(p, s, "corner N-1,N-1");
    s[N-1][N-1] = 1'b0; s[N/2-1][N/2+1] = 1'b1; rand_pixels(); run_mb(p, s, "middle");

    // random macroblocks with gaps and stalls
    for (int t = 0; t < NUM_RANDOM; t++) begin
      automatic int dens = $urandom_range(100);
      gap_pct   = (t % 3 == 0) ? 30 : 0;
      stall_pct = (t % 4 == 1) ? 40 : 0;
      rand_pixels();
      for (int y = 0; y < N; y++) begin
        automatic int rd = (t % 5 == 0 && $urandom_range(3) == 0) ? 0 : dens;   // some empty rows
        for (int x = 0; x < N; x++) s[y][x] = ($urandom_range(99) < rd);
      end
      run_mb(p, s, $sformatf("random %0d", t));
    end

    $display("mechanisms: avg=%0d copy_right=%0d copy_left=%0d empty_line=%0d full_line=%0d in_gap=%0d out_stall=%0d",
             n_avg, n_copy_right, n_copy_left, n_empty_line, n_full_line, n_in_gap, n_out_stall);
    checks++; if (n_avg == 0)        begin failures++; $display("averaged fill never happened"); end
    checks++; if (n_copy_right == 0) begin failures++; $display("copy from the right end never happened"); end
    checks++; if (n_copy_left == 0)  begin failures++; $display("copy from the left end never happened"); end
    checks++; if (n_empty_line == 0) begin failures++; $display("empty line never skipped"); end
    checks++; if (n_full_line == 0)  begin failures++; $display("full line never seen"); end
    checks++; if (n_in_gap == 0)     begin failures++; $display("input gap never happened"); end
    checks++; if (n_out_stall == 0)  begin failures++; $display("output stall never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
