// tb_pixel_select: checks the pixel selector. For random source positions
// (thermometer codes) and pixel values it expects the average
// (p1 + p2) >> 1 when both sources are inside the line, and the sum (the
// copy of the one real source, the other reading as zero) when exactly one
// source is an added end bit. Includes the averaging example 33 and 25 -> 29.
module tb_pixel_select;
  import padding_pkg::*;
  localparam int N = 16;
  localparam int W = N + 2;
  logic [W-1:0] addr_rd1, addr_rd2, first_bit_addr, last_bit_addr;
  logic [PIX_W-1:0] pixel_rd1, pixel_rd2, pixel_wr;
  int checks = 0, failures = 0;

  pixel_select #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] therm(input int pos);
    return '1 << pos;
  endfunction

  task automatic check(input int s1, input int s2, input int p1, input int p2);
    int exp;
    addr_rd1 = therm(s1);
    addr_rd2 = therm(s2);
    pixel_rd1 = (s1 == 0) ? 8'd0 : PIX_W'(p1);
    pixel_rd2 = (s2 == W - 1) ? 8'd0 : PIX_W'(p2);
    if (s1 == 0)          exp = p2;
    else if (s2 == W - 1) exp = p1;
    else                  exp = (p1 + p2) / 2;
    #1;
    checks++;
    if (pixel_wr !== PIX_W'(exp)) begin
      failures++;
      $display("src %0d/%0d pix %0d/%0d: got %0d expected %0d", s1, s2, p1, p2, pixel_wr, exp);
    end
  endtask

  initial begin
    first_bit_addr = '1;
    last_bit_addr  = therm(W - 1);
    check(4, 8, 25, 33);
    check(0, 5, 0, 25);
    check(12, W - 1, 25, 0);
    check(3, 9, 255, 255);
    check(0, 1, 0, 255);
    check(16, W - 1, 255, 0);
    for (int i = 0; i < 3000; i++) begin
      automatic int s1 = $urandom_range(W - 3);
      automatic int s2 = $urandom_range((s1 == 0) ? W - 2 : W - 1, s1 + 2);
      check(s1, s2, $urandom_range(255), $urandom_range(255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
