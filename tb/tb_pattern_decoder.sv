// tb_pattern_decoder: checks the pattern decoder on shape lines with the two
// added '1' bits. The expected values come from scanning the line: the first
// '0' from the right starts the hole, the next '1' after it is the second
// source; b must be '1' from the hole's first bit up, d from the second
// source up, e exactly on the hole, and next must be high for lines whose 16
// shape bits are all '1' or all '0'. Covers the worked example (input
// ...10000111 with the added bits), the four steps of the timing example
// (111000111000110001 and its successors), and random lines.
module tb_pattern_decoder;
  localparam int N = 16;
  localparam int W = N + 2;
  logic [W-1:0] a, b, d, e;
  logic next;
  int checks = 0, failures = 0;

  pattern_decoder #(.N(N)) dut (.a, .b, .d, .e, .next);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] v);
    int z = -1, s2 = -1;
    logic [W-1:0] eb = '0, ed = '0, ee = '0;
    logic en;
    for (int i = 0; i < W; i++) if (!v[i]) begin z = i; break; end
    if (z >= 0) for (int i = z; i < W; i++) if (v[i]) begin s2 = i; break; end
    for (int i = 0; i < W; i++) begin
      eb[i] = (z >= 0) && (i >= z);
      ed[i] = (s2 >= 0) && (i >= s2);
      ee[i] = (z >= 0) && (i >= z) && (s2 < 0 || i < s2);
    end
    en = (v[N:1] == '1) || (v[N:1] == '0);
    a = v;
    #1;
    checks++;
    if (b !== eb || d !== ed || e !== ee || next !== en) begin
      failures++;
      $display("a=%b: b=%b d=%b e=%b next=%b, expected %b %b %b %b", v, b, d, e, next, eb, ed, ee, en);
    end
  endtask

  task automatic check_value(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: %b, expected %b", what, got, want);
    end
  endtask

  initial begin
    // worked example: sources at bits 2 and 7, hole at bits 3..6
    a = {1'b1, 9'b0, 8'b10000111};
    a[N+1] = 1'b1;
    #1;
    check_value("example e", e, 18'b000000000001111000);
    check_value("example d", d, 18'b111111111110000000);
    check_value("example b", b, 18'b111111111111111000);
    // timing example, step 1
    a = 18'b111000111000110001;
    #1;
    check_value("step1 b", b, 18'b111111111111111110);
    check_value("step1 d", d, 18'b111111111111110000);
    check_value("step1 e", e, 18'b000000000000001110);
    check_value("step1 next", 18'(next), 18'd0);
    check(18'b111000111000111111);
    check(18'b111000111111111111);
    a = 18'b111111111111111111;
    #1;
    check_value("step4 next", 18'(next), 18'd1);
    check(18'b100011000000001111);
    check(18'b100000000000000001);   // empty line
    for (int i = 0; i < 3000; i++) check({1'b1, 16'($urandom), 1'b1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
