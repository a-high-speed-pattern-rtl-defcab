// tb_first_zero_detector: checks the first-zero detector against a loop that
// scans each input from bit 0 upwards and sets every output bit from the
// first '0' on. Covers all-ones, all-zeros, every single-zero position, the
// detector example (input 1011 gives 1100) and random vectors.
module tb_first_zero_detector;
  localparam int W = 18;
  logic [W-1:0] din, therm;
  int checks = 0, failures = 0;

  first_zero_detector #(.W(W)) dut (.din, .therm);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(input logic [W-1:0] v);
    logic [W-1:0] r = '0;
    logic seen = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (!v[i]) seen = 1'b1;
      r[i] = seen;
    end
    return r;
  endfunction

  task automatic check(input logic [W-1:0] v);
    din = v;
    #1;
    checks++;
    if (therm !== model(v)) begin
      failures++;
      $display("din=%b therm=%b expected %b", v, therm, model(v));
    end
  endtask

  initial begin
    logic [3:0] small_in, small_out;
    check('1);
    check('0);
    for (int i = 0; i < W; i++) check(~(W'(1) << i));
    for (int i = 0; i < 2000; i++) check(W'($urandom));
    // the 4-bit example: input 1 0 1 1 (left to right) gives 1 1 0 0
    din = {{(W-4){1'b1}}, 4'b1011};
    #1;
    small_out = therm[3:0];
    small_in  = din[3:0];
    checks++;
    if (small_out !== 4'b1100) begin
      failures++;
      $display("example %b gave %b", small_in, small_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
