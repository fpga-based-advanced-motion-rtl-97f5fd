// tb_fx_mult: self-checking test of the fixed-point multiplier.
//
// Drives random and corner-case operand pairs (including products that
// saturate in both directions and negative products that exercise rounding
// toward minus infinity) and compares each result, one clock later, with a
// product computed here in 64-bit integer arithmetic. Also checks that
// out_valid follows in_valid with one clock of latency.
module tb_fx_mult;
  localparam int BW = 24, FRAC = 12;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [BW-1:0] a = '0, b = '0, p;
  int checks = 0, failures = 0;

  fx_mult #(.BW(BW), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_mul(longint x, longint y);
    longint r = (x * y) >>> FRAC;
    if (r > 64'sd8388607) r = 64'sd8388607;
    if (r < -64'sd8388608) r = -64'sd8388608;
    return r;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic one(input logic signed [BW-1:0] x, input logic signed [BW-1:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check("out_valid after 1 clock", longint'(out_valid), 1);
    check($sformatf("%0d * %0d", x, y), longint'(p), ref_mul(longint'(x), longint'(y)));
    @(negedge clk);
    check("out_valid drops", longint'(out_valid), 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    one(24'sd4096, 24'sd4096);           // 1.0 * 1.0
    one(-24'sd4096, 24'sd6144);          // -1.0 * 1.5
    one(-24'sd1, 24'sd1);                // tiny negative rounds down to -1 LSB
    one(24'sd8388607, 24'sd8388607);     // saturate high
    one(-24'sd8388608, 24'sd8388607);    // saturate low
    one(-24'sd8388608, -24'sd8388608);   // saturate high from two negatives
    for (int k = 0; k < 300; k++) begin
      logic signed [BW-1:0] x, y;
      x = BW'($urandom);
      y = (k % 2 == 0) ? BW'($signed($urandom_range(0, 16383)) - 8192) : BW'($urandom);
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
