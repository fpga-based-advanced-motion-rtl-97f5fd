// tb_fx_add: self-checking test of the saturating product adder.
//
// Random operand pairs plus the positive and negative overflow corners are
// added and compared, one clock later, with a sum computed here with 64-bit
// integers and clamped to 24 bits. out_valid must follow in_valid by one clock.
module tb_fx_add;
  localparam int BW = 24;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [BW-1:0] a = '0, b = '0, s;
  int checks = 0, failures = 0;

  fx_add #(.BW(BW)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_add(longint x, longint y);
    longint r = x + y;
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
    check($sformatf("%0d + %0d", x, y), longint'(s), ref_add(longint'(x), longint'(y)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    one(24'sd8388607, 24'sd1);
    one(-24'sd8388608, -24'sd1);
    one(24'sd8000000, 24'sd8000000);
    one(-24'sd8000000, -24'sd8000000);
    one(24'sd100, -24'sd300);
    for (int k = 0; k < 300; k++) one(BW'($urandom), BW'($urandom));
    @(negedge clk);
    check("out_valid idle", longint'(out_valid), 0);
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
