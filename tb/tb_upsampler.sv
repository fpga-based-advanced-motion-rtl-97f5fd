// tb_upsampler: self-checking test of the sample-and-hold upsampler.
//
// Loads a random sample, then checks that the output equals it one clock
// later and stays equal for a random number of clocks without load, as the
// multiplier needs for the N clocks of a column. Also checks reset to zero.
module tb_upsampler;
  localparam int BW = 24;
  logic clk = 0, rst = 1, load = 0;
  logic signed [BW-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  upsampler #(.BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic signed [BW-1:0] held;
    din = 24'sd1234;
    repeat (2) @(negedge clk);
    check("reset value", longint'(dout), 0);
    rst = 0;
    for (int k = 0; k < 100; k++) begin
      int hold_len;
      @(negedge clk);
      held = BW'($urandom); din = held; load = 1;
      @(negedge clk);
      load = 0;
      check("takes din", longint'(dout), longint'(held));
      hold_len = $urandom_range(1, 12);
      for (int h = 0; h < hold_len; h++) begin
        din = BW'($urandom);
        @(negedge clk);
        check("holds while load is low", longint'(dout), longint'(held));
      end
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
