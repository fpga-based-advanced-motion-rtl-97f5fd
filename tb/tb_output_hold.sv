// tb_output_hold: self-checking test of the Switch2 + delay vector hold.
//
// Checks the zero reset value, that a new vector is taken only when sel_new
// is high (with the updated pulse one clock later), and that the vector stays
// unchanged over many clocks in which the input keeps changing.
module tb_output_hold;
  localparam int N = 6, BW = 24;
  logic clk = 0, rst = 1, sel_new = 0, updated;
  logic signed [BW-1:0] din [N];
  logic signed [BW-1:0] dout [N];
  logic signed [BW-1:0] expv [N];
  int checks = 0, failures = 0;

  output_hold #(.N(N), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < N; m++) begin din[m] = BW'($urandom); expv[m] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < N; m++) check("reset value", longint'(dout[m]), 0);
    for (int r = 0; r < 30; r++) begin
      int idle;
      idle = $urandom_range(1, 8);
      for (int k = 0; k < idle; k++) begin
        for (int m = 0; m < N; m++) din[m] = BW'($urandom);
        @(negedge clk);
        check("no update pulse", longint'(updated), 0);
        for (int m = 0; m < N; m++) check("holds", longint'(dout[m]), longint'(expv[m]));
      end
      for (int m = 0; m < N; m++) begin din[m] = BW'($urandom); expv[m] = din[m]; end
      sel_new = 1;
      @(negedge clk);
      sel_new = 0;
      check("update pulse", longint'(updated), 1);
      for (int m = 0; m < N; m++) check("takes new vector", longint'(dout[m]), longint'(expv[m]));
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
