// tb_serializer: self-checking test of the down-sampling serializer.
//
// Over four iterations of N = 5 steps, a new random vector is presented and
// changed again right after the first step of each iteration (the serializer
// must have taken its own copy). Each step must put the next element on dout
// one clock later, with a dout_valid pulse; between steps dout holds.
module tb_serializer;
  localparam int N = 5, BW = 24;
  logic clk = 0, rst = 1, step = 0, first = 0, dout_valid;
  logic signed [BW-1:0] vec [N];
  logic signed [BW-1:0] dout;
  logic signed [BW-1:0] snap [N];
  int checks = 0, failures = 0;

  serializer #(.N(N), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < N; m++) vec[m] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check("reset dout", longint'(dout), 0);
    for (int it = 0; it < 4; it++) begin
      for (int m = 0; m < N; m++) begin vec[m] = BW'($urandom); snap[m] = vec[m]; end
      for (int i = 0; i < N; i++) begin
        step = 1; first = (i == 0);
        @(negedge clk);
        step = 0; first = 0;
        if (i == 0) for (int m = 0; m < N; m++) vec[m] = BW'($urandom);
        check("dout_valid", longint'(dout_valid), 1);
        check($sformatf("iteration %0d element %0d", it, i), longint'(dout), longint'(snap[i]));
        for (int g = 0; g < int'($urandom_range(1, 4)); g++) begin
          @(negedge clk);
          check("dout holds between steps", longint'(dout), longint'(snap[i]));
          check("no dout_valid between steps", longint'(dout_valid), 0);
        end
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
