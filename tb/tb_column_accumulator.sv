// tb_column_accumulator: self-checking test of the column accumulator.
//
// Runs three iterations of N = 4 columns. Each column vector is random (some
// near full scale so that the saturating adders clip). The expected running
// sum is kept here: zero plus the first column of every iteration (the
// constant-zero switch), then the clamped sum of each further column. Checks
// the combinational sum while vec_valid is high, the last flag on the N-th
// column only, the column count, and that nothing changes without vec_valid.
module tb_column_accumulator;
  localparam int N = 4, BW = 24, CW = $clog2(N);
  logic clk = 0, rst = 1, vec_valid = 0, last;
  logic signed [BW-1:0] vec [N];
  logic signed [BW-1:0] sum [N];
  logic [CW-1:0] count;
  longint run [N];
  int checks = 0, failures = 0, clipped = 0;

  column_accumulator #(.N(N), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint clamp(longint v);
    if (v > 64'sd8388607) return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction

  initial begin
    for (int m = 0; m < N; m++) vec[m] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 3; it++) begin
      for (int c = 0; c < N; c++) begin
        for (int g = 0; g < int'($urandom_range(0, 2)); g++) @(negedge clk);
        for (int m = 0; m < N; m++) begin
          vec[m] = (it == 1) ? BW'($signed($urandom_range(0, 8000000)) * ((m % 2) ? -1 : 1))
                             : BW'($signed($urandom_range(0, 200000)) - 100000);
          if (c == 0) run[m] = longint'(vec[m]);
          else begin
            if (run[m] + longint'(vec[m]) != clamp(run[m] + longint'(vec[m]))) clipped++;
            run[m] = clamp(run[m] + longint'(vec[m]));
          end
        end
        vec_valid = 1;
        #1;
        check("count", longint'(count), c);
        check("last flag", longint'(last), (c == N - 1) ? 1 : 0);
        for (int m = 0; m < N; m++) check($sformatf("it %0d col %0d sum[%0d]", it, c, m), longint'(sum[m]), run[m]);
        @(negedge clk);
        vec_valid = 0;
        for (int m = 0; m < N; m++) vec[m] = BW'($urandom);
        #1;
        check("no last without vec_valid", longint'(last), 0);
      end
    end
    check("saturation exercised", longint'(clipped > 0), 1);
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
