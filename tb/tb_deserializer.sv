// tb_deserializer: self-checking test of the scalar-to-vector deserializer.
//
// Feeds several sets of N = 5 random values, with random idle gaps between
// valid inputs, and checks that (a) vec_valid pulses exactly one clock after
// the N-th input of each set and never otherwise, (b) vec then holds the set
// in arrival order (element 0 first), and (c) vec does not change while a new
// set is being collected.
module tb_deserializer;
  localparam int N = 5, BW = 24;
  logic clk = 0, rst = 1, in_valid = 0, vec_valid;
  logic signed [BW-1:0] din = '0;
  logic signed [BW-1:0] vec [N];
  logic signed [BW-1:0] expv [N];   // what vec must show now
  logic signed [BW-1:0] stage [N];  // set being collected
  int checks = 0, failures = 0;

  deserializer #(.N(N), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < N; m++) expv[m] = '0;
    for (int set = 0; set < 40; set++) begin
      for (int m = 0; m < N; m++) begin
        int gap;
        gap = $urandom_range(0, 3);
        for (int g = 0; g < gap; g++) begin
          in_valid = 0;
          @(negedge clk);
          check("no vec_valid while collecting", longint'(vec_valid), 0);
          for (int q = 0; q < N; q++) check("vec holds", longint'(vec[q]), longint'(expv[q]));
        end
        din = BW'($urandom); in_valid = 1;
        if (m == N - 1) begin
          logic signed [BW-1:0] lastv;
          lastv = din;
          @(negedge clk);
          in_valid = 0;
          check("vec_valid one clock after N-th input", longint'(vec_valid), 1);
          stage[N-1] = lastv;
          expv = stage;
          for (int q = 0; q < N; q++) check($sformatf("set %0d element %0d", set, q), longint'(vec[q]), longint'(expv[q]));
        end else begin
          stage[m] = din;
          @(negedge clk);
          check("no early vec_valid", longint'(vec_valid), 0);
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
