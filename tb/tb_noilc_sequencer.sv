// tb_noilc_sequencer: self-checking test of the rate/address sequencer.
//
// With N = 4, issues strobes at the minimum legal period and at longer random
// periods for three iterations. For each strobe it checks: exactly N reads on
// the N clocks after the strobe, at addresses col*N + 0 .. col*N + N-1
// (column order); u_load one clock after the strobe; busy high for exactly
// N + PIPE_LAT clocks; the sample index wrapping at N; iter_start on sample 0
// only; and the iteration counter.
module tb_noilc_sequencer;
  localparam int N = 4, CW = $clog2(N), AW = $clog2(N * N);
  localparam int LAT = noilc_pkg::PIPE_LAT;
  logic clk = 0, rst = 1, sample_en = 0;
  logic ram_rd, u_load, iter_start, busy;
  logic [AW-1:0] ram_addr;
  logic [CW-1:0] col;
  logic [noilc_pkg::ITER_W-1:0] iteration;
  int checks = 0, failures = 0;

  noilc_sequencer #(.N(N)) dut (.*);

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
    check("period formula", noilc_pkg::min_sample_period(N), N + LAT + 1);
    for (int it = 0; it < 3; it++) begin
      for (int i = 0; i < N; i++) begin
        int extra, busy_cycles;
        check("sample index", longint'(col), i);
        check("iter_start", longint'(iter_start), (i == 0) ? 1 : 0);
        check("iteration count", longint'(iteration), it);
        check("idle before strobe", longint'(busy), 0);
        sample_en = 1;
        @(negedge clk);
        sample_en = 0;
        busy_cycles = 0;
        check("u_load one clock after strobe", longint'(u_load), 1);
        for (int k = 0; k < N; k++) begin
          check("read issued", longint'(ram_rd), 1);
          check($sformatf("address it %0d col %0d row %0d", it, i, k), longint'(ram_addr), i * N + k);
          if (busy) busy_cycles++;
          @(negedge clk);
          if (k == 0) check("u_load is one clock", longint'(u_load), 0);
        end
        check("reads stop after N", longint'(ram_rd), 0);
        while (busy) begin busy_cycles++; @(negedge clk); end
        check("busy length", busy_cycles, N + LAT);
        extra = (it == 1) ? 0 : $urandom_range(0, 6);
        repeat (extra) begin
          @(negedge clk);
          check("no read while idle", longint'(ram_rd), 0);
        end
      end
    end
    check("iteration after three", longint'(iteration), 3);
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
