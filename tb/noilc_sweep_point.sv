// noilc_sweep_point: one size point of the matrix-size sweep testbench.
//
// Builds the NOILC engine at N samples per iteration, loads a random L and an
// all-zero Q (so the engine computes the single matrix-vector product L*e),
// streams two iterations of random errors at the minimum sample period, and
// checks the latched vector after each iteration, and the played-out samples
// of the second iteration, against L*e computed here with the engine's
// fixed-point rules. Raises done when finished and reports its counts.
module noilc_sweep_point #(
  parameter int N = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int BW = 24, FRAC = 12;
  localparam int CW = (N > 1) ? $clog2(N) : 1, AW = $clog2(N * N);
  localparam longint MAXV = 64'sd8388607, MINV = -64'sd8388608;

  logic rst = 1;
  logic coef_we_l = 0, coef_we_q = 0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [BW-1:0] coef_wdata = '0;
  logic sample_en = 0;
  logic signed [BW-1:0] e_in = '0;
  logic signed [BW-1:0] uff_out;
  logic uff_valid, busy, uff_vec_valid;
  logic [CW-1:0] sample_idx;
  logic [noilc_pkg::ITER_W-1:0] iteration;

  noilc_top #(.N(N)) dut (.*);

  longint lm [N][N];
  longint e [N];
  longint exp_vec [N];

  function automatic longint clamp(longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) lm[r][c] = longint'($urandom_range(0, 8191)) - 4096;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        coef_we_l = 1; coef_we_q = 0; coef_addr = AW'(c * N + r); coef_wdata = BW'(lm[r][c]);
        @(negedge clk);
        coef_we_l = 0; coef_we_q = 1; coef_wdata = '0;
        @(negedge clk);
      end
    coef_we_q = 0;
    for (int k = 0; k < N; k++) exp_vec[k] = 0;
    for (int it = 0; it < 2; it++) begin
      for (int i = 0; i < N; i++) e[i] = longint'($urandom_range(0, 32767)) - 16384;
      for (int i = 0; i < N; i++) begin
        while (busy) @(negedge clk);
        sample_en = 1; e_in = BW'(e[i]);
        @(negedge clk);
        sample_en = 0;
        check($sformatf("uff_out it %0d i %0d", it, i), longint'(uff_out), exp_vec[i]);
      end
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          longint c;
          c = clamp(clamp((e[i] * lm[k][i]) >>> FRAC) + 0);
          exp_vec[k] = (i == 0) ? c : clamp(exp_vec[k] + c);
        end
      while (busy) @(negedge clk);
      @(negedge clk);
      for (int k = 0; k < N; k++) check($sformatf("L*e it %0d [%0d]", it, k), longint'(dut.uff_vec[k]), exp_vec[k]);
    end
    done = 1;
  end
endmodule
