// tb_noilc_learning: closed-loop learning run of the NOILC engine at its
// default size (N = 325) over 20 iterations.
//
// The testbench plays the part of the motion system. The closed loop from
// feedforward to position is a convolution with an impulse response PS(t)
// (here a model of this testbench's own: PS(0) = 0, PS(t) = 0.02*t*0.95^t, a
// smooth, delayed, well-damped response), so the error of iteration j is
//
//     e_j = e_0 - PS * u_ff,j
//
// where e_0 is the error the feedback loop alone leaves (a smooth pulse, also
// this testbench's own choice). The learning filters are computed here from
// PS with weights W_e = I, W_f = 0.01*I, W_df = 0:
//
//     M = PS'*PS + 0.01*I,   L = M^-1 * PS',   Q = M^-1 * PS'*PS
//
// by Gaussian elimination in real arithmetic, rounded to the engine's 24-bit
// format and preloaded. Each error sample is computed from the feedforward
// samples the engine has already put out (PS(0) = 0 keeps this causal), so
// the loop is closed through the hardware.
//
// Checks: every feedforward sample equals a bit-exact fixed-point reference
// of the engine; the first iteration's feedforward is zero; the error 2-norm
// after 20 iterations is below 30 % of the first iteration's, and the
// feedforward changes from iteration to iteration shrink (the learning
// converges).
module tb_noilc_learning;
  localparam int N = noilc_pkg::N_DEFAULT;
  localparam int ITERS = 20;
  localparam int BW = 24, FRAC = 12;
  localparam int CW = (N > 1) ? $clog2(N) : 1, AW = $clog2(N * N);
  localparam longint MAXV = 64'sd8388607, MINV = -64'sd8388608;
  localparam real ONE = 4096.0;

  logic clk = 0, rst = 1;
  logic coef_we_l = 0, coef_we_q = 0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [BW-1:0] coef_wdata = '0;
  logic sample_en = 0;
  logic signed [BW-1:0] e_in = '0;
  logic signed [BW-1:0] uff_out;
  logic uff_valid, busy, uff_vec_valid;
  logic [CW-1:0] sample_idx;
  logic [noilc_pkg::ITER_W-1:0] iteration;

  noilc_top dut (.*);

  always #5 clk = ~clk;

  real ps [N];          // impulse response PS(t)
  real e0 [N];          // error without feedforward
  real m [N][3*N];      // augmented system [M | PS' | PS'PS]
  longint lq [N][N];    // quantised L, row-major
  longint qq [N][N];    // quantised Q
  longint u [N], un [N], e [N];
  real enorm [ITERS];
  real dnorm [ITERS];
  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint clamp(longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  function automatic longint fmul(longint x, longint y);
    return clamp((x * y) >>> FRAC);
  endfunction

  function automatic longint quant(real x);
    return clamp(longint'($rtoi(x * ONE + ((x >= 0.0) ? 0.5 : -0.5))));
  endfunction

  // PS matrix element (row r, column c): lower-triangular Toeplitz.
  function automatic real psm(int r, int c);
    return (r >= c) ? ps[r-c] : 0.0;
  endfunction

  task automatic compute_filters();
    // Augmented system [M | PS' | PS'PS] with M = PS'PS + 0.01 I, reduced once
    // by Gaussian elimination; the solutions are L (first block) and Q.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real g;
        g = 0.0;
        for (int t = (r > c ? r : c); t < N; t++) g += psm(t, r) * psm(t, c);
        m[r][c]       = g + ((r == c) ? 0.01 : 0.0);
        m[r][N + c]   = psm(c, r);
        m[r][2*N + c] = g;
      end
    for (int p = 0; p < N; p++)
      for (int r = p + 1; r < N; r++) begin
        real f;
        f = m[r][p] / m[p][p];
        if (f != 0.0) for (int k = p; k < 3 * N; k++) m[r][k] -= f * m[p][k];
      end
    for (int c = N; c < 3 * N; c++)
      for (int r = N - 1; r >= 0; r--) begin
        real s;
        s = m[r][c];
        for (int k = r + 1; k < N; k++) s -= m[r][k] * m[k][c];
        m[r][c] = s / m[r][r];
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        lq[r][c] = quant(m[r][N + c]);
        qq[r][c] = quant(m[r][2*N + c]);
      end
  endtask

  initial begin
    for (int t = 0; t < N; t++) begin
      ps[t] = (t == 0) ? 0.0 : 0.02 * t * (0.95 ** t);
      e0[t] = 3.0 * $exp(-(((t - 60.0) / 25.0) ** 2)) - 1.5 * $exp(-(((t - 160.0) / 30.0) ** 2));
    end
    compute_filters();
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        // L and Q share the address and data bus: write them on separate clocks.
        coef_we_l = 1; coef_we_q = 0; coef_addr = AW'(c * N + r); coef_wdata = BW'(lq[r][c]);
        @(negedge clk);
        coef_we_l = 0; coef_we_q = 1; coef_wdata = BW'(qq[r][c]);
        @(negedge clk);
      end
    coef_we_q = 0;
    repeat (2) @(negedge clk);

    for (int k = 0; k < N; k++) u[k] = 0;
    for (int it = 0; it < ITERS; it++) begin
      real en, dn;
      en = 0.0;
      for (int i = 0; i < N; i++) begin
        real y;
        y = 0.0;
        for (int t = 0; t < i; t++) y += ps[i-t] * (real'(u[t]) / ONE);  // PS(0) = 0
        e[i] = quant(e0[i] - y);
        en += (real'(e[i]) / ONE) ** 2;
        while (busy) @(negedge clk);
        sample_en = 1; e_in = BW'(e[i]);
        @(negedge clk);
        sample_en = 0;
        check($sformatf("uff_out it %0d i %0d", it, i), longint'(uff_out), u[i]);
      end
      enorm[it] = $sqrt(en);
      // Bit-exact reference of the engine for the next iteration.
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          longint c;
          c = clamp(fmul(e[i], lq[k][i]) + fmul(u[i], qq[k][i]));
          un[k] = (i == 0) ? c : clamp(un[k] + c);
        end
      dn = 0.0;
      for (int k = 0; k < N; k++) begin
        dn += ((real'(un[k]) - real'(u[k])) / ONE) ** 2;
        u[k] = un[k];
      end
      dnorm[it] = $sqrt(dn);
      $display("iteration %0d: |e| = %f  |u_next - u| = %f", it + 1, enorm[it], dnorm[it]);
    end
    // Wait for the last vector and compare it as well.
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int k = 0; k < N; k++) check("final u_ff vector", longint'(dut.uff_vec[k]), u[k]);
    check("error reduced below 30 % of the first iteration", longint'(enorm[ITERS-1] < 0.3 * enorm[0]), 1);
    check("feedforward update shrinks", longint'(dnorm[ITERS-1] < 0.1 * dnorm[0]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
