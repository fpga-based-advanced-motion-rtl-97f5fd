// tb_noilc_full: the NOILC engine at its full default size (N = 325 samples
// per iteration, 24-bit words), run through three complete iterations.
//
// Same procedure and checks as the small end-to-end test: random L and Q are
// preloaded (2 x 105625 words), three iterations of 325 random position
// errors are streamed in (the third near full scale to force saturation), and
// every feedforward sample, every finished u_ff vector and the pipeline
// timing (column vector N+4 clocks after its strobe, u_ff vector N+5 clocks
// after the last strobe) are compared with a reference computed here with the
// same fixed-point rules. The mechanisms of the design (preload, zero
// feedforward in the first iteration, accumulator clear, vector update,
// Q-path feedback, saturation, waiting on busy, minimum-period strobes) are
// counted and each must occur.
module tb_noilc_full;
  localparam int N = noilc_pkg::N_DEFAULT;
  localparam int ITERS = 3;
  localparam int BW = 24, FRAC = 12;
  localparam int CW = (N > 1) ? $clog2(N) : 1, AW = $clog2(N * N);
  localparam int LAT = noilc_pkg::PIPE_LAT;
  localparam longint MAXV = 64'sd8388607, MINV = -64'sd8388608;

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

  longint lm [N][N];   // lm[row][col]
  longint qm [N][N];
  longint u [N];       // u_ff,j
  longint e [N];       // e_j
  longint acc [N];
  int checks = 0, failures = 0, clips = 0;
  int n_preload = 0, n_zero_ff = 0, n_acc_clear = 0, n_vec_update = 0;
  int n_q_feedback = 0, n_busy_wait = 0, n_min_period = 0;
  longint cycle = 0, last_strobe = -1000, vec_update_cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint clamp(longint v);
    if (v > MAXV) begin clips++; return MAXV; end
    if (v < MINV) begin clips++; return MINV; end
    return v;
  endfunction

  function automatic longint fmul(longint x, longint y);
    return clamp((x * y) >>> FRAC);
  endfunction

  // Counters watching the design's internal events.
  always @(posedge clk) begin
    if (!rst && dut.col_valid && dut.acc_count == '0 && dut.u_acc.stored[0] != '0) n_acc_clear++;
    if (!rst && uff_vec_valid) begin n_vec_update++; vec_update_cycle = cycle; end
    if (!rst && dut.pq_valid && dut.pq != '0) n_q_feedback++;
  end

  // Column-vector and u_ff-vector latency, measured from each strobe.
  longint strobe_cycle [$];
  always @(posedge clk) begin
    if (!rst && sample_en) strobe_cycle.push_back(cycle);
    if (!rst && dut.col_valid) begin
      longint s;
      s = strobe_cycle.pop_front();
      check("column vector N+4 clocks after strobe", cycle - s, N + LAT);
    end
  end

  task automatic strobe(input longint ev, input longint exp_u, input int it, input int i);
    // A strobe that comes too early waits while busy; count the stall.
    if (busy) n_busy_wait++;
    while (busy) @(negedge clk);
    if (cycle - last_strobe == N + LAT + 1) n_min_period++;
    check("sample index", longint'(sample_idx), i);
    check("iteration counter", longint'(iteration), it);
    sample_en = 1; e_in = BW'(ev);
    last_strobe = cycle;
    @(negedge clk);
    sample_en = 0; e_in = BW'($urandom);
    check("uff_valid one clock after strobe", longint'(uff_valid), 1);
    check($sformatf("uff_out it %0d i %0d", it, i), longint'(uff_out), exp_u);
    if (it == 0 && uff_out == '0) n_zero_ff++;
  endtask

  initial begin
    // Reference coefficients, kept moderate so that most sums stay in range.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        lm[r][c] = longint'($urandom_range(0, 8191)) - 4096;   // +-1.0
        qm[r][c] = longint'($urandom_range(0, 4095)) - 2048;   // +-0.5
      end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // Preload, column order: address = col*N + row.
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        coef_we_l = 1; coef_we_q = 0; coef_addr = AW'(c * N + r); coef_wdata = BW'(lm[r][c]);
        @(negedge clk);
        coef_we_l = 0; coef_we_q = 1; coef_wdata = BW'(qm[r][c]);
        @(negedge clk);
        n_preload += 2;
      end
    coef_we_q = 0;
    repeat (2) @(negedge clk);

    for (int m = 0; m < N; m++) u[m] = 0;
    for (int it = 0; it < ITERS; it++) begin
      // Errors: iteration 2 uses near-full-scale values to drive saturation.
      for (int i = 0; i < N; i++)
        e[i] = (it == 2) ? ((i % 2) ? MAXV - longint'($urandom_range(0, 1000)) : MINV + longint'($urandom_range(0, 1000)))
                         : longint'($urandom_range(0, 65535)) - 32768;   // +-8.0
      for (int i = 0; i < N; i++) begin
        bit early;
        early = (i % 3 == 1);
        strobe(e[i], u[i], it, i);
        if (!early) begin
          // idle for a random time (possibly none beyond busy)
          int extra;
          extra = (it == 1) ? 0 : $urandom_range(0, 3);
          while (busy) @(negedge clk);
          repeat (extra) @(negedge clk);
        end else begin
          // come back straight away: the next strobe must wait on busy
          @(negedge clk);
        end
      end
      // Reference for the next iteration, column by column as the hardware does.
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          longint c;
          c = clamp(fmul(e[i], lm[k][i]) + fmul(u[i], qm[k][i]));
          acc[k] = (i == 0) ? c : clamp(acc[k] + c);
        end
      // Wait for the last column, then check the latched vector and its timing.
      begin
        longint t0;
        t0 = last_strobe;
        while (n_vec_update != it + 1) @(negedge clk);
        check("u_ff vector latched N+5 clocks after last strobe", vec_update_cycle - t0, N + LAT + 1);
      end
      for (int k = 0; k < N; k++) begin
        check($sformatf("u_ff vector it %0d [%0d]", it + 1, k), longint'(dut.uff_vec[k]), acc[k]);
        u[k] = acc[k];
      end
    end
    check("iteration counter at end", longint'(iteration), ITERS);

    // Every mechanism must have happened.
    check("mechanism: coefficient preload", longint'(n_preload == 2 * N * N), 1);
    check("mechanism: zero feedforward in first iteration", longint'(n_zero_ff == N), 1);
    check("mechanism: accumulator cleared by constant zero", longint'(n_acc_clear > 0), 1);
    check("mechanism: u_ff vector update", longint'(n_vec_update == ITERS), 1);
    check("mechanism: Q-path feedback", longint'(n_q_feedback > 0), 1);
    check("mechanism: saturation", longint'(clips > 0), 1);
    check("mechanism: strobe waited on busy", longint'(n_busy_wait > 0), 1);
    check("mechanism: strobes at minimum period", longint'(n_min_period > 0), 1);
    $display("mechanisms: preload=%0d zero_ff=%0d acc_clear=%0d vec_update=%0d q_feedback=%0d saturation=%0d busy_wait=%0d min_period=%0d",
             n_preload, n_zero_ff, n_acc_clear, n_vec_update, n_q_feedback, clips, n_busy_wait, n_min_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
