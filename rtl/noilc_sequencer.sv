// noilc_sequencer: rate conversion and address generation for the NOILC engine.
//
// The position error arrives once per sample period Ts, but the engine has
// only one multiplier per filter matrix, so each sample must be multiplied
// with the N elements of its matrix column one after another. On every sample
// strobe this block starts a burst of N coefficient reads at addresses
// col*N .. col*N+N-1 (the matrices are stored column by column), one per
// clock, and advances the sample index col. When col wraps from N-1 to 0 one
// iteration (one pass of the repeated motion) is complete and the iteration
// counter increments.
//
// It also produces u_load, the strobe delayed by one clock, at which the
// freshly serialized u_ff,j[i] is taken into its upsampler, and busy, which
// stays high until the burst has passed through the whole pipeline (N +
// PIPE_LAT clocks after the strobe). A strobe while busy is high is illegal
// and flagged by an assertion; the shortest sample period is therefore
// N + PIPE_LAT + 1 clocks.
//
// Timing: strobe at cycle s; ram_rd is high at cycles s+1 .. s+N; u_load at
// s+1; busy at s+1 .. s+N+PIPE_LAT. col and iter_start describe the sample
// the next strobe will take. Letting the sample period be any length of at
// least that minimum (instead of exactly N clocks) is this implementation's
// choice.
module noilc_sequencer #(
  parameter int unsigned N      = noilc_pkg::N_DEFAULT,
  parameter int unsigned ITER_W = noilc_pkg::ITER_W,
  localparam int unsigned CW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW    = $clog2(N * N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_en,
  output logic              ram_rd,
  output logic [AW-1:0]     ram_addr,
  output logic              u_load,
  output logic [CW-1:0]     col,
  output logic              iter_start,
  output logic [ITER_W-1:0] iteration,
  output logic              busy
);

  import noilc_pkg::PIPE_LAT;

  localparam int unsigned BUSY_CYCLES = N + PIPE_LAT;
  localparam int unsigned BCW         = $clog2(BUSY_CYCLES + 1);

  logic [CW-1:0]  col_q;      // sample index taken by the next strobe
  logic [AW-1:0]  base_q;     // col_q * N, first address of that column
  logic [AW-1:0]  addr_q;
  logic [CW-1:0]  row_q;
  logic           running;
  logic [BCW-1:0] busy_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      col_q     <= '0;
      base_q    <= '0;
      addr_q    <= '0;
      row_q     <= '0;
      running   <= 1'b0;
      busy_cnt  <= '0;
      u_load    <= 1'b0;
      iteration <= '0;
    end else begin
      u_load <= sample_en;
      if (sample_en) begin
        running  <= 1'b1;
        row_q    <= '0;
        addr_q   <= base_q;
        busy_cnt <= BCW'(BUSY_CYCLES);
        if (col_q == CW'(N - 1)) begin
          col_q     <= '0;
          base_q    <= '0;
          iteration <= iteration + 1'b1;
        end else begin
          col_q  <= col_q + 1'b1;
          base_q <= base_q + AW'(N);
        end
      end else begin
        if (running) begin
          addr_q <= addr_q + 1'b1;
          row_q  <= row_q + 1'b1;
          if (row_q == CW'(N - 1)) running <= 1'b0;
        end
        if (busy_cnt != '0) busy_cnt <= busy_cnt - 1'b1;
      end
    end
  end

  assign ram_rd     = running;
  assign ram_addr   = addr_q;
  assign col        = col_q;
  assign iter_start = (col_q == '0);
  assign busy       = (busy_cnt != '0);

  // A new sample may only arrive once the previous column has left the pipeline.
  always_ff @(posedge clk) begin
    if (!rst && sample_en)
      assert (!busy) else $error("noilc_sequencer: sample strobe while busy");
  end

endmodule
