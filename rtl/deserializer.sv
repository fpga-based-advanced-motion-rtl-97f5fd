// deserializer: turns a stream of N scalars into one N x 1 vector.
//
// The structure is a chain of N-1 shift registers followed by a bank of N
// output registers that share one clock enable. Each valid input shifts the
// chain; when the N-th element arrives, the clock enable loads the whole bank
// at once: element 0 (the first received) from the end of the chain, element
// N-1 straight from the input. The clock enable comes from an element counter
// compared with N-1, so the vector only changes after a full set of N
// elements. Flip-flop count is BW*(2N-1) for the data plus the counter.
//
// In the engine, the stream is the N row sums C[k] of one matrix column, and
// the vector is that column's contribution to u_ff,j+1.
//
// Timing: vec and vec_valid change one clock after the N-th valid input; vec
// then holds until the next set is complete. in_valid may have gaps.
module deserializer #(
  parameter int unsigned N  = noilc_pkg::N_DEFAULT,
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [BW-1:0] din,
  output logic                 vec_valid,
  output logic signed [BW-1:0] vec [N]
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic signed [BW-1:0] chain [N-1];
  logic [CW-1:0]        cnt;
  logic                 ce;

  assign ce = in_valid && (cnt == CW'(N - 1));

  // Shift chain: no reset needed, every stage is written before it is loaded
  // into the output bank.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      chain[0] <= din;
      for (int m = 1; m < int'(N) - 1; m++) chain[m] <= chain[m-1];
    end
  end

  // Element counter and clock-enable pulse.
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      vec_valid <= 1'b0;
    end else begin
      vec_valid <= ce;
      if (in_valid) cnt <= ce ? '0 : cnt + 1'b1;
    end
  end

  // Output bank with common clock enable.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < int'(N); m++) vec[m] <= '0;
    end else if (ce) begin
      for (int m = 0; m < int'(N) - 1; m++) vec[m] <= chain[int'(N)-2-m];
      vec[N-1] <= din;
    end
  end

  initial assert (N >= 2) else $fatal(1, "deserializer: N must be at least 2");

endmodule
