// serializer: down-samples the held feedforward vector and plays it out one
// element per sample period.
//
// At the first sample of an iteration (step and first both high) the vector
// is copied into a local register bank (the down-sampling: the vector is
// taken once per iteration) and element 0 goes to dout. On every later step
// the bank shifts by one and the next element goes to dout. dout is both the
// feedforward output of the engine, u_ff,j[i], and the u_ff,j[i] that the Q
// path multiplies.
//
// Timing: dout and dout_valid change one clock after step. Between steps dout
// holds. The vector must be stable in the cycle of the first step.
module serializer #(
  parameter int unsigned N  = noilc_pkg::N_DEFAULT,
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 step,
  input  logic                 first,
  input  logic signed [BW-1:0] vec [N],
  output logic signed [BW-1:0] dout,
  output logic                 dout_valid
);

  logic signed [BW-1:0] bank [N-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      for (int m = 0; m < int'(N) - 1; m++) bank[m] <= '0;
    end else begin
      dout_valid <= step;
      if (step) begin
        if (first) begin
          dout <= vec[0];
          for (int m = 0; m < int'(N) - 1; m++) bank[m] <= vec[m+1];
        end else begin
          dout <= bank[0];
          for (int m = 0; m < int'(N) - 2; m++) bank[m] <= bank[m+1];
          bank[N-2] <= '0;
        end
      end
    end
  end

endmodule
