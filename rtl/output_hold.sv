// output_hold: keeps the finished feedforward vector u_ff,j+1 for a whole
// iteration.
//
// A two-way switch in front of a register bank: when sel_new is high (the
// accumulator has just added the N-th column) the bank takes the accumulator
// output, otherwise it takes its own previous value. The vector therefore
// stays constant from the end of one iteration's computation to the end of
// the next, while the serializer reads it out. It resets to zero, so the
// feedforward signal of the first iteration is zero.
//
// Timing: dout and the updated pulse change one clock after sel_new.
module output_hold #(
  parameter int unsigned N  = noilc_pkg::N_DEFAULT,
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sel_new,
  input  logic signed [BW-1:0] din [N],
  output logic signed [BW-1:0] dout [N],
  output logic                 updated
);

  always_ff @(posedge clk) begin
    if (rst) begin
      updated <= 1'b0;
      for (int m = 0; m < int'(N); m++) dout[m] <= '0;
    end else begin
      updated <= sel_new;
      for (int m = 0; m < int'(N); m++) dout[m] <= sel_new ? din[m] : dout[m];
    end
  end

endmodule
