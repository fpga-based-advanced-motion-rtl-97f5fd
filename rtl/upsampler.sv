// upsampler: sample-and-hold that raises a slow-rate signal to the multiplier
// rate.
//
// A sample of e_j or u_ff,j arrives once per sample period Ts but has to meet
// all N elements of its matrix column, one per clock. The upsampler takes din
// when load is high and repeats it until the next load, so the multiplier
// sees the same sample for the N clocks of the column. Holding (rather than
// inserting zeros) is this implementation's reading of the up-sampling step.
//
// Timing: dout changes one clock after load. Reset clears it to zero.
module upsampler #(
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic signed [BW-1:0] din,
  output logic signed [BW-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst)       dout <= '0;
    else if (load) dout <= din;
  end

endmodule
