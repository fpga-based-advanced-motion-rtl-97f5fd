// fx_add: saturating adder for the two products of one matrix row.
//
// Forms C[k] = A[k] + B[k], where A[k] = e_j[i]*L[k,i] comes from the L path
// and B[k] = u_ff,j[i]*Q[k,i] from the Q path. Adding the two products before
// they are buffered means the L and Q matrix-vector products share one
// deserializer and one set of accumulators, which is the point of the column
// combination method. The sum is saturated to BW bits (a choice of this
// implementation).
//
// Timing: one register stage; s and out_valid follow the operands by one clock.
module fx_add #(
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [BW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic                 out_valid,
  output logic signed [BW-1:0] s
);

  localparam logic signed [BW-1:0] MAXV = {1'b0, {(BW - 1) {1'b1}}};
  localparam logic signed [BW-1:0] MINV = {1'b1, {(BW - 1) {1'b0}}};

  logic signed [BW:0]   wide;
  logic signed [BW-1:0] s_next;

  always_comb begin
    wide = (BW + 1)'(a) + (BW + 1)'(b);
    if (wide > (BW + 1)'(MAXV))      s_next = MAXV;
    else if (wide < (BW + 1)'(MINV)) s_next = MINV;
    else                             s_next = wide[BW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      s         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= s_next;
    end
  end

endmodule
