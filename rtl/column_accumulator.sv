// column_accumulator: sums the column-product vectors of one iteration.
//
// Every sample period delivers one vector C' = e_j[i]*L(:,i) + u_ff,j[i]*Q(:,i)
// (column i of both products). This block keeps the running vector
// C_j = C'_0 + C'_1 + ... in a bank of N registers (the unit delay) and adds
// each new C' to it with N saturating adders. A switch in front of the adders
// feeds constant zero instead of the stored sum when the column counter is 0,
// which clears the sum at the start of every iteration without a separate
// clear cycle. After the N-th column, sum holds u_ff,j+1 and last is high.
//
// Timing: sum is combinational (adder output) and is meaningful in the cycle
// in which vec_valid is high; the register bank and the counter advance on
// that edge. last = vec_valid for the N-th column (count == N-1).
// Saturation of the adders is a choice of this implementation.
module column_accumulator #(
  parameter int unsigned N  = noilc_pkg::N_DEFAULT,
  parameter int unsigned BW = noilc_pkg::BW_DEFAULT,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 vec_valid,
  input  logic signed [BW-1:0] vec [N],
  output logic signed [BW-1:0] sum [N],
  output logic                 last,
  output logic [CW-1:0]        count
);

  localparam logic signed [BW-1:0] MAXV = {1'b0, {(BW - 1) {1'b1}}};
  localparam logic signed [BW-1:0] MINV = {1'b1, {(BW - 1) {1'b0}}};

  logic signed [BW-1:0] stored [N];   // unit delay Z^-1
  logic                 first_col;

  assign first_col = (count == '0);
  assign last      = vec_valid && (count == CW'(N - 1));

  always_comb begin
    for (int m = 0; m < int'(N); m++) begin
      logic signed [BW-1:0] addend;
      logic signed [BW:0]   wide;
      addend = first_col ? '0 : stored[m];           // Switch1 / constant 0
      wide   = (BW + 1)'(vec[m]) + (BW + 1)'(addend);
      if (wide > (BW + 1)'(MAXV))      sum[m] = MAXV;
      else if (wide < (BW + 1)'(MINV)) sum[m] = MINV;
      else                             sum[m] = wide[BW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      for (int m = 0; m < int'(N); m++) stored[m] <= '0;
    end else if (vec_valid) begin
      count <= last ? '0 : count + 1'b1;
      for (int m = 0; m < int'(N); m++) stored[m] <= sum[m];
    end
  end

endmodule
