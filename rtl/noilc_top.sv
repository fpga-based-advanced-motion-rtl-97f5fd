// noilc_top: norm-optimal iterative learning control (NOILC) engine using
// the column combination method.
//
// A motion controller repeats the same trajectory over and over; each pass is
// one iteration of N samples. NOILC learns a feedforward signal from the
// position error of the previous pass:
//
//     u_ff,j+1 = L * e_j + Q * u_ff,j          (L, Q: N x N, computed offline)
//
// Done naively this takes 2*N*N multipliers. Here the product is formed
// column by column instead: sample i of the error only ever meets column i of
// L (and u_ff,j[i] only column i of Q), so as each sample arrives it is
// multiplied with the N elements of its column, one per clock, by a single
// multiplier per matrix. The two products of a row are added, the N row sums
// are gathered into a vector by a deserializer, and that vector is added into
// a running sum. After the N-th sample the running sum is u_ff,j+1; it is
// held for the whole next iteration and played out one element per sample,
// and the same played-out value feeds the Q path. The multiplier count is 2
// for any N; storage is the two coefficient RAMs plus a few N-word registers.
//
//   e_in -> upsampler -> fx_mult(L RAM) -+
//                                         fx_add -> deserializer -> column_accumulator
//   u_ff -> upsampler -> fx_mult(Q RAM) -+                              |
//     ^                                                            output_hold
//     +------------------------------ serializer <-----------------------+
//
// Interface: load L and Q through coef_we_l / coef_we_q, coef_addr (address
// col*N + row) and coef_wdata while the engine is idle. Then give one
// sample_en strobe per sample period with e_in valid in that cycle. uff_out
// shows u_ff,j[i] for the sample just taken, from one clock after the strobe
// (uff_valid pulses then); in the first iteration it is zero. sample_idx and
// iteration tell which sample the next strobe takes.
//
// Timing: the strobe at cycle s starts N coefficient reads (s+1 .. s+N); the
// column's product vector is added into the accumulator at cycle s+N+4; busy
// is high from s+1 to s+N+4 and the next strobe may come at s+N+5 at the
// earliest. The number format (24-bit signed, 12 fraction bits), the block
// structure and the dataflow follow the design; the strobe-driven timing,
// saturation, rounding toward minus infinity, reset and the coefficient write
// port are choices of this implementation.
module noilc_top #(
  parameter int unsigned N    = noilc_pkg::N_DEFAULT,
  parameter int unsigned BW   = noilc_pkg::BW_DEFAULT,
  parameter int unsigned FRAC = noilc_pkg::FRAC_DEFAULT,
  localparam int unsigned CW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW  = $clog2(N * N),
  localparam int unsigned IW  = noilc_pkg::ITER_W
) (
  input  logic                 clk,
  input  logic                 rst,
  // coefficient preload
  input  logic                 coef_we_l,
  input  logic                 coef_we_q,
  input  logic [AW-1:0]        coef_addr,
  input  logic signed [BW-1:0] coef_wdata,
  // sample stream
  input  logic                 sample_en,
  input  logic signed [BW-1:0] e_in,
  output logic signed [BW-1:0] uff_out,
  output logic                 uff_valid,
  // status
  output logic [CW-1:0]        sample_idx,
  output logic [IW-1:0]        iteration,
  output logic                 busy,
  output logic                 uff_vec_valid
);

  // Sequencing
  logic          ram_rd, u_load, iter_start;
  logic [AW-1:0] ram_addr;

  noilc_sequencer #(.N(N)) u_seq (
    .clk, .rst, .sample_en,
    .ram_rd, .ram_addr, .u_load,
    .col(sample_idx), .iter_start, .iteration, .busy
  );

  // Feedforward output path (held vector -> serializer)
  logic signed [BW-1:0] uff_vec [N];

  serializer #(.N(N), .BW(BW)) u_ser (
    .clk, .rst, .step(sample_en), .first(iter_start), .vec(uff_vec),
    .dout(uff_out), .dout_valid(uff_valid)
  );

  // Upsamplers: hold e_j[i] and u_ff,j[i] for the N clocks of the column
  logic signed [BW-1:0] e_hold, u_hold;

  upsampler #(.BW(BW)) u_up_e (.clk, .rst, .load(sample_en), .din(e_in),    .dout(e_hold));
  upsampler #(.BW(BW)) u_up_u (.clk, .rst, .load(u_load),    .din(uff_out), .dout(u_hold));

  // Coefficient RAMs, both read at the same column-order address
  logic signed [BW-1:0] l_coef, q_coef;

  coef_ram #(.DEPTH(N * N), .BW(BW)) u_ram_l (
    .clk, .we(coef_we_l), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr(ram_addr), .rdata(l_coef)
  );
  coef_ram #(.DEPTH(N * N), .BW(BW)) u_ram_q (
    .clk, .we(coef_we_q), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr(ram_addr), .rdata(q_coef)
  );

  logic rd_valid;
  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= ram_rd;
  end

  // Multipliers and product adder: C[k] = e_j[i]*L[k,i] + u_ff,j[i]*Q[k,i]
  logic                 pl_valid, pq_valid, c_valid;
  logic signed [BW-1:0] pl, pq, c_row;

  fx_mult #(.BW(BW), .FRAC(FRAC)) u_mul_l (
    .clk, .rst, .in_valid(rd_valid), .a(e_hold), .b(l_coef), .out_valid(pl_valid), .p(pl)
  );
  fx_mult #(.BW(BW), .FRAC(FRAC)) u_mul_q (
    .clk, .rst, .in_valid(rd_valid), .a(u_hold), .b(q_coef), .out_valid(pq_valid), .p(pq)
  );
  fx_add #(.BW(BW)) u_add (
    .clk, .rst, .in_valid(pl_valid), .a(pl), .b(pq), .out_valid(c_valid), .s(c_row)
  );

  // Gather the N row sums of one column into a vector
  logic                 col_valid;
  logic signed [BW-1:0] col_vec [N];

  deserializer #(.N(N), .BW(BW)) u_deser (
    .clk, .rst, .in_valid(c_valid), .din(c_row), .vec_valid(col_valid), .vec(col_vec)
  );

  // Accumulate the columns of one iteration
  logic signed [BW-1:0] acc_sum [N];
  logic                 acc_last;
  logic [CW-1:0]        acc_count;

  column_accumulator #(.N(N), .BW(BW)) u_acc (
    .clk, .rst, .vec_valid(col_valid), .vec(col_vec),
    .sum(acc_sum), .last(acc_last), .count(acc_count)
  );

  // Hold u_ff,j+1 for the next iteration
  output_hold #(.N(N), .BW(BW)) u_hold_vec (
    .clk, .rst, .sel_new(acc_last), .din(acc_sum), .dout(uff_vec), .updated(uff_vec_valid)
  );

  // The two product paths run in lock step.
  always_ff @(posedge clk) begin
    if (!rst) assert (pl_valid == pq_valid) else $error("noilc_top: product paths out of step");
  end

  // The accumulator's column count and the sequencer's sample index agree.
  always_ff @(posedge clk) begin
    if (!rst && col_valid)
      assert (acc_count == ((sample_idx == '0) ? CW'(N - 1) : sample_idx - 1'b1))
        else $error("noilc_top: accumulator column out of step with the sample index");
  end

endmodule
