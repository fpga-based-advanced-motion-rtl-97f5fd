// coef_ram: block RAM holding one N x N filter matrix (L or Q) in column order.
//
// Element (row k, column i) of the matrix lives at address i*N + k, so the N
// elements of column i are read at consecutive addresses while sample i is
// being processed. The matrices are computed offline and written once through
// the write port before the engine runs; during operation the engine only
// reads. Reading in sequence from a block RAM, instead of keeping the whole
// matrix in flip-flops, is what keeps the storage cost of the design small.
//
// Timing: one write port and one read port, both synchronous; rdata holds the
// word at raddr one clock after raddr is presented. The contents are not
// cleared by any reset.
module coef_ram #(
  parameter int unsigned DEPTH = noilc_pkg::N_DEFAULT * noilc_pkg::N_DEFAULT,
  parameter int unsigned BW    = noilc_pkg::BW_DEFAULT,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [BW-1:0] wdata,
  input  logic [AW-1:0]        raddr,
  output logic signed [BW-1:0] rdata
);

  logic signed [BW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
