// fx_mult: signed fixed-point multiplier, one product per clock.
//
// Multiplies a matrix element (b) with the held sample of the slow-rate
// signal (a). The full 2*BW-bit product is shifted right by FRAC bits
// (rounding toward minus infinity) and saturated to BW bits, so the result is
// in the same fixed-point format as the operands. The engine has two of these,
// one per filter matrix, which is the whole multiplier count of the design
// whatever N is.
//
// Timing: operands and in_valid are registered; p and out_valid appear one
// clock later. Rounding and saturation are choices of this implementation;
// the word format follows the design's 24-bit / 12-fraction-bit signals.
module fx_mult #(
  parameter int unsigned BW   = noilc_pkg::BW_DEFAULT,
  parameter int unsigned FRAC = noilc_pkg::FRAC_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [BW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic                 out_valid,
  output logic signed [BW-1:0] p
);

  localparam int unsigned PW = 2 * BW;
  localparam logic signed [BW-1:0] MAXV = {1'b0, {(BW - 1) {1'b1}}};
  localparam logic signed [BW-1:0] MINV = {1'b1, {(BW - 1) {1'b0}}};

  logic signed [PW-1:0] full;
  logic signed [PW-1:0] scaled;
  logic signed [BW-1:0] p_next;

  always_comb begin
    full   = PW'(a) * PW'(b);
    scaled = full >>> FRAC;
    if (scaled > PW'(MAXV))      p_next = MAXV;
    else if (scaled < PW'(MINV)) p_next = MINV;
    else                         p_next = scaled[BW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= p_next;
    end
  end

endmodule
