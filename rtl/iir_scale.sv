// iir_scale: the scaling stage of the FIR-based IIR filter.
//
// The sum of the feed-forward and feedback FIR results carries the 2**FRAC
// weight of the coefficients. This stage multiplies it by the scaling factor
// SCALE (also with FRAC fractional bits), removes both fraction weights with an
// arithmetic right shift by 2*FRAC (rounding toward minus infinity) and
// saturates the result to the W-bit output range. sat is high when the value
// had to be clipped. The architecture places a scaling stage between the
// adder and the output; the multiply-shift-saturate form is this design's
// choice.
//
// Purely combinational; the caller registers the result.
module iir_scale #(
  parameter int unsigned IW   = 51,  // input width
  parameter int unsigned W    = 32,  // output width
  parameter int unsigned CW   = 16,  // width of the scaling factor
  parameter int unsigned FRAC = 14,  // fractional bits of coefficients
  parameter logic signed [CW-1:0] SCALE = 16'sd4096
) (
  input  logic signed [IW-1:0] din,
  output logic signed [W-1:0]  dout,
  output logic                 sat
);

  localparam int unsigned PW = IW + CW;
  localparam logic signed [PW-1:0] MAXV = PW'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [PW-1:0] MINV = -MAXV - PW'(1);

  logic signed [PW-1:0] prod, shifted;

  always_comb begin
    prod    = PW'(din) * PW'(SCALE);
    shifted = prod >>> (2 * FRAC);
    if (shifted > MAXV) begin
      dout = MAXV[W-1:0];
      sat  = 1'b1;
    end else if (shifted < MINV) begin
      dout = MINV[W-1:0];
      sat  = 1'b1;
    end else begin
      dout = shifted[W-1:0];
      sat  = 1'b0;
    end
  end

endmodule
