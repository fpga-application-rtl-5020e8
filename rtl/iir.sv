// iir: FIR-based IIR filter with a one-sample-per-clock interface.
//
// Top level with the pins of the implemented filter: clk, rst, a 32-bit input
// x and a 32-bit output y, one sample each per clock. Inside, a
// serial-to-parallel stage gathers L consecutive input samples into a block,
// the block-parallel core (iir_core: feed-forward FIR, feedback FIR, adder,
// scaling) processes one block every L clocks, and a parallel-to-serial stage
// sends the L results out one per clock. The core's registers only advance on
// the one clock in L when a new block is ready (a clock enable, not a divided
// clock), so the whole design has one clock.
//
// Timing: y(c) = f(c - (T+2)*L - 1), where f is the response of the core's
// filter (see iir_core) to the input stream x, counted in clocks since the end
// of reset: the latency is (T+2)*L + 1 clocks, 16 with the defaults. The first
// sample after rst falls is lane 0 of the first block. rst is synchronous,
// active high, and clears every register; y is 0 while the pipeline fills.
// The pin names and widths follow the top-level symbol of the implemented
// filter; the serial/parallel conversion is this design's own.
module iir
  import iir_pkg::*;
#(
  parameter int unsigned L    = LANES,
  parameter int unsigned T    = TAPS,
  parameter int unsigned W    = DATA_W,
  parameter int unsigned CW   = COEF_W,
  parameter int unsigned F    = FRAC,
  parameter logic signed [CW-1:0] B [T] = B_DEFAULT,
  parameter logic signed [CW-1:0] A [T] = A_DEFAULT,
  parameter logic signed [CW-1:0] SCALE = SCALE_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned PW = (L > 1) ? $clog2(L) : 1;
  localparam logic [PW-1:0] LAST = PW'(L - 1);

  // phase of the sample now on x within its block
  logic [PW-1:0] ph;
  always_ff @(posedge clk) begin
    if (rst)             ph <= '0;
    else if (ph == LAST) ph <= '0;
    else                 ph <= ph + PW'(1);
  end

  // serial to parallel: gather L samples, hand the block over with a strobe
  logic signed [W-1:0] xbuf [L];
  logic signed [W-1:0] xblk [L];
  logic                blk_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < L; r++) begin
        xbuf[r] <= '0;
        xblk[r] <= '0;
      end
      blk_valid <= 1'b0;
    end else begin
      xbuf[ph]  <= x;
      blk_valid <= (ph == LAST);
      if (ph == LAST) begin
        for (int r = 0; r < L; r++) xblk[r] <= (r == int'(L - 1)) ? x : xbuf[r];
      end
    end
  end

  logic signed [W-1:0] yblk [L];

  iir_core #(.L(L), .T(T), .W(W), .CW(CW), .FRAC(F), .B(B), .A(A), .SCALE(SCALE)) u_core (
    .clk (clk),
    .rst (rst),
    .en  (blk_valid),
    .x   (xblk),
    .y   (yblk),
    .sat ()              // clipping is visible as a saturated y
  );

  // parallel to serial: the core updates yblk on the clock in which ph == 0,
  // so lane r is shown while ph == r + 1 (mod L)
  logic [PW-1:0] out_lane;
  always_comb out_lane = (ph == '0) ? LAST : ph - PW'(1);

  assign y = yblk[out_lane];

endmodule
