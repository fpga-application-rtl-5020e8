// iir_core: block-parallel FIR-based IIR filter (feed-forward FIR, feedback FIR,
// adder, scaling).
//
// The recursion of the IIR filter is built from two L-parallel pipelined FIR
// filters. The feed-forward FIR filters the input block with coefficients B;
// the feedback FIR filters the filter's own output block with coefficients A.
// Their sum is scaled (iir_scale) and registered as the output block, which is
// also the feedback FIR's input. Since the feedback FIR is pipelined, the loop
// spans P = T+2 blocks, so the recursion reaches back over D = L*P samples:
//   v(n) = sat( SCALE * ( sum_j B[j] x(n-j) + sum_j A[j] v(n-D-j) ) / 2**(2*FRAC) )
// and v(L*k + r) leaves on y[r] P enabled edges after block k came in. Without
// saturation the transfer function from x to v is
//   V(z)/X(z) = S*B(z) / (1 - S*z^-D*A(z)),  S = SCALE / 2**FRAC,
// which is stable whenever S*sum|A[j]| < 1 (true for the defaults). The
// two FIRs, the adder, the scaling stage and the feedback path follow the
// block diagram of the architecture; the loop delay D, the coefficient format
// and saturation are this design's choices.
//
// Interface: x and y are arrays of L lanes, lane r holding sample L*k + r of
// block k. A block is accepted on every clock with en=1 and its result leaves
// on y after P = T+2 enabled edges. sat flags that a lane of the block now
// being registered was clipped. rst (synchronous) clears all state, so the
// output is zero until the first block has passed.
module iir_core #(
  parameter int unsigned L    = 3,
  parameter int unsigned T    = 3,
  parameter int unsigned W    = 32,
  parameter int unsigned CW   = 16,
  parameter int unsigned FRAC = 14,
  parameter logic signed [CW-1:0] B [T] = '{16'sd16384, 16'sd12288, 16'sd9216},
  parameter logic signed [CW-1:0] A [T] = '{16'sd16384, 16'sd12288, 16'sd9216},
  parameter logic signed [CW-1:0] SCALE = 16'sd4096
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] x   [L],
  output logic signed [W-1:0] y   [L],
  output logic                sat
);

  localparam int unsigned AW = W + CW + $clog2(T);

  logic signed [AW-1:0] ff [L];
  logic signed [AW-1:0] fb [L];
  logic signed [W-1:0]  y_q    [L];
  logic signed [W-1:0]  y_next [L];
  logic [L-1:0]         lane_sat;

  par_fir #(.L(L), .T(T), .W(W), .CW(CW), .AW(AW), .H(B)) u_ff (
    .clk (clk), .rst (rst), .en (en), .din (x),   .dout (ff)
  );

  par_fir #(.L(L), .T(T), .W(W), .CW(CW), .AW(AW), .H(A)) u_fb (
    .clk (clk), .rst (rst), .en (en), .din (y_q), .dout (fb)
  );

  for (genvar r = 0; r < L; r++) begin : g_lane
    logic signed [AW:0] sum;
    assign sum = (AW+1)'(ff[r]) + (AW+1)'(fb[r]);

    iir_scale #(.IW(AW+1), .W(W), .CW(CW), .FRAC(FRAC), .SCALE(SCALE)) u_scale (
      .din  (sum),
      .dout (y_next[r]),
      .sat  (lane_sat[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < L; r++) y_q[r] <= '0;
    end else if (en) begin
      for (int r = 0; r < L; r++) y_q[r] <= y_next[r];
    end
  end

  assign y   = y_q;
  assign sat = en && (|lane_sat);

endmodule
