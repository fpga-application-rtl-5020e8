// par_fir: L-parallel, pipelined FIR filter with fine-grain pipelined multipliers.
//
// Each clock with en=1 takes a block of L consecutive samples
// din[r] = x(L*k + r), r = 0..L-1, and produces L outputs
//   dout[r] = sum_{j=0}^{T-1} H[j] * x(L*k + r - j).
// Every output lane is one row: T fine-grain multipliers (m1, register, m2) feed
// a chain of adders with a register after each adder, so the longest path is
// half a multiply plus two adds (m2's add and one chain adder). Because the
// partial sum of a row moves one block down the chain per clock, the
// multiplier of tap j takes its sample one block later than tap 0 does, from
// a short history of earlier input blocks; that keeps all T products of a row
// aligned to the same output sample. Samples with
// r - j < 0 come from the previous block(s), which is how the lanes cross-connect.
// The lane/tap structure and the split multiplier follow the parallel FIR of the
// architecture; the exact placement of the chain registers and the sample
// history are this design's own, chosen so that the result is an exact FIR.
//
// Interface: din and dout are arrays of L lanes; results are full precision
// (W + CW + clog2(T) bits), not rounded. Timing: dout for the block presented
// with en=1 is valid after T+1 enabled clock edges, and a new block is accepted
// on every enabled edge. rst is synchronous and clears every register.
module par_fir #(
  parameter int unsigned L  = 3,   // lanes (parallel inputs)
  parameter int unsigned T  = 3,   // taps
  parameter int unsigned W  = 32,  // sample width
  parameter int unsigned CW = 16,  // coefficient width
  parameter int unsigned AW = W + CW + $clog2(T),  // result width
  parameter logic signed [CW-1:0] H [T] = '{16'sd16384, 16'sd12288, 16'sd9216}
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [W-1:0]  din  [L],
  output logic signed [AW-1:0] dout [L]
);

  // deepest block history any tap needs: j + ceil(j/L) for j = T-1
  localparam int unsigned DEPTH = (T - 1) + (T - 1 + L - 1) / L;
  localparam int unsigned HD    = (DEPTH > 0) ? DEPTH : 1;

  // hist[d] holds the input block presented d+1 enabled edges ago
  logic signed [W-1:0] hist [HD][L];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < HD; d++)
        for (int r = 0; r < L; r++) hist[d][r] <= '0;
    end else if (en) begin
      for (int r = 0; r < L; r++) hist[0][r] <= din[r];
      for (int d = 1; d < HD; d++)
        for (int r = 0; r < L; r++) hist[d][r] <= hist[d-1][r];
    end
  end

  logic signed [W+CW-1:0] prod [L][T];
  logic signed [AW-1:0]   acc  [L][T];

  for (genvar r = 0; r < L; r++) begin : g_row
    for (genvar j = 0; j < T; j++) begin : g_tap
      // sample x(L*k + r - j) seen j blocks after block k entered
      localparam int IDX  = int'(r) - int'(j);
      localparam int BACK = (IDX >= 0) ? 0 : (-IDX + int'(L) - 1) / int'(L);
      localparam int LANE = IDX + BACK * int'(L);
      localparam int AGE  = int'(j) + BACK;   // 0: the block at din now

      logic signed [W-1:0] smp;
      if (AGE == 0) begin : g_now
        assign smp = din[LANE];
      end else begin : g_old
        assign smp = hist[AGE-1][LANE];
      end

      fg_mult #(.W(W), .CW(CW)) u_mul (
        .clk (clk),
        .rst (rst),
        .en  (en),
        .a   (smp),
        .c   (H[j]),
        .p   (prod[r][j])
      );

      // adder chain with a register after every adder
      if (j == 0) begin : g_first
        always_ff @(posedge clk) begin
          if (rst)     acc[r][j] <= '0;
          else if (en) acc[r][j] <= AW'(prod[r][j]);
        end
      end else begin : g_next
        always_ff @(posedge clk) begin
          if (rst)     acc[r][j] <= '0;
          else if (en) acc[r][j] <= acc[r][j-1] + AW'(prod[r][j]);
        end
      end
    end : g_tap

    assign dout[r] = acc[r][T-1];
  end : g_row

endmodule
