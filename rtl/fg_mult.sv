// fg_mult: fine-grain pipelined multiplier, p = a * c.
//
// The multiplier is cut into two smaller units with a pipeline register between
// them, as the fine-grain pipelining of the parallel FIR requires. The first
// unit (m1) multiplies the sample by the unsigned low half of the coefficient;
// the register holds that partial product together with the sample and the
// signed high half of the coefficient; the second unit (m2) multiplies by the
// high half, shifts it into place and adds the partial product. The longest path
// is therefore one half-width multiply (plus one add in m2), not a full one.
// How the multiplier is split (low half first, high half second) is this
// design's choice; the architecture only specifies two units with a pipeline
// latch between them.
//
// Timing: one register. The product of operands presented in a cycle with
// en=1 appears at p after that clock edge and holds until the next enabled edge
// (p is combinational from the register, so it can feed an adder directly).
// rst is synchronous and clears the register.
module fg_mult #(
  parameter int unsigned W  = 32,  // sample width
  parameter int unsigned CW = 16   // coefficient width, at least 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic signed [W-1:0]    a,
  input  logic signed [CW-1:0]   c,
  output logic signed [W+CW-1:0] p
);

  localparam int unsigned LO = CW / 2;   // bits handled by m1
  localparam int unsigned HI = CW - LO;  // bits handled by m2

  // m1: sample times the low coefficient half (treated as unsigned)
  logic signed [W+LO:0] m1_prod;
  always_comb m1_prod = a * $signed({1'b0, c[LO-1:0]});

  // pipeline register between m1 and m2
  logic signed [W+LO:0]  pp_q;
  logic signed [W-1:0]   a_q;
  logic signed [HI-1:0]  chi_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pp_q  <= '0;
      a_q   <= '0;
      chi_q <= '0;
    end else if (en) begin
      pp_q  <= m1_prod;
      a_q   <= a;
      chi_q <= c[CW-1:LO];
    end
  end

  // m2: sample times the signed high half, weighted by 2**LO, plus m1's part
  logic signed [W+CW-1:0] m2_prod;
  always_comb begin
    m2_prod = a_q * chi_q;
    p = (m2_prod <<< LO) + (W+CW)'(pp_q);
  end

endmodule
