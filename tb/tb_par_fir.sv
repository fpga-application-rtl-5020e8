// tb_par_fir: self-checking test of the L-parallel pipelined FIR.
// Feeds random blocks (with random gaps where en is low) into a 3-lane,
// 3-tap instance with the default coefficients and into a 4-lane, 6-tap
// instance whose taps reach back more than one block. Every output block is
// compared with a direct convolution of the sample stream computed in the
// testbench, exactly T+1 enabled edges after its input block.
module tb_par_fir;
  localparam int unsigned W = 32, CW = 16;
  localparam int unsigned L1 = 3, T1 = 3, L2 = 4, T2 = 6;
  localparam int unsigned A1 = W + CW + $clog2(T1), A2 = W + CW + $clog2(T2);
  localparam logic signed [CW-1:0] H1 [T1] = '{16'sd16384, 16'sd12288, 16'sd9216};
  localparam logic signed [CW-1:0] H2 [T2] = '{16'sd1000, -16'sd32768, 16'sd32767,
                                               -16'sd7, 16'sd20000, -16'sd12345};
  localparam int NBLK = 400;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [W-1:0]  d1 [L1];
  logic signed [W-1:0]  d2 [L2];
  logic signed [A1-1:0] q1 [L1];
  logic signed [A2-1:0] q2 [L2];
  int checks = 0, failures = 0;

  par_fir #(.L(L1), .T(T1), .W(W), .CW(CW), .H(H1)) dut1 (
    .clk, .rst, .en, .din(d1), .dout(q1));
  par_fir #(.L(L2), .T(T2), .W(W), .CW(CW), .H(H2)) dut2 (
    .clk, .rst, .en, .din(d2), .dout(q2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample streams; index = L*block + lane
  logic signed [W-1:0] s1 [L1*NBLK];
  logic signed [W-1:0] s2 [L2*NBLK];

  function automatic logic signed [127:0] conv1(int n);
    automatic logic signed [127:0] acc = 0;
    for (int j = 0; j < int'(T1); j++)
      if (n - j >= 0) acc += 128'(s1[n-j]) * 128'(H1[j]);
    return acc;
  endfunction

  function automatic logic signed [127:0] conv2(int n);
    automatic logic signed [127:0] acc = 0;
    for (int j = 0; j < int'(T2); j++)
      if (n - j >= 0) acc += 128'(s2[n-j]) * 128'(H2[j]);
    return acc;
  endfunction

  initial begin
    int nin = 0;           // blocks presented so far
    int edges = 0;         // enabled edges so far
    int in_edge [NBLK];    // enabled-edge number at which block k was taken
    for (int r = 0; r < int'(L1); r++) d1[r] = '0;
    for (int r = 0; r < int'(L2); r++) d2[r] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    while (nin < NBLK) begin
      logic go;
      go = (($urandom() % 4) != 0);
      if (go) begin
        for (int r = 0; r < int'(L1); r++) begin
          s1[L1*nin + r] = $signed($urandom());
          d1[r] <= s1[L1*nin + r];
        end
        for (int r = 0; r < int'(L2); r++) begin
          s2[L2*nin + r] = $signed($urandom());
          d2[r] <= s2[L2*nin + r];
        end
      end
      en <= go;
      @(posedge clk);
      if (go) begin
        in_edge[nin] = edges;
        nin++;
        edges++;
      end
      #1;
      // the block taken at enabled edge e is out right after edge e+T
      if (go) begin
        automatic int k1 = edges - 1 - int'(T1);
        automatic int k2 = edges - 1 - int'(T2);
        if (k1 >= 0) begin
          for (int r = 0; r < int'(L1); r++) begin
            automatic logic signed [127:0] e = conv1(int'(L1)*k1 + r);
            checks++;
            if (128'(q1[r]) !== e) begin
              failures++;
              $display("FAIL L3T3 block %0d lane %0d: %0d expected %0d", k1, r, q1[r], e);
            end
          end
        end
        if (k2 >= 0) begin
          for (int r = 0; r < int'(L2); r++) begin
            automatic logic signed [127:0] e = conv2(int'(L2)*k2 + r);
            checks++;
            if (128'(q2[r]) !== e) begin
              failures++;
              $display("FAIL L4T6 block %0d lane %0d: %0d expected %0d", k2, r, q2[r], e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
