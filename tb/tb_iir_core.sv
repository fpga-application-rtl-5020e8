// tb_iir_core: self-checking test of the block-parallel FIR-based IIR core
// at its default size (3 lanes, 3 taps). Random input blocks are applied
// with random idle clocks in between; each output block is compared, exactly
// P = T+2 enabled edges after its input block, with a sample-by-sample model
// of the recursion
//   v(n) = sat(SCALE*(sum B[j] x(n-j) + sum A[j] v(n-L*P-j)) / 2**(2*FRAC)).
// The test counts how often the feedback path carried a non-zero value into
// an output and how often the output saturated, and fails if either never
// happened. Input amplitudes vary from small to full scale so both occur.
module tb_iir_core;
  import iir_pkg::*;
  localparam int unsigned L = LANES, T = TAPS, W = DATA_W, CW = COEF_W, F = FRAC;
  localparam int unsigned P = T + 2;
  localparam int NBLK = 600;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [W-1:0] x [L];
  logic signed [W-1:0] y [L];
  logic sat;
  int checks = 0, failures = 0, n_feedback = 0, n_sat = 0;

  iir_core dut (.clk, .rst, .en, .x, .y, .sat);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [W-1:0] xs [L*NBLK];
  logic signed [W-1:0] vs [L*NBLK];

  // model of one output sample; also tells whether feedback contributed
  task automatic model(input int n, output logic signed [W-1:0] v, output logic fbnz,
                       output logic s);
    logic signed [127:0] acc, fb, prod, q;
    acc = 0;
    fb  = 0;
    for (int j = 0; j < int'(T); j++) begin
      if (n - j >= 0) acc += 128'(xs[n-j]) * 128'(B_DEFAULT[j]);
      if (n - int'(L*P) - j >= 0) fb += 128'(vs[n-int'(L*P)-j]) * 128'(A_DEFAULT[j]);
    end
    fbnz = (fb != 0);
    prod = (acc + fb) * 128'(SCALE_DEFAULT);
    q = prod >>> (2 * F);
    s = 1'b1;
    if (q > 128'sd2147483647)       v = 32'sh7fffffff;
    else if (q < -128'sd2147483648) v = 32'sh80000000;
    else begin v = q[W-1:0]; s = 1'b0; end
  endtask

  initial begin
    int nin, edges;
    nin = 0;
    edges = 0;
    for (int r = 0; r < int'(L); r++) x[r] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (y[0] !== 0 || y[1] !== 0 || y[2] !== 0) begin
      failures++;
      $display("FAIL output not cleared by reset");
    end
    while (nin < NBLK) begin
      logic go;
      go = (($urandom() % 3) != 0);
      if (go) begin
        int shift;
        // amplitude classes: tiny, medium, full scale, and a held
        // near-full-scale level that drives the loop into saturation
        case ((nin / 50) % 4)
          0: shift = 20;
          1: shift = 8;
          2: shift = 0;
          default: shift = -1;
        endcase
        for (int r = 0; r < int'(L); r++) begin
          if (shift < 0) xs[L*nin + r] = 32'sh7000_0000;
          else           xs[L*nin + r] = $signed($urandom()) >>> shift;
          x[r] <= xs[L*nin + r];
        end
      end
      en <= go;
      @(posedge clk);
      if (go) begin
        nin++;
        edges++;
      end
      #1;
      if (go) begin
        int k;
        k = edges - int'(P);
        if (k >= 0) begin
          logic any_sat;
          any_sat = 1'b0;
          for (int r = 0; r < int'(L); r++) begin
            logic signed [W-1:0] v;
            logic fbnz, s;
            model(int'(L)*k + r, v, fbnz, s);
            vs[L*k + r] = v;
            if (fbnz) n_feedback++;
            if (s) begin n_sat++; any_sat = 1'b1; end
            checks++;
            if (y[r] !== v) begin
              failures++;
              $display("FAIL block %0d lane %0d: y=%0d expected %0d", k, r, y[r], v);
            end
          end
        end
      end
    end
    $display("feedback-driven outputs=%0d saturated outputs=%0d", n_feedback, n_sat);
    checks += 2;
    if (n_feedback == 0) begin failures++; $display("FAIL feedback never exercised"); end
    if (n_sat == 0)      begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sat must only be raised on an enabled edge's input
  always @(posedge clk) if (!en) assert (!sat) else begin
    failures++;
    $display("FAIL sat without en");
  end
endmodule
