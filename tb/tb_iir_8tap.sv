// tb_iir_8tap: end-to-end test of the filter top level built from 8-tap
// parallel FIRs instead of the default 3-tap ones (T = 8; lanes, widths and
// number format unchanged). Both FIRs use the taps 0.75**j, j = 0..7, and the
// scaling factor is 3/16, for a loop gain of 0.675 and a DC gain of 2.08.
// With T = 8 the loop spans T+2 = 10 blocks, so the feedback reaches back
// D = 30 samples and the latency is (T+2)*L + 1 = 31 clocks. Stimulus, checks and counted mechanisms are the
// same as in the default-size test: y is compared with an integer model on
// every clock, and block hand-overs, feedback, saturation and a mid-stream
// reset must each occur.
module tb_iir_8tap;
  import iir_pkg::*;
  localparam int unsigned L = LANES, T = 8, W = DATA_W, F = FRAC;
  localparam coef_t H8 [T] = '{16'sd16384, 16'sd12288, 16'sd9216, 16'sd6912,
                                16'sd5184, 16'sd3888, 16'sd2916, 16'sd2187};
  localparam coef_t S8 = 16'sd3072;
  localparam int LAT = int'((T + 2) * L + 1);
  localparam int NS  = 3000;   // samples per run

  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x = '0;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;
  int n_blocks = 0, n_feedback = 0, n_sat = 0, n_reset = 0;

  iir #(.T(T), .B(H8), .A(H8), .SCALE(S8)) dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * NS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // complete 3-sample blocks handed to the parallel core: one per L clocks
  // out of reset (their contents are checked through y, sample by sample)
  int phase = 0;
  always @(posedge clk) begin
    if (rst) phase <= 0;
    else begin
      phase <= (phase == int'(L) - 1) ? 0 : phase + 1;
      if (phase == int'(L) - 1) n_blocks++;
    end
  end

  logic signed [W-1:0] xs [NS];
  logic signed [W-1:0] vs [NS];

  function automatic logic signed [W-1:0] stimulus(int n);
    if (n == 0)     return 32'sd1000000;                      // impulse
    if (n < 100)    return 32'sd0;
    if (n < 400)    return 32'sd5000;                          // step
    if (n < 1400)   return $signed($urandom()) >>> (n % 24);   // mixed amplitudes
    if (n < 1700)   return 32'sh7fff_ffff;                     // drives saturation
    return $signed($urandom()) >>> 4;
  endfunction

  task automatic model(input int n, output logic signed [W-1:0] v,
                       output logic fbnz, output logic s);
    logic signed [127:0] acc, fb, q;
    acc = 0;
    fb  = 0;
    for (int j = 0; j < int'(T); j++) begin
      if (n - j >= 0) acc += 128'(xs[n-j]) * 128'(H8[j]);
      if (n - int'(L*(T+2)) - j >= 0)
        fb += 128'(vs[n-int'(L*(T+2))-j]) * 128'(H8[j]);
    end
    fbnz = (fb != 0);
    q = ((acc + fb) * 128'(S8)) >>> (2 * F);
    s = 1'b1;
    if (q > 128'sd2147483647)       v = 32'sh7fffffff;
    else if (q < -128'sd2147483648) v = 32'sh80000000;
    else begin v = q[W-1:0]; s = 1'b0; end
  endtask

  // one run of NS samples starting right after reset is released
  task automatic run(input int ns);
    for (int c = 0; c < ns + LAT; c++) begin
      if (c < ns) begin
        xs[c] = stimulus(c);
        x <= xs[c];
      end else begin
        x <= '0;
      end
      @(posedge clk);
      #1;
      // y now shows the sample for clock c+1 - LAT
      begin
        int m;
        logic signed [W-1:0] v;
        logic fbnz, s;
        m = c + 1 - LAT;
        if (m >= 0 && m < ns) begin
          model(m, v, fbnz, s);
          vs[m] = v;
          if (fbnz) n_feedback++;
          if (s) n_sat++;
        end else if (m < 0) begin
          v = '0;
        end else begin
          continue;   // past the stimulus: not modelled
        end
        checks++;
        if (y !== v) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: y=%0d expected %0d", m, y, v);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(NS);
    // reset in mid-stream: everything clears, then a fresh run
    x <= 32'sd123456;
    repeat (5) @(posedge clk);
    #1 rst = 1'b1;
    n_reset++;
    @(posedge clk);
    #1;
    checks++;
    if (y !== 0) begin failures++; $display("FAIL y not cleared by reset"); end
    rst = 1'b0;
    run(600);
    $display("blocks=%0d feedback=%0d saturated=%0d resets=%0d",
             n_blocks, n_feedback, n_sat, n_reset);
    checks += 4;
    if (n_blocks == 0)   begin failures++; $display("FAIL no block hand-over"); end
    if (n_feedback == 0) begin failures++; $display("FAIL feedback never exercised"); end
    if (n_sat == 0)      begin failures++; $display("FAIL saturation never exercised"); end
    if (n_reset == 0)    begin failures++; $display("FAIL reset never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
