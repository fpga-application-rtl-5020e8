// tb_iir: end-to-end test of the filter top level at its default size.
// One sample per clock goes into x from the first clock after reset; y is
// compared on every clock with a sample-by-sample model of the filter,
// delayed by the design's latency of (T+2)*L + 1 = 16 clocks. The run then
// applies a mid-stream reset and checks that the output returns to zero and
// that the filter restarts cleanly. Mechanisms counted (each must occur):
// block hand-overs to the parallel core, outputs carrying feedback, saturated
// outputs, and the reset. The stimulus is an impulse, then a held step, then
// random samples at several amplitudes, then a near-full-scale level.
module tb_iir;
  import iir_pkg::*;
  localparam int unsigned L = LANES, T = TAPS, W = DATA_W, F = FRAC;
  localparam int LAT = int'((T + 2) * L + 1);
  localparam int NS  = 3000;   // samples per run

  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x = '0;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;
  int n_blocks = 0, n_feedback = 0, n_sat = 0, n_reset = 0;

  iir dut (.clk, .rst, .x, .y);

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
    if (n < 1700)   return 32'sh7000_0000;                     // drives saturation
    return $signed($urandom()) >>> 4;
  endfunction

  task automatic model(input int n, output logic signed [W-1:0] v,
                       output logic fbnz, output logic s);
    logic signed [127:0] acc, fb, q;
    acc = 0;
    fb  = 0;
    for (int j = 0; j < int'(T); j++) begin
      if (n - j >= 0) acc += 128'(xs[n-j]) * 128'(B_DEFAULT[j]);
      if (n - int'(L*(T+2)) - j >= 0)
        fb += 128'(vs[n-int'(L*(T+2))-j]) * 128'(A_DEFAULT[j]);
    end
    fbnz = (fb != 0);
    q = ((acc + fb) * 128'(SCALE_DEFAULT)) >>> (2 * F);
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
