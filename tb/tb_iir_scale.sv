// tb_iir_scale: self-checking test of the scaling stage. Random sums (small,
// large and at the extremes) are scaled by 1/4 and by -3/4; the expected
// value is computed with wide integer arithmetic in the testbench: multiply,
// divide by 2**(2*FRAC) rounding toward minus infinity, clip to 32 bits.
module tb_iir_scale;
  localparam int unsigned IW = 51, W = 32, CW = 16, FRAC = 14;

  logic signed [IW-1:0] din;
  logic signed [W-1:0]  y1, y2;
  logic                 s1, s2;
  int checks = 0, failures = 0, sat_seen = 0;

  iir_scale #(.IW(IW), .W(W), .CW(CW), .FRAC(FRAC), .SCALE(16'sd4096)) dut1 (
    .din, .dout(y1), .sat(s1));
  iir_scale #(.IW(IW), .W(W), .CW(CW), .FRAC(FRAC), .SCALE(-16'sd12288)) dut2 (
    .din, .dout(y2), .sat(s2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_scaled(input logic signed [127:0] v, input longint sc,
                                        output logic signed [W-1:0] y, output logic s);
    logic signed [127:0] prod, q;
    prod = v * 128'(sc);
    // floor division by 2**(2*FRAC)
    q = prod / (128'sd1 <<< (2 * FRAC));
    if (q * (128'sd1 <<< (2 * FRAC)) != prod && prod < 0) q = q - 1;
    if (q > 128'sd2147483647)       begin y = 32'sh7fffffff; s = 1'b1; end
    else if (q < -128'sd2147483648) begin y = 32'sh80000000; s = 1'b1; end
    else                            begin y = q[W-1:0];       s = 1'b0; end
  endfunction

  initial begin
    logic signed [W-1:0] e1, e2;
    logic es1, es2;
    for (int i = 0; i < 5000; i++) begin
      logic signed [IW-1:0] v;
      v = $signed({$urandom(), $urandom()});
      case (i % 4)
        0: v = v >>> 20;   // values that never clip
        1: v = v >>> 12;
        default: ;
      endcase
      if (i == 0) v = {1'b1, {(IW-1){1'b0}}};
      if (i == 1) v = {1'b0, {(IW-1){1'b1}}};
      if (i == 2) v = -1;
      din = v;
      #1;
      expect_scaled(128'(v), 4096, e1, es1);
      expect_scaled(128'(v), -12288, e2, es2);
      checks += 2;
      if (y1 !== e1 || s1 !== es1) begin
        failures++;
        $display("FAIL x1/4: din=%0d y=%0d sat=%0b expected %0d %0b", v, y1, s1, e1, es1);
      end
      if (y2 !== e2 || s2 !== es2) begin
        failures++;
        $display("FAIL x-3/4: din=%0d y=%0d sat=%0b expected %0d %0b", v, y2, s2, e2, es2);
      end
      if (s1) sat_seen++;
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
