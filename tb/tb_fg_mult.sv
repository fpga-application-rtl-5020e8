// tb_fg_mult: self-checking test of the fine-grain pipelined multiplier.
// Drives random signed samples and coefficients (plus the extreme values),
// checks that the product appears exactly one enabled clock later, and that
// the result holds while en is low. The expected product is a plain
// full-width multiply done in the testbench.
module tb_fg_mult;
  localparam int unsigned W = 32, CW = 16;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [W-1:0]    a = '0;
  logic signed [CW-1:0]   c = '0;
  logic signed [W+CW-1:0] p;
  int checks = 0, failures = 0;

  fg_mult #(.W(W), .CW(CW)) dut (.clk, .rst, .en, .a, .c, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [W+CW-1:0] exp, input string what);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %s: p=%0d expected %0d", what, p, exp);
    end
  endtask

  initial begin
    logic signed [W+CW-1:0] exp;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 check('0, "after reset");
    for (int i = 0; i < 2000; i++) begin
      logic signed [W-1:0]  ai;
      logic signed [CW-1:0] ci;
      ai = $signed($urandom());
      ci = $signed(CW'($urandom()));
      case (i)
        0: begin ai = {1'b1, {(W-1){1'b0}}}; ci = {1'b1, {(CW-1){1'b0}}}; end
        1: begin ai = {1'b0, {(W-1){1'b1}}}; ci = {1'b1, {(CW-1){1'b0}}}; end
        2: begin ai = -1; ci = {1'b0, {(CW-1){1'b1}}}; end
        3: begin ai = 12345; ci = 16'sd12288; end
        default: ;
      endcase
      a  <= ai;
      c  <= ci;
      en <= 1'b1;
      exp = (W+CW)'(ai) * (W+CW)'(ci);
      @(posedge clk);
      // product is there right after the enabled edge
      #1 check(exp, "latency one");
      if (($urandom() & 3) == 0) begin
        // hold while disabled, even if the operands move
        en <= 1'b0;
        a  <= $signed($urandom());
        c  <= $signed(CW'($urandom()));
        @(posedge clk);
        #1 check(exp, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
