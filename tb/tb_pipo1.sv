// tb_pipo1: self-checking testbench of the 16-bit PIPO accumulator register.
//
// Inputs change away from the rising edge. After every edge dout must equal
// the din present at that edge, or 0 if rst was high. Also checks that dout
// holds between edges. A watchdog ends the run if it has not finished in time.
module tb_pipo1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int resets = 0;

  logic        rst;
  logic [15:0] din, dout, exp, held;

  pipo1 dut (.clk(clk), .rst(rst), .din(din), .dout(dout));

  initial begin
    rst = 1'b1;
    din = 16'hBEEF;
    @(posedge clk);
    #1;
    checks++;
    if (dout !== 16'h0000) begin
      failures++;
      $display("FAIL reset: dout=%h", dout);
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      held = dout;
      rst = ($urandom_range(0, 9) == 0);
      din = 16'($urandom);
      exp = rst ? 16'h0000 : din;
      if (rst) resets++;
      // Between edges the register must still hold its old value.
      #2;
      din = ~din;
      #1;
      din = ~din;
      checks++;
      if (dout !== held) begin
        failures++;
        $display("FAIL cycle %0d: dout changed between edges", k);
      end
      @(posedge clk);
      #1;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL cycle %0d: dout=%h expected %h", k, dout, exp);
      end
    end
    checks++;
    if (resets == 0) begin
      failures++;
      $display("FAIL reset never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
