// tb_mul8bit: exhaustive self-checking testbench of the 8 x 8 Kogge-Stone
// multiplier. All 65,536 operand pairs are applied and z is compared with the
// integer product x*y. A watchdog ends the run if it has not finished in time.
module tb_mul8bit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x, y;
  logic [15:0] z;

  mul8bit dut (.x(x), .y(y), .z(z));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i);
        y = 8'(j);
        @(posedge clk);
        checks++;
        if (z !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
