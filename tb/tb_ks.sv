// tb_ks: self-checking testbench of the Kogge-Stone adder.
//
// Two instances: the default 16-bit adder and a 4-bit one. The 4-bit adder is
// checked exhaustively (all 256 operand pairs, including 1001 + 1100 = 1_0101),
// the 16-bit adder on corner cases (carry through all bits, all ones) and on
// random operands. The reference is the integer sum a + b, split into sum and
// carry out. A watchdog ends the run if it has not finished in time.
module tb_ks;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [3:0]  a4, b4, s4;
  logic        c4;

  ks dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));
  ks #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .sum(s4), .cout(c4));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] exp;
    a16 = x;
    b16 = y;
    exp = {1'b0, x} + {1'b0, y};
    @(posedge clk);
    checks++;
    if ({c16, s16} !== exp) begin
      failures++;
      $display("FAIL ks16 %h + %h: got %b_%h, expected %b_%h", x, y, c16, s16, exp[16], exp[15:0]);
    end
  endtask

  initial begin
    // 4-bit adder: exhaustive.
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        @(posedge clk);
        checks++;
        if ({c4, s4} !== 5'(i + j)) begin
          failures++;
          $display("FAIL ks4 %0d + %0d: got %b_%b", i, j, c4, s4);
        end
      end
    end
    // Worked example: A = 1001, B = 1100, carry out 1, sum 0101.
    a4 = 4'b1001;
    b4 = 4'b1100;
    @(posedge clk);
    checks++;
    if (c4 !== 1'b1 || s4 !== 4'b0101) begin
      failures++;
      $display("FAIL ks4 worked example: got %b_%b", c4, s4);
    end

    // 16-bit adder: corners, then random.
    check16(16'h0000, 16'h0000);
    check16(16'hFFFF, 16'h0001);
    check16(16'h0001, 16'hFFFF);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h7FFF, 16'h0001);
    check16(16'h8000, 16'h8000);
    check16(16'hAAAA, 16'h5555);
    check16(16'h5555, 16'h5556);
    for (int k = 0; k < 16; k++) check16(16'hFFFF >> k, 16'(1));
    for (int k = 0; k < 5000; k++) check16(16'($urandom), 16'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
