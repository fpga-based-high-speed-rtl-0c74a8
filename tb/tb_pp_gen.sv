// tb_pp_gen: self-checking testbench of the 8 x 8 partial-product generator.
//
// For every multiplier value y and a set of multiplicands x, each row pp[i]
// is compared with (y[i] ? x : 0) shifted left by i, and the rows' integer sum
// with x*y. A watchdog ends the run if it has not finished in time.
module tb_pp_gen;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0]       x, y;
  logic [7:0][15:0] pp;

  pp_gen dut (.x(x), .y(y), .pp(pp));

  task automatic check(input logic [7:0] xv, input logic [7:0] yv);
    int unsigned total;
    x = xv;
    y = yv;
    @(posedge clk);
    total = 0;
    for (int i = 0; i < 8; i++) begin
      logic [15:0] exp;
      exp = yv[i] ? (16'(xv) << i) : 16'h0000;
      checks++;
      if (pp[i] !== exp) begin
        failures++;
        $display("FAIL x=%h y=%h row %0d: got %h expected %h", xv, yv, i, pp[i], exp);
      end
      total += 32'(pp[i]);
    end
    checks++;
    if (total != 32'(xv) * 32'(yv)) begin
      failures++;
      $display("FAIL x=%h y=%h: rows sum to %0d", xv, yv, total);
    end
  endtask

  initial begin
    for (int yv = 0; yv < 256; yv++) begin
      check(8'hFF, 8'(yv));
      check(8'h01, 8'(yv));
      check(8'(yv), 8'(yv));
      check(8'($urandom), 8'(yv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
