// tb_mac8bit: end-to-end self-checking testbench of the 8-bit multiply-
// accumulate unit at its default size.
//
// A reference model keeps acc = (acc + a*b) mod 2^16, cleared by rst. Inputs
// change at the falling edge; after each rising edge z must equal the model.
// The test runs: a reset; a single multiplication (one product after reset,
// z = a*b one clock later, the multiplier on its own); a run of random
// products; products of large operands until the 16-bit accumulator wraps;
// resets in the middle of an accumulation; and a hold of zero products.
// It counts how often each of these happened (accumulate, wrap-around,
// reset of a non-zero accumulator, one-cycle latency of a single product) and
// fails if any never did. A watchdog ends the run if it has not finished.
module tb_mac8bit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_accumulate = 0;
  int n_wrap = 0;
  int n_reset_nonzero = 0;
  int n_single = 0;

  logic        rst;
  logic [7:0]  a, b;
  logic [15:0] z;
  logic [15:0] model;

  mac8bit dut (.clk(clk), .rst(rst), .a(a), .b(b), .z(z));

  // One clock: drive at the falling edge, check after the rising edge.
  task automatic step(input logic r, input logic [7:0] av, input logic [7:0] bv);
    logic [16:0] wide;
    @(negedge clk);
    rst = r;
    a = av;
    b = bv;
    wide = {1'b0, model} + 17'(16'(av) * 16'(bv));
    if (r) begin
      if (model != 16'h0000) n_reset_nonzero++;
      model = 16'h0000;
    end else begin
      model = wide[15:0];
      if (av != 0 && bv != 0) n_accumulate++;
      if (wide[16]) n_wrap++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (z !== model) begin
      failures++;
      if (failures < 20) $display("FAIL rst=%b a=%0d b=%0d: z=%h expected %h", r, av, bv, z, model);
    end
  endtask

  // Single multiplication: after reset, one product must appear after exactly
  // one rising edge, and not before.
  task automatic single(input logic [7:0] av, input logic [7:0] bv);
    step(1'b1, 8'd0, 8'd0);
    @(negedge clk);
    rst = 1'b0;
    a = av;
    b = bv;
    checks++;
    if (z !== 16'h0000) begin
      failures++;
      $display("FAIL single %0d*%0d: z changed before the clock edge", av, bv);
    end
    @(posedge clk);
    #1;
    checks++;
    if (z !== 16'(av) * 16'(bv)) begin
      failures++;
      $display("FAIL single %0d*%0d: z=%0d", av, bv, z);
    end else begin
      n_single++;
    end
    model = z;
    // Hold the operands at zero: the accumulator must keep its value.
    step(1'b0, 8'd0, 8'd0);
  endtask

  initial begin
    rst = 1'b1;
    a = '0;
    b = '0;
    model = '0;
    step(1'b1, 8'd0, 8'd0);

    single(8'd13, 8'd11);
    single(8'd255, 8'd255);
    single(8'd128, 8'd2);

    // Accumulate a short known sequence: 1*2 + 3*4 + 5*6 + 7*8 = 100.
    step(1'b1, 8'd0, 8'd0);
    step(1'b0, 8'd1, 8'd2);
    step(1'b0, 8'd3, 8'd4);
    step(1'b0, 8'd5, 8'd6);
    step(1'b0, 8'd7, 8'd8);
    checks++;
    if (z !== 16'd100) begin
      failures++;
      $display("FAIL known sequence: z=%0d expected 100", z);
    end

    // Large products until the accumulator wraps past 2^16.
    for (int k = 0; k < 4; k++) step(1'b0, 8'd255, 8'd255);

    // Random operation with occasional resets.
    for (int k = 0; k < 20000; k++) begin
      step(($urandom_range(0, 199) == 0), 8'($urandom), 8'($urandom));
    end

    checks++;
    if (n_accumulate == 0) begin failures++; $display("FAIL no accumulation seen"); end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL accumulator never wrapped"); end
    checks++;
    if (n_reset_nonzero == 0) begin failures++; $display("FAIL no reset of a non-zero accumulator"); end
    checks++;
    if (n_single == 0) begin failures++; $display("FAIL no single multiplication passed"); end
    $display("accumulate=%0d wrap=%0d reset_nonzero=%0d single=%0d",
             n_accumulate, n_wrap, n_reset_nonzero, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
