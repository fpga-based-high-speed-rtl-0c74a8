// pipo1: parallel-in parallel-out register used as the accumulator of the
// multiply-accumulate unit (WIDTH = 16 bits by default).
//
// All WIDTH bits are loaded from din on every rising clock edge and shown on
// dout. rst is active high and synchronous: at a rising edge with rst = 1 the
// register clears to 0. The reset polarity and its synchronous form are a
// choice of this implementation; the design only names a rst pin.
module pipo1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= din;
  end

endmodule
