// stack_pointer: the 9-bit up/down counter behind the STP register.
//
// At a rising clock edge the counter loads d when load is high, otherwise
// counts up on inc or down on dec; with inc and dec both high, or neither,
// it holds. It counts modulo 2^WIDTH, so it wraps around inside the stack
// segment. rst clears it asynchronously, which the register file reads as
// stack address 0xE00.
//
// The document gives the width and the up/down function and says that the
// stack pointer starts at 0xE00. The priority of load over counting, the
// behaviour with inc and dec together, wrap-around and the reset style are
// this design's choices.
module stack_pointer #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             inc,
  input  logic             dec,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              q <= '0;
    else if (load)        q <= d;
    else if (inc && !dec) q <= q + 1'b1;
    else if (dec && !inc) q <= q - 1'b1;
  end

endmodule
