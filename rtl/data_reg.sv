// data_reg: a parallel-load register with write enable.
//
// On a rising clock edge with en high the register takes d; otherwise it
// keeps its value. rst clears it at once, without waiting for the clock.
// The register file uses it at 32 bits for the general-purpose registers
// and at 9 bits for the index registers. The document takes this unit
// from an earlier exercise and gives only its widths; the enable, the
// asynchronous active-high reset and the reset value of zero are this
// design's choices.
//
// Timing: q changes one clock edge after en and d are presented.
module data_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
