// read_mux: N-to-1 multiplexer of WIDTH-bit words for a read port.
//
// y is data[sel], combinationally; a select beyond N-1 gives zero. Two of
// these drive busA and busB of the register file from selA and selB. The
// document gives the function ("selection lines select which register
// output is connected to each port"); the multiplexer itself is this
// design's own.
module read_mux #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] data,
  input  logic [SEL_W-1:0]        sel,
  output logic [WIDTH-1:0]        y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (sel == SEL_W'(i)) y = data[i];
  end

endmodule
