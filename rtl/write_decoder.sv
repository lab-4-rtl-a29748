// write_decoder: turns the write address and strobe into one enable per
// register.
//
// en[i] is high exactly when wr is high and sel equals i; with wr low all
// enables are low. It is purely combinational. The document says only that
// selC selects the register written when wr is asserted; the binary
// decoder is this design's own.
module write_decoder #(
  parameter int unsigned SEL_W = 5,
  parameter int unsigned N     = 32
) (
  input  logic [SEL_W-1:0] sel,
  input  logic             wr,
  output logic [N-1:0]     en
);

  always_comb begin
    en = '0;
    for (int i = 0; i < N; i++)
      en[i] = wr && (sel == SEL_W'(i));
  end

  // At most one register is written per clock.
  always_comb assert ($onehot0(en));

endmodule
