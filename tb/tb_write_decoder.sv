// tb_write_decoder: exhaustive test of the write-address decoder. Every
// select value is applied with the strobe low and high, and the enable
// vector is compared with the expected one-hot (or all-zero) pattern.
module tb_write_decoder;
  logic [4:0]  sel;
  logic        wr;
  logic [31:0] en;
  int checks = 0, failures = 0;

  write_decoder #(.SEL_W(5), .N(32)) dut (.sel, .wr, .en);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++)
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s); wr = 1'(w);
        #1;
        checks++;
        if (en !== ((w != 0) ? (32'd1 << s) : 32'd0)) begin
          failures++;
          $display("mismatch sel=%0d wr=%0d en=%h", s, w, en);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
