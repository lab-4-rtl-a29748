// tb_read_mux: self-checking test of the 32-to-1 word multiplexer. Random
// register contents are loaded and every select value is checked against
// the word it must pass, over many random data sets.
module tb_read_mux;
  logic [31:0][31:0] data;
  logic [4:0]        sel;
  logic [31:0]       y;
  int checks = 0, failures = 0;

  read_mux #(.WIDTH(32), .N(32), .SEL_W(5)) dut (.data, .sel, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 32; i++) data[i] = $urandom;
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (y !== data[s]) begin
          failures++;
          $display("mismatch sel=%0d y=%h exp %h", s, y, data[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
