// tb_data_reg: self-checking test of the enable register at both widths
// the register file uses, 32 bits (general-purpose) and 9 bits (index).
// Random enables and data are applied for many cycles, with resets in
// between, and each output is compared with a reference value kept in the
// testbench.
module tb_data_reg;
  logic        clk = 0;
  logic        rst;
  logic        en32, en9;
  logic [31:0] d32, q32, m32;
  logic [8:0]  d9, q9, m9;
  int checks = 0, failures = 0;

  data_reg #(.WIDTH(32)) dut32 (.clk, .rst, .en(en32), .d(d32), .q(q32));
  data_reg #(.WIDTH(9))  dut9  (.clk, .rst, .en(en9),  .d(d9),  .q(q9));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (q32 !== m32 || q9 !== m9) begin
      failures++;
      $display("mismatch t=%0t q32=%h exp %h q9=%h exp %h", $time, q32, m32, q9, m9);
    end
  endtask

  initial begin
    en32 = 0; en9 = 0; d32 = 0; d9 = 0;
    rst = 0; m32 = 0; m9 = 0;
    #1 rst = 1;
    #1 check();                  // asynchronous reset acts without a clock
    @(negedge clk) rst = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      en32 = 1'($urandom); en9 = 1'($urandom);
      d32 = $urandom; d9 = 9'($urandom);
      if (c % 300 == 299) begin
        rst = 1; #1; m32 = 0; m9 = 0; check(); rst = 0;
      end
      @(posedge clk);
      if (en32) m32 = d32;
      if (en9)  m9  = d9;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
