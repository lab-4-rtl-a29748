// tb_stack_pointer: self-checking test of the 9-bit up/down counter.
// Phase 1 counts up through a full wrap (0x1FF -> 0) and back down through
// zero; phase 2 applies random load/inc/dec combinations, including inc
// and dec together and load with counting, against a reference count.
module tb_stack_pointer;
  localparam int W = 9;
  logic         clk = 0;
  logic         rst, load, inc, dec;
  logic [W-1:0] d, q;
  int           model;
  int checks = 0, failures = 0;

  stack_pointer #(.WIDTH(W)) dut (.clk, .rst, .load, .inc, .dec, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (int'(q) !== model) begin
      failures++;
      $display("mismatch t=%0t q=%0d exp %0d", $time, q, model);
    end
  endtask

  task automatic step(bit l, bit i, bit dd, logic [W-1:0] v);
    @(negedge clk);
    load = l; inc = i; dec = dd; d = v;
    @(posedge clk);
    if (l)            model = int'(v);
    else if (i && !dd) model = (model + 1) % (1 << W);
    else if (dd && !i) model = (model + (1 << W) - 1) % (1 << W);
    #1 check();
  endtask

  initial begin
    load = 0; inc = 0; dec = 0; d = 0;
    rst = 0; model = 0;
    #1 rst = 1;
    #1 check();
    @(negedge clk) rst = 0;
    // Full count up, wrapping past 511.
    for (int k = 0; k < (1 << W) + 3; k++) step(0, 1, 0, '0);
    // Count down through zero.
    for (int k = 0; k < 10; k++) step(0, 0, 1, '0);
    // Random mixes.
    for (int k = 0; k < 3000; k++)
      step(($urandom % 8) == 0, 1'($urandom), 1'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
