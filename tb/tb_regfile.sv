// tb_regfile: end-to-end test of the register file at its default sizes
// (28 x 32-bit general-purpose, 3 x 9-bit index, 9-bit stack pointer).
//
// A reference model keeps the value each of the 32 registers must show on
// the read buses. Every cycle the testbench drives random read selects and
// a random write and stack operation, compares busA and busB with the
// model before the clock edge, and updates the model after it. Directed
// sequences add the cases random stimulus rarely reaches: the reset value
// of the stack pointer (address 0xE00), wrap-around at both ends of the
// stack segment, a write to the stack pointer together with stkInc, and a
// mid-run reset. Each mechanism is counted; one that never occurred counts
// as a failure.
module tb_regfile;
  localparam int NGP = 28, NIX = 3;
  localparam logic [4:0] SP = 5'd31;

  logic        clk = 0;
  logic        rst;
  logic [4:0]  selA, selB, selC;
  logic        wr, stkInc, stkDec;
  logic [31:0] busC, busA, busB;

  logic [31:0] model [32];
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_gp_wr, n_ix_wr, n_ix_trunc, n_sp_wr, n_sp_inc, n_sp_dec, n_sp_both;
  int n_sp_wr_over_cnt, n_wrap_up, n_wrap_down, n_reset, n_same_sel, n_no_bypass;

  regfile dut (.clk, .rst, .selA, .selB, .selC, .wr, .stkInc, .stkDec, .busC, .busA, .busB);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sp_val(logic [8:0] c);
    return {23'h7FFFFF, c};
  endfunction

  task automatic model_reset();
    for (int i = 0; i < 32; i++) model[i] = (i == 31) ? sp_val('0) : '0;
  endtask

  task automatic check_reads();
    checks++;
    if (busA !== model[selA]) begin
      failures++;
      $display("t=%0t busA sel=%0d got %h exp %h", $time, selA, busA, model[selA]);
    end
    checks++;
    if (busB !== model[selB]) begin
      failures++;
      $display("t=%0t busB sel=%0d got %h exp %h", $time, selB, busB, model[selB]);
    end
    // Stack pointer always points into the stack segment 0xE00-0xFFF.
    if (selA == SP) begin
      checks++;
      if (busA[11:0] < 12'hE00) begin
        failures++;
        $display("t=%0t stack pointer outside segment: %h", $time, busA);
      end
    end
  endtask

  // One clock cycle: drive on the falling edge, check the reads, then
  // update the model from the rising edge.
  task automatic cycle(logic [4:0] a, logic [4:0] b, logic w, logic [4:0] c,
                       logic [31:0] data, logic inc, logic dec);
    logic [8:0] sp_old, sp_new;
    @(negedge clk);
    selA = a; selB = b; wr = w; selC = c; busC = data; stkInc = inc; stkDec = dec;
    #1 check_reads();
    if (a == b) n_same_sel++;
    if (w && (a == c) && (model[c] != expected_write(c, data))) n_no_bypass++;
    @(posedge clk);
    sp_old = model[SP][8:0];
    sp_new = sp_old;
    if (w && c == SP) begin
      sp_new = data[8:0];
      n_sp_wr++;
      if (inc || dec) n_sp_wr_over_cnt++;
    end else if (inc && !dec) begin
      sp_new = sp_old + 9'd1; n_sp_inc++;
      if (sp_old == 9'h1FF) n_wrap_up++;
    end else if (dec && !inc) begin
      sp_new = sp_old - 9'd1; n_sp_dec++;
      if (sp_old == 9'h000) n_wrap_down++;
    end else if (inc && dec) n_sp_both++;
    if (w && c < 5'(NGP)) n_gp_wr++;
    if (w && c >= 5'(NGP) && c < SP) begin
      n_ix_wr++;
      if (data[31:9] != 0) n_ix_trunc++;
    end
    if (w && c != SP) model[c] = expected_write(c, data);
    model[SP] = sp_val(sp_new);
    #1 check_reads();
  endtask

  function automatic logic [31:0] expected_write(logic [4:0] c, logic [31:0] data);
    if (c < 5'(NGP))      return data;
    else if (c < SP)  return {23'd0, data[8:0]};
    else                  return sp_val(data[8:0]);
  endfunction

  initial begin
    selA = 0; selB = 0; selC = 0; wr = 0; stkInc = 0; stkDec = 0; busC = 0;
    n_gp_wr = 0; n_ix_wr = 0; n_ix_trunc = 0; n_sp_wr = 0; n_sp_inc = 0; n_sp_dec = 0;
    n_sp_both = 0; n_sp_wr_over_cnt = 0; n_wrap_up = 0; n_wrap_down = 0; n_reset = 0;
    n_same_sel = 0; n_no_bypass = 0;

    rst = 0; selA = SP; selB = 0;
    #1 rst = 1; model_reset(); n_reset++;
    #1 check_reads();
    checks++;
    if (busA !== 32'hFFFF_FE00) begin
      failures++;
      $display("stack pointer after reset %h, expected 0xFFFFFE00", busA);
    end
    @(negedge clk) rst = 0;

    // Fill every register with a distinct value and read each back on both ports.
    for (int i = 0; i < 32; i++) cycle(5'(i), 5'(i), 1, 5'(i), 32'hA5A5_0000 + 32'(i * 32'h1111), 0, 0);
    for (int i = 0; i < 32; i++) cycle(5'(i), 5'(31 - i), 0, 0, 0, 0, 0);

    // PUSH/POP-like use of the stack pointer: down through 0 and back up.
    cycle(SP, SP, 1, SP, 32'd2, 0, 0);
    for (int i = 0; i < 5; i++) cycle(SP, 0, 0, 0, 0, 0, 1);
    for (int i = 0; i < 5; i++) cycle(SP, 0, 0, 0, 0, 1, 0);
    // Wrap at the top of the segment (0xFFF -> 0xE00).
    cycle(SP, SP, 1, SP, 32'h0000_01FE, 0, 0);
    for (int i = 0; i < 3; i++) cycle(SP, 1, 0, 0, 0, 1, 0);
    // Write beats count; inc and dec together hold.
    cycle(SP, SP, 1, SP, 32'h0000_0100, 1, 0);
    cycle(SP, SP, 1, SP, 32'h0000_0080, 0, 1);
    cycle(SP, SP, 0, 0, 0, 1, 1);
    // Read and write the same register in one cycle: the read sees the old value.
    cycle(5, 5, 1, 5, 32'hDEAD_BEEF, 0, 0);
    cycle(5, 5, 1, 5, 32'h1234_5678, 0, 0);

    // Random traffic with a reset in the middle.
    for (int k = 0; k < 20000; k++) begin
      if (k == 10000) begin
        @(negedge clk);
        wr = 0; stkInc = 0; stkDec = 0;
        rst = 1; #1; model_reset(); n_reset++;
        check_reads();
        @(negedge clk) rst = 0;
      end
      cycle(5'($urandom), 5'($urandom), 1'($urandom), 5'($urandom), $urandom,
            ($urandom % 4) == 0, ($urandom % 4) == 0);
    end

    // Every mechanism must have occurred at least once.
    begin
      int cnt [string];
      cnt["general-purpose write"]        = n_gp_wr;
      cnt["index register write"]         = n_ix_wr;
      cnt["index write dropping bits"]    = n_ix_trunc;
      cnt["stack pointer write"]          = n_sp_wr;
      cnt["stack pointer increment"]      = n_sp_inc;
      cnt["stack pointer decrement"]      = n_sp_dec;
      cnt["stkInc and stkDec together"]   = n_sp_both;
      cnt["write over inc/dec"]           = n_sp_wr_over_cnt;
      cnt["wrap 0xFFF to 0xE00"]          = n_wrap_up;
      cnt["wrap 0xE00 to 0xFFF"]          = n_wrap_down;
      cnt["reset"]                        = n_reset;
      cnt["same register on both ports"]  = n_same_sel;
      cnt["read during write, old value"] = n_no_bypass;
      foreach (cnt[s]) begin
        $display("%-30s %0d", s, cnt[s]);
        checks++;
        if (cnt[s] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
