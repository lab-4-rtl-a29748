// regfile: the register file of the Micro6 processor.
//
// It holds 28 general-purpose registers of 32 bits (R00..R27, addresses
// 0..27) that carry ALU operands and results, three 9-bit index registers
// (IX0..IX2, addresses 28..30) used for register-indexed addressing, and a
// 9-bit up/down stack pointer (STP, address 31) into the fixed stack
// segment 0xE00-0xFFF.
//
// Interface
//   busC, selC, wr   write port: at a rising clock edge with wr high the
//                    register numbered selC takes busC. An index register
//                    or the stack pointer keeps only busC[8:0].
//   selA -> busA,    two read ports, combinational: busX shows register
//   selB -> busB     selX in the same cycle. Index registers read back
//                    zero-extended; the stack pointer reads back with bits
//                    31..9 set, so after reset it reads 0xFFFFFE00 (stack
//                    address 0xE00).
//   stkInc, stkDec   at a rising clock edge the stack pointer counts up or
//                    down by one; both together leave it unchanged.
//   rst              asynchronous, active high, clears every register.
//
// Timing: a written or counted value appears on busA/busB after the clock
// edge that stores it; there is no write-to-read bypass.
//
// The register set, the widths, the port names, the read-back of the
// upper bits of IX0..IX2 and STP, and the use of a generate loop for the
// general-purpose registers follow the document. Its own choices are the
// reset style, the priority of a write to STP over stkInc/stkDec in the
// same cycle, and the absence of a bypass.
module regfile #(
  parameter int unsigned DATA_W = regfile_pkg::DATA_W,
  parameter int unsigned NUM_GP = regfile_pkg::NUM_GP,
  parameter int unsigned NUM_IX = regfile_pkg::NUM_IX,
  parameter int unsigned IX_W   = regfile_pkg::IX_W,
  parameter int unsigned SP_W   = regfile_pkg::SP_W,
  parameter int unsigned SEL_W  = $clog2(NUM_GP + NUM_IX + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [SEL_W-1:0]  selA,
  input  logic [SEL_W-1:0]  selB,
  input  logic [SEL_W-1:0]  selC,
  input  logic              wr,
  input  logic              stkInc,
  input  logic              stkDec,
  input  logic [DATA_W-1:0] busC,
  output logic [DATA_W-1:0] busA,
  output logic [DATA_W-1:0] busB
);

  localparam int unsigned NREGS   = NUM_GP + NUM_IX + 1;
  localparam int unsigned SP_INDEX = NUM_GP + NUM_IX;

  // Every register, as seen on the read buses.
  logic [NREGS-1:0][DATA_W-1:0] reg_out;
  logic [NREGS-1:0]             wr_en;

  write_decoder #(.SEL_W(SEL_W), .N(NREGS)) u_wdec (
    .sel (selC),
    .wr  (wr),
    .en  (wr_en)
  );

  // General-purpose registers R00..R27.
  for (genvar i = 0; i < NUM_GP; i++) begin : g_gp
    data_reg #(.WIDTH(DATA_W)) u_gp (
      .clk (clk),
      .rst (rst),
      .en  (wr_en[i]),
      .d   (busC),
      .q   (reg_out[i])
    );
  end

  // Index registers IX0..IX2: the bits above IX_W read as zero.
  for (genvar i = 0; i < NUM_IX; i++) begin : g_ix
    logic [IX_W-1:0] ix_q;
    data_reg #(.WIDTH(IX_W)) u_ix (
      .clk (clk),
      .rst (rst),
      .en  (wr_en[NUM_GP + i]),
      .d   (busC[IX_W-1:0]),
      .q   (ix_q)
    );
    assign reg_out[NUM_GP + i] = DATA_W'(ix_q);
  end

  // Stack pointer: the bits above SP_W read as ones (stack segment at the
  // top of memory).
  logic [SP_W-1:0] sp_q;
  stack_pointer #(.WIDTH(SP_W)) u_sp (
    .clk  (clk),
    .rst  (rst),
    .load (wr_en[SP_INDEX]),
    .inc  (stkInc),
    .dec  (stkDec),
    .d    (busC[SP_W-1:0]),
    .q    (sp_q)
  );
  assign reg_out[SP_INDEX] = {{(DATA_W-SP_W){1'b1}}, sp_q};

  read_mux #(.WIDTH(DATA_W), .N(NREGS), .SEL_W(SEL_W)) u_rmux_a (
    .data (reg_out),
    .sel  (selA),
    .y    (busA)
  );

  read_mux #(.WIDTH(DATA_W), .N(NREGS), .SEL_W(SEL_W)) u_rmux_b (
    .data (reg_out),
    .sel  (selB),
    .y    (busB)
  );

  // Configuration rules.
  initial begin
    assert (NREGS <= (1 << SEL_W)) else $error("SEL_W too small for %0d registers", NREGS);
    assert (IX_W <= DATA_W && SP_W < DATA_W) else $error("IX_W/SP_W wider than DATA_W");
  end

endmodule
