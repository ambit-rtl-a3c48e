// Self-checking test of ambit_chip (2 banks, 2 subarrays, reduced row
// width). Rows of both banks are loaded, then an or in bank 0 and a nand in
// bank 1 run with their commands interleaved cycle by cycle on the shared
// command bus (bank-level parallelism); both results and the untouched
// sources are checked through READs, including the one-cycle read latency.
module tb_ambit_chip;
  import ambit_pkg::*;
  localparam int unsigned W = 64, DQ = 8, NCOL = W / DQ;

  logic clk = 0, rst_n = 0;
  cmd_e cmd = CMD_NOP;
  logic ba = 0;
  logic [10:0] row = '0;
  logic [2:0] col = '0;
  logic [DQ-1:0] dq_wdata = '0, dq_rdata;
  logic dq_rvalid;
  logic [1:0] bank_active;
  int checks = 0, failures = 0;

  ambit_chip #(.W(W), .DQ_W(DQ), .N_BANK(2), .N_SUB(2)) dut (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .ba(ba), .row(row), .col(col),
    .dq_wdata(dq_wdata), .dq_rdata(dq_rdata), .dq_rvalid(dq_rvalid),
    .bank_active(bank_active));

  always #5 clk = ~clk;

  task automatic issue(input cmd_e c, input logic b, input logic [10:0] r,
                       input logic [2:0] cl, input logic [7:0] d);
    cmd = c; ba = b; row = r; col = cl; dq_wdata = d;
    @(posedge clk); #1;
    cmd = CMD_NOP;
  endtask
  task automatic write_row(input logic b, input logic [10:0] r, input logic [W-1:0] v);
    issue(CMD_ACT, b, r, 0, 0);
    for (int c = 0; c < NCOL; c++) issue(CMD_WR, b, r, 3'(c), v[c*DQ +: DQ]);
    @(posedge clk); #1;
    issue(CMD_PRE, b, r, 0, 0);
  endtask
  task automatic expect_row(input logic b, input logic [10:0] r, input logic [W-1:0] e,
                            input string what);
    logic [W-1:0] v;
    issue(CMD_ACT, b, r, 0, 0);
    for (int c = 0; c < NCOL; c++) begin
      issue(CMD_RD, b, r, 3'(c), 0);
      checks++;
      if (!dq_rvalid) failures++;
      v[c*DQ +: DQ] = dq_rdata;
    end
    issue(CMD_PRE, b, r, 0, 0);
    checks++;
    if (v !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, v, e);
    end
  endtask

  // one AAP on each bank, commands interleaved
  task automatic aap2(input logic [10:0] a0, input logic [10:0] b0,
                      input logic [10:0] a1, input logic [10:0] b1);
    issue(CMD_ACT, 0, a0, 0, 0);
    issue(CMD_ACT, 1, a1, 0, 0);
    issue(CMD_ACT, 0, b0, 0, 0);
    issue(CMD_ACT, 1, b1, 0, 0);
    checks++;
    if (bank_active != 2'b11) failures++;
    issue(CMD_PRE, 0, 0, 0, 0);
    issue(CMD_PRE, 1, 0, 0, 0);
  endtask

  initial begin
    logic [W-1:0] x0, y0, x1, y1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    x0 = {$urandom, $urandom}; y0 = {$urandom, $urandom};
    x1 = {$urandom, $urandom}; y1 = {$urandom, $urandom};
    write_row(0, 11'd30, x0); write_row(0, 11'd31, y0);
    write_row(1, 11'h400 | 11'd30, x1); write_row(1, 11'h400 | 11'd31, y1);
    // bank 0: or (C1), bank 1 subarray 1: nand (C0, then B12->B5, B4->Dk)
    aap2(11'd30, 11'd0, 11'h41e, 11'h400);
    aap2(11'd31, 11'd1, 11'h41f, 11'h401);
    aap2(11'd17, 11'd2, 11'h410, 11'h402);
    aap2(11'd12, 11'd40, 11'h40c, 11'h405);
    aap2(11'd12, 11'd41, 11'h404, 11'h428);
    expect_row(0, 11'd40, x0 | y0, "bank0 or");
    expect_row(1, 11'h428, ~(x1 & y1), "bank1 nand");
    expect_row(0, 11'd30, x0, "bank0 source");
    expect_row(1, 11'h41f, y1, "bank1 source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
