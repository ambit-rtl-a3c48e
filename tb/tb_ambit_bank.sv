// Self-checking test of ambit_bank with two subarrays at a reduced row
// width: the same local row in each subarray holds independent data, READ
// data arrive exactly one cycle after the command with rvalid, and an and /
// xor operation run in subarray 1 leaves subarray 0 untouched.
module tb_ambit_bank;
  import ambit_pkg::*;
  localparam int unsigned W = 64, DQ = 8, NCOL = W / DQ;

  logic clk = 0, rst_n = 0;
  cmd_e cmd = CMD_NOP;
  logic [10:0] row = '0;
  logic [2:0] col = '0;
  logic [DQ-1:0] wdata = '0, rdata;
  logic rvalid, active;
  int checks = 0, failures = 0;

  ambit_bank #(.W(W), .DQ_W(DQ), .N_SUB(2)) dut (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .row(row), .col(col), .wdata(wdata),
    .rdata(rdata), .rvalid(rvalid), .active(active));

  always #5 clk = ~clk;

  task automatic issue(input cmd_e c, input logic [10:0] r, input logic [2:0] cl,
                       input logic [7:0] d);
    cmd = c; row = r; col = cl; wdata = d;
    @(posedge clk); #1;
    cmd = CMD_NOP;
  endtask
  task automatic write_row(input logic [10:0] r, input logic [W-1:0] v);
    issue(CMD_ACT, r, 0, 0);
    for (int c = 0; c < NCOL; c++) issue(CMD_WR, r, 3'(c), v[c*DQ +: DQ]);
    @(posedge clk); #1;
    issue(CMD_PRE, r, 0, 0);
  endtask
  task automatic read_row(input logic [10:0] r, output logic [W-1:0] v);
    issue(CMD_ACT, r, 0, 0);
    for (int c = 0; c < NCOL; c++) begin
      issue(CMD_RD, r, 3'(c), 0);
      checks++;
      if (!rvalid) failures++;
      v[c*DQ +: DQ] = rdata;
    end
    issue(CMD_PRE, r, 0, 0);
  endtask
  task automatic aap(input logic [10:0] a, input logic [10:0] b);
    issue(CMD_ACT, a, 0, 0); @(posedge clk); #1;
    issue(CMD_ACT, b, 0, 0); @(posedge clk); #1;
    issue(CMD_PRE, a, 0, 0);
  endtask
  task automatic ap(input logic [10:0] a);
    issue(CMD_ACT, a, 0, 0); @(posedge clk); #1;
    issue(CMD_PRE, a, 0, 0);
  endtask
  task automatic expect_row(input logic [10:0] r, input logic [W-1:0] e, input string what);
    logic [W-1:0] v;
    read_row(r, v);
    checks++;
    if (v !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, v, e);
    end
  endtask

  localparam logic [10:0] S1 = 11'h400;  // subarray 1

  initial begin
    logic [W-1:0] x0, x1, y1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    x0 = {$urandom, $urandom}; x1 = {$urandom, $urandom}; y1 = {$urandom, $urandom};
    write_row(11'd18, x0);
    write_row(S1 | 11'd18, x1);
    write_row(S1 | 11'd19, y1);
    expect_row(11'd18, x0, "sub0 row");
    expect_row(S1 | 11'd18, x1, "sub1 row");
    // and in subarray 1: D2 = D0 & D1
    aap(S1 | 11'd18, S1 | 11'd0);
    aap(S1 | 11'd19, S1 | 11'd1);
    aap(S1 | 11'd16, S1 | 11'd2);
    aap(S1 | 11'd12, S1 | 11'd20);
    expect_row(S1 | 11'd20, x1 & y1, "and in subarray 1");
    // xor in subarray 1: D3 = D0 ^ D1
    aap(S1 | 11'd18, S1 | 11'd8);
    aap(S1 | 11'd19, S1 | 11'd9);
    aap(S1 | 11'd16, S1 | 11'd10);
    ap(S1 | 11'd14);
    ap(S1 | 11'd15);
    aap(S1 | 11'd17, S1 | 11'd2);
    aap(S1 | 11'd12, S1 | 11'd21);
    expect_row(S1 | 11'd21, x1 ^ y1, "xor in subarray 1");
    expect_row(11'd18, x0, "sub0 untouched");
    expect_row(11'd16, '0, "sub0 C0");
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
