// Self-checking test of ambit_sense_amp: single-cell sensing, triple-row
// majority on random rows, two-cell ties, column writes and reads, and that
// precharge clears the active state.
module tb_ambit_sense_amp;
  localparam int unsigned W = 64, DQ = 8;

  logic clk = 0, rst_n = 0;
  logic sense = 0, precharge = 0, col_we = 0;
  logic [1:0] n_cells = 1;
  logic [W-1:0] a, b, c, bl;
  logic [2:0] col_idx = 0;
  logic [DQ-1:0] col_wdata = 0, col_rdata;
  logic active;
  int checks = 0, failures = 0;

  ambit_sense_amp #(.W(W), .DQ_W(DQ)) dut (
    .clk(clk), .rst_n(rst_n), .sense(sense), .n_cells(n_cells), .cell_a(a),
    .cell_b(b), .cell_c(c), .precharge(precharge), .col_we(col_we),
    .col_idx(col_idx), .col_wdata(col_wdata), .col_rdata(col_rdata), .bl(bl),
    .active(active));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (bl !== exp || !active) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, bl, exp);
    end
  endtask

  task automatic do_sense(input logic [1:0] n);
    n_cells = n;
    sense = 1;
    @(posedge clk); #1;
    sense = 0;
  endtask

  task automatic do_pre();
    precharge = 1;
    @(posedge clk); #1;
    precharge = 0;
    checks++;
    if (active) failures++;
  endtask

  initial begin
    a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      logic [W-1:0] e;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      do_sense(2'd1);
      check(a, "single");
      do_pre();
      do_sense(2'd3);
      for (int i = 0; i < W; i++)
        e[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      check(e, "majority");
      // column write then read back
      col_idx = 3'($urandom);
      col_wdata = 8'($urandom);
      col_we = 1;
      @(posedge clk); #1;
      col_we = 0;
      e[col_idx*DQ +: DQ] = col_wdata;
      check(e, "column write");
      checks++;
      if (col_rdata != col_wdata) failures++;
      do_pre();
      do_sense(2'd2);
      check(a & b, "two cells");
      do_pre();
    end
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
