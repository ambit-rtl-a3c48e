// Self-checking test of ambit_subarray at a reduced row width.
// Rows are written and read through column accesses. It checks: C0 reads all
// zeros and C1 all ones after reset; an in-array copy (AAP D->D); a triple-
// row activation B12 gives the bitwise majority of T0, T1, T2 and leaves it
// in all three; the n-wordline of a DCC row stores the inverse (B5 then B4);
// B8 copies a row and its inverse at once; and, with the AAP sequences of
// all seven operations issued command by command, the destination row
// equals the Boolean result computed here from the source rows.
module tb_ambit_subarray;
  import ambit_pkg::*;
  localparam int unsigned W = 64, DQ = 8, NCOL = W / DQ;

  logic clk = 0, rst_n = 0;
  logic act = 0, pre = 0, col_we = 0;
  logic [LOCAL_ROW_W-1:0] act_addr = '0;
  logic [2:0] col_idx = '0;
  logic [DQ-1:0] col_wdata = '0, col_rdata;
  logic active;
  int checks = 0, failures = 0;

  ambit_subarray #(.W(W), .DQ_W(DQ)) dut (
    .clk(clk), .rst_n(rst_n), .act(act), .act_addr(act_addr), .pre(pre),
    .col_we(col_we), .col_idx(col_idx), .col_wdata(col_wdata),
    .col_rdata(col_rdata), .active(active));

  always #5 clk = ~clk;

  function automatic logic [9:0] D(int n); return 10'(18 + n); endfunction
  function automatic logic [9:0] B(int n); return 10'(n); endfunction
  localparam logic [9:0] C0 = 10'd16, C1 = 10'd17;

  task automatic cmd_act(input logic [9:0] a);
    act_addr = a; act = 1;
    @(posedge clk); #1; act = 0;
    @(posedge clk); #1;
  endtask
  task automatic cmd_pre();
    pre = 1;
    @(posedge clk); #1; pre = 0;
  endtask
  task automatic aap(input logic [9:0] a1, input logic [9:0] a2);
    cmd_act(a1); cmd_act(a2); cmd_pre();
  endtask
  task automatic ap(input logic [9:0] a1);
    cmd_act(a1); cmd_pre();
  endtask
  task automatic write_row(input logic [9:0] a, input logic [W-1:0] v);
    cmd_act(a);
    for (int c = 0; c < NCOL; c++) begin
      col_idx = 3'(c); col_wdata = v[c*DQ +: DQ]; col_we = 1;
      @(posedge clk); #1;
    end
    col_we = 0;
    @(posedge clk); #1;
    cmd_pre();
  endtask
  task automatic read_row(input logic [9:0] a, output logic [W-1:0] v);
    cmd_act(a);
    for (int c = 0; c < NCOL; c++) begin
      col_idx = 3'(c); #1;
      v[c*DQ +: DQ] = col_rdata;
    end
    cmd_pre();
  endtask
  task automatic expect_row(input logic [9:0] a, input logic [W-1:0] e, input string what);
    logic [W-1:0] v;
    read_row(a, v);
    checks++;
    if (v !== e) begin
      failures++;
      $display("FAIL %s: row %0d = %h, expected %h", what, a, v, e);
    end
  endtask

  task automatic run_op(input op_e op, input logic [9:0] di, input logic [9:0] dj,
                        input logic [9:0] dk);
    logic [9:0] cA, cF;
    cA = (op == OP_OR || op == OP_NOR || op == OP_XNOR) ? C1 : C0;
    cF = (op == OP_XNOR) ? C0 : C1;
    case (op)
      OP_NOT: begin aap(di, B(5)); aap(B(4), dk); end
      OP_AND, OP_OR: begin
        aap(di, B(0)); aap(dj, B(1)); aap(cA, B(2)); aap(B(12), dk);
      end
      OP_NAND, OP_NOR: begin
        aap(di, B(0)); aap(dj, B(1)); aap(cA, B(2)); aap(B(12), B(5)); aap(B(4), dk);
      end
      default: begin
        aap(di, B(8)); aap(dj, B(9)); aap(cA, B(10)); ap(B(14)); ap(B(15));
        aap(cF, B(2)); aap(B(12), dk);
      end
    endcase
  endtask

  function automatic logic [W-1:0] ref_op(op_e o, logic [W-1:0] x, logic [W-1:0] y);
    case (o)
      OP_NOT:  return ~x;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_NAND: return ~(x & y);
      OP_NOR:  return ~(x | y);
      OP_XOR:  return x ^ y;
      default: return ~(x ^ y);
    endcase
  endfunction

  initial begin
    logic [W-1:0] x, y, z, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_row(C0, '0, "C0");
    expect_row(C1, '1, "C1");

    // RowClone-style copy D0 -> D5
    x = {$urandom, $urandom};
    write_row(D(0), x);
    aap(D(0), D(5));
    expect_row(D(5), x, "copy");
    expect_row(D(0), x, "copy source kept");

    // direct triple-row activation
    x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
    write_row(B(0), x); write_row(B(1), y); write_row(B(2), z);
    for (int i = 0; i < W; i++) e[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    ap(B(12));
    expect_row(B(0), e, "TRA T0");
    expect_row(B(2), e, "TRA T2");

    // NOT through the n-wordline of DCC0
    x = {$urandom, $urandom};
    write_row(D(1), x);
    aap(D(1), B(5));
    expect_row(B(4), ~x, "DCC0 negation");

    // B8: inverse into DCC0 and copy into T0
    x = {$urandom, $urandom};
    write_row(D(2), x);
    aap(D(2), B(8));
    expect_row(B(0), x, "B8 T0");
    expect_row(B(4), ~x, "B8 DCC0");

    for (int o = 0; o < 7; o++) begin
      for (int it = 0; it < 4; it++) begin
        op_e opv;
        opv = op_e'(o);
        x = {$urandom, $urandom}; y = {$urandom, $urandom};
        write_row(D(10 + it), x);
        write_row(D(1000 - it), y);
        run_op(op_e'(o), D(10 + it), D(1000 - it), D(500 + o));
        expect_row(D(500 + o), ref_op(opv, x, y), opv.name());
        expect_row(D(10 + it), x, "source unchanged");
      end
    end
    expect_row(C0, '0, "C0 kept");
    expect_row(C1, '1, "C1 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
