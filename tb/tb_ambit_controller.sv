// Self-checking test of ambit_controller (4 banks, 2 subarrays, 64-byte
// rows) against a command-bus monitor written here.
//  * word READ / WRITE: ACTIVATE, READ/WRITE no earlier than tRCD, PRECHARGE
//    no earlier than tRAS, right bank/row/column; read data returned.
//  * bbops of several rows: the commands seen by each bank must be exactly
//    the programs of that bank's rows in row order, with the addresses of
//    the interleaved mapping, and per-bank spacing of at least the AAP
//    timing. The whole operation must use the banks in parallel: an 8-row
//    and takes about two row operations' time, not eight.
//  * misaligned, mis-sized or cross-subarray bbops are rejected without a
//    command.
// The event counters must show overlapped and serial AAPs, APs, dispatch
// stalls and rejects.
module tb_ambit_controller;
  import ambit_pkg::*;
  localparam int unsigned NB = 4, NS = 2, RB = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready;
  req_kind_e req_kind = REQ_READ;
  op_e req_op = OP_AND;
  logic [31:0] req_dst = 0, req_src1 = 0, req_src2 = 0, req_size = 0;
  logic [63:0] req_wdata = 0;
  logic rsp_valid, rsp_rejected;
  logic [63:0] rsp_rdata;
  cmd_e dram_cmd;
  logic [1:0] dram_ba;
  logic [10:0] dram_row;
  logic [2:0] dram_col;
  logic [63:0] dram_wdata, dram_rdata = 0;
  logic dram_rvalid = 0;
  logic [31:0] stats [6];
  int checks = 0, failures = 0;

  ambit_controller #(.N_BANK(NB), .N_SUB(NS), .ROW_BYTES(RB)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_kind(req_kind), .req_op(req_op), .req_dst(req_dst), .req_src1(req_src1),
    .req_src2(req_src2), .req_size(req_size), .req_wdata(req_wdata),
    .rsp_valid(rsp_valid), .rsp_rejected(rsp_rejected), .rsp_rdata(rsp_rdata),
    .dram_cmd(dram_cmd), .dram_ba(dram_ba), .dram_row(dram_row),
    .dram_col(dram_col), .dram_wdata(dram_wdata), .dram_rdata(dram_rdata),
    .dram_rvalid(dram_rvalid), .stats(stats));

  // ------------------------------------------------------ bus monitor
  typedef struct { cmd_e c; int row; int col; longint t; logic [63:0] wd; } ev_t;
  ev_t bank_log [NB][$];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    dram_rvalid <= 1'b0;
    if (dram_cmd != CMD_NOP)
      bank_log[dram_ba].push_back('{dram_cmd, int'(dram_row), int'(dram_col), cyc, dram_wdata});
    if (dram_cmd == CMD_RD) begin
      dram_rvalid <= 1'b1;
      dram_rdata  <= {32'hC0DE0000 | 32'(dram_row), 32'(dram_col)};
    end
  end

  function automatic void clear_logs();
    for (int b = 0; b < NB; b++) bank_log[b].delete();
  endfunction

  task automatic send(input req_kind_e k, input op_e o, input int dst, input int s1,
                      input int s2, input int size, input logic [63:0] wd,
                      output longint lat);
    longint t0;
    req_kind = k; req_op = o; req_dst = dst; req_src1 = s1; req_src2 = s2;
    req_size = size; req_wdata = wd; req_valid = 1;
    while (!req_ready) @(posedge clk);
    @(posedge clk); #1;
    req_valid = 0;
    t0 = cyc;
    while (!rsp_valid) begin @(posedge clk); #1; end
    lat = cyc - t0;
  endtask

  // expected program of one row op: list of {cmd, local row}
  function automatic void prog(op_e o, int di, int dj, int dk, ref int q [$]);
    int ca = (o == OP_OR || o == OP_NOR || o == OP_XNOR) ? 17 : 16;
    int cf = (o == OP_XNOR) ? 16 : 17;
    int a [$];
    case (o)
      OP_NOT: a = '{di, 5, 4, dk};
      OP_AND, OP_OR: a = '{di, 0, dj, 1, ca, 2, 12, dk};
      OP_NAND, OP_NOR: a = '{di, 0, dj, 1, ca, 2, 12, 5, 4, dk};
      default: a = '{di, 8, dj, 9, ca, 10, 14, -1, 15, -1, cf, 2, 12, dk};
    endcase
    for (int i = 0; i < a.size(); i += 2) begin
      q.push_back(a[i]);
      if (a[i + 1] >= 0) q.push_back(a[i + 1]);
      q.push_back(-2);  // PRECHARGE
    end
  endfunction

  function automatic int locrow(int g);
    return (((g / NB) % NS) << 10) | (18 + g / (NB * NS));
  endfunction

  task automatic check_bbop(op_e o, int gd, int g1, int g2, int nrows);
    int q [NB][$];
    for (int r = 0; r < nrows; r++) begin
      int b = (gd + r) % NB;
      int sub = ((gd + r) / NB) % NS;
      int tmp [$];
      prog(o, locrow(g1 + r) & 'h3ff, locrow(g2 + r) & 'h3ff, locrow(gd + r) & 'h3ff, tmp);
      foreach (tmp[i]) q[b].push_back(tmp[i] < 0 ? tmp[i] : ((sub << 10) | tmp[i]));
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (bank_log[b].size() != q[b].size()) begin
        failures++;
        $display("FAIL %s bank %0d: %0d commands, expected %0d", o.name(), b,
                 bank_log[b].size(), q[b].size());
        continue;
      end
      foreach (q[b][i]) begin
        ev_t e = bank_log[b][i];
        bit ok = (q[b][i] == -2) ? (e.c == CMD_PRE) : (e.c == CMD_ACT && e.row == q[b][i]);
        // spacing: PRE->ACT >= tRP, ACT->ACT >= tRCD, ACT->PRE >= tRAS - tRCD
        if (i > 0) begin
          longint gap = e.t - bank_log[b][i - 1].t;
          if (bank_log[b][i - 1].c == CMD_PRE && gap < T_RP) ok = 0;
          if (bank_log[b][i - 1].c == CMD_ACT && e.c == CMD_ACT && gap < T_RCD) ok = 0;
          if (e.c == CMD_PRE && gap < T_RAS - T_RCD) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL %s bank %0d cmd %0d: %s row %h at %0d", o.name(), b, i,
                   e.c.name(), e.row, e.t);
        end
      end
    end
  endtask

  initial begin
    longint lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // word write: row 13, byte 24 -> bank 1, sub 1, d 1, col 3
    clear_logs();
    send(REQ_WRITE, OP_AND, 13 * RB + 24, 0, 0, 0, 64'h1122334455667788, lat);
    checks++;
    if (bank_log[1].size() != 3 || bank_log[1][0].c != CMD_ACT ||
        bank_log[1][0].row != ((1 << 10) | 19) || bank_log[1][1].c != CMD_WR ||
        bank_log[1][1].col != 3 || bank_log[1][1].wd != 64'h1122334455667788 ||
        bank_log[1][1].t - bank_log[1][0].t < T_RCD ||
        bank_log[1][2].c != CMD_PRE || bank_log[1][2].t - bank_log[1][0].t < T_RAS) begin
      failures++;
      $display("FAIL word write sequence");
    end

    // word read: row 6, byte 56 -> bank 2, sub 1, d 0, col 7
    clear_logs();
    send(REQ_READ, OP_AND, 6 * RB + 56, 0, 0, 0, 0, lat);
    checks++;
    if (rsp_rejected || rsp_rdata != {32'hC0DE0000 | ((1 << 10) | 18), 32'd7} ||
        bank_log[2].size() != 3) begin
      failures++;
      $display("FAIL word read %h", rsp_rdata);
    end

    // bbops over 8 rows; operands 8 rows apart share bank and subarray
    for (int o = 0; o < 7; o++) begin
      op_e opv;
      opv = op_e'(o);
      clear_logs();
      send(REQ_BBOP, opv, 16 * RB, 24 * RB, 32 * RB, 8 * RB, 0, lat);
      checks++;
      if (rsp_rejected) failures++;
      check_bbop(opv, 16, 24, 32, 8);
      if (opv == OP_AND) begin
        // 8 rows on 4 banks: two row operations of ~160 cycles each
        checks++;
        if (lat < 320 || lat > 400) begin
          failures++;
          $display("FAIL and latency %0d", lat);
        end
      end
    end

    // rejects: misaligned dst, size not a multiple, cross-subarray source,
    // rows beyond the D-group
    clear_logs();
    send(REQ_BBOP, OP_AND, 16 * RB + 8, 24 * RB, 32 * RB, RB, 0, lat);
    checks++; if (!rsp_rejected) failures++;
    send(REQ_BBOP, OP_AND, 16 * RB, 24 * RB, 32 * RB, RB + 8, 0, lat);
    checks++; if (!rsp_rejected) failures++;
    send(REQ_BBOP, OP_OR, 16 * RB, 25 * RB, 32 * RB, RB, 0, lat);
    checks++; if (!rsp_rejected) failures++;
    send(REQ_BBOP, OP_NOT, 8 * 1000 * RB, 0, 0, 8 * 10 * RB, 0, lat);
    checks++; if (!rsp_rejected) failures++;
    checks++;
    if (bank_log[0].size() + bank_log[1].size() + bank_log[2].size() + bank_log[3].size() != 0)
      failures++;

    $display("stats: fast %0d serial %0d ap %0d stalls %0d conflicts %0d rejects %0d",
             stats[0], stats[1], stats[2], stats[3], stats[4], stats[5]);
    // counter 4 (two engines requesting in one cycle) is informative only:
    // dispatch staggers the engines by a cycle, so it rarely fires
    for (int i = 0; i < 6; i++) begin
      if (i == 4) continue;
      checks++;
      if (stats[i] == 0) begin
        failures++;
        $display("FAIL event %0d never happened", i);
      end
    end
    checks++;
    if (stats[5] != 4) failures++;
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
