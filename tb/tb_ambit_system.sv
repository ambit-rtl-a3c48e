// End-to-end test of ambit_system at reduced size: 8 chips with 64-bit rows
// (a 64-byte rank row), 4 banks, 2 subarrays per bank.
// The host fills bit vectors with random words through ordinary writes,
// runs all seven bulk bitwise operations on multi-row vectors, reads every
// result word back and compares it with the operation computed here from
// the written data; the sources must be unchanged. Misaligned and
// cross-subarray requests must be rejected. The bus is watched to count the
// mechanisms of the design, and each must occur at least once: triple-row
// activations (B12-B15), DCC negations (n-wordlines, B5/B7/B8/B9), in-array
// copies into and out of the designated rows, overlapped and serial AAPs,
// APs, banks working in parallel, dispatch stalls and rejects.
module tb_ambit_system;
  import ambit_pkg::*;
  localparam int unsigned NB = 4, NS = 2, WB = 64, RB = WB * 8 / 8;  // 64 B rows
  localparam int unsigned WPR = RB / 8;                               // words per row

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready;
  req_kind_e req_kind = REQ_READ;
  op_e req_op = OP_AND;
  logic [31:0] req_dst = 0, req_src1 = 0, req_src2 = 0, req_size = 0;
  logic [63:0] req_wdata = 0;
  logic rsp_valid, rsp_rejected;
  logic [63:0] rsp_rdata;
  cmd_e bus_cmd;
  logic [1:0] bus_ba;
  logic [10:0] bus_row;
  logic [31:0] stats [6];
  int checks = 0, failures = 0;

  ambit_system #(.NCHIP(8), .N_BANK(NB), .N_SUB(NS), .W(WB)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_kind(req_kind), .req_op(req_op), .req_dst(req_dst), .req_src1(req_src1),
    .req_src2(req_src2), .req_size(req_size), .req_wdata(req_wdata),
    .rsp_valid(rsp_valid), .rsp_rejected(rsp_rejected), .rsp_rdata(rsp_rdata),
    .bus_cmd(bus_cmd), .bus_ba(bus_ba), .bus_row(bus_row), .stats(stats));

  // ------------------------------------------------- mechanism counters
  int n_tra = 0, n_neg = 0, n_parallel = 0;
  logic [NB-1:0] open_bank = '0;
  always @(posedge clk) begin
    if (bus_cmd == CMD_ACT) begin
      if (bus_row[9:0] >= 10'd12 && bus_row[9:0] <= 10'd15) n_tra++;
      if (bus_row[9:0] == 10'd5 || bus_row[9:0] == 10'd7 ||
          bus_row[9:0] == 10'd8 || bus_row[9:0] == 10'd9) n_neg++;
      if ((open_bank & ~(NB'(1) << bus_ba)) != '0) n_parallel++;
      open_bank[bus_ba] <= 1'b1;
    end
    if (bus_cmd == CMD_PRE) open_bank[bus_ba] <= 1'b0;
  end

  // -------------------------------------------------------- host tasks
  task automatic send(input req_kind_e k, input op_e o, input int dst, input int s1,
                      input int s2, input int size, input logic [63:0] wd);
    req_kind = k; req_op = o; req_dst = dst; req_src1 = s1; req_src2 = s2;
    req_size = size; req_wdata = wd; req_valid = 1;
    while (!req_ready) @(posedge clk);
    @(posedge clk); #1;
    req_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; end
  endtask

  logic [63:0] mem [int];  // host's copy of written words, by byte address

  task automatic fill(input int row, input int nrows);
    for (int w = 0; w < nrows * WPR; w++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      mem[row * RB + w * 8] = v;
      send(REQ_WRITE, OP_AND, row * RB + w * 8, 0, 0, 0, v);
    end
  endtask

  function automatic logic [63:0] ref_op(op_e o, logic [63:0] x, logic [63:0] y);
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

  task automatic verify(input int row, input int nrows, input logic [63:0] exp [],
                        input string what);
    for (int w = 0; w < nrows * WPR; w++) begin
      send(REQ_READ, OP_AND, row * RB + w * 8, 0, 0, 0, 0);
      checks++;
      if (rsp_rejected || rsp_rdata !== exp[w]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s word %0d: %h expected %h", what, w, rsp_rdata, exp[w]);
      end
    end
  endtask

  initial begin
    int nr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // sources Di at rows 8.., Dj at rows 16.. (same subarray row by row)
    nr = 5;
    fill(8, nr);
    fill(16, nr);
    for (int o = 0; o < 7; o++) begin
      op_e opv;
      logic [63:0] exp [];
      int dst;
      opv = op_e'(o);
      dst = 24 + 8 * o;
      exp = new[nr * WPR];
      for (int w = 0; w < nr * WPR; w++)
        exp[w] = ref_op(opv, mem[8 * RB + w * 8], mem[16 * RB + w * 8]);
      send(REQ_BBOP, opv, dst * RB, 8 * RB, 16 * RB, nr * RB, 0);
      checks++;
      if (rsp_rejected) failures++;
      verify(dst, nr, exp, opv.name());
    end
    // sources unchanged
    begin
      logic [63:0] exp [];
      exp = new[nr * WPR];
      for (int w = 0; w < nr * WPR; w++) exp[w] = mem[8 * RB + w * 8];
      verify(8, nr, exp, "source Di");
    end
    // rejected requests
    send(REQ_BBOP, OP_AND, 24 * RB + 4, 8 * RB, 16 * RB, RB, 0);
    checks++; if (!rsp_rejected) failures++;
    send(REQ_BBOP, OP_AND, 24 * RB, 9 * RB, 16 * RB, RB, 0);
    checks++; if (!rsp_rejected) failures++;

    $display("TRAs %0d, DCC negations %0d, parallel bank ACTs %0d", n_tra, n_neg, n_parallel);
    $display("overlapped AAPs %0d, serial AAPs %0d, APs %0d, stalls %0d, rejects %0d",
             stats[0], stats[1], stats[2], stats[3], stats[5]);
    checks++; if (n_tra == 0) begin failures++; $display("FAIL no TRA"); end
    checks++; if (n_neg == 0) begin failures++; $display("FAIL no negation"); end
    checks++; if (n_parallel == 0) begin failures++; $display("FAIL no bank parallelism"); end
    checks++; if (stats[0] == 0) begin failures++; $display("FAIL no overlapped AAP"); end
    checks++; if (stats[1] == 0) begin failures++; $display("FAIL no serial AAP"); end
    checks++; if (stats[2] == 0) begin failures++; $display("FAIL no AP"); end
    checks++; if (stats[3] == 0) begin failures++; $display("FAIL no dispatch stall"); end
    checks++; if (stats[5] != 2) begin failures++; $display("FAIL reject count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
