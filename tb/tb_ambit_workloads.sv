// Application workloads on ambit_system at reduced size: 8 chips with
// 64-bit rows (64-byte rank row), 4 banks, 2 subarrays per bank. Each bit
// vector is 8 rows long (4096 bits), starts on a multiple of 8 rows and so
// lies in the same subarray as every other vector, row by row.
//
// Three kernels run entirely as bulk bitwise requests; the host only writes
// the inputs, reads the results back and counts bits:
//   bitmap index  - 2 weeks of daily activity bitmaps of 4096 users plus a
//                   gender bitmap: weekly = OR of 7 days, then "active in
//                   every week" = AND of the weeks, and the same restricted
//                   to one gender.
//   bit-sliced scan - a 4-bit column of 4096 values stored as 4 bit slices;
//                   the predicate value < K is evaluated most significant
//                   slice first with running lt / eq vectors (NOT, AND, OR).
//   set operations - union, intersection and difference (A and not B) of
//                   three sets held as bit vectors.
// Every result is compared word by word, and by population count, with a
// value computed here directly from the raw inputs, not by chaining the same
// steps. The latency of one 8-row OR (two row operations per bank, each
// 4 overlapped AAPs of 40 cycles) is checked against 320-400 cycles.
module tb_ambit_workloads;
  import ambit_pkg::*;
  localparam int unsigned NB = 4, NS = 2, WB = 64, RB = WB * 8 / 8;  // 64 B rows
  localparam int unsigned WPR = RB / 8;        // 64-bit words per row
  localparam int unsigned VROWS = NB * NS;     // rows per vector
  localparam int unsigned VW = VROWS * WPR;    // words per vector
  localparam int unsigned NDAY = 14, NWEEK = 2, NSLICE = 4;
  localparam logic [3:0] K = 4'd11;

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

  // Vector slots: slot s occupies rows 8 + 8*s .. 15 + 8*s.
  function automatic int vaddr(int s);
    return (VROWS + VROWS * s) * RB;
  endfunction

  // -------------------------------------------------------- host tasks
  int lat;
  task automatic send(input req_kind_e k, input op_e o, input int dst, input int s1,
                      input int s2, input int size, input logic [63:0] wd);
    req_kind = k; req_op = o; req_dst = dst; req_src1 = s1; req_src2 = s2;
    req_size = size; req_wdata = wd; req_valid = 1;
    while (!req_ready) @(posedge clk);
    @(posedge clk); #1;
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
  endtask

  task automatic write_vec(input int s, input logic [63:0] v []);
    for (int w = 0; w < VW; w++) send(REQ_WRITE, OP_AND, vaddr(s) + w * 8, 0, 0, 0, v[w]);
  endtask

  task automatic bbop(input op_e o, input int d, input int a, input int b);
    send(REQ_BBOP, o, vaddr(d), vaddr(a), vaddr(b), VROWS * RB, 0);
    checks++;
    if (rsp_rejected) begin failures++; $display("FAIL %s rejected", o.name()); end
  endtask

  // Read slot s, compare with exp word by word and by population count.
  task automatic check_vec(input int s, input logic [63:0] exp [], input string what);
    int pop_got = 0, pop_exp = 0, bad = 0;
    for (int w = 0; w < VW; w++) begin
      send(REQ_READ, OP_AND, vaddr(s) + w * 8, 0, 0, 0, 0);
      pop_got += $countones(rsp_rdata);
      pop_exp += $countones(exp[w]);
      checks++;
      if (rsp_rdata !== exp[w]) begin
        bad++; failures++;
        if (bad < 4) $display("FAIL %s word %0d: %h expected %h", what, w, rsp_rdata, exp[w]);
      end
    end
    checks++;
    if (pop_got != pop_exp) failures++;
    $display("%s: %0d of %0d bits set (expected %0d)", what, pop_got, VW * 64, pop_exp);
  endtask

  function automatic logic [63:0] rnd();
    return {$urandom, $urandom};
  endfunction

  // ------------------------------------------------------------ kernels
  logic [63:0] day [NDAY][];
  logic [63:0] male [];
  logic [63:0] slice [NSLICE][];
  logic [63:0] set_v [3][];

  initial begin
    logic [63:0] exp [];
    logic [63:0] ones [];
    logic [63:0] zeros [];
    exp = new[VW];
    ones = new[VW];
    zeros = new[VW];
    foreach (ones[w]) begin ones[w] = '1; zeros[w] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---------------- bitmap index: slots 0-13 days, 14 gender, 15-18 work
    for (int d = 0; d < NDAY; d++) begin
      day[d] = new[VW];
      foreach (day[d][w]) day[d][w] = rnd() & rnd();  // a user is active on ~1/4 of days
      write_vec(d, day[d]);
    end
    male = new[VW];
    foreach (male[w]) male[w] = rnd();
    write_vec(NDAY, male);
    for (int wk = 0; wk < NWEEK; wk++) begin
      int acc;
      acc = 15 + wk;
      bbop(OP_OR, acc, 7 * wk, 7 * wk + 1);
      if (wk == 0) begin
        // one OR of a whole vector: two row operations per bank
        checks++;
        if (lat < 320 || lat > 400) begin
          failures++; $display("FAIL 8-row or took %0d cycles", lat);
        end else $display("8-row or: %0d cycles", lat);
      end
      for (int d = 2; d < 7; d++) bbop(OP_OR, acc, acc, 7 * wk + d);
    end
    bbop(OP_AND, 17, 15, 16);
    bbop(OP_AND, 18, 17, NDAY);
    foreach (exp[w]) begin
      logic [63:0] every;
      every = '1;
      for (int wk = 0; wk < NWEEK; wk++) begin
        logic [63:0] any;
        any = '0;
        for (int d = 0; d < 7; d++) any |= day[7 * wk + d][w];
        every &= any;
      end
      exp[w] = every;
    end
    check_vec(17, exp, "users active every week");
    foreach (exp[w]) exp[w] &= male[w];
    check_vec(18, exp, "male users active every week");

    // ---------------- bit-sliced scan: slots 20-23 slices (bit 3 first),
    //                  24 lt, 25 eq, 26 not-slice temp
    for (int i = 0; i < NSLICE; i++) begin
      slice[i] = new[VW];
      foreach (slice[i][w]) slice[i][w] = rnd();
      write_vec(20 + i, slice[i]);
    end
    write_vec(24, zeros);
    write_vec(25, ones);
    for (int i = 0; i < NSLICE; i++) begin
      bbop(OP_NOT, 26, 20 + i, 20 + i);
      if (K[NSLICE - 1 - i]) begin
        bbop(OP_AND, 26, 26, 25);          // eq & ~x
        bbop(OP_OR, 24, 24, 26);           // lt |= eq & ~x
        bbop(OP_AND, 25, 25, 20 + i);      // eq &= x
      end else begin
        bbop(OP_AND, 25, 25, 26);          // eq &= ~x
      end
    end
    foreach (exp[w]) begin
      for (int b = 0; b < 64; b++) begin
        logic [3:0] v;
        for (int i = 0; i < NSLICE; i++) v[NSLICE - 1 - i] = slice[i][w][b];
        exp[w][b] = (v < K);
      end
    end
    check_vec(24, exp, "values below 11");

    // ---------------- set operations: slots 30-32 sets, 33-36 results
    for (int i = 0; i < 3; i++) begin
      set_v[i] = new[VW];
      foreach (set_v[i][w]) set_v[i][w] = rnd() & rnd();
      write_vec(30 + i, set_v[i]);
    end
    bbop(OP_OR, 33, 30, 31);
    bbop(OP_OR, 33, 33, 32);
    foreach (exp[w]) exp[w] = set_v[0][w] | set_v[1][w] | set_v[2][w];
    check_vec(33, exp, "union");
    bbop(OP_AND, 34, 30, 31);
    bbop(OP_AND, 34, 34, 32);
    foreach (exp[w]) exp[w] = set_v[0][w] & set_v[1][w] & set_v[2][w];
    check_vec(34, exp, "intersection");
    bbop(OP_NOT, 35, 31, 31);
    bbop(OP_AND, 36, 30, 35);
    foreach (exp[w]) exp[w] = set_v[0][w] & ~set_v[1][w];
    check_vec(36, exp, "difference");

    $display("overlapped AAPs %0d, serial AAPs %0d, APs %0d", stats[0], stats[1], stats[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
