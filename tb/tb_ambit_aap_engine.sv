// Self-checking test of ambit_aap_engine with the default DDR3-1600 timing.
// For every operation the issued commands are compared with the expected
// command list (written out here from the operation programs) and, with the
// grant always given, the cycle of every command: an overlapped AAP takes
// 40 cycles (ACT, ACT +8, PRE +32, next +40), a serial one 64, an AP 36.
// A second pass withholds the grant at random and checks order and minimum
// spacing; a third runs with SPLIT = 0 (all AAPs serial, 80 ns).
module tb_ambit_aap_engine;
  import ambit_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start [2] = '{0, 0};
  op_e  op = OP_AND;
  logic [9:0] di = 10'd100, dj = 10'd200, dk = 10'd300;
  int checks = 0, failures = 0;
  int n_fast = 0, n_serial = 0, n_ap = 0;

  logic       ready  [2], done [2], req [2], gnt [2];
  cmd_e       cmd    [2];
  logic [10:0] crow  [2];
  logic       evf [2], evs [2], eva [2];

  ambit_aap_engine #(.SPLIT(1'b1)) dut_split (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .ready(ready[0]), .op(op),
    .sub(1'b1), .di(di), .dj(dj), .dk(dk), .done(done[0]), .cmd_req(req[0]),
    .cmd(cmd[0]), .cmd_row(crow[0]), .cmd_gnt(gnt[0]), .ev_aap_fast(evf[0]),
    .ev_aap_serial(evs[0]), .ev_ap(eva[0]));

  ambit_aap_engine #(.SPLIT(1'b0)) dut_serial (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .ready(ready[1]), .op(op),
    .sub(1'b1), .di(di), .dj(dj), .dk(dk), .done(done[1]), .cmd_req(req[1]),
    .cmd(cmd[1]), .cmd_row(crow[1]), .cmd_gnt(gnt[1]), .ev_aap_fast(evf[1]),
    .ev_aap_serial(evs[1]), .ev_ap(eva[1]));

  // expected primitives: {a1, a2, is_ap}, addresses as local rows
  typedef struct { int a1; int a2; bit is_ap; } p_t;
  function automatic int prog(op_e o, output p_t p [7]);
    int ca = (o == OP_OR || o == OP_NOR || o == OP_XNOR) ? 17 : 16;
    int cf = (o == OP_XNOR) ? 16 : 17;
    case (o)
      OP_NOT: begin p[0] = '{100, 5, 0}; p[1] = '{4, 300, 0}; return 2; end
      OP_AND, OP_OR: begin
        p[0] = '{100, 0, 0}; p[1] = '{200, 1, 0}; p[2] = '{ca, 2, 0};
        p[3] = '{12, 300, 0}; return 4;
      end
      OP_NAND, OP_NOR: begin
        p[0] = '{100, 0, 0}; p[1] = '{200, 1, 0}; p[2] = '{ca, 2, 0};
        p[3] = '{12, 5, 0}; p[4] = '{4, 300, 0}; return 5;
      end
      default: begin
        p[0] = '{100, 8, 0}; p[1] = '{200, 9, 0}; p[2] = '{ca, 10, 0};
        p[3] = '{14, 14, 1}; p[4] = '{15, 15, 1}; p[5] = '{cf, 2, 0};
        p[6] = '{12, 300, 0}; return 7;
      end
    endcase
  endfunction

  // expected command trace
  typedef struct { cmd_e c; int row; int min_gap; } e_t;
  e_t exp_q [$];

  function automatic void build(op_e o, bit split);
    p_t p [7];
    int n = prog(o, p);
    int gap_after_pre = 0;
    exp_q.delete();
    for (int s = 0; s < n; s++) begin
      bit fast = split && !p[s].is_ap && ((p[s].a1 < 16) != (p[s].a2 < 16));
      exp_q.push_back('{CMD_ACT, 'h400 | p[s].a1, gap_after_pre});
      if (p[s].is_ap) begin
        exp_q.push_back('{CMD_PRE, -1, 28});
      end else begin
        exp_q.push_back('{CMD_ACT, 'h400 | p[s].a2, fast ? 8 : 28});
        exp_q.push_back('{CMD_PRE, -1, fast ? 24 : 28});
      end
      gap_after_pre = 8;
    end
  endfunction

  // run one operation on engine `k`; random_gnt withholds grants
  task automatic run(int k, op_e o, bit random_gnt, output int cycles);
    int last_t = 0, t = 0, idx = 0;
    op = o;
    build(o, k == 0);
    start[k] = 1;
    @(posedge clk); #1;
    start[k] = 0;
    while (!done[k] && t < 2000) begin
      gnt[k] = random_gnt ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (req[k] && gnt[k]) begin
        checks++;
        if (idx >= exp_q.size() || cmd[k] != exp_q[idx].c ||
            (exp_q[idx].row >= 0 && int'(crow[k]) != exp_q[idx].row) ||
            (idx > 0 && (random_gnt ? (t - last_t < exp_q[idx].min_gap)
                                    : (t - last_t != exp_q[idx].min_gap)))) begin
          failures++;
          $display("FAIL %s engine %0d cmd %0d at %0d (gap %0d) got %0d/%0d exp %0d/%0d", o.name(), k, idx, t, t - last_t, cmd[k], crow[k], exp_q[idx].c, exp_q[idx].row,
                   t - last_t);
        end
        last_t = t;
        idx++;
      end
      @(posedge clk); #1;
      t++;
    end
    gnt[k] = 0;
    checks++;
    if (idx != exp_q.size()) begin
      failures++;
      $display("FAIL %s: %0d commands, expected %0d", o.name(), idx, exp_q.size());
    end
    cycles = t;
  endtask

  always @(posedge clk) begin
    if (evf[0] || evf[1]) n_fast++;
    if (evs[0] || evs[1]) n_serial++;
    if (eva[0] || eva[1]) n_ap++;
  end

  initial begin
    int cyc;
    gnt[0] = 0; gnt[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int o = 0; o < 7; o++) begin
      run(0, op_e'(o), 1'b0, cyc);
      // and: 4 overlapped AAPs of 40 cycles, the last PRE + tRP ends it
      if (o == int'(OP_AND)) begin
        checks++;
        if (cyc < 160 || cyc > 163) begin
          failures++;
          $display("FAIL and latency %0d", cyc);
        end
      end
      run(0, op_e'(o), 1'b1, cyc);
      run(1, op_e'(o), 1'b0, cyc);
      if (o == int'(OP_AND)) begin
        checks++;
        if (cyc < 256 || cyc > 259) begin
          failures++;
          $display("FAIL serial and latency %0d", cyc);
        end
      end
    end
    checks++;
    if (n_fast == 0 || n_serial == 0 || n_ap == 0) failures++;
    $display("overlapped AAPs %0d, serial AAPs %0d, APs %0d", n_fast, n_serial, n_ap);
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
