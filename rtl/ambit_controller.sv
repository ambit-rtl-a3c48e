// Ambit memory controller.
//
// Accepts two kinds of request from the host:
//  * bbop (op, dst, src1, src2, size): a bulk bitwise operation over `size`
//    bytes. The operation is done by Ambit only when every address is
//    row-aligned, size is a non-zero multiple of the row size, the operands
//    lie in the same subarray row by row and all rows exist; otherwise the
//    request is rejected (rsp_rejected) so that the host does it itself.
//  * READ / WRITE of one 64-bit word, done with a closed-page
//    ACTIVATE / READ-or-WRITE / PRECHARGE sequence (tRCD, tRAS, tRP).
//
// Address mapping: the host sees only D-group rows. Global row number
// g = addr / ROW_BYTES is interleaved bank first, then subarray:
//   bank = g % N_BANK, subarray = (g / N_BANK) % N_SUB,
//   D index = g / (N_BANK * N_SUB), local row address = 18 + D index
// so consecutive rows of a bit vector spread over all banks and an operation
// uses the banks in parallel. Operands whose row numbers agree modulo
// N_BANK * N_SUB share a subarray in every row.
//
// A bbop is split into row operations, handed in row order to the engine of
// the row's bank (ambit_aap_engine, one per bank); dispatch waits while that
// engine is busy. A round-robin arbiter grants one command per cycle on the
// shared command bus. Host word accesses are served only while no bbop is in
// progress. Inter-bank command spacing (tRRD, tFAW) is not modelled.
// `stats` counts events for observation: overlapped and serial AAPs, APs,
// dispatch stalls, command-bus conflicts and rejected bbops.
module ambit_controller
  import ambit_pkg::*;
#(
  parameter int unsigned N_BANK    = N_BANKS,
  parameter int unsigned N_SUB     = N_SUBARRAYS,
  parameter int unsigned ROW_BYTES = RANK_ROW_BYTES,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned TRAS      = T_RAS,
  parameter int unsigned TRP       = T_RP,
  parameter int unsigned TRCD      = T_RCD,
  parameter int unsigned TOVL      = T_OVL,
  parameter bit          SPLIT     = 1'b1,
  localparam int unsigned BA_W   = (N_BANK > 1) ? $clog2(N_BANK) : 1,
  localparam int unsigned SUB_W  = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned ROW_W  = SUB_W + LOCAL_ROW_W,
  localparam int unsigned COL_W  = $clog2(ROW_BYTES / 8),
  localparam int unsigned RB_W   = $clog2(ROW_BYTES),
  localparam int unsigned IL_W   = $clog2(N_BANK * N_SUB)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host request
  input  logic              req_valid,
  output logic              req_ready,
  input  req_kind_e         req_kind,
  input  op_e               req_op,
  input  logic [ADDR_W-1:0] req_dst,   // bbop destination / word address
  input  logic [ADDR_W-1:0] req_src1,
  input  logic [ADDR_W-1:0] req_src2,
  input  logic [ADDR_W-1:0] req_size,  // bytes
  input  logic [63:0]       req_wdata,
  // host response
  output logic              rsp_valid,
  output logic              rsp_rejected,
  output logic [63:0]       rsp_rdata,
  // DRAM command bus to the rank
  output cmd_e              dram_cmd,
  output logic [BA_W-1:0]   dram_ba,
  output logic [ROW_W-1:0]  dram_row,
  output logic [COL_W-1:0]  dram_col,
  output logic [63:0]       dram_wdata,
  input  logic [63:0]       dram_rdata,
  input  logic              dram_rvalid,
  // event counters
  output logic [31:0]       stats [6]
);

  localparam int unsigned ST_AAP_FAST = 0, ST_AAP_SERIAL = 1, ST_AP = 2,
                          ST_STALL = 3, ST_CONFLICT = 4, ST_REJECT = 5;

  typedef enum logic [2:0] {
    C_IDLE, C_DISPATCH, C_DRAIN, C_H_ACT, C_H_COL, C_H_PRE, C_H_TAIL, C_RESP
  } cstate_e;

  cstate_e state;

  // ------------------------------------------------------ address mapping
  typedef struct packed {
    logic [BA_W-1:0]        bank;
    logic [SUB_W-1:0]       sub;
    logic [LOCAL_ROW_W-1:0] local_row;
    logic                   in_range;
  } loc_t;

  function automatic loc_t map_row(input logic [ADDR_W-1:0] g);
    logic [ADDR_W-1:0] d;
    map_row.bank      = (N_BANK > 1) ? BA_W'(g % N_BANK) : '0;
    map_row.sub       = (N_SUB > 1) ? SUB_W'((g / N_BANK) % N_SUB) : '0;
    d                 = g >> IL_W;
    map_row.in_range  = (d < ADDR_W'(N_DROWS));
    map_row.local_row = LOCAL_ROW_W'(d + ADDR_W'(D0_ADDR));
  endfunction

  function automatic logic [ADDR_W-1:0] row_of(input logic [ADDR_W-1:0] a);
    return a >> RB_W;
  endfunction

  // ---------------------------------------------------------- request regs
  op_e               op_q;
  logic [ADDR_W-1:0] gdst, gsrc1, gsrc2, nrows, ridx;
  logic              is_write;
  logic [COL_W-1:0]  col_q;
  logic [63:0]       wdata_q;
  loc_t              hloc;
  logic [7:0]        htimer;

  // Acceptance check of a bbop.
  logic              bb_ok;
  logic [ADDR_W-1:0] req_rows, glast;
  always_comb begin
    req_rows = req_size >> RB_W;
    bb_ok = (req_size != '0) && (req_size[RB_W-1:0] == '0) &&
            (req_dst[RB_W-1:0] == '0) && (req_src1[RB_W-1:0] == '0) &&
            (req_src2[RB_W-1:0] == '0);
    // same subarray and bank in every row
    if (IL_W > 0) begin
      if (((row_of(req_dst) - row_of(req_src1)) & ADDR_W'((1 << IL_W) - 1)) != '0)
        bb_ok = 1'b0;
      if (req_op != OP_NOT &&
          ((row_of(req_dst) - row_of(req_src2)) & ADDR_W'((1 << IL_W) - 1)) != '0)
        bb_ok = 1'b0;
    end
    // all rows exist
    glast = row_of(req_dst) + req_rows - 1;
    if (!map_row(glast).in_range) bb_ok = 1'b0;
    if (!map_row(row_of(req_src1) + req_rows - 1).in_range) bb_ok = 1'b0;
    if (req_op != OP_NOT && !map_row(row_of(req_src2) + req_rows - 1).in_range)
      bb_ok = 1'b0;
  end

  // --------------------------------------------------------------- engines
  logic [N_BANK-1:0] e_start, e_ready, e_req, e_gnt;
  logic [N_BANK-1:0] e_fast, e_serial, e_ap;
  cmd_e              e_cmd [N_BANK];
  logic [ROW_W-1:0]  e_row [N_BANK];

  loc_t cur_dst, cur_s1, cur_s2;
  assign cur_dst = map_row(gdst + ridx);
  assign cur_s1  = map_row(gsrc1 + ridx);
  assign cur_s2  = map_row(gsrc2 + ridx);

  logic dispatch_go;
  assign dispatch_go = (state == C_DISPATCH) && e_ready[cur_dst.bank];

  for (genvar b = 0; b < N_BANK; b++) begin : g_eng
    assign e_start[b] = dispatch_go && cur_dst.bank == BA_W'(b);
    ambit_aap_engine #(
      .N_SUB(N_SUB), .TRAS(TRAS), .TRP(TRP), .TRCD(TRCD), .TOVL(TOVL),
      .SPLIT(SPLIT)
    ) u_eng (
      .clk          (clk),
      .rst_n        (rst_n),
      .start        (e_start[b]),
      .ready        (e_ready[b]),
      .op           (op_q),
      .sub          (cur_dst.sub),
      .di           (cur_s1.local_row),
      .dj           (cur_s2.local_row),
      .dk           (cur_dst.local_row),
      .done         (),
      .cmd_req      (e_req[b]),
      .cmd          (e_cmd[b]),
      .cmd_row      (e_row[b]),
      .cmd_gnt      (e_gnt[b]),
      .ev_aap_fast  (e_fast[b]),
      .ev_aap_serial(e_serial[b]),
      .ev_ap        (e_ap[b])
    );
  end

  // ------------------------------------------------- round-robin arbiter
  logic [BA_W-1:0] rr;
  logic            any_gnt;
  logic [BA_W-1:0] gnt_idx;

  always_comb begin
    e_gnt   = '0;
    any_gnt = 1'b0;
    gnt_idx = '0;
    for (int n = 0; n < N_BANK; n++) begin
      automatic logic [BA_W-1:0] cand = BA_W'((int'(rr) + n) % N_BANK);
      if (!any_gnt && e_req[cand]) begin
        any_gnt       = 1'b1;
        gnt_idx       = cand;
        e_gnt[cand]   = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- command bus
  always_comb begin
    dram_cmd   = CMD_NOP;
    dram_ba    = '0;
    dram_row   = '0;
    dram_col   = col_q;
    dram_wdata = wdata_q;
    if (any_gnt) begin
      dram_cmd = e_cmd[gnt_idx];
      dram_ba  = gnt_idx;
      dram_row = e_row[gnt_idx];
    end else if (htimer == '0) begin
      dram_ba  = hloc.bank;
      dram_row = {hloc.sub, hloc.local_row};
      unique case (state)
        C_H_ACT: dram_cmd = CMD_ACT;
        C_H_COL: dram_cmd = is_write ? CMD_WR : CMD_RD;
        C_H_PRE: dram_cmd = CMD_PRE;
        default: dram_cmd = CMD_NOP;
      endcase
    end
  end

  assign req_ready = (state == C_IDLE);

  // ------------------------------------------------------------ main FSM
  logic rd_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      op_q         <= OP_NOT;
      gdst         <= '0;
      gsrc1        <= '0;
      gsrc2        <= '0;
      nrows        <= '0;
      ridx         <= '0;
      is_write     <= 1'b0;
      col_q        <= '0;
      wdata_q      <= '0;
      hloc         <= '0;
      htimer       <= '0;
      rr           <= '0;
      rd_wait      <= 1'b0;
      rsp_valid    <= 1'b0;
      rsp_rejected <= 1'b0;
      rsp_rdata    <= '0;
      for (int i = 0; i < 6; i++) stats[i] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (htimer != '0) htimer <= htimer - 8'd1;
      if (any_gnt) rr <= BA_W'((int'(gnt_idx) + 1) % N_BANK);
      if (dram_rvalid && rd_wait) begin
        rsp_rdata <= dram_rdata;
        rd_wait   <= 1'b0;
      end

      // event counters
      if (|e_fast)   stats[ST_AAP_FAST]   <= stats[ST_AAP_FAST] + 32'($countones(e_fast));
      if (|e_serial) stats[ST_AAP_SERIAL] <= stats[ST_AAP_SERIAL] + 32'($countones(e_serial));
      if (|e_ap)     stats[ST_AP]         <= stats[ST_AP] + 32'($countones(e_ap));
      if (state == C_DISPATCH && !dispatch_go) stats[ST_STALL] <= stats[ST_STALL] + 1;
      if ($countones(e_req) > 1) stats[ST_CONFLICT] <= stats[ST_CONFLICT] + 1;

      unique case (state)
        C_IDLE: if (req_valid) begin
          rsp_rejected <= 1'b0;
          if (req_kind == REQ_BBOP) begin
            if (bb_ok) begin
              op_q  <= req_op;
              gdst  <= row_of(req_dst);
              gsrc1 <= row_of(req_src1);
              gsrc2 <= (req_op == OP_NOT) ? row_of(req_src1) : row_of(req_src2);
              nrows <= req_rows;
              ridx  <= '0;
              state <= C_DISPATCH;
            end else begin
              rsp_rejected       <= 1'b1;
              stats[ST_REJECT]   <= stats[ST_REJECT] + 1;
              state              <= C_RESP;
            end
          end else begin
            hloc     <= map_row(row_of(req_dst));
            col_q    <= COL_W'(req_dst[RB_W-1:3]);
            wdata_q  <= req_wdata;
            is_write <= (req_kind == REQ_WRITE);
            htimer   <= '0;
            if (!map_row(row_of(req_dst)).in_range) begin
              rsp_rejected     <= 1'b1;
              state            <= C_RESP;
            end else begin
              state <= C_H_ACT;
            end
          end
        end
        C_DISPATCH: if (dispatch_go) begin
          if (ridx == nrows - 1) state <= C_DRAIN;
          ridx <= ridx + 1;
        end
        C_DRAIN: if (&e_ready && e_start == '0) state <= C_RESP;
        C_H_ACT: if (!any_gnt && htimer == '0) begin
          htimer <= 8'(TRCD - 1);
          state  <= C_H_COL;
        end
        C_H_COL: if (!any_gnt && htimer == '0) begin
          htimer  <= 8'(TRAS - TRCD - 1);
          rd_wait <= !is_write;
          state   <= C_H_PRE;
        end
        C_H_PRE: if (!any_gnt && htimer == '0) begin
          htimer <= 8'(TRP - 1);
          state  <= C_H_TAIL;
        end
        C_H_TAIL: if (htimer == '0 && !rd_wait) state <= C_RESP;
        C_RESP: begin
          rsp_valid <= 1'b1;
          state     <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The interleaving arithmetic assumes power-of-two bank and subarray counts.
  initial begin
    assert ((N_BANK & (N_BANK - 1)) == 0 && (N_SUB & (N_SUB - 1)) == 0)
      else $error("N_BANK and N_SUB must be powers of two");
  end

endmodule
