// One bank of an Ambit DRAM chip: N_SUB subarrays behind one command port.
//
// The bank row address is {subarray, local row}; the local part is decoded
// inside the subarray into the B-, C- or D-group. ACTIVATE goes to the
// addressed subarray, PRECHARGE to all of them, and READ/WRITE to the
// subarray that is open, as in a commodity bank where one subarray at a time
// holds an open row. Both ACTIVATEs of an AAP go to the same subarray; an
// assertion flags an ACTIVATE to a second subarray while one is open.
// Read data appear on rdata one cycle after the READ, with rvalid; this
// one-cycle read latency is a simplification of this design (a real device
// adds its CAS latency).
module ambit_bank
  import ambit_pkg::*;
#(
  parameter int unsigned W     = CHIP_ROW_BITS,
  parameter int unsigned DQ_W  = DQ_PER_CHIP,
  parameter int unsigned N_SUB = N_SUBARRAYS,
  localparam int unsigned SUB_W = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned ROW_W = SUB_W + LOCAL_ROW_W,
  localparam int unsigned COL_W = $clog2(W / DQ_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cmd_e             cmd,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  input  logic [DQ_W-1:0]  wdata,
  output logic [DQ_W-1:0]  rdata,
  output logic             rvalid,
  output logic             active
);

  logic [SUB_W-1:0] sub_sel;
  logic [SUB_W-1:0] open_sub;
  logic [N_SUB-1:0] sub_active;
  logic [DQ_W-1:0]  sub_rdata [N_SUB];

  assign sub_sel = (N_SUB > 1) ? row[ROW_W-1 -: SUB_W] : '0;
  assign active  = |sub_active;

  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    ambit_subarray #(.W(W), .DQ_W(DQ_W)) u_sa (
      .clk      (clk),
      .rst_n    (rst_n),
      .act      (cmd == CMD_ACT && sub_sel == SUB_W'(s)),
      .act_addr (row[LOCAL_ROW_W-1:0]),
      .pre      (cmd == CMD_PRE),
      .col_we   (cmd == CMD_WR && open_sub == SUB_W'(s)),
      .col_idx  (col),
      .col_wdata(wdata),
      .col_rdata(sub_rdata[s]),
      .active   (sub_active[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_sub <= '0;
      rdata    <= '0;
      rvalid   <= 1'b0;
    end else begin
      if (cmd == CMD_ACT) open_sub <= sub_sel;
      rvalid <= (cmd == CMD_RD);
      if (cmd == CMD_RD) rdata <= sub_rdata[open_sub];
    end
  end

  // One open subarray per bank.
  a_one_open_subarray: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == CMD_ACT && active) |-> (sub_sel == open_sub));

endmodule
