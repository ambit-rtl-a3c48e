// Ambit DRAM chip: N_BANKS banks behind the unchanged DRAM command and
// address interface.
//
// Ambit needs no new command: triple-row activation, the DCC negation and
// in-array copies are all ordinary ACTIVATEs whose row address falls in the
// reserved B- or C-group, decoded inside each subarray. The chip decodes the
// bank address and hands the command to that bank. READ data come back one
// cycle later on dq_rdata with dq_rvalid (simplified read latency, this
// design's choice). A rank is built from several such chips in lock-step,
// each supplying DQ_W bits of the data bus.
module ambit_chip
  import ambit_pkg::*;
#(
  parameter int unsigned W       = CHIP_ROW_BITS,
  parameter int unsigned DQ_W    = DQ_PER_CHIP,
  parameter int unsigned N_BANK  = N_BANKS,
  parameter int unsigned N_SUB   = N_SUBARRAYS,
  localparam int unsigned BA_W   = $clog2(N_BANK),
  localparam int unsigned SUB_W  = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned ROW_W  = SUB_W + LOCAL_ROW_W,
  localparam int unsigned COL_W  = $clog2(W / DQ_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cmd_e              cmd,
  input  logic [BA_W-1:0]   ba,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic [DQ_W-1:0]   dq_wdata,
  output logic [DQ_W-1:0]   dq_rdata,
  output logic              dq_rvalid,
  output logic [N_BANK-1:0] bank_active
);

  logic [DQ_W-1:0]   b_rdata [N_BANK];
  logic [N_BANK-1:0] b_rvalid;

  for (genvar b = 0; b < N_BANK; b++) begin : g_bank
    ambit_bank #(.W(W), .DQ_W(DQ_W), .N_SUB(N_SUB)) u_bank (
      .clk   (clk),
      .rst_n (rst_n),
      .cmd   ((ba == BA_W'(b)) ? cmd : CMD_NOP),
      .row   (row),
      .col   (col),
      .wdata (dq_wdata),
      .rdata (b_rdata[b]),
      .rvalid(b_rvalid[b]),
      .active(bank_active[b])
    );
  end

  always_comb begin
    dq_rdata  = '0;
    dq_rvalid = |b_rvalid;
    for (int b = 0; b < N_BANK; b++)
      if (b_rvalid[b]) dq_rdata = b_rdata[b];
  end

endmodule
