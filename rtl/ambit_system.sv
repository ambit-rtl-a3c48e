// Ambit system: the Ambit memory controller driving one rank of Ambit DRAM
// chips over an ordinary DRAM command/address bus and a 64-bit data bus.
//
// The host issues bulk bitwise operations (not, and, or, nand, nor, xor,
// xnor over whole 8 KB rows) and ordinary 64-bit reads and writes. The
// controller turns each bbop into per-row AAP/AP command programs, spreads
// the rows over the banks and runs the banks in parallel; the chips compute
// the results inside their subarrays with triple-row activation and
// dual-contact-cell negation. Data never cross the data bus during a bbop.
//
// The rank is N_CHIPS chips in lock-step: every chip sees the same command
// and address, chip c carries data bits [8c+7:8c], so an 8 KB rank row is
// 1 KB in each chip. Ports are those of ambit_controller's host side plus
// the command bus, brought out for observation, and the controller's event
// counters. Defaults: 8 chips, 8 banks, 2 subarrays per bank, DDR3-1600
// timing in 1.25 ns cycles.
module ambit_system
  import ambit_pkg::*;
#(
  parameter int unsigned NCHIP  = N_CHIPS,
  parameter int unsigned N_BANK = N_BANKS,
  parameter int unsigned N_SUB  = N_SUBARRAYS,
  parameter int unsigned W      = CHIP_ROW_BITS,  // row bits per chip
  parameter bit          SPLIT  = 1'b1,
  localparam int unsigned DQ_W      = 64 / NCHIP,
  localparam int unsigned ROW_BYTES = W * NCHIP / 8,
  localparam int unsigned BA_W      = (N_BANK > 1) ? $clog2(N_BANK) : 1,
  localparam int unsigned SUB_W     = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned ROW_W     = SUB_W + LOCAL_ROW_W,
  localparam int unsigned COL_W     = $clog2(W / DQ_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  req_kind_e        req_kind,
  input  op_e              req_op,
  input  logic [31:0]      req_dst,
  input  logic [31:0]      req_src1,
  input  logic [31:0]      req_src2,
  input  logic [31:0]      req_size,
  input  logic [63:0]      req_wdata,
  output logic             rsp_valid,
  output logic             rsp_rejected,
  output logic [63:0]      rsp_rdata,
  output cmd_e             bus_cmd,
  output logic [BA_W-1:0]  bus_ba,
  output logic [ROW_W-1:0] bus_row,
  output logic [31:0]      stats [6]
);

  logic [COL_W-1:0] bus_col;
  logic [63:0]      bus_wdata, bus_rdata;
  logic [NCHIP-1:0] chip_rvalid;

  ambit_controller #(
    .N_BANK(N_BANK), .N_SUB(N_SUB), .ROW_BYTES(ROW_BYTES), .ADDR_W(32),
    .SPLIT(SPLIT)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (req_valid),
    .req_ready   (req_ready),
    .req_kind    (req_kind),
    .req_op      (req_op),
    .req_dst     (req_dst),
    .req_src1    (req_src1),
    .req_src2    (req_src2),
    .req_size    (req_size),
    .req_wdata   (req_wdata),
    .rsp_valid   (rsp_valid),
    .rsp_rejected(rsp_rejected),
    .rsp_rdata   (rsp_rdata),
    .dram_cmd    (bus_cmd),
    .dram_ba     (bus_ba),
    .dram_row    (bus_row),
    .dram_col    (bus_col),
    .dram_wdata  (bus_wdata),
    .dram_rdata  (bus_rdata),
    .dram_rvalid (chip_rvalid[0]),
    .stats       (stats)
  );

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    ambit_chip #(.W(W), .DQ_W(DQ_W), .N_BANK(N_BANK), .N_SUB(N_SUB)) u_chip (
      .clk        (clk),
      .rst_n      (rst_n),
      .cmd        (bus_cmd),
      .ba         (bus_ba),
      .row        (bus_row),
      .col        (bus_col),
      .dq_wdata   (bus_wdata[c*DQ_W +: DQ_W]),
      .dq_rdata   (bus_rdata[c*DQ_W +: DQ_W]),
      .dq_rvalid  (chip_rvalid[c]),
      .bank_active()
    );
  end

endmodule
