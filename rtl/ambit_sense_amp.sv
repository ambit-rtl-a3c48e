// Row of sense amplifiers of one Ambit subarray (digital equivalent).
//
// Each sense amplifier is a pair of cross-coupled inverters between a
// bitline and its complement (bitline bar). An activation from the
// precharged state first shares charge between the bitline and the cells
// whose wordlines are raised and then amplifies the deviation to full
// levels. With k of n equal cells charged the deviation has the sign of
// 2k - n, so one cell is read as it is and three cells resolve to their
// bitwise majority: the basis of triple-row activation.
//
// This module is a synthesizable, cycle-level stand-in for that analog
// behaviour, not a circuit. The caller gives up to three cell rows already
// expressed as bitline values (a cell reached through an n-wordline sits on
// the bitline bar, so the caller passes its inverse), and their count:
//   n_cells = 1 : bl = a
//   n_cells = 2 : bl = a & b   (tie 1-1 gives no deviation; this model
//                               resolves it to 0, a choice of this design)
//   n_cells = 3 : bl = maj(a, b, c)
// `sense` latches the result at the next clock edge and sets `active`.
// While active, the latched row is what the sense amplifiers drive back into
// every raised cell, and a column write overwrites DQ_W bits of it.
// `precharge` clears `active` (bitlines return to VDD/2). Column reads are
// combinational from the latched row.
module ambit_sense_amp #(
  parameter int unsigned W    = ambit_pkg::CHIP_ROW_BITS,  // bitlines
  parameter int unsigned DQ_W = ambit_pkg::DQ_PER_CHIP,    // bits per column
  localparam int unsigned COLS  = W / DQ_W,
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sense,      // charge sharing + amplification
  input  logic [1:0]       n_cells,    // 1..3 cells connected
  input  logic [W-1:0]     cell_a,
  input  logic [W-1:0]     cell_b,
  input  logic [W-1:0]     cell_c,
  input  logic             precharge,
  input  logic             col_we,
  input  logic [COL_W-1:0] col_idx,
  input  logic [DQ_W-1:0]  col_wdata,
  output logic [DQ_W-1:0]  col_rdata,
  output logic [W-1:0]     bl,         // latched bitline values
  output logic             active
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      bl     <= '0;
    end else if (precharge) begin
      active <= 1'b0;
    end else if (sense) begin
      active <= 1'b1;
      unique case (n_cells)
        2'd2:    bl <= cell_a & cell_b;
        2'd3:    bl <= (cell_a & cell_b) | (cell_b & cell_c) | (cell_a & cell_c);
        default: bl <= cell_a;
      endcase
    end else if (col_we && active) begin
      bl[col_idx*DQ_W +: DQ_W] <= col_wdata;
    end
  end

  assign col_rdata = bl[col_idx*DQ_W +: DQ_W];

endmodule
