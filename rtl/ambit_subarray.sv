// One Ambit DRAM subarray, modelled at row granularity.
//
// Storage: the data rows D0-D1005, the constant rows C0 (all zeros) and C1
// (all ones), the four designated rows T0-T3 used for triple-row activation
// and two dual-contact-cell rows DCC0/DCC1. A DCC row has two wordlines: the
// d-wordline connects its cell to the bitline, the n-wordline to the
// bitline bar. All rows share one row of sense amplifiers (ambit_sense_amp)
// and are selected through the split row decoder (ambit_row_decoder).
//
// Behaviour of an ACTIVATE (`act` with a local row address):
//  * sense amplifiers idle (precharged): the raised cells share charge and
//    the sense amplifiers resolve them - one cell is read, three cells give
//    their bitwise majority (B12-B15). A cell reached through an n-wordline
//    contributes its inverse.
//  * sense amplifiers already active: the new rows are simply connected and
//    overwritten with the latched value (inverted on n-wordlines). This is
//    the second ACTIVATE of an AAP, i.e. an in-array row copy, and with the
//    split decoder one C/D row and B-group wordlines can be held together.
// While active, every raised row is restored from the sense amplifiers one
// cycle after the latched value changes. PRECHARGE (`pre`) lowers all
// wordlines and idles the sense amplifiers. Column reads return DQ_W bits of
// the latched row combinationally; column writes change them and, through
// the restore, the open rows.
//
// Timing: commands are accepted every cycle, but after an ACTIVATE or a
// column write the next command must come at least one cycle later for the
// restore to reach the cells; the controller's DRAM timing (tRAS, tRP)
// guarantees far more. C0/C1 are set on reset; the other rows are not
// initialised, as in a DRAM.
module ambit_subarray
  import ambit_pkg::*;
#(
  parameter int unsigned W    = CHIP_ROW_BITS,
  parameter int unsigned DQ_W = DQ_PER_CHIP,
  localparam int unsigned COL_W = $clog2(W / DQ_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   act,
  input  logic [LOCAL_ROW_W-1:0] act_addr,
  input  logic                   pre,
  input  logic                   col_we,
  input  logic [COL_W-1:0]       col_idx,
  input  logic [DQ_W-1:0]        col_wdata,
  output logic [DQ_W-1:0]        col_rdata,
  output logic                   active
);

  // ------------------------------------------------------------ storage
  logic [W-1:0] drow [N_DROWS];  // D-group
  logic [W-1:0] crow [N_CGROUP]; // C0, C1
  logic [W-1:0] trow [4];        // T0-T3
  logic [W-1:0] dcc  [2];        // DCC0, DCC1 capacitors

  // ------------------------------------------------------------ decoder
  logic                   dec_is_b, dec_is_cd;
  logic [7:0]             dec_bwl;
  logic [LOCAL_ROW_W-1:0] dec_cd_idx;

  ambit_row_decoder u_dec (
    .addr  (act_addr),
    .is_b  (dec_is_b),
    .is_cd (dec_is_cd),
    .b_wl  (dec_bwl),
    .cd_idx(dec_cd_idx)
  );

  // wordlines held raised until PRECHARGE
  logic                   cd_up;
  logic [LOCAL_ROW_W-1:0] cd_up_idx;
  logic [7:0]             b_up;

  // ------------------------------------------------ cells onto bitlines
  logic [W-1:0] cd_cell;

  always_comb begin
    if (dec_cd_idx < LOCAL_ROW_W'(N_CGROUP))
      cd_cell = crow[dec_cd_idx[0]];
    else
      cd_cell = drow[dec_cd_idx - LOCAL_ROW_W'(N_CGROUP)];
  end

  // Every row the new address can raise, as seen on the bitline: the eight
  // B-group wordlines (a cell on an n-wordline appears inverted) and the
  // C/D row. The rows actually raised are routed onto at most three
  // charge-sharing slots by small slot selects.
  logic [W-1:0] view [9];
  logic [3:0]   slot_sel [3];
  logic [1:0]   n_cells;

  always_comb begin
    view[WL_T0]    = trow[0];
    view[WL_T1]    = trow[1];
    view[WL_T2]    = trow[2];
    view[WL_T3]    = trow[3];
    view[WL_DCC0]  = dcc[0];
    view[WL_DCC0N] = ~dcc[0];
    view[WL_DCC1]  = dcc[1];
    view[WL_DCC1N] = ~dcc[1];
    view[8]        = cd_cell;
  end

  always_comb begin
    n_cells     = 2'd0;
    slot_sel[0] = 4'd8;
    slot_sel[1] = 4'd8;
    slot_sel[2] = 4'd8;
    if (dec_is_cd) begin
      n_cells = 2'd1;
    end else begin
      for (int i = 0; i < 8; i++) begin
        if (dec_bwl[i] && n_cells != 2'd3) begin
          slot_sel[n_cells] = 4'(i);
          n_cells = n_cells + 2'd1;
        end
      end
    end
  end

  logic [W-1:0] sh_cell [3];
  for (genvar k = 0; k < 3; k++) begin : g_slot
    assign sh_cell[k] = view[slot_sel[k]];
  end

  // ----------------------------------------------------- sense amplifiers
  logic [W-1:0] bl;
  logic         sa_active;

  ambit_sense_amp #(.W(W), .DQ_W(DQ_W)) u_sa (
    .clk      (clk),
    .rst_n    (rst_n),
    .sense    (act && !sa_active),
    .n_cells  (n_cells),
    .cell_a   (sh_cell[0]),
    .cell_b   (sh_cell[1]),
    .cell_c   (sh_cell[2]),
    .precharge(pre),
    .col_we   (col_we),
    .col_idx  (col_idx),
    .col_wdata(col_wdata),
    .col_rdata(col_rdata),
    .bl       (bl),
    .active   (sa_active)
  );

  assign active = sa_active;

  // ------------------------------------------------------ wordline state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cd_up     <= 1'b0;
      cd_up_idx <= '0;
      b_up      <= '0;
    end else if (pre) begin
      cd_up <= 1'b0;
      b_up  <= '0;
    end else if (act) begin
      // A first ACTIVATE replaces the (empty) raised set; a second one adds
      // to it. Only one C/D row can be held by the regular decoder.
      if (dec_is_cd) begin
        cd_up     <= 1'b1;
        cd_up_idx <= dec_cd_idx;
      end else if (!sa_active) begin
        cd_up <= 1'b0;
      end
      b_up <= sa_active ? (b_up | dec_bwl) : dec_bwl;
    end
  end

  // ------------------------------------------------------ restore cells
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crow[0] <= '0;
      crow[1] <= '1;
    end else if (sa_active && cd_up && cd_up_idx < LOCAL_ROW_W'(N_CGROUP)) begin
      crow[cd_up_idx[0]] <= bl;
    end
  end

  always_ff @(posedge clk) begin
    if (sa_active) begin
      if (cd_up && cd_up_idx >= LOCAL_ROW_W'(N_CGROUP))
        drow[cd_up_idx - LOCAL_ROW_W'(N_CGROUP)] <= bl;
      for (int t = 0; t < 4; t++)
        if (b_up[t]) trow[t] <= bl;
      if (b_up[WL_DCC0])  dcc[0] <= bl;
      if (b_up[WL_DCC0N]) dcc[0] <= ~bl;
      if (b_up[WL_DCC1])  dcc[1] <= bl;
      if (b_up[WL_DCC1N]) dcc[1] <= ~bl;
    end
  end

endmodule
