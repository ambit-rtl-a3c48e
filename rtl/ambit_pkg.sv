// Shared types and constants of the Ambit in-DRAM bulk bitwise accelerator.
//
// Ambit computes bitwise operations inside the DRAM array. A triple-row
// activation (TRA) of three rows that share one row of sense amplifiers
// leaves the bitwise majority of the three rows on the bitlines. With one row
// preset to all zeros or all ones, that majority is the AND or OR of the other
// two. A dual-contact cell (DCC) row can also be written from the inverted
// side of the sense amplifier, which gives NOT. The memory controller drives
// everything with ordinary ACTIVATE / PRECHARGE commands to reserved row
// addresses.
//
// Row address grouping inside one subarray of 1024 row addresses:
//   B-group: 16 reserved addresses B0-B15, decoded by a small separate
//            decoder onto the wordlines of T0-T3 and the d-/n-wordlines
//            of the two DCC rows (mapping in ambit_bgroup_decoder)
//   C-group: C0 (all zeros) and C1 (all ones)
//   D-group: D0-D1005, ordinary data rows
// The numeric placement of the groups inside the 10-bit local address
// (B at 0-15, C at 16-17, D from 18 up) is this design's choice.
//
// Timing defaults are DDR3-1600 (8-8-8) in clock cycles of 1.25 ns:
// tRAS = 35 ns = 28 cycles, tRP = tRCD = 10 ns = 8 cycles. An overlapped
// (split-decoder) AAP lasts tRAS + 4 ns + tRP; the 4 ns are rounded up to 4
// cycles, so an AAP takes 40 cycles (50 ns) where a serial one takes
// 2*tRAS + tRP = 64 cycles (80 ns).
package ambit_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ROWS_PER_SUBARRAY = 1024;  // row addresses per subarray
  localparam int unsigned LOCAL_ROW_W       = 10;    // log2(ROWS_PER_SUBARRAY)
  localparam int unsigned N_BGROUP          = 16;    // B0-B15
  localparam int unsigned N_CGROUP          = 2;     // C0, C1
  localparam int unsigned N_DROWS           = 1006;  // D0-D1005
  localparam int unsigned N_CDROWS          = N_CGROUP + N_DROWS;
  localparam int unsigned C0_ADDR           = N_BGROUP;      // local address of C0
  localparam int unsigned C1_ADDR           = N_BGROUP + 1;  // local address of C1
  localparam int unsigned D0_ADDR           = N_BGROUP + N_CGROUP;

  localparam int unsigned RANK_ROW_BYTES = 8192;  // 8 KB row across the rank
  localparam int unsigned N_CHIPS        = 8;     // chips per rank, lock-step
  localparam int unsigned DQ_PER_CHIP    = 8;     // x8 chips, 64-bit channel
  localparam int unsigned CHIP_ROW_BITS  = RANK_ROW_BYTES * 8 / N_CHIPS;  // 8192
  localparam int unsigned N_BANKS        = 8;
  localparam int unsigned N_SUBARRAYS    = 2;     // per bank (not given; chosen)

  // ------------------------------------------------------------- timing
  localparam int unsigned T_RAS = 28;
  localparam int unsigned T_RP  = 8;
  localparam int unsigned T_RCD = 8;
  localparam int unsigned T_OVL = 4;  // extra time of back-to-back ACTIVATEs

  // ----------------------------------------------------------- B wordlines
  // Bit positions of the eight B-group wordlines.
  typedef enum int unsigned {
    WL_T0    = 0,
    WL_T1    = 1,
    WL_T2    = 2,
    WL_T3    = 3,
    WL_DCC0  = 4,  // d-wordline of DCC row 0 (cell on the bitline)
    WL_DCC0N = 5,  // n-wordline of DCC row 0 (cell on the bitline bar)
    WL_DCC1  = 6,
    WL_DCC1N = 7
  } bwl_e;

  // ------------------------------------------------------ DRAM commands
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_PRE = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } cmd_e;

  // ---------------------------------------------------- bulk bitwise ops
  typedef enum logic [2:0] {
    OP_NOT  = 3'd0,
    OP_AND  = 3'd1,
    OP_OR   = 3'd2,
    OP_NAND = 3'd3,
    OP_NOR  = 3'd4,
    OP_XOR  = 3'd5,
    OP_XNOR = 3'd6
  } op_e;

  // Symbolic operand of an AAP/AP step: a source/destination data row of
  // the current row operation, a control row or a B-group address.
  typedef enum logic [2:0] {
    SYM_DI = 3'd0,
    SYM_DJ = 3'd1,
    SYM_DK = 3'd2,
    SYM_C0 = 3'd3,
    SYM_C1 = 3'd4,
    SYM_B  = 3'd5
  } sym_e;

  typedef struct packed {
    sym_e       kind;
    logic [3:0] b;  // B-group index when kind == SYM_B
  } operand_t;

  // One primitive: AAP(a1, a2) = ACT a1; ACT a2; PRE, or AP(a1) = ACT a1; PRE.
  typedef struct packed {
    logic     is_ap;
    operand_t a1;
    operand_t a2;
  } prim_t;

  // Host request to the controller.
  typedef enum logic [1:0] {
    REQ_BBOP  = 2'd0,
    REQ_READ  = 2'd1,
    REQ_WRITE = 2'd2
  } req_kind_e;

  // Number of AAP/AP steps in the program of each operation.
  function automatic int unsigned prog_len(op_e op);
    case (op)
      OP_NOT:             return 2;
      OP_AND, OP_OR:      return 4;
      OP_NAND, OP_NOR:    return 5;
      default:            return 7;  // xor, xnor
    endcase
  endfunction

endpackage
