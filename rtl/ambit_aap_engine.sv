// Per-bank AAP engine of the Ambit controller.
//
// Runs one row operation Dk = f(Di, Dj) in one bank: it walks the program of
// the operation (ambit_op_program), turns each symbolic operand into a
// subarray-local row address and issues the ACTIVATE / ACTIVATE / PRECHARGE
// of an AAP, or the ACTIVATE / PRECHARGE of an AP, through a request/grant
// handshake with the controller's command-bus arbiter. A request that is not
// granted is held (the engine stalls); all delays count from the cycle the
// command actually went out.
//
// AAP timing (cycles from the first ACTIVATE):
//  * overlapped, when SPLIT = 1 and exactly one of the two addresses is a
//    B-group address, so that the split row decoder can hold both rows:
//    ACT a1 @0, ACT a2 @T_RCD, PRE @T_RAS+T_OVL, next ACT @T_RAS+T_OVL+T_RP
//    (40 cycles = 50 ns at DDR3-1600 defaults)
//  * serial otherwise (both addresses in the same decoder, e.g. AAP(B12,B5)
//    of nand, or SPLIT = 0): ACT a2 @T_RAS, PRE @2*T_RAS, next @2*T_RAS+T_RP
//    (64 cycles = 80 ns)
// AP: PRE @T_RAS, next @T_RAS+T_RP. The gap between the two ACTIVATEs of an
// overlapped AAP (T_RCD) is this design's choice; the total follows the
// tRAS + 4 ns estimate for back-to-back activations.
// `done` pulses when the final PRECHARGE's tRP has elapsed; the engine then
// accepts a new row operation (start while ready).
// `cmd` is only ever ACTIVATE or PRECHARGE, qualified by cmd_req; the encoding
// bit that selects READ/WRITE is therefore constant 0 at this output.
module ambit_aap_engine
  import ambit_pkg::*;
#(
  parameter int unsigned N_SUB  = N_SUBARRAYS,
  parameter int unsigned TRAS   = T_RAS,
  parameter int unsigned TRP    = T_RP,
  parameter int unsigned TRCD   = T_RCD,
  parameter int unsigned TOVL   = T_OVL,
  parameter bit          SPLIT  = 1'b1,
  localparam int unsigned SUB_W = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned ROW_W = SUB_W + LOCAL_ROW_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // row operation
  input  logic                   start,
  output logic                   ready,
  input  op_e                    op,
  input  logic [SUB_W-1:0]       sub,
  input  logic [LOCAL_ROW_W-1:0] di,
  input  logic [LOCAL_ROW_W-1:0] dj,
  input  logic [LOCAL_ROW_W-1:0] dk,
  output logic                   done,
  // command request to the arbiter
  output logic                   cmd_req,
  output cmd_e                   cmd,
  output logic [ROW_W-1:0]       cmd_row,
  input  logic                   cmd_gnt,
  // events
  output logic                   ev_aap_fast,
  output logic                   ev_aap_serial,
  output logic                   ev_ap
);

  typedef enum logic [2:0] {S_IDLE, S_ACT1, S_ACT2, S_PRE, S_TAIL} state_e;

  state_e                 state;
  op_e                    op_q;
  logic [SUB_W-1:0]       sub_q;
  logic [LOCAL_ROW_W-1:0] di_q, dj_q, dk_q;
  logic [2:0]             step;
  logic [7:0]             timer;
  logic                   fast_q;

  prim_t prim;
  logic  last;

  ambit_op_program u_prog (
    .op  (op_q),
    .step(step),
    .prim(prim),
    .last(last)
  );

  function automatic logic [LOCAL_ROW_W-1:0] resolve(input operand_t o,
      input logic [LOCAL_ROW_W-1:0] i, input logic [LOCAL_ROW_W-1:0] j,
      input logic [LOCAL_ROW_W-1:0] k);
    unique case (o.kind)
      SYM_DI:  return i;
      SYM_DJ:  return j;
      SYM_DK:  return k;
      SYM_C0:  return LOCAL_ROW_W'(C0_ADDR);
      SYM_C1:  return LOCAL_ROW_W'(C1_ADDR);
      default: return LOCAL_ROW_W'(o.b);
    endcase
  endfunction

  logic fast_now;
  assign fast_now = SPLIT && !prim.is_ap &&
                    ((prim.a1.kind == SYM_B) != (prim.a2.kind == SYM_B));

  assign ready   = (state == S_IDLE);
  assign cmd_req = (state == S_ACT1 || state == S_ACT2 || state == S_PRE) &&
                   timer == '0;
  assign cmd     = (state == S_PRE) ? CMD_PRE : CMD_ACT;
  assign cmd_row = {sub_q, (state == S_ACT2) ? resolve(prim.a2, di_q, dj_q, dk_q)
                                             : resolve(prim.a1, di_q, dj_q, dk_q)};

  logic granted;
  assign granted = cmd_req && cmd_gnt;

  assign ev_aap_fast   = granted && state == S_ACT1 && !prim.is_ap && fast_now;
  assign ev_aap_serial = granted && state == S_ACT1 && !prim.is_ap && !fast_now;
  assign ev_ap         = granted && state == S_ACT1 && prim.is_ap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_NOT;
      sub_q  <= '0;
      di_q   <= '0;
      dj_q   <= '0;
      dk_q   <= '0;
      step   <= '0;
      timer  <= '0;
      fast_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (timer != '0) timer <= timer - 8'd1;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          sub_q <= sub;
          di_q  <= di;
          dj_q  <= dj;
          dk_q  <= dk;
          step  <= '0;
          timer <= '0;
          state <= S_ACT1;
        end
        S_ACT1: if (granted) begin
          fast_q <= fast_now;
          if (prim.is_ap) begin
            timer <= 8'(TRAS - 1);
            state <= S_PRE;
          end else begin
            timer <= fast_now ? 8'(TRCD - 1) : 8'(TRAS - 1);
            state <= S_ACT2;
          end
        end
        S_ACT2: if (granted) begin
          timer <= fast_q ? 8'(TRAS + TOVL - TRCD - 1) : 8'(TRAS - 1);
          state <= S_PRE;
        end
        S_PRE: if (granted) begin
          timer <= 8'(TRP - 1);
          if (last) begin
            state <= S_TAIL;
          end else begin
            step  <= step + 3'd1;
            state <= S_ACT1;
          end
        end
        S_TAIL: if (timer == '0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
