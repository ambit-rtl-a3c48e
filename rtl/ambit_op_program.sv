// Command programs of the seven bulk bitwise operations.
//
// Every operation Dk = f(Di, Dj) is a short list of two primitives:
//   AAP(a1, a2) = ACTIVATE a1; ACTIVATE a2; PRECHARGE  - copies the result of
//                 activating a1 into the row(s) that a2 raises
//   AP(a)       = ACTIVATE a; PRECHARGE                 - an in-place TRA
// Programs (B-group addresses as decoded by ambit_bgroup_decoder):
//   not  : AAP(Di,B5) AAP(B4,Dk)
//   and  : AAP(Di,B0) AAP(Dj,B1) AAP(C0,B2) AAP(B12,Dk)
//   nand : AAP(Di,B0) AAP(Dj,B1) AAP(C0,B2) AAP(B12,B5) AAP(B4,Dk)
//   xor  : AAP(Di,B8) AAP(Dj,B9) AAP(C0,B10) AP(B14) AP(B15)
//          AAP(C1,B2) AAP(B12,Dk)
// or / nor use C1 where and / nand use C0. xnor swaps C0 and C1 in the xor
// program: the two B14/B15 TRAs then compute (!Di | Dj) and (Di | !Dj) and
// the final TRA their AND. Combinational lookup by (op, step); `last` marks
// the final step.
module ambit_op_program
  import ambit_pkg::*;
(
  input  op_e        op,
  input  logic [2:0] step,
  output prim_t      prim,
  output logic       last
);

  function automatic operand_t b(input int unsigned n);
    b.kind = SYM_B;
    b.b    = 4'(n);
  endfunction

  function automatic operand_t s(input sym_e k);
    s.kind = k;
    s.b    = '0;
  endfunction

  function automatic prim_t aap(input operand_t x, input operand_t y);
    aap.is_ap = 1'b0;
    aap.a1    = x;
    aap.a2    = y;
  endfunction

  function automatic prim_t ap(input operand_t x);
    ap.is_ap = 1'b1;
    ap.a1    = x;
    ap.a2    = x;
  endfunction

  sym_e c_and;   // control row for and-type TRAs of this op
  sym_e c_fin;   // control row of the final xor/xnor TRA

  always_comb begin
    c_and = (op == OP_OR || op == OP_NOR || op == OP_XNOR) ? SYM_C1 : SYM_C0;
    c_fin = (op == OP_XNOR) ? SYM_C0 : SYM_C1;
    prim  = aap(s(SYM_DI), s(SYM_DK));
    last  = (32'(step) == prog_len(op) - 1);
    unique case (op)
      OP_NOT:
        unique case (step)
          3'd0:    prim = aap(s(SYM_DI), b(5));
          default: prim = aap(b(4), s(SYM_DK));
        endcase
      OP_AND, OP_OR:
        unique case (step)
          3'd0:    prim = aap(s(SYM_DI), b(0));
          3'd1:    prim = aap(s(SYM_DJ), b(1));
          3'd2:    prim = aap(s(c_and), b(2));
          default: prim = aap(b(12), s(SYM_DK));
        endcase
      OP_NAND, OP_NOR:
        unique case (step)
          3'd0:    prim = aap(s(SYM_DI), b(0));
          3'd1:    prim = aap(s(SYM_DJ), b(1));
          3'd2:    prim = aap(s(c_and), b(2));
          3'd3:    prim = aap(b(12), b(5));
          default: prim = aap(b(4), s(SYM_DK));
        endcase
      default:  // OP_XOR, OP_XNOR
        unique case (step)
          3'd0:    prim = aap(s(SYM_DI), b(8));
          3'd1:    prim = aap(s(SYM_DJ), b(9));
          3'd2:    prim = aap(s(c_and), b(10));
          3'd3:    prim = ap(b(14));
          3'd4:    prim = ap(b(15));
          3'd5:    prim = aap(s(c_fin), b(2));
          default: prim = aap(b(12), s(SYM_DK));
        endcase
    endcase
  end

endmodule
