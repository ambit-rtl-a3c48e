// Self-checking test of ambit_op_program. Each program is executed on an
// abstract row-level model of one subarray written here (rows T0-T3, DCC0,
// DCC1, C0, C1 and data rows, with majority sensing and n-wordline
// inversion) and the destination row is compared with the Boolean
// definition of the operation for random source rows. The length of each
// program (number of AAP/AP steps) is checked as well.
module tb_ambit_op_program;
  import ambit_pkg::*;

  op_e        op;
  logic [2:0] step;
  prim_t      prim;
  logic       last;
  int checks = 0, failures = 0;

  ambit_op_program dut (.op(op), .step(step), .prim(prim), .last(last));

  // model state: 0-3 T0-T3, 4 DCC0, 5 DCC1, 6 C0, 7 C1, 8 Di, 9 Dj, 10 Dk
  logic [31:0] r [11];
  logic [31:0] sa;

  // wordline lists of B addresses: cell index, inverted
  function automatic int wl_cells(input int baddr, output int cell_i [3],
                                  output bit inv [3]);
    int n = 0;
    case (baddr)
      0: begin cell_i[0] = 0; inv[0] = 0; n = 1; end
      1: begin cell_i[0] = 1; inv[0] = 0; n = 1; end
      2: begin cell_i[0] = 2; inv[0] = 0; n = 1; end
      3: begin cell_i[0] = 3; inv[0] = 0; n = 1; end
      4: begin cell_i[0] = 4; inv[0] = 0; n = 1; end
      5: begin cell_i[0] = 4; inv[0] = 1; n = 1; end
      6: begin cell_i[0] = 5; inv[0] = 0; n = 1; end
      7: begin cell_i[0] = 5; inv[0] = 1; n = 1; end
      8: begin cell_i[0] = 4; inv[0] = 1; cell_i[1] = 0; inv[1] = 0; n = 2; end
      9: begin cell_i[0] = 5; inv[0] = 1; cell_i[1] = 1; inv[1] = 0; n = 2; end
      10: begin cell_i[0] = 2; inv[0] = 0; cell_i[1] = 3; inv[1] = 0; n = 2; end
      11: begin cell_i[0] = 0; inv[0] = 0; cell_i[1] = 3; inv[1] = 0; n = 2; end
      12: begin cell_i = '{0, 1, 2}; inv = '{0, 0, 0}; n = 3; end
      13: begin cell_i = '{1, 2, 3}; inv = '{0, 0, 0}; n = 3; end
      14: begin cell_i = '{4, 1, 2}; inv = '{0, 0, 0}; n = 3; end
      default: begin cell_i = '{5, 0, 3}; inv = '{0, 0, 0}; n = 3; end
    endcase
    return n;
  endfunction

  function automatic void cells_of(input operand_t o, output int n,
                                   output int ci [3], output bit iv [3]);
    ci = '{0, 0, 0};
    iv = '{0, 0, 0};
    case (o.kind)
      SYM_DI: begin n = 1; ci[0] = 8; end
      SYM_DJ: begin n = 1; ci[0] = 9; end
      SYM_DK: begin n = 1; ci[0] = 10; end
      SYM_C0: begin n = 1; ci[0] = 6; end
      SYM_C1: begin n = 1; ci[0] = 7; end
      default: n = wl_cells(int'(o.b), ci, iv);
    endcase
  endfunction

  task automatic activate(input operand_t o, input bit first);
    int n; int ci [3]; bit iv [3];
    cells_of(o, n, ci, iv);
    if (first) begin
      logic [31:0] v [3];
      for (int k = 0; k < 3; k++) v[k] = iv[k] ? ~r[ci[k]] : r[ci[k]];
      if (n == 1) sa = v[0];
      else if (n == 2) sa = v[0] & v[1];
      else sa = (v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[2]);
    end
    for (int k = 0; k < n; k++) r[ci[k]] = iv[k] ? ~sa : sa;
  endtask

  function automatic logic [31:0] ref_op(op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      OP_NOT:  return ~x;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_NAND: return ~(x & y);
      OP_NOR:  return ~(x | y);
      OP_XOR:  return x ^ y;
      default: return ~(x ^ y);
    endcase
  endfunction

  initial begin
    int exp_len [7] = '{2, 4, 4, 5, 5, 7, 7};
    for (int o = 0; o < 7; o++) begin
      op = op_e'(o);
      for (int it = 0; it < 20; it++) begin
        int n_steps;
        n_steps = 0;
        for (int k = 0; k < 11; k++) r[k] = $urandom;
        r[6] = '0;
        r[7] = '1;
        step = '0;
        forever begin
          #1;
          activate(prim.a1, 1'b1);
          if (!prim.is_ap) activate(prim.a2, 1'b0);
          n_steps++;
          if (last || n_steps > 8) break;
          step = step + 3'd1;
        end
        checks++;
        if (n_steps != exp_len[o]) begin
          failures++;
          $display("FAIL %s length %0d", op.name(), n_steps);
        end
        checks++;
        if (r[10] != ref_op(op, r[8], r[9])) begin
          failures++;
          $display("FAIL %s: Di=%h Dj=%h Dk=%h", op.name(), r[8], r[9], r[10]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
