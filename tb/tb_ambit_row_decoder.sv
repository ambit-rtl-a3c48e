// Self-checking test of ambit_row_decoder: all 1024 local addresses are
// classified (B below 16, C0/C1 at 16/17, D from 18) and C/D rows get the
// right storage index; B12 must raise T0, T1 and T2.
module tb_ambit_row_decoder;
  import ambit_pkg::*;

  logic [LOCAL_ROW_W-1:0] addr;
  logic                   is_b, is_cd;
  logic [7:0]             b_wl;
  logic [LOCAL_ROW_W-1:0] cd_idx;
  int checks = 0, failures = 0;

  ambit_row_decoder dut (.addr(addr), .is_b(is_b), .is_cd(is_cd), .b_wl(b_wl),
                         .cd_idx(cd_idx));

  initial begin
    for (int a = 0; a < 1024; a++) begin
      addr = LOCAL_ROW_W'(a);
      #1;
      checks++;
      if (is_b != (a < 16) || is_cd != (a >= 16)) begin
        failures++;
        $display("FAIL group of %0d", a);
      end
      if (a >= 16) begin
        checks++;
        if (cd_idx != LOCAL_ROW_W'(a - 16) || b_wl != '0) begin
          failures++;
          $display("FAIL C/D index of %0d: %0d", a, cd_idx);
        end
      end else begin
        checks++;
        if (b_wl == '0) failures++;
      end
    end
    addr = 10'd12;
    #1;
    checks++;
    if (b_wl != 8'b0000_0111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
