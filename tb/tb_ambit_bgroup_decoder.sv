// Self-checking test of ambit_bgroup_decoder: every B-group address against
// the wordline table of the design, written out here independently as lists
// of wordline names, plus the disabled case.
module tb_ambit_bgroup_decoder;
  import ambit_pkg::*;

  logic       en;
  logic [3:0] baddr;
  logic [7:0] wl;
  int checks = 0, failures = 0;

  ambit_bgroup_decoder dut (.en(en), .baddr(baddr), .wl(wl));

  // Expected rows as names: T0 T1 T2 T3 DCC0 nDCC0 DCC1 nDCC1
  string table_s [16] = '{
    "T0", "T1", "T2", "T3", "DCC0", "nDCC0", "DCC1", "nDCC1",
    "nDCC0 T0", "nDCC1 T1", "T2 T3", "T0 T3",
    "T0 T1 T2", "T1 T2 T3", "DCC0 T1 T2", "DCC1 T0 T3"};

  function automatic logic [7:0] parse(string s);
    string names [8] = '{"T0", "T1", "T2", "T3", "DCC0", "nDCC0", "DCC1", "nDCC1"};
    string tok = "";
    logic [7:0] r = '0;
    for (int i = 0; i <= s.len(); i++) begin
      if (i == s.len() || s[i] == " ") begin
        for (int n = 0; n < 8; n++) if (tok == names[n]) r[n] = 1'b1;
        tok = "";
      end else begin
        tok = {tok, s.substr(i, i)};
      end
    end
    return r;
  endfunction

  initial begin
    en = 1'b1;
    for (int a = 0; a < 16; a++) begin
      baddr = 4'(a);
      #1;
      checks++;
      if (wl !== parse(table_s[a])) begin
        failures++;
        $display("FAIL B%0d: got %b expected %b", a, wl, parse(table_s[a]));
      end
      // three wordlines exactly for B12-B15, two for B8-B11
      checks++;
      if ($countones(wl) != (a >= 12 ? 3 : a >= 8 ? 2 : 1)) failures++;
    end
    en = 1'b0;
    for (int a = 0; a < 16; a++) begin
      baddr = 4'(a);
      #1;
      checks++;
      if (wl != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
