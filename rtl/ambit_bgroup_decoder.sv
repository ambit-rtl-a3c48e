// B-group row decoder of an Ambit subarray.
//
// Decodes one of the 16 reserved B-group addresses into the set of B-group
// wordlines it raises, following the fixed mapping of the design:
//   B0-B3   : T0, T1, T2, T3 alone
//   B4, B5  : d-wordline and n-wordline of DCC row 0
//   B6, B7  : d-wordline and n-wordline of DCC row 1
//   B8      : n-wordline of DCC0 + T0      B9  : n-wordline of DCC1 + T1
//   B10     : T2 + T3                      B11 : T0 + T3
//   B12     : T0 + T1 + T2                 B13 : T1 + T2 + T3
//   B14     : d-wordline of DCC0 + T1 + T2 B15 : d-wordline of DCC1 + T0 + T3
// Three-wordline addresses trigger triple-row activations; two-wordline
// addresses copy a result into two rows at once (one of them inverted when
// it is an n-wordline). The output bit order is given by ambit_pkg::bwl_e.
// Purely combinational; `en` low gives no wordline.
module ambit_bgroup_decoder
  import ambit_pkg::*;
(
  input  logic       en,     // address is in the B-group
  input  logic [3:0] baddr,  // B-group index 0-15
  output logic [7:0] wl      // raised wordlines, bit i = bwl_e value i
);

  always_comb begin
    wl = '0;
    if (en) begin
      unique case (baddr)
        4'd0:  wl[WL_T0]    = 1'b1;
        4'd1:  wl[WL_T1]    = 1'b1;
        4'd2:  wl[WL_T2]    = 1'b1;
        4'd3:  wl[WL_T3]    = 1'b1;
        4'd4:  wl[WL_DCC0]  = 1'b1;
        4'd5:  wl[WL_DCC0N] = 1'b1;
        4'd6:  wl[WL_DCC1]  = 1'b1;
        4'd7:  wl[WL_DCC1N] = 1'b1;
        4'd8:  begin wl[WL_DCC0N] = 1'b1; wl[WL_T0] = 1'b1; end
        4'd9:  begin wl[WL_DCC1N] = 1'b1; wl[WL_T1] = 1'b1; end
        4'd10: begin wl[WL_T2] = 1'b1; wl[WL_T3] = 1'b1; end
        4'd11: begin wl[WL_T0] = 1'b1; wl[WL_T3] = 1'b1; end
        4'd12: begin wl[WL_T0] = 1'b1; wl[WL_T1] = 1'b1; wl[WL_T2] = 1'b1; end
        4'd13: begin wl[WL_T1] = 1'b1; wl[WL_T2] = 1'b1; wl[WL_T3] = 1'b1; end
        4'd14: begin wl[WL_DCC0] = 1'b1; wl[WL_T1] = 1'b1; wl[WL_T2] = 1'b1; end
        4'd15: begin wl[WL_DCC1] = 1'b1; wl[WL_T0] = 1'b1; wl[WL_T3] = 1'b1; end
        default: wl = '0;
      endcase
    end
  end

endmodule
