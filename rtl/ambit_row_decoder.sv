// Split row decoder of an Ambit subarray.
//
// The 1024 local row addresses of a subarray fall into three groups: the
// B-group (B0-B15, reserved for bitwise operations), the C-group (C0, C1,
// the constant rows) and the D-group (D0-D1005, data). The decoder is split
// in two: a regular decoder that selects at most one C/D-group row, and the
// small B-group decoder (ambit_bgroup_decoder) that may raise up to three of
// the eight B-group wordlines at once. Because the two parts are separate,
// a C/D row and B-group wordlines can be held raised together, which is what
// lets an AAP overlap its two activations.
//
// Local address layout (this design's choice): 0-15 = B0-B15, 16 = C0,
// 17 = C1, 18-1023 = D0-D1005. The C/D index output counts C0 as 0, C1 as 1
// and Dn as n+2, the index into the subarray's C/D row storage.
// Combinational.
module ambit_row_decoder
  import ambit_pkg::*;
(
  input  logic [LOCAL_ROW_W-1:0] addr,
  output logic                   is_b,   // address is in the B-group
  output logic                   is_cd,  // address is a C- or D-group row
  output logic [7:0]             b_wl,   // raised B-group wordlines
  output logic [LOCAL_ROW_W-1:0] cd_idx  // C/D row index when is_cd
);

  always_comb begin
    is_b   = (addr < LOCAL_ROW_W'(N_BGROUP));
    is_cd  = !is_b;
    cd_idx = is_cd ? addr - LOCAL_ROW_W'(N_BGROUP) : '0;
  end

  ambit_bgroup_decoder u_bdec (
    .en   (is_b),
    .baddr(addr[3:0]),
    .wl   (b_wl)
  );

endmodule
