// ppa_adder: W-bit parallel prefix adder whose carry network is chosen by the
// KIND parameter: Brent-Kung (default), Kogge-Stone, Han-Carlson or
// Ladner-Fischer. All four give the same sum; they differ in depth, node count
// and wiring, and so in area and power. Combinational. These are the four
// networks the filter was built and compared with; Brent-Kung is the one the
// filter uses by default.
module ppa_adder
  import frm_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter ppa_kind_e   KIND = PPA_BK
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  generate
    case (KIND)
      PPA_KS:  begin : g_ks ks_adder #(.W(W)) u_add (.a, .b, .cin, .s, .cout); end
      PPA_HC:  begin : g_hc hc_adder #(.W(W)) u_add (.a, .b, .cin, .s, .cout); end
      PPA_LF:  begin : g_lf lf_adder #(.W(W)) u_add (.a, .b, .cin, .s, .cout); end
      default: begin : g_bk bk_adder #(.W(W)) u_add (.a, .b, .cin, .s, .cout); end
    endcase
  endgenerate

endmodule
