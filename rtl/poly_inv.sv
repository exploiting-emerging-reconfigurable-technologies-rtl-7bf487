// poly_inv: key-programmed inverter whose key bit p is a don't-care,
// realised either as a reconfigurable-FET inverter (IMPL_SINW, rfet_inv) or as
// a CMOS inverter followed by a mux with both data inputs tied together
// (IMPL_CMOS, cmos_inv_mux).
//
// Purely combinational.
module poly_inv
  import rfet_key_pkg::*;
#(
  parameter impl_e IMPL = IMPL_SINW
) (
  input  logic a,
  input  logic p,
  output logic y
);

  if (IMPL == IMPL_SINW) begin : g_sinw
    rfet_inv u_gate (.a(a), .p(p), .y(y));
  end else begin : g_cmos
    cmos_inv_mux u_gate (.a(a), .p(p), .y(y));
  end

endmodule
