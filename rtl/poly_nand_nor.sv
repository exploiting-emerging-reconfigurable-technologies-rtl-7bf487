// poly_nand_nor: key-programmed two-input gate (NAND for p=0, NOR for p=1), realised
// either as one reconfigurable-FET gate (IMPL_SINW, rfet_nand_nor) or as its CMOS
// equivalent of two fixed gates and a select mux (IMPL_CMOS,
// cmos_nand_nor_mux). Both realisations share the key convention, so a netlist
// built from this cell can be elaborated in either technology.
//
// Purely combinational.
module poly_nand_nor
  import rfet_key_pkg::*;
#(
  parameter impl_e IMPL = IMPL_SINW
) (
  input  logic a,
  input  logic b,
  input  logic p,
  output logic y
);

  if (IMPL == IMPL_SINW) begin : g_sinw
    rfet_nand_nor u_gate (.a(a), .b(b), .p(p), .y(y));
  end else begin : g_cmos
    cmos_nand_nor_mux u_gate (.a(a), .b(b), .p(p), .y(y));
  end

endmodule
