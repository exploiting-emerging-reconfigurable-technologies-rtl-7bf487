// cmos_nand_nor_mux: CMOS gate-level equivalent of the NAND/NOR polymorphic
// gate. A fixed NAND and a fixed NOR both see a and b; a 2:1 multiplexer
// selected by the key bit p passes the NAND for p=0 and the NOR for p=1, the
// same key convention as the reconfigurable gate. It shows the area cost of
// reproducing the polymorphic gate in CMOS: three cells instead of one.
//
// Purely combinational.
module cmos_nand_nor_mux
  import rfet_key_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic p,
  output logic y
);

  logic y_nand;
  logic y_nor;

  assign y_nand = ~(a & b);
  assign y_nor  = ~(a | b);

  // 2:1 mux: select 0 -> NAND, select 1 -> NOR
  assign y = (p == P_NOR) ? y_nor : y_nand;

endmodule
