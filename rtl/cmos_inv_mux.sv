// cmos_inv_mux: CMOS equivalent of the reconfigurable inverter. An inverter
// is followed by a 2:1 multiplexer whose two data inputs are both the
// inverter output, so the key bit p on the select line is a don't-care just
// as on the reconfigurable inverter, while the mux makes the cell look like
// every other key-programmed cell.
//
// Purely combinational.
module cmos_inv_mux (
  input  logic a,
  input  logic p,
  output logic y
);

  logic y_inv;

  assign y_inv = ~a;

  // both data inputs carry the inverter output
  assign y = p ? y_inv : y_inv;

endmodule
