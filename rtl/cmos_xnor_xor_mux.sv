// cmos_xnor_xor_mux: CMOS gate-level equivalent of the XNOR/XOR polymorphic
// gate. A fixed XNOR and a fixed XOR both see a and b; a 2:1 multiplexer
// selected by the key bit p passes the XNOR for p=0 and the XOR for p=1, the
// same key convention as the reconfigurable gate.
//
// Purely combinational.
module cmos_xnor_xor_mux
  import rfet_key_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic p,
  output logic y
);

  logic y_xnor;
  logic y_xor;

  assign y_xnor = ~(a ^ b);
  assign y_xor  = a ^ b;

  // 2:1 mux: select 0 -> XNOR, select 1 -> XOR
  assign y = (p == P_XOR) ? y_xor : y_xnor;

endmodule
