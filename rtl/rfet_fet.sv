// rfet_fet: logic-level model of one silicon-nanowire reconfigurable FET.
//
// The device has a control gate cg, which switches the channel, and a
// program gate pg, which selects the carrier type. Its gate-level equivalent
// is a p-type and an n-type transistor on the same control gate, with a
// multiplexer steered by the program gate choosing which of the two is in
// effect: pg=0 gives p-type behaviour (conducts when cg=0), pg=1 gives
// n-type behaviour (conducts when cg=1). The output on is 1 when the channel
// conducts. The assignment of pg=1 to n-type is this model's choice; it is
// the one under which the polymorphic gates built from the device have the
// functions their key convention says.
//
// This is a switch abstraction for building gates at logic level: it says
// whether the device conducts, not the voltage it passes, its drive strength
// or its leakage. Purely combinational.
module rfet_fet (
  input  logic cg,
  input  logic pg,
  output logic on
);

  logic p_on;  // p-type view: conducts on a low control gate
  logic n_on;  // n-type view: conducts on a high control gate

  assign p_on = ~cg;
  assign n_on = cg;

  // program gate selects the carrier type
  assign on = pg ? n_on : p_on;

endmodule
