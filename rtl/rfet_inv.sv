// rfet_inv: inverter of two reconfigurable FETs whose program input is a
// don't-care.
//
// Structure, following the transistor drawing of the gate: one device gated
// by a and programmed by p connects the output to a rail held at ~p; a second
// device gated by a and programmed by ~p connects it to a rail held at p.
// Pull-up and pull-down simply swap roles when p changes, so y = ~a for both
// values of p. That freedom makes the inverter's key bit a don't-care, which
// can be set to 0 or 1 to balance the key. Each device is an rfet_fet; the
// two are combined at logic level.
//
// Purely combinational. An assertion checks that exactly one device
// conducts.
module rfet_inv (
  input  logic a,
  input  logic p,
  output logic y
);

  logic t1_on;  // rail ~p
  logic t2_on;  // rail p

  rfet_fet u_t1 (.cg(a), .pg(p),  .on(t1_on));
  rfet_fet u_t2 (.cg(a), .pg(~p), .on(t2_on));

  always_comb begin
    y = t1_on ? ~p : p;
    assert (t1_on != t2_on)
      else $error("rfet_inv: devices conflict (a=%b p=%b)", a, p);
  end

endmodule
