// rfet_xnor_xor: polymorphic two-input gate of eight reconfigurable FETs.
// XNOR when the program input p is 0, XOR when p is 1.
//
// Structure, following the transistor drawing of the gate: the upper network,
// on a rail held at ~p, has two series branches gated (a, b) and (~a, ~b),
// all programmed by p; the lower network, on a rail held at p, has two series
// branches gated (~b, a) and (b, ~a), all programmed by ~p. Whatever p is,
// the upper network conducts when a equals b and the lower one when they
// differ, so the output is ~p when a==b and p otherwise: XNOR for p=0, XOR for
// p=1. Each device is an rfet_fet; the networks are combined at logic level.
//
// Purely combinational. An assertion checks that exactly one network
// conducts.
module rfet_xnor_xor (
  input  logic a,
  input  logic b,
  input  logic p,
  output logic y
);

  logic on_u1a, on_u1b, on_u2a, on_u2b;  // upper branches, rail ~p
  logic on_l1a, on_l1b, on_l2a, on_l2b;  // lower branches, rail p
  logic up_on, dn_on;

  rfet_fet u_u1a (.cg(a),  .pg(p),  .on(on_u1a));
  rfet_fet u_u1b (.cg(b),  .pg(p),  .on(on_u1b));
  rfet_fet u_u2a (.cg(~a), .pg(p),  .on(on_u2a));
  rfet_fet u_u2b (.cg(~b), .pg(p),  .on(on_u2b));
  rfet_fet u_l1a (.cg(~b), .pg(~p), .on(on_l1a));
  rfet_fet u_l1b (.cg(a),  .pg(~p), .on(on_l1b));
  rfet_fet u_l2a (.cg(b),  .pg(~p), .on(on_l2a));
  rfet_fet u_l2b (.cg(~a), .pg(~p), .on(on_l2b));

  always_comb begin
    up_on = (on_u1a & on_u1b) | (on_u2a & on_u2b);
    dn_on = (on_l1a & on_l1b) | (on_l2a & on_l2b);
    y     = up_on ? ~p : p;
    assert (up_on != dn_on)
      else $error("rfet_xnor_xor: networks conflict (a=%b b=%b p=%b)", a, b, p);
  end

endmodule
