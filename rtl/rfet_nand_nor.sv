// rfet_nand_nor: polymorphic two-input gate of four reconfigurable FETs.
// NAND when the program input p is 0, NOR when p is 1.
//
// Structure, following the transistor drawing of the gate: two devices in
// parallel, gated by a and b and programmed by p, connect the output to a rail
// held at ~p; two devices in series, gated by a and b and programmed by ~p,
// connect it to a rail held at p. With p=0 the parallel pair is p-type and
// pulls up while the series pair pulls down (NAND); with p=1 the parallel
// pair is n-type and pulls down while the series pair pulls up (NOR). Each
// device is an rfet_fet; the networks are combined at logic level (which
// network conducts, which rail it drives), not as analog circuits.
//
// Purely combinational. An assertion checks that exactly one network
// conducts for every input, i.e. the output is never floating or contended.
module rfet_nand_nor (
  input  logic a,
  input  logic b,
  input  logic p,
  output logic y
);

  logic on_pa, on_pb;  // parallel pair, rail ~p
  logic on_sa, on_sb;  // series pair, rail p
  logic par_on, ser_on;

  rfet_fet u_pa (.cg(a), .pg(p),  .on(on_pa));
  rfet_fet u_pb (.cg(b), .pg(p),  .on(on_pb));
  rfet_fet u_sa (.cg(a), .pg(~p), .on(on_sa));
  rfet_fet u_sb (.cg(b), .pg(~p), .on(on_sb));

  always_comb begin
    par_on = on_pa | on_pb;
    ser_on = on_sa & on_sb;
    y      = par_on ? ~p : p;
    assert (par_on != ser_on)
      else $error("rfet_nand_nor: networks conflict (a=%b b=%b p=%b)", a, b, p);
  end

endmodule
