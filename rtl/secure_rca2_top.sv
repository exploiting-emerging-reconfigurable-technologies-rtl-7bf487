// secure_rca2_top: the key-locked 2-bit ripple-carry adder in both of its
// technologies, side by side. u_sinw is built from reconfigurable-FET
// polymorphic gates (the proposed realisation); u_cmos is the same netlist with
// every gate replaced by its CMOS equivalent of fixed gates and a select mux.
// Both share the operands and the authentication key, so for any key they
// produce the same outputs; with the right key both compute a + b + cin.
//
// Ports: a, b (2 bits), cin, key (18 + N_PAD_INV bits, order and correct
// value in rfet_key_pkg); {cout, sum} of each realisation. N_PAD_INV adds
// pairs of don't-care inverters to both (see keyed_rca2).
//
// Purely combinational.
module secure_rca2_top
  import rfet_key_pkg::*;
#(
  parameter int unsigned N_PAD_INV = 0,
  localparam int unsigned KEY_LEN  = RCA_KEY_LEN + N_PAD_INV
) (
  input  logic [1:0]         a,
  input  logic [1:0]         b,
  input  logic               cin,
  input  logic [KEY_LEN-1:0] key,
  output logic [1:0]         sum_sinw,
  output logic               cout_sinw,
  output logic [1:0]         sum_cmos,
  output logic               cout_cmos
);

  keyed_rca2 #(.IMPL(IMPL_SINW), .N_PAD_INV(N_PAD_INV)) u_sinw (
    .a(a), .b(b), .cin(cin), .key(key), .sum(sum_sinw), .cout(cout_sinw)
  );

  keyed_rca2 #(.IMPL(IMPL_CMOS), .N_PAD_INV(N_PAD_INV)) u_cmos (
    .a(a), .b(b), .cin(cin), .key(key), .sum(sum_cmos), .cout(cout_cmos)
  );

endmodule
