// keyed_rca2: 2-bit ripple-carry adder whose every gate is polymorphic, so
// that it adds correctly only when the right authentication key drives the
// gates' program inputs.
//
// The netlist has 18 cells: 7 NAND/NOR gates set to NAND, 3 set to NOR, 1
// XNOR/XOR gate set to XOR, 3 set to XNOR and 4 inverters. Each cell takes
// one key bit (see rfet_key_pkg for the bit order and the correct key). The
// 14 bits of the NAND/NOR and XNOR/XOR cells must be right; a single wrong one
// breaks sum or carry for some inputs. The 4 inverter bits are don't-cares
// and may be chosen freely, e.g. to balance 0s and 1s in the key.
//
// The netlist, its node numbers, gate counts and the level-by-level key
// order are those of the published technology-mapped adder; vector ports and
// the IMPL/N_PAD_INV parameters are this design's. Node numbers:
//   n10 = nand(cin,a0)  n13 = nand(cin,b0)  n12 = nand(a0,b0)
//   n11 = ~n10          n14 = nand(n13,n12) n15 = nor(n11,n14)  = ~c1
//   n17 = xnor(a0,b0)   n18 = xnor(cin,n17) = sum0
//   n9  = xor(a1,b1)    n16 = xnor(n15,n9)  = sum1
//   n21 = nand(a1,b1)   n22 = ~n21  n23 = ~b1  n19 = ~n15
//   n24 = nor(n15,n23)  n25 = nor(n24,n22)
//   n20 = nand(n19,a1)  n26 = nand(n20,n25) = cout
//
// N_PAD_INV (even, default 0) inserts that many extra inverters between n14
// and n15. They leave the function unchanged and add N_PAD_INV don't-care key
// bits, placed above the 18 base bits (that placement is this design's
// choice). Two of them, set to 1, give the key equal numbers of 0s and 1s.
// IMPL selects the technology of every cell: the reconfigurable-FET gates or
// their CMOS mux equivalents.
//
// Purely combinational: sum and cout settle one propagation delay after any
// input or key change.
module keyed_rca2
  import rfet_key_pkg::*;
#(
  parameter impl_e       IMPL      = IMPL_SINW,
  parameter int unsigned N_PAD_INV = 0,
  localparam int unsigned KEY_LEN  = RCA_KEY_LEN + N_PAD_INV
) (
  input  logic [1:0]         a,
  input  logic [1:0]         b,
  input  logic               cin,
  input  logic [KEY_LEN-1:0] key,
  output logic [1:0]         sum,
  output logic               cout
);

  if (N_PAD_INV % 2 != 0) begin : g_bad_pad
    $error("keyed_rca2: N_PAD_INV must be even to keep the function");
  end

  logic n9, n10, n11, n12, n13, n14, n14_pad, n15, n16, n17, n18;
  logic n19, n20, n21, n22, n23, n24, n25, n26;

  // bit 0: first adder stage (carry c1 = ~n15, sum0 = n18)
  poly_nand_nor #(.IMPL(IMPL)) u_n10 (.a(cin), .b(a[0]), .p(key[K_N10]), .y(n10));
  poly_nand_nor #(.IMPL(IMPL)) u_n13 (.a(cin), .b(b[0]), .p(key[K_N13]), .y(n13));
  poly_nand_nor #(.IMPL(IMPL)) u_n12 (.a(a[0]), .b(b[0]), .p(key[K_N12]), .y(n12));
  poly_inv      #(.IMPL(IMPL)) u_n11 (.a(n10), .p(key[K_N11]), .y(n11));
  poly_nand_nor #(.IMPL(IMPL)) u_n14 (.a(n13), .b(n12), .p(key[K_N14]), .y(n14));
  poly_nand_nor #(.IMPL(IMPL)) u_n15 (.a(n11), .b(n14_pad), .p(key[K_N15]), .y(n15));
  poly_xnor_xor #(.IMPL(IMPL)) u_n17 (.a(a[0]), .b(b[0]), .p(key[K_N17]), .y(n17));
  poly_xnor_xor #(.IMPL(IMPL)) u_n18 (.a(cin), .b(n17), .p(key[K_N18]), .y(n18));

  // optional don't-care padding between n14 and n15
  if (N_PAD_INV == 0) begin : g_no_pad
    assign n14_pad = n14;
  end else begin : g_pad
    logic [N_PAD_INV:0] chain;
    assign chain[0] = n14;
    for (genvar i = 0; i < N_PAD_INV; i++) begin : g_inv
      poly_inv #(.IMPL(IMPL)) u_pad (.a(chain[i]), .p(key[RCA_KEY_LEN+i]), .y(chain[i+1]));
    end
    assign n14_pad = chain[N_PAD_INV];
  end

  // bit 1: second adder stage (sum1 = n16, cout = n26)
  poly_xnor_xor #(.IMPL(IMPL)) u_n9  (.a(a[1]), .b(b[1]), .p(key[K_N9]), .y(n9));
  poly_xnor_xor #(.IMPL(IMPL)) u_n16 (.a(n15), .b(n9), .p(key[K_N16]), .y(n16));
  poly_nand_nor #(.IMPL(IMPL)) u_n21 (.a(a[1]), .b(b[1]), .p(key[K_N21]), .y(n21));
  poly_inv      #(.IMPL(IMPL)) u_n22 (.a(n21), .p(key[K_N22]), .y(n22));
  poly_inv      #(.IMPL(IMPL)) u_n23 (.a(b[1]), .p(key[K_N23]), .y(n23));
  poly_inv      #(.IMPL(IMPL)) u_n19 (.a(n15), .p(key[K_N19]), .y(n19));
  poly_nand_nor #(.IMPL(IMPL)) u_n24 (.a(n15), .b(n23), .p(key[K_N24]), .y(n24));
  poly_nand_nor #(.IMPL(IMPL)) u_n25 (.a(n24), .b(n22), .p(key[K_N25]), .y(n25));
  poly_nand_nor #(.IMPL(IMPL)) u_n20 (.a(n19), .b(a[1]), .p(key[K_N20]), .y(n20));
  poly_nand_nor #(.IMPL(IMPL)) u_n26 (.a(n20), .b(n25), .p(key[K_N26]), .y(n26));

  assign sum  = {n16, n18};
  assign cout = n26;

endmodule
