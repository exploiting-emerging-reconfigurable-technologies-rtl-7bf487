// rfet_key_pkg: shared types and constants of the key-locked polymorphic-gate
// adder.
//
// Program-gate (key) conventions follow the gate drawings: NAND/NOR gate is
// NAND for P=0 and NOR for P=1; XNOR/XOR gate is XNOR for P=0 and XOR for P=1;
// the inverter ignores P (a don't-care key bit).
//
// RCA_KEY_* describe the 18-bit authentication key of the 2-bit ripple-carry
// adder. Key bit i is the i-th symbol of the key read level by level from the
// primary inputs (level 1) to the primary outputs (level 6), left to right in
// each level: 000 | X0 | 10X | X1X | 0011 | 000. Don't-care bits (X) belong to
// inverters. RCA_KEY_CARE marks the bits that matter, RCA_KEY_VALUE gives
// their values (don't-cares shown as 0 there).
package rfet_key_pkg;

  // How a polymorphic gate is realised.
  typedef enum logic {
    IMPL_SINW = 1'b0,  // one reconfigurable RFET gate
    IMPL_CMOS = 1'b1   // CMOS equivalent: fixed gates plus a select mux
  } impl_e;

  // Program-gate values of each function.
  localparam logic P_NAND = 1'b0;
  localparam logic P_NOR  = 1'b1;
  localparam logic P_XNOR = 1'b0;
  localparam logic P_XOR  = 1'b1;

  // Key of the 2-bit ripple-carry adder.
  localparam int unsigned RCA_KEY_LEN = 18;
  localparam logic [RCA_KEY_LEN-1:0] RCA_KEY_CARE  = 18'h3FA77;
  localparam logic [RCA_KEY_LEN-1:0] RCA_KEY_VALUE = 18'h06220;

  // Position of each netlist node's program gate in the key.
  // Level 1
  localparam int unsigned K_N10 = 0;   // nand2 (cin, a0)
  localparam int unsigned K_N13 = 1;   // nand2 (cin, b0)
  localparam int unsigned K_N12 = 2;   // nand2 (a0, b0)
  // Level 2
  localparam int unsigned K_N11 = 3;   // inv1  (n10)
  localparam int unsigned K_N14 = 4;   // nand2 (n13, n12)
  // Level 3
  localparam int unsigned K_N15 = 5;   // nor2  (n11, n14): inverted carry c1
  localparam int unsigned K_N21 = 6;   // nand2 (a1, b1)
  localparam int unsigned K_N23 = 7;   // inv1  (b1)
  // Level 4
  localparam int unsigned K_N19 = 8;   // inv1  (n15)
  localparam int unsigned K_N24 = 9;   // nor2  (n15, n23)
  localparam int unsigned K_N22 = 10;  // inv1  (n21)
  // Level 5
  localparam int unsigned K_N17 = 11;  // xnor2 (a0, b0)
  localparam int unsigned K_N20 = 12;  // nand2 (n19, a1)
  localparam int unsigned K_N9  = 13;  // xor2  (a1, b1)
  localparam int unsigned K_N25 = 14;  // nor2  (n24, n22)
  // Level 6
  localparam int unsigned K_N18 = 15;  // xnor2 (cin, n17) -> sum0
  localparam int unsigned K_N16 = 16;  // xnor2 (n15, n9)  -> sum1
  localparam int unsigned K_N26 = 17;  // nand2 (n20, n25) -> cout

endpackage
