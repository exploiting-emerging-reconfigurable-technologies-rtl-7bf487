// tb_keyed_rca2: self-checking test of the key-locked 2-bit adder in four
// configurations: reconfigurable-FET and CMOS-equivalent cells, each without
// padding and with two don't-care padding inverters.
//
//  1. With the correct key, under all 16 (or 64 with padding) assignments of
//     the don't-care bits, all 32 operand combinations must give
//     {cout, sum} = a + b + cin, computed arithmetically here.
//  2. For each of the 14 key bits that matter, flipping that bit alone must
//     corrupt the result for exactly the number of the 32 operand
//     combinations worked out from a separate gate-by-gate analysis of the
//     netlist (EXP_BAD below).
//  3. With padding, setting the four inverter bits and the two padding bits
//     to 1 gives a key with ten 1s and ten 0s that still adds correctly.
// The adder is combinational; one operand set is applied per clock cycle
// and there is no latency to check. A watchdog bounds the run.
module tb_keyed_rca2;
  import rfet_key_pkg::*;

  localparam int unsigned PAD = 2;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]               a, b;
  logic                     cin;
  logic [RCA_KEY_LEN-1:0]   key;
  logic [RCA_KEY_LEN+PAD-1:0] key_pad;
  logic [1:0]               sum_s, sum_c, sum_sp, sum_cp;
  logic                     cout_s, cout_c, cout_sp, cout_cp;

  int checks = 0;
  int failures = 0;

  keyed_rca2 #(.IMPL(IMPL_SINW)) dut_sinw (
    .a(a), .b(b), .cin(cin), .key(key), .sum(sum_s), .cout(cout_s));
  keyed_rca2 #(.IMPL(IMPL_CMOS)) dut_cmos (
    .a(a), .b(b), .cin(cin), .key(key), .sum(sum_c), .cout(cout_c));
  keyed_rca2 #(.IMPL(IMPL_SINW), .N_PAD_INV(PAD)) dut_sinw_pad (
    .a(a), .b(b), .cin(cin), .key(key_pad), .sum(sum_sp), .cout(cout_sp));
  keyed_rca2 #(.IMPL(IMPL_CMOS), .N_PAD_INV(PAD)) dut_cmos_pad (
    .a(a), .b(b), .cin(cin), .key(key_pad), .sum(sum_cp), .cout(cout_cp));

  // Number of the 32 operand combinations that a single flipped key bit
  // corrupts; -1 for the don't-care bits.
  localparam int EXP_BAD [RCA_KEY_LEN] = '{
    8, 8, 8, -1, 8, 12, 8, -1, -1, 8, -1, 32, 8, 32, 8, 32, 32, 12};

  // don't-care positions of the base key
  localparam int DC_POS [4] = '{K_N11, K_N23, K_N19, K_N22};

  function automatic logic [2:0] ref_add(input logic [4:0] v);
    return 3'(v[1:0]) + 3'(v[3:2]) + 3'(v[4]);
  endfunction

  // Apply all 32 operand combinations; return how many results of each
  // instance differ from the arithmetic sum (one count per instance).
  task automatic sweep(output int bad_s, output int bad_c, output int bad_sp, output int bad_cp);
    bad_s = 0; bad_c = 0; bad_sp = 0; bad_cp = 0;
    for (int v = 0; v < 32; v++) begin
      {cin, b, a} = 5'(v);
      @(posedge clk);
      if ({cout_s,  sum_s}  != ref_add(5'(v))) bad_s++;
      if ({cout_c,  sum_c}  != ref_add(5'(v))) bad_c++;
      if ({cout_sp, sum_sp} != ref_add(5'(v))) bad_sp++;
      if ({cout_cp, sum_cp} != ref_add(5'(v))) bad_cp++;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int bs, bc, bsp, bcp;
    int ones;
    a = '0; b = '0; cin = 1'b0;
    key = RCA_KEY_VALUE;
    key_pad = {{PAD{1'b0}}, RCA_KEY_VALUE};

    // 1. correct key, every don't-care assignment
    for (int d = 0; d < 64; d++) begin
      key = RCA_KEY_VALUE;
      for (int i = 0; i < 4; i++) key[DC_POS[i]] = d[i];
      key_pad = {d[5:4], key};
      sweep(bs, bc, bsp, bcp);
      if (d < 16) begin
        check(bs == 0, $sformatf("SiNW adder wrong with dc=%0d (%0d bad)", d, bs));
        check(bc == 0, $sformatf("CMOS adder wrong with dc=%0d (%0d bad)", d, bc));
      end
      check(bsp == 0, $sformatf("padded SiNW adder wrong with dc=%0d (%0d bad)", d, bsp));
      check(bcp == 0, $sformatf("padded CMOS adder wrong with dc=%0d (%0d bad)", d, bcp));
    end

    // 2. one wrong key bit at a time
    for (int i = 0; i < int'(RCA_KEY_LEN); i++) begin
      if (EXP_BAD[i] < 0) continue;
      key = RCA_KEY_VALUE;
      key[i] = ~key[i];
      key_pad = {{PAD{1'b0}}, key};
      sweep(bs, bc, bsp, bcp);
      check(bs == EXP_BAD[i], $sformatf("SiNW: key bit %0d flipped gives %0d bad, expected %0d", i, bs, EXP_BAD[i]));
      check(bc == EXP_BAD[i], $sformatf("CMOS: key bit %0d flipped gives %0d bad, expected %0d", i, bc, EXP_BAD[i]));
      check(bsp == EXP_BAD[i], $sformatf("padded SiNW: key bit %0d flipped gives %0d bad", i, bsp));
      check(bcp == EXP_BAD[i], $sformatf("padded CMOS: key bit %0d flipped gives %0d bad", i, bcp));
    end

    // 3. balanced 20-bit key: all six don't-cares set to 1
    key = RCA_KEY_VALUE;
    key_pad = {{PAD{1'b1}}, RCA_KEY_VALUE};
    for (int i = 0; i < 4; i++) key_pad[DC_POS[i]] = 1'b1;
    ones = $countones(key_pad);
    check(ones == 10, $sformatf("balanced key has %0d ones, expected 10", ones));
    sweep(bs, bc, bsp, bcp);
    check(bsp == 0 && bcp == 0, "balanced padded key does not add correctly");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
