// tb_secure_rca2_top: end-to-end test of the key-locked adder pair at its
// default size (18-bit key). It exercises each mechanism of the design and
// counts how often each one happened; a mechanism that never happened is a
// failure.
//
//  unlock      correct key: both realisations compute a + b + cin for all
//              32 operand combinations (arithmetic reference).
//  dc_swap     the four don't-care (inverter) key bits take all 16 values;
//              the adder must keep working.
//  dc_adjust   the don't-care balancing rule is applied to the key: if 0s or
//              1s already fill more than half the key, every don't-care gets
//              the minority value, otherwise they are split to even out the
//              count. The entropy of the key must rise from 0.8631 bits
//              (4 ones, 10 zeros, don't-cares ignored) to 0.9911 bits
//              (8 ones, 10 zeros), and the adjusted key must still unlock.
//  lock        every one of the 2^14 settings of the key bits that matter
//              is applied (don't-cares random): both realisations must match
//              a gate-by-gate reference model of the netlist written here
//              (ref_netlist). A gate-level analysis of the netlist shows that
//              exactly 16 settings add correctly (EQUIV_KEYS: the correct key
//              and 15 others that differ in groups of gates whose changes
//              cancel, De Morgan style); every other setting must give a
//              wrong sum for some operands.
//  agree       reconfigurable-FET and CMOS realisations give identical
//              outputs for every key and operand tried.
// The design is combinational: one operand set per clock cycle, no latency.
// A watchdog bounds the run.
module tb_secure_rca2_top;
  import rfet_key_pkg::*;

  // Settings of the key bits that matter (don't-cares 0) under which the
  // netlist still computes a + b + cin.
  localparam logic [17:0] EQUIV_KEYS [16] = '{
    18'h06217, 18'h06220, 18'h0EA17, 18'h0EA20, 18'h14217, 18'h14220,
    18'h1CA17, 18'h1CA20, 18'h23057, 18'h23060, 18'h2B857, 18'h2B860,
    18'h31057, 18'h31060, 18'h39857, 18'h39860};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]             a, b;
  logic                   cin;
  logic [RCA_KEY_LEN-1:0] key;
  logic [1:0]             sum_sinw, sum_cmos;
  logic                   cout_sinw, cout_cmos;

  int checks = 0;
  int failures = 0;
  int n_unlock = 0, n_dc_swap = 0, n_dc_adjust = 0, n_lock = 0, n_equiv = 0, n_agree = 0;

  secure_rca2_top dut (
    .a(a), .b(b), .cin(cin), .key(key),
    .sum_sinw(sum_sinw), .cout_sinw(cout_sinw),
    .sum_cmos(sum_cmos), .cout_cmos(cout_cmos));

  localparam int DC_POS [4] = '{K_N11, K_N23, K_N19, K_N22};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Gate-by-gate model of the mapped netlist for an arbitrary key.
  function automatic logic [2:0] ref_netlist(input logic [RCA_KEY_LEN-1:0] k,
                                             input logic [1:0] ra, input logic [1:0] rb,
                                             input logic rc);
    logic n9, n10, n11, n12, n13, n14, n15, n16, n17, n18;
    logic n19, n20, n21, n22, n23, n24, n25, n26;
    n10 = k[0]  ? !(rc | ra[0])   : !(rc & ra[0]);
    n13 = k[1]  ? !(rc | rb[0])   : !(rc & rb[0]);
    n12 = k[2]  ? !(ra[0] | rb[0]) : !(ra[0] & rb[0]);
    n11 = !n10;
    n14 = k[4]  ? !(n13 | n12)    : !(n13 & n12);
    n15 = k[5]  ? !(n11 | n14)    : !(n11 & n14);
    n21 = k[6]  ? !(ra[1] | rb[1]) : !(ra[1] & rb[1]);
    n23 = !rb[1];
    n19 = !n15;
    n24 = k[9]  ? !(n15 | n23)    : !(n15 & n23);
    n22 = !n21;
    n17 = k[11] ? (ra[0] ^ rb[0]) : !(ra[0] ^ rb[0]);
    n20 = k[12] ? !(n19 | ra[1])  : !(n19 & ra[1]);
    n9  = k[13] ? (ra[1] ^ rb[1]) : !(ra[1] ^ rb[1]);
    n25 = k[14] ? !(n24 | n22)    : !(n24 & n22);
    n18 = k[15] ? (rc ^ n17)      : !(rc ^ n17);
    n16 = k[16] ? (n15 ^ n9)      : !(n15 ^ n9);
    n26 = k[17] ? !(n20 | n25)    : !(n20 & n25);
    return {n26, n16, n18};
  endfunction

  // Shannon entropy in bits per symbol of a key with the given counts.
  function automatic real entropy(input int ones, input int zeros);
    real p1, p0, h;
    p1 = real'(ones) / real'(ones + zeros);
    p0 = 1.0 - p1;
    h = 0.0;
    if (p1 > 0.0) h -= p1 * $ln(p1) / $ln(2.0);
    if (p0 > 0.0) h -= p0 * $ln(p0) / $ln(2.0);
    return h;
  endfunction

  // Run all 32 operand combinations with the current key. Returns the
  // number of wrong sums (against arithmetic) of the reconfigurable-FET
  // adder; checks agreement between realisations and, if want_model, with
  // the netlist model.
  task automatic sweep(input bit want_model, output int bad);
    logic [2:0] exp_sum, exp_net;
    bad = 0;
    for (int v = 0; v < 32; v++) begin
      {cin, b, a} = 5'(v);
      @(posedge clk);
      exp_sum = 3'(a) + 3'(b) + 3'(cin);
      exp_net = ref_netlist(key, a, b, cin);
      if ({cout_sinw, sum_sinw} != exp_sum) bad++;
      checks++;
      if ({cout_sinw, sum_sinw} != {cout_cmos, sum_cmos}) begin
        failures++;
        $display("FAIL realisations differ: key=%h v=%0d", key, v);
      end else begin
        n_agree++;
      end
      if (want_model) begin
        check({cout_sinw, sum_sinw} == exp_net,
              $sformatf("netlist model mismatch key=%h v=%0d got %b expected %b",
                        key, v, {cout_sinw, sum_sinw}, exp_net));
      end
    end
  endtask

  initial begin
    int bad;
    int ones, zeros, dcs, new_ones, new_zeros, extra;
    real h_before, h_after;
    logic [RCA_KEY_LEN-1:0] rnd;
    a = '0; b = '0; cin = 1'b0;
    key = RCA_KEY_VALUE;

    // unlock and dc_swap
    for (int d = 0; d < 16; d++) begin
      key = RCA_KEY_VALUE;
      for (int i = 0; i < 4; i++) key[DC_POS[i]] = d[i];
      sweep(1'b1, bad);
      check(bad == 0, $sformatf("correct key with dc=%0d: %0d wrong sums", d, bad));
      if (bad == 0) begin
        n_unlock++;
        if (d != 0) n_dc_swap++;
      end
    end

    // dc_adjust: counts from the key itself
    ones  = $countones(RCA_KEY_VALUE & RCA_KEY_CARE);
    zeros = $countones(~RCA_KEY_VALUE & RCA_KEY_CARE);
    dcs   = int'(RCA_KEY_LEN) - ones - zeros;
    check(ones == 4 && zeros == 10 && dcs == 4,
          $sformatf("key has %0d ones, %0d zeros, %0d don't-cares; expected 4/10/4", ones, zeros, dcs));
    if (2 * ones > int'(RCA_KEY_LEN)) begin
      new_ones = ones; new_zeros = zeros + dcs;
    end else if (2 * zeros > int'(RCA_KEY_LEN)) begin
      new_zeros = zeros; new_ones = ones + dcs;
    end else begin
      extra = int'(RCA_KEY_LEN) / 2 - ones;
      new_ones = ones + extra; new_zeros = int'(RCA_KEY_LEN) - new_ones;
    end
    h_before = entropy(ones, zeros);
    h_after  = entropy(new_ones, new_zeros);
    check(h_before > 0.86305 && h_before < 0.86315,
          $sformatf("entropy before adjustment %f, expected 0.8631", h_before));
    check(h_after > 0.99105 && h_after < 0.99115,
          $sformatf("entropy after adjustment %f, expected 0.9911", h_after));
    // realise the adjusted key: the first (new_ones - ones) don't-cares -> 1
    key = RCA_KEY_VALUE;
    for (int i = 0; i < 4; i++) key[DC_POS[i]] = (i < new_ones - ones);
    check($countones(key) == new_ones, "adjusted key has the wrong number of ones");
    sweep(1'b1, bad);
    check(bad == 0, $sformatf("adjusted key: %0d wrong sums", bad));
    if (bad == 0 && h_after > h_before) n_dc_adjust++;

    // lock: every setting of the key bits that matter
    for (int n = 0; n < (1 << 18); n++) begin
      bit is_equiv;
      if ((18'(n) & ~RCA_KEY_CARE) != '0) continue;
      rnd = 18'(n) | (RCA_KEY_LEN'({$urandom, $urandom}) & ~RCA_KEY_CARE);
      key = rnd;
      is_equiv = 1'b0;
      foreach (EQUIV_KEYS[j]) if (18'(n) == EQUIV_KEYS[j]) is_equiv = 1'b1;
      sweep(1'b1, bad);
      if (is_equiv) begin
        check(bad == 0, $sformatf("equivalent key %h gives %0d wrong sums", rnd, bad));
        if (bad == 0) n_equiv++;
      end else begin
        check(bad > 0, $sformatf("wrong key %h still adds correctly", rnd));
        if (bad > 0) n_lock++;
      end
    end
    check(n_equiv == 16, $sformatf("%0d unlocking key settings, expected 16", n_equiv));
    check(n_lock == 16384 - 16, $sformatf("%0d locking key settings, expected 16368", n_lock));

    $display("mechanisms: unlock=%0d dc_swap=%0d dc_adjust=%0d lock=%0d equivalent=%0d agree=%0d",
             n_unlock, n_dc_swap, n_dc_adjust, n_lock, n_equiv, n_agree);
    check(n_unlock > 0, "unlock never happened");
    check(n_dc_swap > 0, "dc_swap never happened");
    check(n_dc_adjust > 0, "dc_adjust never happened");
    check(n_lock > 0, "lock never happened");
    check(n_agree > 0, "agree never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
