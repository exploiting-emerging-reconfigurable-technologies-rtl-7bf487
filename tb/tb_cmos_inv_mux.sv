// tb_cmos_inv_mux: exhaustive self-checking test of cmos_inv_mux. Both values of
// a are applied under both values of the program input p, one per clock
// cycle; the output must be the complement of a whatever p is, which is what
// makes the inverter's key bit a don't-care.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_cmos_inv_mux;

  logic clk;
  initial clk = 1'b0;
  logic a, p, y;
  int   checks = 0;
  int   failures = 0;

  cmos_inv_mux dut (.a(a), .p(p), .y(y));

  always #5 clk = ~clk;

  initial begin
    a = 1'b0; p = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {p, a} = 2'(v);
      @(posedge clk);
      checks++;
      if (y !== !a) begin
        failures++;
        $display("FAIL a=%b p=%b y=%b expected %b", a, p, y, !a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
