// tb_rfet_fet: exhaustive self-checking test of the reconfigurable-FET switch
// model. All four combinations of control gate and program gate are applied,
// one per clock cycle: with pg=1 (n-type) the device must conduct exactly when
// cg=1, with pg=0 (p-type) exactly when cg=0.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rfet_fet;

  logic clk;
  initial clk = 1'b0;
  logic cg, pg, on;
  int   checks = 0;
  int   failures = 0;

  rfet_fet dut (.cg(cg), .pg(pg), .on(on));

  always #5 clk = ~clk;

  initial begin
    cg = 1'b0; pg = 1'b0;
    for (int v = 0; v < 4; v++) begin
      logic expect_on;
      {pg, cg} = 2'(v);
      @(posedge clk);
      expect_on = pg ? cg : !cg;
      checks++;
      if (on !== expect_on) begin
        failures++;
        $display("FAIL cg=%b pg=%b on=%b expected %b", cg, pg, on, expect_on);
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
