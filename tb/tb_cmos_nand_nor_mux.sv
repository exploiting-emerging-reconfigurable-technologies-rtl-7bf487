// tb_cmos_nand_nor_mux: exhaustive self-checking test of cmos_nand_nor_mux. All eight
// combinations of a, b and the program input p are applied, one per clock
// cycle, and the output is compared with the function of the CMOS gates plus select mux: NAND for
// p=0 and NOR for p=1, computed here from the truth table.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_cmos_nand_nor_mux;

  logic clk;
  initial clk = 1'b0;
  logic a, b, p, y;
  int   checks = 0;
  int   failures = 0;

  cmos_nand_nor_mux dut (.a(a), .b(b), .p(p), .y(y));

  always #5 clk = ~clk;

  function automatic logic expected(input logic ea, input logic eb, input logic ep);
    return ep ? (!(ea || eb)) : (!(ea && eb));
  endfunction

  initial begin
    a = 1'b0; b = 1'b0; p = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {p, b, a} = 3'(v);
      @(posedge clk);
      checks++;
      if (y !== expected(a, b, p)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b y=%b expected %b", a, b, p, y, expected(a, b, p));
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
