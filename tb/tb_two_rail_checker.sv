// tb_two_rail_checker: exhaustive check of the 6-pair two-rail checker.
// Every one of the 4^6 input combinations is applied; the output must be
// complementary exactly when all six pairs are complementary. The inputs
// are also checked for the code-disjoint property in both output polarities.
module tb_two_rail_checker;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] x, y;
  logic z0, z1;
  int n01 = 0, n10 = 0;

  two_rail_checker #(.N(6)) dut (.x, .y, .z0, .z1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x = v[5:0];
      y = v[11:6];
      #1;
      checks++;
      if ((z0 != z1) != ((x ^ y) == 6'h3f)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b%b", x, y, z0, z1);
      end
      if (z0 && !z1) n10++;
      if (!z0 && z1) n01++;
    end
    // A self-testing checker must produce both valid outputs in normal use.
    checks++;
    if (n10 == 0 || n01 == 0) begin failures++; $display("FAIL output stuck at one code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
