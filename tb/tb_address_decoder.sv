// tb_address_decoder: exhaustive check of the 32-way decoder with three
// operation lines: for every select value and every operation combination
// exactly the selected register receives the operation lines.
module tb_address_decoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]        rs;
  logic [2:0]        op;
  logic [31:0][2:0]  line;

  address_decoder #(.NREGS(32), .ADDR_W(5), .OPS(3)) dut (.rs, .op, .line);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int o = 0; o < 8; o++) begin
        rs = 5'(a); op = 3'(o);
        #1;
        for (int r = 0; r < 32; r++) begin
          checks++;
          if (line[r] != ((r == a) ? 3'(o) : 3'b000)) begin
            failures++;
            $display("FAIL rs=%0d op=%b reg %0d got %b", a, o, r, line[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
