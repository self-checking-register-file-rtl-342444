// tb_berger_check_gen: checks the zero counter on corner words (all zeros,
// all ones, one-hot), on random words, and on the 7-bit textbook example
// 1100101, whose check symbol is 011, with a second 7-bit instance.
module tb_berger_check_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] data;
  logic [5:0]  check;
  logic [6:0]  data7;
  logic [2:0]  check7;

  berger_check_gen #(.DATA_W(32)) dut (.data, .check);
  berger_check_gen #(.DATA_W(7))  dut7 (.data(data7), .check(check7));

  task automatic try(input logic [31:0] d);
    data = d;
    #1;
    checks++;
    if (check != 6'(32 - $countones(d))) begin
      failures++;
      $display("FAIL data=%h got %0d", d, check);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0000_0000);
    try(32'hffff_ffff);
    for (int i = 0; i < 32; i++) begin
      try(32'h1 << i);
      try(~(32'h1 << i));
    end
    for (int i = 0; i < 2000; i++) try($urandom);
    data7 = 7'b1100101;
    #1;
    checks++;
    if (check7 != 3'b011) begin failures++; $display("FAIL 7-bit example got %b", check7); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
