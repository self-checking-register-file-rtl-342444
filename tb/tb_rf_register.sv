// tb_rf_register: checks one 32-bit register of eight 4-bit groups and one
// 6-bit single-group register. Random writes, clears and reads on each port
// are compared with a reference word; a wrong or missing control copy in any
// group shows as a wrong nibble.
module tb_rf_register;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rda, rdb, rdc, wrc, clr;
  logic [31:0] dc, qa, qb, qc, ref_w;
  logic [5:0]  dc6, qa6, qb6, qc6, ref6;

  rf_register #(.WIDTH(32), .GROUPS(8), .CLR_VAL(32'h0)) dut32 (
    .clk, .rda, .rdb, .rdc, .wrc, .clr, .dc, .qa, .qb, .qc);
  rf_register #(.WIDTH(6), .GROUPS(1), .CLR_VAL(6'b100000)) dut6 (
    .clk, .rda, .rdb, .rdc, .wrc, .clr, .dc(dc6), .qa(qa6), .qb(qb6), .qc(qc6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {rda, rdb, rdc, wrc} = '0;
    clr = 1'b1; dc = '0; dc6 = '0;
    @(negedge clk);
    ref_w = '0; ref6 = 6'b100000;
    for (int i = 0; i < 500; i++) begin
      {rda, rdb, rdc} = 3'($urandom);
      wrc = 1'($urandom);
      clr = ($urandom % 10) == 0;
      dc  = $urandom;
      dc6 = 6'($urandom);
      #1;
      check(qa == (rda ? ref_w : 32'h0) && qb == (rdb ? ref_w : 32'h0) &&
            qc == (rdc ? ref_w : 32'h0),
            $sformatf("32-bit read i=%0d exp %h got %h %h %h", i, ref_w, qa, qb, qc));
      check(qa6 == (rda ? ref6 : 6'h0) && qb6 == (rdb ? ref6 : 6'h0) &&
            qc6 == (rdc ? ref6 : 6'h0),
            $sformatf("6-bit read i=%0d exp %h got %h %h %h", i, ref6, qa6, qb6, qc6));
      @(negedge clk);
      if (clr) begin ref_w = '0; ref6 = 6'b100000; end
      else if (wrc) begin ref_w = dc; ref6 = dc6; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
