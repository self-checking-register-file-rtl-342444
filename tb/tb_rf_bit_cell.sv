// tb_rf_bit_cell: checks the one-bit three-port register cell.
// Random sequences of write/clear/read commands are applied and the three
// read ports are compared with a reference bit kept by the testbench
// (clear over write priority, reads gated by their own line).
module tb_rf_bit_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rda, rdb, rdc, wrc, clr, dc, qa, qb, qc;
  logic ref_q;

  rf_bit_cell #(.CLR_VAL(1'b1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {rda, rdb, rdc, wrc, dc} = '0;
    clr = 1'b1;               // clear loads CLR_VAL = 1
    @(negedge clk);
    ref_q = 1'b1;
    for (int i = 0; i < 400; i++) begin
      {rda, rdb, rdc} = 3'($urandom);
      wrc = 1'($urandom);
      clr = ($urandom % 8) == 0;
      dc  = 1'($urandom);
      #1;
      check(qa == (ref_q & rda) && qb == (ref_q & rdb) && qc == (ref_q & rdc),
            $sformatf("read i=%0d q=%b got %b%b%b", i, ref_q, qa, qb, qc));
      @(negedge clk);
      if (clr) ref_q = 1'b1;
      else if (wrc) ref_q = dc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
