// tb_rf_controller: applies every operation with random register selects and
// compares the operation lines, the forwarded selects and the conflict flag
// with a table of what each operation must drive.
module tb_rf_controller;
  import berger_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rf_cmd_t  cmd;
  rf_ctrl_t ctrl;
  logic     conflict;

  rf_controller dut (.cmd, .ctrl, .conflict);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] lines;   // expected {rda, rdb, rdc, wrc, clr}
    bit         exp_conf;
    int         n_conf = 0;
    for (int i = 0; i < 4000; i++) begin
      cmd.op  = rf_op_e'(i % 8);
      cmd.rsa = 5'($urandom);
      cmd.rsb = 5'($urandom);
      cmd.rsc = (i % 3 == 0) ? cmd.rsa : 5'($urandom);
      case (i % 8)
        0: lines = 5'b00000;
        1: lines = 5'b10000;
        2: lines = 5'b01000;
        3: lines = 5'b11000;
        4: lines = 5'b00100;
        5: lines = 5'b00010;
        6: lines = 5'b00001;
        default: lines = 5'b11010;
      endcase
      exp_conf = (i % 8 == 7) && (cmd.rsc == cmd.rsa || cmd.rsc == cmd.rsb);
      if (exp_conf) begin lines[1] = 1'b0; n_conf++; end
      #1;
      checks++;
      if ({ctrl.rda, ctrl.rdb, ctrl.rdc, ctrl.wrc, ctrl.clr} != lines ||
          ctrl.rsa != cmd.rsa || ctrl.rsb != cmd.rsb || ctrl.rsc != cmd.rsc ||
          conflict != exp_conf) begin
        failures++;
        $display("FAIL op=%0d lines=%b exp %b conflict=%b", i % 8,
                 {ctrl.rda, ctrl.rdb, ctrl.rdc, ctrl.wrc, ctrl.clr}, lines, conflict);
      end
    end
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
