// tb_register_file: checks the generic register file at a small size
// (8 registers of 8 bits in two groups, clearing to 8'h5a). All registers are cleared,
// then random cycles read two registers on buses A and B, read one on bus C,
// write or clear one, or read A/B while writing a different register. Every
// bus is compared with a reference array in the cycle of the read, and the
// whole file is read back at the end.
module tb_register_file;
  import berger_pkg::*;
  localparam int NR = 8;
  localparam int W  = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rf_ctrl_t     ctrl;
  logic [W-1:0] bus_c_in, bus_a, bus_b, bus_c_out;
  logic [W-1:0] model [NR];
  localparam logic [W-1:0] CLRV = 8'h5a;

  register_file #(.NREGS(NR), .WIDTH(W), .GROUPS(2), .CLR_VAL(CLRV)) dut (.clk, .ctrl, .bus_c_in, .bus_a, .bus_b, .bus_c_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    ctrl = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind;
    idle();
    bus_c_in = '0;
    // Clear every register.
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      idle(); ctrl.clr = 1'b1; ctrl.rsc = 5'(r);
      model[r] = CLRV;
    end
    @(negedge clk); idle();
    // Fill every register.
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      idle(); ctrl.wrc = 1'b1; ctrl.rsc = 5'(r); bus_c_in = W'($urandom);
      model[r] = bus_c_in;
    end
    @(negedge clk); idle();
    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      idle();
      ctrl.rsa = 5'($urandom % NR);
      ctrl.rsb = (i % 5 == 0) ? ctrl.rsa : 5'($urandom % NR);
      ctrl.rsc = 5'($urandom % NR);
      bus_c_in = W'($urandom);
      kind = $urandom % 6;
      case (kind)
        0: begin ctrl.rda = 1'b1; ctrl.rdb = 1'b1; end
        1: ctrl.rdc = 1'b1;
        2: ctrl.wrc = 1'b1;
        3: ctrl.clr = (i % 3 == 0);
        4: begin
             ctrl.rda = 1'b1; ctrl.rdb = 1'b1;
             ctrl.wrc = (ctrl.rsc != ctrl.rsa) && (ctrl.rsc != ctrl.rsb);
           end
        default: ctrl.rda = 1'b1;
      endcase
      #1;
      check(bus_a == (ctrl.rda ? model[ctrl.rsa] : '0),
            $sformatf("bus A reg %0d exp %h got %h", ctrl.rsa, model[ctrl.rsa], bus_a));
      check(bus_b == (ctrl.rdb ? model[ctrl.rsb] : '0),
            $sformatf("bus B reg %0d exp %h got %h", ctrl.rsb, model[ctrl.rsb], bus_b));
      check(bus_c_out == (ctrl.rdc ? model[ctrl.rsc] : '0),
            $sformatf("bus C reg %0d exp %h got %h", ctrl.rsc, model[ctrl.rsc], bus_c_out));
      if (ctrl.clr) model[ctrl.rsc] = CLRV;
      else if (ctrl.wrc) model[ctrl.rsc] = bus_c_in;
    end
    // Read back the whole file on bus A.
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      idle(); ctrl.rda = 1'b1; ctrl.rsa = 5'(r);
      #1;
      check(bus_a == model[r], $sformatf("final reg %0d exp %h got %h", r, model[r], bus_a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
