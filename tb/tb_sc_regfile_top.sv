// tb_sc_regfile_top: end-to-end test of the self-checking register file at
// its full size (32 registers of 32 data bits and 6 check bits).
//
// The testbench plays the control unit and the ALU (result = A + B). It keeps
// its own copy of both files and, every cycle, predicts the buses, the
// operand latches, the checker verdicts, GO/STOP and the passed result.
// Besides normal traffic (clear, write, read A/B, read C, read A/B with a
// write) it injects the faults the design exists to catch:
//   - a code word with a unidirectional error written through bus C,
//   - an addressing fault: the check symbol file reads a different register
//     than the data file,
//   - a controller fault: only one of the two files performs a write,
// and a command that reads and writes the same register. Each mechanism is
// counted; one that never happened counts as a failure.
module tb_sc_regfile_top;
  import berger_pkg::*;
  localparam int NR = 32;
  localparam int W  = 32;
  localparam int K  = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n;
  rf_cmd_t       info_cmd, chk_cmd;
  logic [W-1:0]  wr_data, rd_c_data, alu_opa, alu_opb, alu_result, result_out;
  logic [K-1:0]  wr_chk, rd_c_chk;
  logic          op_valid, result_go, result_stop, err_a, err_b, ctrl_conflict;

  sc_regfile_top dut (.*);

  // ALU model: combinational on the input latches.
  assign alu_result = alu_opa + alu_opb;

  // Reference copies of the two files.
  logic [W-1:0] mdata [NR];
  logic [K-1:0] mchk  [NR];

  // Mechanism counters.
  int n_write, n_clear, n_read_ab, n_read_c, n_rw, n_go, n_stop, n_err_a, n_err_b,
      n_uni_err, n_addr_fault, n_ctrl_fault, n_conflict, n_idle_bus_go;

  function automatic logic [K-1:0] zeros(input logic [W-1:0] d);
    return K'(W - $countones(d));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit is_rd_a(input rf_op_e op);
    return op inside {OP_READ_A, OP_READ_AB, OP_READ_AB_WR};
  endfunction
  function automatic bit is_rd_b(input rf_op_e op);
    return op inside {OP_READ_B, OP_READ_AB, OP_READ_AB_WR};
  endfunction
  function automatic bit is_wr(input rf_op_e op);
    return op inside {OP_WRITE, OP_READ_AB_WR};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: present both commands, check bus C, clock, check the latches.
  task automatic cycle(input rf_cmd_t ci, input rf_cmd_t cc,
                       input logic [W-1:0] wd, input logic [K-1:0] wc);
    logic [W-1:0] da, db;
    logic [K-1:0] ka, kb;
    bit ua, ub, ea, eb, conf_i, conf_c, go;
    info_cmd = ci; chk_cmd = cc; wr_data = wd; wr_chk = wc;
    da = is_rd_a(ci.op) ? mdata[ci.rsa] : '0;
    db = is_rd_b(ci.op) ? mdata[ci.rsb] : '0;
    ka = is_rd_a(cc.op) ? mchk[cc.rsa] : '0;
    kb = is_rd_b(cc.op) ? mchk[cc.rsb] : '0;
    ua = is_rd_a(ci.op) || is_rd_a(cc.op);
    ub = is_rd_b(ci.op) || is_rd_b(cc.op);
    ea = ua && zeros(da) != ka;
    eb = ub && zeros(db) != kb;
    conf_i = is_wr(ci.op) && ((is_rd_a(ci.op) && ci.rsa == ci.rsc) ||
                              (is_rd_b(ci.op) && ci.rsb == ci.rsc));
    conf_c = is_wr(cc.op) && ((is_rd_a(cc.op) && cc.rsa == cc.rsc) ||
                              (is_rd_b(cc.op) && cc.rsb == cc.rsc));
    #1;
    check(ctrl_conflict == (conf_i || conf_c), "conflict flag");
    if (conf_i || conf_c) n_conflict++;
    check(rd_c_data == (ci.op == OP_READ_C ? mdata[ci.rsc] : '0) &&
          rd_c_chk  == (cc.op == OP_READ_C ? mchk[cc.rsc] : '0),
          $sformatf("bus C read reg %0d got %h/%h", ci.rsc, rd_c_data, rd_c_chk));
    if (ci.op == OP_READ_C) n_read_c++;
    @(posedge clk);
    // Update the reference files as the edge did.
    if (ci.op == OP_CLEAR) mdata[ci.rsc] = '0;
    else if (is_wr(ci.op) && !conf_i) mdata[ci.rsc] = wd;
    if (cc.op == OP_CLEAR) mchk[cc.rsc] = K'(W);
    else if (is_wr(cc.op) && !conf_c) mchk[cc.rsc] = wc;
    @(negedge clk);
    info_cmd = '0; chk_cmd = '0;
    if (ua || ub) begin
      go = !ea && !eb;
      check(op_valid, "op_valid after a read");
      if (ua) check(alu_opa == da, $sformatf("latch A exp %h got %h", da, alu_opa));
      if (ub) check(alu_opb == db, $sformatf("latch B exp %h got %h", db, alu_opb));
      check(err_a == ea && err_b == eb,
            $sformatf("errors exp %b%b got %b%b", ea, eb, err_a, err_b));
      check(result_go == go && result_stop == !go, "GO/STOP verdict");
      check(result_out == (go ? alu_opa + alu_opb : '0), "passed result");
      if (go) n_go++; else n_stop++;
      if (ea) n_err_a++;
      if (eb) n_err_b++;
      if (go && (ua != ub)) n_idle_bus_go++;
      if (is_rd_a(ci.op) && is_rd_b(ci.op)) n_read_ab++;
    end else begin
      check(!op_valid && !err_a && !err_b, "no operand, no error");
    end
  endtask

  function automatic rf_cmd_t mk(input rf_op_e op, input int a, input int b, input int c);
    rf_cmd_t r;
    r.op = op; r.rsa = 5'(a); r.rsb = 5'(b); r.rsc = 5'(c);
    return r;
  endfunction

  initial begin
    rf_cmd_t ci, cc;
    logic [W-1:0] d;
    logic [K-1:0] k, m;
    int a, b, c, kind;
    {n_write, n_clear, n_read_ab, n_read_c, n_rw, n_go, n_stop, n_err_a, n_err_b,
     n_uni_err, n_addr_fault, n_ctrl_fault, n_conflict, n_idle_bus_go} = '0;
    info_cmd = '0; chk_cmd = '0; wr_data = '0; wr_chk = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Clear the whole file, then check a cleared register reads as valid.
    for (int r = 0; r < NR; r++) begin
      ci = mk(OP_CLEAR, 0, 0, r);
      cycle(ci, ci, '0, '0);
      n_clear++;
    end
    cycle(mk(OP_READ_AB, 3, 17, 0), mk(OP_READ_AB, 3, 17, 0), '0, '0);
    // Fill with valid code words.
    for (int r = 0; r < NR; r++) begin
      d = $urandom;
      ci = mk(OP_WRITE, 0, 0, r);
      cycle(ci, ci, d, zeros(d));
      n_write++;
    end
    // Random traffic with injected faults.
    for (int i = 0; i < 4000; i++) begin
      a = $urandom % NR; b = $urandom % NR; c = $urandom % NR;
      d = $urandom;
      k = zeros(d);
      kind = $urandom % 16;
      case (kind)
        0, 1, 2, 3: begin                                  // operand read
          ci = mk(OP_READ_AB, a, b, c); cc = ci;
        end
        4: begin ci = mk(OP_READ_A, a, b, c); cc = ci; end
        5: begin ci = mk(OP_READ_B, a, b, c); cc = ci; end
        6: begin ci = mk(OP_READ_C, a, b, c); cc = ci; end
        7, 8: begin ci = mk(OP_WRITE, a, b, c); cc = ci; n_write++; end
        9: begin ci = mk(OP_CLEAR, a, b, c); cc = ci; n_clear++; end
        10, 11: begin                                      // read A/B and write
          if (c == a || c == b) c = (a + b + 1) % NR;
          if (c == a || c == b) c = (c + 1) % NR;
          if (c == a || c == b) c = (c + 1) % NR;
          ci = mk(OP_READ_AB_WR, a, b, c); cc = ci; n_rw++;
        end
        12: begin                                          // unidirectional error in the code word
          m = 6'($urandom);
          if (i[0]) begin d = d & ~32'($urandom); m = m & k; k = k & ~m; end   // 1 -> 0 in data, check
          else      begin d = d | 32'($urandom); m = m & ~k; k = k | m; end    // 0 -> 1
          ci = mk(OP_WRITE, a, b, c); cc = ci;
          if (k != zeros(d)) n_uni_err++;
        end
        13: begin                                          // check file reads another register
          ci = mk(OP_READ_AB, a, b, c); cc = ci;
          cc.rsa = 5'((a + 1 + $urandom % (NR - 1)) % NR);
          n_addr_fault++;
        end
        14: begin                                          // only the data file writes
          ci = mk(OP_WRITE, a, b, c); cc = mk(OP_NOP, a, b, c);
          n_ctrl_fault++;
        end
        default: begin                                     // read and write the same register
          ci = mk(OP_READ_AB_WR, a, b, a); cc = ci;
        end
      endcase
      cycle(ci, cc, d, k);
      // Repair a register hit by a fault now and then so traffic stays mostly clean.
      if (i % 7 == 0) begin
        d = $urandom;
        ci = mk(OP_WRITE, 0, 0, c);
        cycle(ci, ci, d, zeros(d));
      end
    end
    $display("mechanisms: write=%0d clear=%0d read_ab=%0d read_c=%0d read_ab_write=%0d go=%0d stop=%0d",
             n_write, n_clear, n_read_ab, n_read_c, n_rw, n_go, n_stop);
    $display("            err_a=%0d err_b=%0d unidir=%0d addr_fault=%0d ctrl_fault=%0d conflict=%0d idle_bus_go=%0d",
             n_err_a, n_err_b, n_uni_err, n_addr_fault, n_ctrl_fault, n_conflict, n_idle_bus_go);
    check(n_write > 0 && n_clear > 0 && n_read_ab > 0 && n_read_c > 0 && n_rw > 0, "normal operations exercised");
    check(n_go > 0 && n_stop > 0, "both GO and STOP seen");
    check(n_err_a > 0 && n_err_b > 0, "errors on both buses seen");
    check(n_uni_err > 0 && n_addr_fault > 0 && n_ctrl_fault > 0, "all fault kinds injected");
    check(n_conflict > 0 && n_idle_bus_go > 0, "conflict and single-bus reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
