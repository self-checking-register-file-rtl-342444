// tb_go_stop: exhaustive check of the GO/STOP unit over both checker pairs
// and both bus-in-use flags, with a random result word each time. The result
// must pass exactly when every used bus carries a valid two-rail pair.
module tb_go_stop;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  pair_a, pair_b;
  logic        use_a, use_b, go, stop;
  logic [31:0] result_in, result_out;

  go_stop #(.DATA_W(32)) dut (.*);

  function automatic bit ok_pair(input logic [1:0] p);
    return p == 2'b01 || p == 2'b10;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_go;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 64; v++) begin
        {pair_a, pair_b, use_a, use_b} = 6'(v);
        result_in = $urandom;
        #1;
        exp_go = (!use_a || ok_pair(pair_a)) && (!use_b || ok_pair(pair_b));
        checks++;
        if (go != exp_go || stop != !exp_go || result_out != (exp_go ? result_in : 32'h0)) begin
          failures++;
          $display("FAIL a=%b b=%b use=%b%b go=%b stop=%b out=%h", pair_a, pair_b, use_a, use_b,
                   go, stop, result_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
