// tb_bus_checker: checks a bus checker on correct code words and on code
// words hit by unidirectional errors (any number of bits flipped in one
// direction across the data word and the stored check symbol), all of which
// a Berger code must detect. The regenerated check symbol is compared with
// an independent zero count.
module tb_bus_checker;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] data;
  logic [5:0]  stored_chk, gen_chk;
  logic [1:0]  z;
  logic        error;

  bus_checker #(.DATA_W(32)) dut (.data, .stored_chk, .gen_chk, .z, .error);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, md;
    logic [5:0]  c, mc;
    for (int i = 0; i < 3000; i++) begin
      d = (i < 2) ? {32{i[0]}} : $urandom;
      c = 6'(32 - $countones(d));
      // Correct code word.
      data = d; stored_chk = c;
      #1;
      check(!error && (z == 2'b01 || z == 2'b10) && gen_chk == c,
            $sformatf("good word %h chk %0d: z=%b gen=%0d", d, c, z, gen_chk));
      // Unidirectional error: random masks, all flips 1->0 or all 0->1.
      md = $urandom; mc = 6'($urandom);
      if (i % 4 == 0) mc = '0;          // data bits only
      if (i % 4 == 1) md = '0;          // check bits only
      if (i[0]) begin md &= d; mc &= c; end   // 1 -> 0
      else begin md &= ~d; mc &= ~c; end      // 0 -> 1
      if (md != '0 || mc != '0) begin
        data = d ^ md; stored_chk = c ^ mc;
        #1;
        check(error && (z == 2'b00 || z == 2'b11),
              $sformatf("unidirectional error not seen: d=%h md=%h c=%h mc=%h", d, md, c, mc));
      end
    end
    // All-zero word: its check symbol 100000 is the only one using the top
    // check bit. Losing that bit (1 -> 0) or gaining any 0 -> 1 must be seen.
    data = '0; stored_chk = 6'b000000;
    #1;
    check(error, "all-zero word with check bit 5 lost");
    for (int b = 0; b < 5; b++) begin
      data = '0; stored_chk = 6'b100000 | (6'b1 << b);
      #1;
      check(error, $sformatf("all-zero word with check bit %0d gained", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
