// berger_check_gen: Berger check symbol generator, a zero counter.
//
// It counts the zeros among the DATA_W information bits and outputs the count
// in binary on CHK_W = ceil(log2(DATA_W+1)) bits (6 bits for 32-bit data).
// For a maximal-length code (DATA_W = 2^k - 1) this equals the bit-by-bit
// complement of the count of ones; for 32-bit data the two differ, and this
// design uses the zero count throughout, for the stored check symbols as well
// as in the checkers. Purely combinational.
//
// The zero-counting function follows the document; the counter's structure
// (a plain sum, left to synthesis to build as an adder tree) is this
// design's choice.
module berger_check_gen #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned CHK_W  = $clog2(DATA_W + 1)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CHK_W-1:0]  check   // number of zeros in data
);

  always_comb begin
    check = '0;
    for (int i = 0; i < DATA_W; i++) check += CHK_W'(!data[i]);
  end

endmodule
