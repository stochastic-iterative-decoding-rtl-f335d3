// Codeword check: every parity check of H over the hard decisions must be 0.
// valid is high when bits is a codeword of the code defined by H (row i =
// parity check i, column 0 = bit 0). Combinational.
// This is the published validity test (every check's XOR is 0), applied
// to the counters' sign bits; it is used for the early stop.
module syndrome_check
  import stoch_pkg::*;
#(
  parameter int                N = HAM_N,
  parameter int                M = HAM_M,
  parameter bit [0:M-1][0:N-1] H = HAMMING_H
) (
  input  logic [N-1:0] bits,
  output logic         valid
);

  logic [M-1:0] syn;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      syn[i] = 1'b0;
      for (int j = 0; j < N; j++)
        if (H[i][j]) syn[i] ^= bits[j];
    end
    valid = (syn == '0);
  end

endmodule
