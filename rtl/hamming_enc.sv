// hamming_enc: check bits of one line of the 2-D Hamming product code.
//
// Each data bit d[j] gates column j of the parity matrix h (an AND term of
// R bits), and the N terms are XORed together into the R check bits. For
// the 7 x 7 default this is 7 x 4 AND terms and a chain of XORs, one line's
// share of the 49 x 4 product terms of the whole window. A line of all ones
// gives 0111 with the default matrix.
//
// Interface: h is the flat parity matrix (column j in bits [j*R +: R]),
// d the N data bits of a row or a column, chk the R check bits.
// Timing: purely combinational.
module hamming_enc #(
  parameter int unsigned N = hpc_pkg::HPC_N,
  parameter int unsigned R = hpc_pkg::HPC_R
) (
  input  logic [0:N*R-1] h,
  input  logic [0:N-1]   d,
  output logic [0:R-1]   chk
);

  logic [0:R-1] term [N];  // d[j] AND column j

  always_comb begin
    for (int j = 0; j < N; j++) begin
      term[j] = d[j] ? h[j*R +: R] : '0;
    end
    chk = '0;
    for (int j = 0; j < N; j++) begin
      chk = chk ^ term[j];
    end
  end

endmodule
