// hamming_sec: single-error correction of one line (a row or a column).
//
// The check bits of the received line are recomputed and XORed with the
// stored reference check bits; the result is the syndrome. A zero syndrome
// means the line is consistent. A non-zero syndrome that equals column j of
// the parity matrix marks data position j as wrong: err has a one there and
// corr is the received line with that bit inverted. A non-zero syndrome that
// matches no column cannot be repaired in this line (uncorr), and the line
// is passed through unchanged. If the matrix held the same column twice,
// the lowest position wins.
//
// Interface: h parity matrix, d received data, chk_ref stored check bits;
// syn, err, corr, detect (syn != 0), uncorr (detect and no column matches).
// Timing: purely combinational.
module hamming_sec #(
  parameter int unsigned N = hpc_pkg::HPC_N,
  parameter int unsigned R = hpc_pkg::HPC_R
) (
  input  logic [0:N*R-1] h,
  input  logic [0:N-1]   d,
  input  logic [0:R-1]   chk_ref,
  output logic [0:R-1]   syn,
  output logic [0:N-1]   err,
  output logic [0:N-1]   corr,
  output logic           detect,
  output logic           uncorr
);

  logic [0:R-1] chk_rx;

  hamming_enc #(.N(N), .R(R)) u_enc (
    .h  (h),
    .d  (d),
    .chk(chk_rx)
  );

  always_comb begin
    logic found;
    syn    = chk_rx ^ chk_ref;
    detect = |syn;
    err    = '0;
    found  = 1'b0;
    for (int j = 0; j < N; j++) begin
      if (detect && !found && syn == h[j*R +: R]) begin
        err[j] = 1'b1;
        found  = 1'b1;
      end
    end
    uncorr = detect && !found;
    corr   = d ^ err;
  end

endmodule
