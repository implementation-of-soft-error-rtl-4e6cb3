// hpc_decoder: one iteration of 2-D Hamming product code correction.
//
// First every row of the received window is checked against its stored row
// check bits and a single wrong bit per row is inverted (row pass). The row
// corrected window (sec_corrected_mat) then has every column checked against
// its stored column check bits and one wrong bit per column inverted (column
// pass); the result is sec_modified. A row with two errors is left to the
// column pass, which repairs both when they sit in different columns.
// row_err marks the bits the row pass inverted and col_err those the column
// pass inverted. detect is set when any row or column of the received window
// violates its checks. fail is set when the final window still violates a
// row or a column check, i.e. one iteration was not enough (or the error
// pattern cannot be repaired).
//
// Interface: h parity matrix, rec received window, row_chk/col_chk stored
// check bits. Timing: purely combinational (2*N line correctors plus 2*N
// line encoders for the final check).
module hpc_decoder #(
  parameter int unsigned N = hpc_pkg::HPC_N,
  parameter int unsigned R = hpc_pkg::HPC_R
) (
  input  logic [0:N*R-1] h,
  input  logic [0:N-1]   rec               [N],
  input  logic [0:R-1]   row_chk           [N],
  input  logic [0:R-1]   col_chk           [N],
  output logic [0:N-1]   sec_corrected_mat [N],
  output logic [0:N-1]   sec_modified      [N],
  output logic [0:N-1]   row_err           [N],
  output logic [0:N-1]   col_err           [N],
  output logic           detect,
  output logic           fail
);

  logic [0:N-1] rec_col   [N];  // received window, column k in rec_col[k]
  logic [0:N-1] mid_col   [N];  // row-corrected window by columns
  logic [0:N-1] fix_col   [N];  // column pass result by columns
  logic [0:N-1] cerr_col  [N];
  logic [0:R-1] fin_rchk  [N];
  logic [0:R-1] fin_cchk  [N];
  logic [0:N-1] row_det, col_det, rec_cdet;
  logic [0:N-1] row_unc, col_unc, rec_cunc;
  logic [0:R-1] row_syn [N], col_syn [N], rec_csyn [N];
  logic [0:N-1] rec_cerr [N], rec_ccorr [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        rec_col[j][i]      = rec[i][j];
        mid_col[j][i]      = sec_corrected_mat[i][j];
        sec_modified[i][j] = fix_col[j][i];
        col_err[i][j]      = cerr_col[j][i];
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_line
    // row pass on the received window
    hamming_sec #(.N(N), .R(R)) u_row_sec (
      .h      (h),
      .d      (rec[k]),
      .chk_ref(row_chk[k]),
      .syn    (row_syn[k]),
      .err    (row_err[k]),
      .corr   (sec_corrected_mat[k]),
      .detect (row_det[k]),
      .uncorr (row_unc[k])
    );
    // column check of the received window, only for the detect flag
    hamming_sec #(.N(N), .R(R)) u_rec_col_chk (
      .h      (h),
      .d      (rec_col[k]),
      .chk_ref(col_chk[k]),
      .syn    (rec_csyn[k]),
      .err    (rec_cerr[k]),
      .corr   (rec_ccorr[k]),
      .detect (rec_cdet[k]),
      .uncorr (rec_cunc[k])
    );
    // column pass on the row-corrected window
    hamming_sec #(.N(N), .R(R)) u_col_sec (
      .h      (h),
      .d      (mid_col[k]),
      .chk_ref(col_chk[k]),
      .syn    (col_syn[k]),
      .err    (cerr_col[k]),
      .corr   (fix_col[k]),
      .detect (col_det[k]),
      .uncorr (col_unc[k])
    );
    // final consistency check of the result
    hamming_enc #(.N(N), .R(R)) u_fin_row (
      .h  (h),
      .d  (sec_modified[k]),
      .chk(fin_rchk[k])
    );
    hamming_enc #(.N(N), .R(R)) u_fin_col (
      .h  (h),
      .d  (fix_col[k]),
      .chk(fin_cchk[k])
    );
  end

  always_comb begin
    detect = |row_det || |rec_cdet;
    fail   = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (fin_rchk[k] != row_chk[k] || fin_cchk[k] != col_chk[k]) fail = 1'b1;
    end
  end

endmodule
