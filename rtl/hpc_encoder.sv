// hpc_encoder: 2-D encoder of one window of the Hamming product code.
//
// Every row i of the N x N data window gets R row check bits (E_R) and every
// column j gets R column check bits (E_C), all with the same parity matrix.
// Column j is read top to bottom, so data[i][j] is position i of column j.
// This gives 2*N*R check bits per window (56 for 7 x 7).
//
// Interface: h parity matrix, data the window (data[i] is row i, data[i][j]
// its column j); row_chk[i] and col_chk[j] the check bits.
// Timing: purely combinational.
module hpc_encoder #(
  parameter int unsigned N = hpc_pkg::HPC_N,
  parameter int unsigned R = hpc_pkg::HPC_R
) (
  input  logic [0:N*R-1] h,
  input  logic [0:N-1]   data    [N],
  output logic [0:R-1]   row_chk [N],
  output logic [0:R-1]   col_chk [N]
);

  logic [0:N-1] col_data [N];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        col_data[j][i] = data[i][j];
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_line
    hamming_enc #(.N(N), .R(R)) u_row (
      .h  (h),
      .d  (data[k]),
      .chk(row_chk[k])
    );
    hamming_enc #(.N(N), .R(R)) u_col (
      .h  (h),
      .d  (col_data[k]),
      .chk(col_chk[k])
    );
  end

endmodule
