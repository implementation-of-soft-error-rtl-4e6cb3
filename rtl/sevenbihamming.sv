// sevenbihamming: built-in 2-D Hamming product code for one N x N window of
// SRAM-FPGA configuration bits (default 7 x 7 = 49 bits).
//
// bitstream is the original window, bitstream_rec the window as read back
// (possibly hit by soft errors), both row-major: bit r*N+c is row r,
// column c. parity is the N x R parity matrix of the line code, column j in
// bits [j*R +: R]. The encoder derives the row and column check bits of the
// original window; they stand for the check bits kept next to the
// configuration data.
//
// Two correctors use them:
//  * One-iteration path (combinational): a row pass gives sec_corrected_mat
//    and a following column pass gives sec_modified. err_det marks the bits
//    the row pass inverted and col_err those the column pass inverted,
//    detect flags any violated row or column check,
//    hpc_fail flags a result that still violates a check.
//  * Iterative path (clocked): start loads bitstream_rec and the check bits
//    into the 2-D buffer and the controller alternates row and column passes,
//    one line per clock, until the window is consistent or given up.
//    scrub_window is the buffer contents and frame_dirty the rows that were
//    changed and must be rewritten into configuration memory.
//
// The pass structure and the 7 x 7 / 4-check-bit code follow the reference
// design; the clocked buffer, its line-per-cycle schedule, the stopping
// rules and the status ports are this design's choices.
// Timing: see hpc_iter_ctrl; a clean window finishes in 2*N cycles.
module sevenbihamming #(
  parameter int unsigned N               = hpc_pkg::HPC_N,
  parameter int unsigned R               = hpc_pkg::HPC_R,
  parameter int unsigned MAX_HALF_PASSES = hpc_pkg::HPC_MAX_HALF_PASSES,
  localparam int unsigned PW = $clog2(MAX_HALF_PASSES + 1),
  localparam int unsigned CW = $clog2(N * N * MAX_HALF_PASSES + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [0:N*N-1]  bitstream,
  input  logic [0:N*N-1]  bitstream_rec,
  input  logic [0:N*R-1]  parity,
  // one-iteration path
  output logic [0:N-1]    sec_corrected_mat [N],
  output logic [0:N-1]    sec_modified      [N],
  output logic [0:N-1]    err_det           [N],
  output logic [0:N-1]    col_err           [N],
  output logic            detect,
  output logic            hpc_fail,
  // iterative path
  input  logic            start,
  input  logic            col_first,
  output logic            busy,
  output logic            done,
  output logic            success,
  output logic            uncorrectable,
  output logic [PW-1:0]   half_passes,
  output logic [CW-1:0]   corrections,
  output logic [0:N-1]    scrub_window      [N],
  output logic [0:N-1]    frame_dirty
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [0:N-1] org     [N];
  logic [0:N-1] rec     [N];
  logic [0:R-1] row_chk [N];
  logic [0:R-1] col_chk [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      org[i] = bitstream[i*N +: N];
      rec[i] = bitstream_rec[i*N +: N];
    end
  end

  hpc_encoder #(.N(N), .R(R)) u_enc (
    .h      (parity),
    .data   (org),
    .row_chk(row_chk),
    .col_chk(col_chk)
  );

  hpc_decoder #(.N(N), .R(R)) u_dec (
    .h                (parity),
    .rec              (rec),
    .row_chk          (row_chk),
    .col_chk          (col_chk),
    .sec_corrected_mat(sec_corrected_mat),
    .sec_modified     (sec_modified),
    .row_err          (err_det),
    .col_err          (col_err),
    .detect           (detect),
    .fail             (hpc_fail)
  );

  hpc_pkg::hpc_dir_e buf_dir;
  logic [IW-1:0]     buf_idx;
  logic [0:N-1]      buf_rd_data;
  logic [0:R-1]      buf_rd_chk;
  logic              buf_wr_en;
  logic [0:N-1]      buf_wr_data;
  logic              load;

  assign load = start && !busy;

  hpc_frame_buffer #(.N(N), .R(R)) u_buf (
    .clk         (clk),
    .rst         (rst),
    .load        (load),
    .load_data   (rec),
    .load_row_chk(row_chk),
    .load_col_chk(col_chk),
    .rd_dir      (buf_dir),
    .rd_idx      (buf_idx),
    .rd_data     (buf_rd_data),
    .rd_chk      (buf_rd_chk),
    .wr_en       (buf_wr_en),
    .wr_dir      (buf_dir),
    .wr_idx      (buf_idx),
    .wr_data     (buf_wr_data),
    .win         (scrub_window)
  );

  hpc_iter_ctrl #(.N(N), .R(R), .MAX_HALF_PASSES(MAX_HALF_PASSES)) u_ctrl (
    .clk          (clk),
    .rst          (rst),
    .h            (parity),
    .start        (load),
    .col_first    (col_first),
    .buf_dir      (buf_dir),
    .buf_idx      (buf_idx),
    .buf_rd_data  (buf_rd_data),
    .buf_rd_chk   (buf_rd_chk),
    .buf_wr_en    (buf_wr_en),
    .buf_wr_data  (buf_wr_data),
    .busy         (busy),
    .done         (done),
    .success      (success),
    .uncorrectable(uncorrectable),
    .half_passes  (half_passes),
    .corrections  (corrections),
    .row_dirty    (frame_dirty)
  );

endmodule
