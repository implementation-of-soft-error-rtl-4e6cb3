// hpc_iter_ctrl: iterative 2-D Hamming product code correction.
//
// The controller walks the window in the 2-D buffer one line per clock:
// a row pass visits rows 0..N-1, a column pass columns 0..N-1, and each
// visit runs the line through a single-error corrector and writes the
// repaired line back in the same cycle. Passes alternate direction, so
// errors a row pass cannot resolve (two in one row) are attacked from the
// columns, and vice versa; the text's "1.5 iterations" is row, column, row.
// col_first starts with a column pass, the equivalent correction order.
//
// The window is declared good (success) once a row pass and a column pass
// in a row found every line consistent. It is given up (uncorrectable) when
// two passes in a row detected errors but could repair none, since nothing
// would change any more, or when MAX_HALF_PASSES passes have been spent.
// row_dirty marks every row of the window that was modified, i.e. the
// frames that must be rewritten into configuration memory.
//
// Interface: start (one cycle, in idle) begins a window; the buffer must be
// loaded in the same cycle. busy is high while passes run; done, success,
// uncorrectable, half_passes, corrections and row_dirty hold their values
// from the end of the run until the next start.
// Timing: a run takes exactly half_passes * N cycles from the start edge to
// the first cycle with done high; a clean window takes 2*N cycles.
module hpc_iter_ctrl #(
  parameter int unsigned N               = hpc_pkg::HPC_N,
  parameter int unsigned R               = hpc_pkg::HPC_R,
  parameter int unsigned MAX_HALF_PASSES = hpc_pkg::HPC_MAX_HALF_PASSES,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PW = $clog2(MAX_HALF_PASSES + 1),
  localparam int unsigned CW = $clog2(N * N * MAX_HALF_PASSES + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [0:N*R-1]    h,
  input  logic              start,
  input  logic              col_first,
  // line port of the 2-D buffer
  output hpc_pkg::hpc_dir_e buf_dir,
  output logic [IW-1:0]     buf_idx,
  input  logic [0:N-1]      buf_rd_data,
  input  logic [0:R-1]      buf_rd_chk,
  output logic              buf_wr_en,
  output logic [0:N-1]      buf_wr_data,
  // status
  output logic              busy,
  output logic              done,
  output logic              success,
  output logic              uncorrectable,
  output logic [PW-1:0]     half_passes,
  output logic [CW-1:0]     corrections,
  output logic [0:N-1]      row_dirty
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_RUN,
    S_DONE
  } state_e;

  state_e            state;
  hpc_pkg::hpc_dir_e dir;
  logic [IW-1:0]     idx;
  logic              pass_clean;  // no line of this pass had a syndrome
  logic              pass_fixed;  // some line of this pass was repaired
  logic              prev_clean;
  logic              prev_fixed;

  logic [0:R-1] syn;
  logic [0:N-1] err;
  logic [0:N-1] corr;
  logic         det;
  logic         unc;

  hamming_sec #(.N(N), .R(R)) u_sec (
    .h      (h),
    .d      (buf_rd_data),
    .chk_ref(buf_rd_chk),
    .syn    (syn),
    .err    (err),
    .corr   (corr),
    .detect (det),
    .uncorr (unc)
  );

  logic          fix_now;
  logic          clean_end;
  logic          fixed_end;
  logic [PW-1:0] hp_next;

  always_comb begin
    fix_now     = (state == S_RUN) && det && !unc;
    buf_dir     = dir;
    buf_idx     = idx;
    buf_wr_en   = fix_now;
    buf_wr_data = corr;
    clean_end   = pass_clean && !det;
    fixed_end   = pass_fixed || fix_now;
    hp_next     = half_passes + 1'b1;
    busy        = (state == S_RUN);
    done        = (state == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      dir           <= hpc_pkg::DIR_ROW;
      idx           <= '0;
      pass_clean    <= 1'b1;
      pass_fixed    <= 1'b0;
      prev_clean    <= 1'b0;
      prev_fixed    <= 1'b1;
      success       <= 1'b0;
      uncorrectable <= 1'b0;
      half_passes   <= '0;
      corrections   <= '0;
      row_dirty     <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state         <= S_RUN;
            dir           <= col_first ? hpc_pkg::DIR_COL : hpc_pkg::DIR_ROW;
            idx           <= '0;
            pass_clean    <= 1'b1;
            pass_fixed    <= 1'b0;
            prev_clean    <= 1'b0;
            prev_fixed    <= 1'b1;
            success       <= 1'b0;
            uncorrectable <= 1'b0;
            half_passes   <= '0;
            corrections   <= '0;
            row_dirty     <= '0;
          end
        end
        S_RUN: begin
          if (fix_now) begin
            corrections <= corrections + 1'b1;
            if (dir == hpc_pkg::DIR_ROW) row_dirty[idx] <= 1'b1;
            else row_dirty <= row_dirty | err;
          end
          if (int'(idx) == N - 1) begin
            half_passes <= hp_next;
            idx         <= '0;
            pass_clean  <= 1'b1;
            pass_fixed  <= 1'b0;
            prev_clean  <= clean_end;
            prev_fixed  <= fixed_end;
            dir         <= (dir == hpc_pkg::DIR_ROW) ? hpc_pkg::DIR_COL : hpc_pkg::DIR_ROW;
            if (clean_end && prev_clean) begin
              state   <= S_DONE;
              success <= 1'b1;
            end else if ((!clean_end && !fixed_end && !prev_fixed) ||
                         int'(hp_next) >= MAX_HALF_PASSES) begin
              state         <= S_DONE;
              uncorrectable <= 1'b1;
            end
          end else begin
            idx        <= idx + 1'b1;
            pass_clean <= clean_end;
            pass_fixed <= fixed_end;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A line is only written back while a run is in progress.
  a_wr_only_busy: assert property (@(posedge clk) disable iff (rst) buf_wr_en |-> busy);
  // The line index never leaves the window.
  a_idx_range: assert property (@(posedge clk) disable iff (rst) int'(idx) < N);

endmodule
