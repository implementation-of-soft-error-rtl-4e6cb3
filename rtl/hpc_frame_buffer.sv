// hpc_frame_buffer: 2-D buffer holding one window for iterative correction.
//
// The window read back from configuration memory is loaded in one cycle
// together with its stored row and column check bits. After that the
// buffer is accessed by whole lines in either direction: one port reads row
// rd_idx or column rd_idx (selected by rd_dir) with its check bits, and one
// port writes a corrected row or column back. This two-direction access lets
// a single line corrector serve both the row pass and the column pass. The
// storage is a register array; the check bits are read-only after a load.
//
// Interface: load/load_data/load_row_chk/load_col_chk load a window;
// rd_dir/rd_idx select a line, rd_data/rd_chk return it; wr_en/wr_dir/
// wr_idx/wr_data write a line; win shows the whole window.
// Timing: reads are combinational from the current contents, load and
// write take effect at the next rising clk edge (load wins over a write).
// rst clears data and check bits synchronously.
module hpc_frame_buffer #(
  parameter int unsigned N = hpc_pkg::HPC_N,
  parameter int unsigned R = hpc_pkg::HPC_R,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [0:N-1]      load_data    [N],
  input  logic [0:R-1]      load_row_chk [N],
  input  logic [0:R-1]      load_col_chk [N],
  input  hpc_pkg::hpc_dir_e rd_dir,
  input  logic [IW-1:0]     rd_idx,
  output logic [0:N-1]      rd_data,
  output logic [0:R-1]      rd_chk,
  input  logic              wr_en,
  input  hpc_pkg::hpc_dir_e wr_dir,
  input  logic [IW-1:0]     wr_idx,
  input  logic [0:N-1]      wr_data,
  output logic [0:N-1]      win          [N]
);

  logic [0:N-1] mem     [N];
  logic [0:R-1] row_chk [N];
  logic [0:R-1] col_chk [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        mem[i]     <= '0;
        row_chk[i] <= '0;
        col_chk[i] <= '0;
      end
    end else if (load) begin
      mem     <= load_data;
      row_chk <= load_row_chk;
      col_chk <= load_col_chk;
    end else if (wr_en && int'(wr_idx) < N) begin
      if (wr_dir == hpc_pkg::DIR_ROW) begin
        mem[wr_idx] <= wr_data;
      end else begin
        for (int i = 0; i < N; i++) mem[i][wr_idx] <= wr_data[i];
      end
    end
  end

  always_comb begin
    rd_data = '0;
    rd_chk  = '0;
    if (int'(rd_idx) < N) begin
      if (rd_dir == hpc_pkg::DIR_ROW) begin
        rd_data = mem[rd_idx];
        rd_chk  = row_chk[rd_idx];
      end else begin
        for (int i = 0; i < N; i++) rd_data[i] = mem[i][rd_idx];
        rd_chk = col_chk[rd_idx];
      end
    end
  end

  assign win = mem;

endmodule
