// tb_hpc_frame_buffer: loads random windows, then mixes random row and
// column reads and writes and compares every read and the whole window
// with a shadow copy kept in the testbench. Also checks that load wins over
// a write in the same cycle and that reset clears the buffer.
module tb_hpc_frame_buffer;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic clk = 0, rst = 1, load = 0, wr_en = 0;
  ref_t::win_t  load_data, win, shadow;
  ref_t::chks_t lrc, lcc, src, scc;
  hpc_pkg::hpc_dir_e rd_dir = hpc_pkg::DIR_ROW, wr_dir = hpc_pkg::DIR_ROW;
  logic [2:0] rd_idx = '0, wr_idx = '0;
  logic [0:6] rd_data, wr_data = '0, exp;
  logic [0:3] rd_chk;
  int checks = 0, failures = 0;

  hpc_frame_buffer #(.N(7), .R(4)) dut (
    .clk(clk), .rst(rst), .load(load), .load_data(load_data), .load_row_chk(lrc),
    .load_col_chk(lcc), .rd_dir(rd_dir), .rd_idx(rd_idx), .rd_data(rd_data), .rd_chk(rd_chk),
    .wr_en(wr_en), .wr_dir(wr_dir), .wr_idx(wr_idx), .wr_data(wr_data), .win(win)
  );

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) begin load_data[i] = '0; lrc[i] = '0; lcc[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 7; i++) check(win[i] == '0, "reset clears");
    for (int t = 0; t < 20; t++) begin
      ref_t::rand_win(load_data);
      for (int k = 0; k < 7; k++) begin lrc[k] = 4'($urandom()); lcc[k] = 4'($urandom()); end
      load = 1; wr_en = 1; wr_data = 7'b1010101; wr_idx = 3'd2;  // load must win
      @(posedge clk); #1;
      load = 0; wr_en = 0;
      shadow = load_data; src = lrc; scc = lcc;
      check(win == shadow, "load");
      for (int s = 0; s < 40; s++) begin
        rd_dir = hpc_pkg::hpc_dir_e'($urandom_range(0, 1));
        rd_idx = 3'($urandom_range(0, 6));
        #1;
        if (rd_dir == hpc_pkg::DIR_ROW) begin
          exp = shadow[rd_idx];
          check(rd_chk == src[rd_idx], "row check bits");
        end else begin
          exp = ref_t::get_col(shadow, int'(rd_idx));
          check(rd_chk == scc[rd_idx], "column check bits");
        end
        check(rd_data == exp, "line read");
        wr_en   = 1'($urandom_range(0, 1));
        wr_dir  = hpc_pkg::hpc_dir_e'($urandom_range(0, 1));
        wr_idx  = 3'($urandom_range(0, 6));
        wr_data = 7'($urandom());
        @(posedge clk); #1;
        if (wr_en) begin
          if (wr_dir == hpc_pkg::DIR_ROW) shadow[wr_idx] = wr_data;
          else for (int i = 0; i < 7; i++) shadow[i][wr_idx] = wr_data[i];
        end
        wr_en = 0;
        check(win == shadow, "window after write");
      end
    end
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 7; i++) check(win[i] == '0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
