// tb_hpc_iter_ctrl: the iterative corrector (controller plus 2-D buffer) on
// directed and random windows. Each run is compared with the reference
// model (final window, success/uncorrectable, number of half passes,
// number of repaired lines, dirty rows) and the run time must be exactly
// half_passes * N cycles. Directed cases: a clean window (2 passes), two
// errors in one row, a pattern needing row-column-row, the same pattern
// started with a column pass, and an unrepairable rectangle.
module tb_hpc_iter_ctrl;
  import hpc_ref_pkg::*;
  localparam int N = 7, R = 4, MAXHP = 8;
  typedef hpc_ref #(N, R) ref_t;

  logic clk = 0, rst = 1, start = 0, col_first = 0;
  logic [0:N*R-1] h;
  ref_t::win_t  org, rec, win;
  ref_t::chks_t rc, cc;
  hpc_pkg::hpc_dir_e buf_dir;
  logic [2:0] buf_idx;
  logic [0:N-1] rd_data, wr_data, row_dirty;
  logic [0:R-1] rd_chk;
  logic wr_en, busy, done, success, uncorrectable, load;
  logic [3:0] half_passes;
  logic [8:0] corrections;
  int checks = 0, failures = 0;
  int n_clean = 0, n_multi = 0, n_colfirst = 0, n_unc = 0, n_silent = 0;

  assign load = start;

  hpc_frame_buffer #(.N(N), .R(R)) u_buf (
    .clk(clk), .rst(rst), .load(load), .load_data(rec), .load_row_chk(rc), .load_col_chk(cc),
    .rd_dir(buf_dir), .rd_idx(buf_idx), .rd_data(rd_data), .rd_chk(rd_chk),
    .wr_en(wr_en), .wr_dir(buf_dir), .wr_idx(buf_idx), .wr_data(wr_data), .win(win)
  );

  hpc_iter_ctrl #(.N(N), .R(R), .MAX_HALF_PASSES(MAXHP)) dut (
    .clk(clk), .rst(rst), .h(h), .start(start), .col_first(col_first),
    .buf_dir(buf_dir), .buf_idx(buf_idx), .buf_rd_data(rd_data), .buf_rd_chk(rd_chk),
    .buf_wr_en(wr_en), .buf_wr_data(wr_data), .busy(busy), .done(done), .success(success),
    .uncorrectable(uncorrectable), .half_passes(half_passes), .corrections(corrections),
    .row_dirty(row_dirty)
  );

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit cf, string what);
    ref_t::win_t  w;
    ref_t::line_t dirty;
    bit s_ref, u_ref;
    int hp_ref, fx_ref, cycles;
    ref_t::encode(h, org, rc, cc);
    w = rec;
    ref_t::iterate(h, w, rc, cc, cf, MAXHP, s_ref, u_ref, hp_ref, fx_ref, dirty);
    col_first = cf; start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(win == w, {what, ": window"});
    check(success == s_ref && uncorrectable == u_ref, {what, ": outcome"});
    check(int'(half_passes) == hp_ref && int'(corrections) == fx_ref, {what, ": pass and fix counts"});
    check(row_dirty == dirty, {what, ": dirty rows"});
    check(cycles == hp_ref * N, {what, ": cycle count"});
    if (success && win != org) n_silent++;
    if (what != "random")
      $display("%s: half passes %0d, repaired lines %0d, success %0d", what, half_passes, corrections, success);
    if (success && hp_ref == 2) n_clean++;
    if (success && hp_ref > 3) n_multi++;
    if (uncorrectable) n_unc++;
    if (cf) n_colfirst++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = hpc_pkg::HPC_H_DEFAULT;
    for (int i = 0; i < N; i++) org[i] = 7'b1111111;
    rec = org;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // clean window: one row pass and one column pass, 14 cycles
    run(0, "clean");
    check(success && half_passes == 2 && corrections == 0, "clean window");
    // two errors in row 4 (columns 1 and 5): the column pass repairs them
    rec = org; rec[4][1] = 0; rec[4][5] = 0;
    run(0, "double in row");
    check(success && win == org && row_dirty == 7'b0000100, "double in row repaired");
    // row 0 holds three errors (columns 0, 3, 6: syndrome 0000, invisible to
    // the row), columns 0 and 3 each get a second error in rows 2 and 5:
    // rows 2 and 5 are repaired first, then columns 0, 3 and 6 each hold one
    rec = org; rec[0][0] = 0; rec[0][3] = 0; rec[0][6] = 0; rec[2][1] = 0; rec[5][4] = 0;
    run(0, "row-column-row");
    check(success && win == org, "multi-pass pattern repaired");
    run(1, "column first");
    // rectangle rows 1,5 x columns 2,4
    rec = org; rec[1][2] = 0; rec[1][4] = 0; rec[5][2] = 0; rec[5][4] = 0;
    run(0, "rectangle");
    check(!success, "rectangle not repaired");
    for (int t = 0; t < 400; t++) begin
      ref_t::rand_win(org);
      rec = org;
      ref_t::inject(rec, 1 + t % 10);
      run(1'(t % 3 == 0), "random");
      if (t % 10 == 0) check(success && win == org, "a single error is always repaired");
    end
    $display("clean=%0d multi-pass=%0d column-first=%0d uncorrectable=%0d silent miscorrection=%0d",
             n_clean, n_multi, n_colfirst, n_unc, n_silent);
    check(n_clean > 0 && n_multi > 0 && n_colfirst > 0 && n_unc > 0, "every outcome seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
