// tb_hpc_large_window: the design scaled to the window sizes discussed for
// real configuration frames: 32 x 32 (a 1 Kb frame, 6 check bits per line)
// with ten random soft errors per window, and 64 x 64 (7 check bits per
// line) with four random errors. Every trial is compared with the reference
// model, and the success rates of one iteration and of the iterative scrub
// are reported. The parity matrices hold the first N values of R bits that
// have at least two ones. In the first two runs only data bits are hit.
// A third run drives the 32 x 32 buffer and controller directly and spreads
// the ten errors uniformly over data and check bits (1024 + 384 bits). It
// reports how often the data comes back intact, and how often the
// controller also reports success (a line with a bad check bit stays
// flagged, so it cannot).
module tb_hpc_large_window;
  import hpc_ref_pkg::*;

  localparam int TRIALS = 200;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- 32 x 32
  typedef hpc_ref #(32, 6) r32_t;
  logic [0:32*32-1] bs32, rec32;
  logic [0:32*6-1]  h32;
  r32_t::win_t      one32, scr32, m32, e32a, e32b;
  logic det32, fail32, start32 = 0, busy32, done32, succ32, unc32;
  logic [3:0]  hp32;
  logic [13:0] fx32;
  logic [0:31] dirty32;

  sevenbihamming #(.N(32), .R(6)) u32 (
    .clk(clk), .rst(rst), .bitstream(bs32), .bitstream_rec(rec32), .parity(h32),
    .sec_corrected_mat(m32), .sec_modified(one32), .err_det(e32a), .col_err(e32b),
    .detect(det32), .hpc_fail(fail32), .start(start32), .col_first(1'b0), .busy(busy32),
    .done(done32), .success(succ32), .uncorrectable(unc32), .half_passes(hp32),
    .corrections(fx32), .scrub_window(scr32), .frame_dirty(dirty32)
  );

  // ------------------------------------- 32 x 32, errors in check bits too
  r32_t::win_t  pload, pwin;
  r32_t::chks_t prc, pcc;
  logic pstart = 0, pwr, pbusy, pdone, psucc, punc;
  hpc_pkg::hpc_dir_e pdir;
  logic [4:0]  pidx;
  logic [0:31] prd, pwd, pdirty;
  logic [0:5]  prchk;
  logic [3:0]  php;
  logic [13:0] pfx;

  hpc_frame_buffer #(.N(32), .R(6)) u_pbuf (
    .clk(clk), .rst(rst), .load(pstart), .load_data(pload), .load_row_chk(prc),
    .load_col_chk(pcc), .rd_dir(pdir), .rd_idx(pidx), .rd_data(prd), .rd_chk(prchk),
    .wr_en(pwr), .wr_dir(pdir), .wr_idx(pidx), .wr_data(pwd), .win(pwin)
  );

  hpc_iter_ctrl #(.N(32), .R(6)) u_pctrl (
    .clk(clk), .rst(rst), .h(h32), .start(pstart), .col_first(1'b0),
    .buf_dir(pdir), .buf_idx(pidx), .buf_rd_data(prd), .buf_rd_chk(prchk),
    .buf_wr_en(pwr), .buf_wr_data(pwd), .busy(pbusy), .done(pdone), .success(psucc),
    .uncorrectable(punc), .half_passes(php), .corrections(pfx), .row_dirty(pdirty)
  );

  // ---------------------------------------------------------------- 64 x 64
  typedef hpc_ref #(64, 7) r64_t;
  logic [0:64*64-1] bs64, rec64;
  logic [0:64*7-1]  h64;
  r64_t::win_t      one64, scr64, m64, e64a, e64b;
  logic det64, fail64, start64 = 0, busy64, done64, succ64, unc64;
  logic [3:0]  hp64;
  logic [15:0] fx64;
  logic [0:63] dirty64;

  sevenbihamming #(.N(64), .R(7)) u64 (
    .clk(clk), .rst(rst), .bitstream(bs64), .bitstream_rec(rec64), .parity(h64),
    .sec_corrected_mat(m64), .sec_modified(one64), .err_det(e64a), .col_err(e64b),
    .detect(det64), .hpc_fail(fail64), .start(start64), .col_first(1'b0), .busy(busy64),
    .done(done64), .success(succ64), .uncorrectable(unc64), .half_passes(hp64),
    .corrections(fx64), .scrub_window(scr64), .frame_dirty(dirty64)
  );

  initial begin
    int ok1, okn;
    h32 = r32_t::make_h();
    h64 = r64_t::make_h();
    bs32 = '0; rec32 = '0; bs64 = '0; rec64 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    ok1 = 0; okn = 0;
    for (int t = 0; t < TRIALS; t++) begin
      r32_t::win_t org, w, f;
      r32_t::chks_t rc, cc;
      r32_t::line_t dm, dirty;
      bit clean, s_ref, u_ref;
      int n, hp_ref, fx_ref;
      r32_t::rand_win(org);
      w = org;
      r32_t::inject(w, 10);
      for (int i = 0; i < 32; i++) begin bs32[i*32 +: 32] = org[i]; rec32[i*32 +: 32] = w[i]; end
      r32_t::encode(h32, org, rc, cc);
      f = w; dm = '0;
      n = r32_t::half_pass(h32, f, rc, cc, 0, clean, dm);
      n = r32_t::half_pass(h32, f, rc, cc, 1, clean, dm);
      r32_t::iterate(h32, w, rc, cc, 0, hpc_pkg::HPC_MAX_HALF_PASSES, s_ref, u_ref, hp_ref, fx_ref, dirty);
      @(negedge clk);
      check(one32 == f, "32x32 one iteration");
      if (one32 == org) ok1++;
      start32 = 1;
      @(posedge clk); #1;
      start32 = 0;
      while (!done32) @(posedge clk);
      #1;
      check(scr32 == w && succ32 == s_ref && int'(hp32) == hp_ref, "32x32 scrub");
      if (succ32 && scr32 == org) okn++;
    end
    $display("32x32, 10 errors: one iteration repairs %0d of %0d, iterative %0d of %0d",
             ok1, TRIALS, okn, TRIALS);
    check(okn >= ok1, "iterations never do worse than one");
    check(okn * 100 >= TRIALS * 90, "32x32 iterative success rate of at least 90%");

    ok1 = 0; okn = 0;
    for (int t = 0; t < TRIALS; t++) begin
      r32_t::win_t org, w;
      r32_t::chks_t rc, cc;
      r32_t::line_t dirty;
      bit taken [32*32 + 2*32*6];
      bit s_ref, u_ref;
      int p, hp_ref, fx_ref;
      r32_t::rand_win(org);
      r32_t::encode(h32, org, rc, cc);
      w = org;
      foreach (taken[k]) taken[k] = 0;
      for (int k = 0; k < 10; k++) begin
        do p = $urandom_range(0, 32*32 + 2*32*6 - 1); while (taken[p]);
        taken[p] = 1;
        if (p < 1024) w[p / 32][p % 32] = !w[p / 32][p % 32];
        else if (p < 1024 + 192) rc[(p - 1024) / 6][(p - 1024) % 6] = !rc[(p - 1024) / 6][(p - 1024) % 6];
        else cc[(p - 1216) / 6][(p - 1216) % 6] = !cc[(p - 1216) / 6][(p - 1216) % 6];
      end
      pload = w; prc = rc; pcc = cc;
      r32_t::iterate(h32, w, rc, cc, 0, hpc_pkg::HPC_MAX_HALF_PASSES, s_ref, u_ref, hp_ref, fx_ref, dirty);
      @(negedge clk);
      pstart = 1;
      @(posedge clk); #1;
      pstart = 0;
      while (!pdone) @(posedge clk);
      #1;
      check(pwin == w && psucc == s_ref && punc == u_ref && int'(php) == hp_ref && pdirty == dirty,
            "32x32 with check-bit errors");
      if (pwin == org) ok1++;
      if (psucc && pwin == org) okn++;
    end
    $display("32x32, 10 errors over data and check bits: data restored %0d of %0d, reported success %0d of %0d",
             ok1, TRIALS, okn, TRIALS);

    ok1 = 0; okn = 0;
    for (int t = 0; t < TRIALS / 4; t++) begin
      r64_t::win_t org, w, f;
      r64_t::chks_t rc, cc;
      r64_t::line_t dm, dirty;
      bit clean, s_ref, u_ref;
      int n, hp_ref, fx_ref;
      r64_t::rand_win(org);
      w = org;
      r64_t::inject(w, 4);
      for (int i = 0; i < 64; i++) begin bs64[i*64 +: 64] = org[i]; rec64[i*64 +: 64] = w[i]; end
      r64_t::encode(h64, org, rc, cc);
      f = w; dm = '0;
      n = r64_t::half_pass(h64, f, rc, cc, 0, clean, dm);
      n = r64_t::half_pass(h64, f, rc, cc, 1, clean, dm);
      r64_t::iterate(h64, w, rc, cc, 0, hpc_pkg::HPC_MAX_HALF_PASSES, s_ref, u_ref, hp_ref, fx_ref, dirty);
      @(negedge clk);
      check(one64 == f, "64x64 one iteration");
      if (one64 == org) ok1++;
      start64 = 1;
      @(posedge clk); #1;
      start64 = 0;
      while (!done64) @(posedge clk);
      #1;
      check(scr64 == w && succ64 == s_ref && int'(hp64) == hp_ref, "64x64 scrub");
      if (succ64 && scr64 == org) okn++;
    end
    $display("64x64, 4 errors: one iteration repairs %0d of %0d, iterative %0d of %0d",
             ok1, TRIALS / 4, okn, TRIALS / 4);
    check(okn >= ok1, "64x64 iterations never do worse than one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
