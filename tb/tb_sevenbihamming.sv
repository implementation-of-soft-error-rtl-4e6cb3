// tb_sevenbihamming: end-to-end test of the 7 x 7 design at its default
// parameters. The original window is encoded, a read-back copy with
// injected soft errors is presented, and both correctors are compared with
// the reference model: the combinational one-iteration outputs
// (sec_corrected_mat, sec_modified, err_det, col_err, detect, hpc_fail) and
// the iterative scrub (window, outcome, pass count, run time, dirty frames).
// The first case is the reference simulation: an all-ones window with
// errors at row 1 column 2 and row 2 column 6 of the 49-bit stream.
// Each mechanism is counted and must occur at least once: detection, row
// repair, column repair, failure of one iteration, multi-pass success,
// column-first start, give-up, clean scrub, and a start ignored while busy.
module tb_sevenbihamming;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic clk = 0, rst = 1, start = 0, col_first = 0;
  logic [0:48] bitstream, bitstream_rec;
  logic [0:27] parity;
  ref_t::win_t sec_corrected_mat, sec_modified, err_det, col_err, scrub_window;
  logic detect, hpc_fail, busy, done, success, uncorrectable;
  logic [3:0] half_passes;
  logic [8:0] corrections;
  logic [0:6] frame_dirty;
  int checks = 0, failures = 0;
  int m_detect = 0, m_rowfix = 0, m_colfix = 0, m_onefail = 0, m_multi = 0;
  int m_colfirst = 0, m_giveup = 0, m_clean = 0, m_ignored = 0;

  sevenbihamming dut (
    .clk(clk), .rst(rst), .bitstream(bitstream), .bitstream_rec(bitstream_rec), .parity(parity),
    .sec_corrected_mat(sec_corrected_mat), .sec_modified(sec_modified), .err_det(err_det),
    .col_err(col_err), .detect(detect), .hpc_fail(hpc_fail), .start(start), .col_first(col_first),
    .busy(busy), .done(done), .success(success), .uncorrectable(uncorrectable),
    .half_passes(half_passes), .corrections(corrections), .scrub_window(scrub_window),
    .frame_dirty(frame_dirty)
  );

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ref_t::win_t to_win(logic [0:48] s);
    ref_t::win_t w;
    for (int i = 0; i < 7; i++) w[i] = s[i*7 +: 7];
    return w;
  endfunction

  task automatic run(bit cf, bit poke_busy);
    ref_t::win_t  org, rec, m, f, w;
    ref_t::chks_t rc, cc;
    ref_t::line_t dm, dirty;
    bit clean, s_ref, u_ref;
    int n, hp_ref, fx_ref, cycles;
    org = to_win(bitstream);
    rec = to_win(bitstream_rec);
    ref_t::encode(parity, org, rc, cc);
    // one iteration
    m = rec; dm = '0;
    n = ref_t::half_pass(parity, m, rc, cc, 0, clean, dm);
    f = m;
    n = ref_t::half_pass(parity, f, rc, cc, 1, clean, dm);
    #1;
    check(sec_corrected_mat == m && sec_modified == f, "one-iteration windows");
    check(detect == !ref_t::consistent(parity, rec, rc, cc), "detect");
    check(hpc_fail == !ref_t::consistent(parity, f, rc, cc), "hpc_fail");
    for (int i = 0; i < 7; i++)
      check(err_det[i] == (rec[i] ^ m[i]) && col_err[i] == (m[i] ^ f[i]), "error masks");
    if (detect) m_detect++;
    if (m != rec) m_rowfix++;
    if (f != m) m_colfix++;
    if (hpc_fail) m_onefail++;
    // iterative scrub
    w = rec;
    ref_t::iterate(parity, w, rc, cc, cf, hpc_pkg::HPC_MAX_HALF_PASSES, s_ref, u_ref, hp_ref, fx_ref, dirty);
    @(negedge clk);
    col_first = cf; start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 0;
    while (!done) begin
      if (poke_busy && cycles == 3) begin
        start = 1;  // must be ignored while busy
        bitstream_rec = ~bitstream_rec;
      end
      @(posedge clk); #1;
      start = 0;
      cycles++;
      if (cycles > 200) break;
    end
    if (poke_busy) begin
      bitstream_rec = ~bitstream_rec;
      m_ignored++;
    end
    check(scrub_window == w, "scrubbed window");
    check(success == s_ref && uncorrectable == u_ref, "scrub outcome");
    check(int'(half_passes) == hp_ref && int'(corrections) == fx_ref, "pass and fix counts");
    check(frame_dirty == dirty, "dirty frames");
    check(cycles == hp_ref * 7, "scrub run time = half passes x 7 cycles");
    if (success && hp_ref > 3) m_multi++;
    if (success && hp_ref == 2) m_clean++;
    if (uncorrectable) m_giveup++;
    if (cf) m_colfirst++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    parity = hpc_pkg::HPC_H_DEFAULT;
    bitstream = '1;
    bitstream_rec = '1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // clean read-back
    run(0, 0);
    // the reference simulation's errors: stream bits 9 and 20
    bitstream_rec[9] = 0; bitstream_rec[20] = 0;
    #1;
    check(err_det[0] == '0 && err_det[1] == 7'b0010000 && err_det[2] == 7'b0000001, "reference err_det");
    check(sec_modified == to_win(bitstream), "reference window repaired");
    run(0, 1);
    check(success && frame_dirty == 7'b0110000, "reference scrub");
    // column-first scrub of the same window
    run(1, 0);
    // random windows with 0..10 errors
    for (int t = 0; t < 300; t++) begin
      ref_t::win_t w;
      ref_t::rand_win(w);
      for (int i = 0; i < 7; i++) bitstream[i*7 +: 7] = w[i];
      ref_t::inject(w, t % 11);
      for (int i = 0; i < 7; i++) bitstream_rec[i*7 +: 7] = w[i];
      run(1'(t % 4 == 3), 1'(t % 50 == 7));
    end
    $display("detect=%0d row-fix=%0d col-fix=%0d one-iteration-fail=%0d multi-pass=%0d",
             m_detect, m_rowfix, m_colfix, m_onefail, m_multi);
    $display("column-first=%0d give-up=%0d clean=%0d start-while-busy=%0d",
             m_colfirst, m_giveup, m_clean, m_ignored);
    check(m_detect > 0, "detect seen");
    check(m_rowfix > 0, "row repair seen");
    check(m_colfix > 0, "column repair seen");
    check(m_onefail > 0, "one-iteration failure seen");
    check(m_multi > 0, "multi-pass success seen");
    check(m_colfirst > 0, "column-first seen");
    check(m_giveup > 0, "give-up seen");
    check(m_clean > 0, "clean scrub seen");
    check(m_ignored > 0, "start while busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
