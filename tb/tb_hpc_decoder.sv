// tb_hpc_decoder: one iteration (row pass, then column pass).
// Directed cases: the reference simulation's window (all ones, errors at
// row 1 column 2 and row 2 column 6), two errors in one row that only the
// column pass can repair, and four errors on the corners of a rectangle,
// which one iteration cannot repair. Every pair of errors must be
// repaired by one iteration. Random windows with 0..6 errors are
// compared with the reference model.
module tb_hpc_decoder;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic [0:27]  h;
  ref_t::win_t  org, rec, mid, fin, rerr, cerr, w, e_mid;
  ref_t::chks_t row_chk, col_chk;
  logic         detect, fail;
  ref_t::line_t dirty;
  int checks = 0, failures = 0;

  hpc_decoder #(.N(7), .R(4)) dut (
    .h(h), .rec(rec), .row_chk(row_chk), .col_chk(col_chk),
    .sec_corrected_mat(mid), .sec_modified(fin), .row_err(rerr), .col_err(cerr),
    .detect(detect), .fail(fail)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // the reference: one row pass then one column pass
  task automatic run_ref(input ref_t::win_t r, output ref_t::win_t m, output ref_t::win_t f,
                         output bit det, output bit bad);
    bit clean;
    int n;
    ref_t::line_t dm;
    det = !ref_t::consistent(h, r, row_chk, col_chk);
    m = r; dm = '0;
    n = ref_t::half_pass(h, m, row_chk, col_chk, 0, clean, dm);
    f = m;
    n = ref_t::half_pass(h, f, row_chk, col_chk, 1, clean, dm);
    bad = !ref_t::consistent(h, f, row_chk, col_chk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t::win_t m_ref, f_ref;
    bit det_ref, bad_ref;
    h = hpc_pkg::HPC_H_DEFAULT;
    // reference simulation window
    for (int i = 0; i < 7; i++) org[i] = 7'b1111111;
    ref_t::encode(h, org, row_chk, col_chk);
    rec = org; rec[1][2] = 1'b0; rec[2][6] = 1'b0;
    #1;
    check(rerr[0] == 7'b0000000 && rerr[1] == 7'b0010000 && rerr[2] == 7'b0000001 &&
          rerr[3] == '0 && rerr[4] == '0 && rerr[5] == '0 && rerr[6] == '0, "err_det pattern");
    check(detect, "detect");
    check(mid == org && fin == org && !fail, "two errors repaired by rows");
    // two errors in row 4, columns 1 and 5: 1010^0010 = 1000 = column 3,
    // so the row pass miscorrects column 3; the column pass repairs all three
    rec = org; rec[4][1] = 1'b0; rec[4][5] = 1'b0;
    #1;
    check(rerr[4] == 7'b0001000, "row miscorrection");
    check(cerr[4] == 7'b0101010, "column pass repairs columns 1, 3 and 5");
    check(fin == org && !fail, "double error in a row repaired by columns");
    // rectangle: rows 1,5 x columns 0,1 (1001^1010 = 0011, not a column)
    rec = org; rec[1][0] = 1'b0; rec[1][1] = 1'b0; rec[5][0] = 1'b0; rec[5][1] = 1'b0;
    #1;
    check(detect && fail && fin != org, "rectangle not repairable");
    // every pair of errors in a random window is repaired by one iteration
    ref_t::rand_win(org);
    ref_t::encode(h, org, row_chk, col_chk);
    for (int a = 0; a < 49; a++) begin
      for (int b = a + 1; b < 49; b++) begin
        rec = org;
        rec[a / 7][a % 7] = !rec[a / 7][a % 7];
        rec[b / 7][b % 7] = !rec[b / 7][b % 7];
        #1;
        check(fin == org && !fail && detect, "every double error repaired");
      end
    end
    // random
    for (int t = 0; t < 300; t++) begin
      ref_t::rand_win(org);
      ref_t::encode(h, org, row_chk, col_chk);
      rec = org;
      ref_t::inject(rec, t % 7);
      #1;
      run_ref(rec, m_ref, f_ref, det_ref, bad_ref);
      check(mid == m_ref, "random row pass");
      check(fin == f_ref, "random column pass");
      check(detect == det_ref && fail == bad_ref, "random flags");
      for (int i = 0; i < 7; i++) begin
        check(rerr[i] == (rec[i] ^ m_ref[i]) && cerr[i] == (m_ref[i] ^ f_ref[i]), "random error masks");
      end
      if (t % 7 == 1) check(fin == org && !fail && detect, "single error always repaired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
