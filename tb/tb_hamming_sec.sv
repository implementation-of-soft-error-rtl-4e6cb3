// tb_hamming_sec: every single-bit error in random lines must be found at
// its position and repaired; error-free lines must pass unchanged with no
// detect; double errors must behave as the reference model says (either a
// detected uncorrectable line or a miscorrection onto a third position).
module tb_hamming_sec;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic [0:27] h;
  logic [0:6]  d, err, corr, good, e_ref;
  logic [0:3]  chk_ref, syn;
  logic        detect, uncorr;
  bit          rdet, runc;
  int checks = 0, failures = 0;

  hamming_sec #(.N(7), .R(4)) dut (
    .h(h), .d(d), .chk_ref(chk_ref), .syn(syn), .err(err), .corr(corr),
    .detect(detect), .uncorr(uncorr)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: good=%b d=%b err=%b corr=%b det=%b unc=%b syn=%b",
               what, good, d, err, corr, detect, uncorr, syn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = hpc_pkg::HPC_H_DEFAULT;
    for (int t = 0; t < 50; t++) begin
      good    = 7'($urandom());
      chk_ref = ref_t::enc(h, good);
      d = good; #1;
      check(!detect && !uncorr && corr == good && err == '0, "no error");
      for (int j = 0; j < 7; j++) begin
        d = good; d[j] = !d[j]; #1;
        check(detect && !uncorr && corr == good && err == (7'b1000000 >> j), "single error");
        check(syn == h[j*4 +: 4], "syndrome");
      end
      for (int a = 0; a < 7; a++) begin
        for (int b = a + 1; b < 7; b++) begin
          d = good; d[a] = !d[a]; d[b] = !d[b]; #1;
          e_ref = ref_t::sec(h, d, chk_ref, rdet, runc);
          check(detect == rdet && uncorr == runc && err == e_ref && corr == (d ^ e_ref), "double error");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
