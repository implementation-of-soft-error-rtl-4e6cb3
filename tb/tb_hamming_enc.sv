// tb_hamming_enc: checks the line encoder against the check bits of the
// reference 7 x 7 simulation (a line of all ones gives 0111, a line with
// position 2 cleared gives 1100, one with position 6 cleared gives 0110) and
// against the reference model for random lines and random matrices.
module tb_hamming_enc;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic [0:27] h;
  logic [0:6]  d;
  logic [0:3]  chk;
  int checks = 0, failures = 0;

  hamming_enc #(.N(7), .R(4)) dut (.h(h), .d(d), .chk(chk));

  task automatic expect_chk(logic [0:3] exp, string what);
    #1;
    checks++;
    if (chk !== exp) begin
      failures++;
      $display("FAIL %s: d=%b chk=%b expected %b", what, d, chk, exp);
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
    d = 7'b1111111; expect_chk(4'b0111, "all ones");
    d = 7'b1101111; expect_chk(4'b1100, "bit 2 clear");
    d = 7'b1111110; expect_chk(4'b0110, "bit 6 clear");
    d = 7'b0000000; expect_chk(4'b0000, "all zero");
    for (int j = 0; j < 7; j++) begin
      d = '0; d[j] = 1'b1; expect_chk(h[j*4 +: 4], "unit vector");
    end
    for (int t = 0; t < 200; t++) begin
      if (t >= 100) h = 28'($urandom());
      d = 7'($urandom());
      expect_chk(ref_t::enc(h, d), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
