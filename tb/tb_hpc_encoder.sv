// tb_hpc_encoder: row and column check bits of random windows, compared with
// the reference model; plus the all-ones window of the reference
// simulation, whose rows and columns all give 0111.
module tb_hpc_encoder;
  import hpc_ref_pkg::*;
  typedef hpc_ref #(7, 4) ref_t;

  logic [0:27] h;
  ref_t::win_t  data;
  ref_t::chks_t row_chk, col_chk, rc, cc;
  int checks = 0, failures = 0;

  hpc_encoder #(.N(7), .R(4)) dut (.h(h), .data(data), .row_chk(row_chk), .col_chk(col_chk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = hpc_pkg::HPC_H_DEFAULT;
    for (int i = 0; i < 7; i++) data[i] = 7'b1111111;
    #1;
    for (int k = 0; k < 7; k++) begin
      checks += 2;
      if (row_chk[k] != 4'b0111) begin failures++; $display("FAIL all-ones row %0d", k); end
      if (col_chk[k] != 4'b0111) begin failures++; $display("FAIL all-ones col %0d", k); end
    end
    for (int t = 0; t < 100; t++) begin
      if (t >= 50) h = 28'($urandom());
      ref_t::rand_win(data);
      #1;
      ref_t::encode(h, data, rc, cc);
      for (int k = 0; k < 7; k++) begin
        checks += 2;
        if (row_chk[k] != rc[k]) begin failures++; $display("FAIL row %0d: %b vs %b", k, row_chk[k], rc[k]); end
        if (col_chk[k] != cc[k]) begin failures++; $display("FAIL col %0d: %b vs %b", k, col_chk[k], cc[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
