// tb_ddp_result_gen -- second-step result planes for all 15 (s, c') pairs.
//
// Pixel p carries s = p/3 - 2 and c' = p%3 - 1; a second pass uses random
// pairs. Each result pixel must be one-hot with value s + c'.
module tb_ddp_result_gen;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;
  localparam int PIX = 15;
  logic [NSP-1:0][PIX-1:0] s;
  logic [NCP-1:0][PIX-1:0] cs;
  logic [NDP-1:0][PIX-1:0] z;
  int sv [PIX], cv [PIX];
  int checks = 0, failures = 0;

  ddp_result_gen #(.PIX(PIX)) dut (.s(s), .cs(cs), .z(z));

  task automatic apply_and_check();
    s = '0; cs = '0;
    for (int p = 0; p < PIX; p++) begin
      s[sv[p] + 2][p]  = 1'b1;
      cs[cv[p] + 1][p] = 1'b1;
    end
    #1;
    for (int p = 0; p < PIX; p++) begin
      logic [6:0] col;
      int got;
      for (int k = 0; k < NDP; k++) col[k] = z[k][p];
      got = onehot_val(col, 7, 3);
      checks++;
      if (got != sv[p] + cv[p]) begin
        failures++;
        $display("FAIL s=%0d c'=%0d: z planes %b", sv[p], cv[p], col);
      end
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
    for (int p = 0; p < PIX; p++) begin sv[p] = p / 3 - 2; cv[p] = p % 3 - 1; end
    apply_and_check();
    for (int i = 0; i < 50; i++) begin
      for (int p = 0; p < PIX; p++) begin
        sv[p] = $urandom_range(4, 0) - 2;
        cv[p] = $urandom_range(2, 0) - 1;
      end
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
