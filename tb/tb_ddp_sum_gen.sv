// tb_ddp_sum_gen -- first-step sum planes for all 49 digit pairs.
//
// Pixel p carries the pair x = p/7 - 3, y = p%7 - 3; a second pass uses
// random pairs in random pixels. Every output pixel must be one-hot and
// hold the sum of x + y = 4c + s worked out from the number system.
module tb_ddp_sum_gen;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;
  localparam int PIX = 49;
  logic [NDP-1:0][PIX-1:0] a, b;
  logic [NSP-1:0][PIX-1:0] s;
  int xs [PIX], ys [PIX];
  int checks = 0, failures = 0;

  ddp_sum_gen #(.PIX(PIX)) dut (.a(a), .b(b), .s(s));

  task automatic apply_and_check();
    a = '0; b = '0;
    for (int p = 0; p < PIX; p++) begin
      a[xs[p] + 3][p] = 1'b1;
      b[ys[p] + 3][p] = 1'b1;
    end
    #1;
    for (int p = 0; p < PIX; p++) begin
      logic [6:0] col = '0;
      int got, exp_v;
      for (int k = 0; k < NSP; k++) col[k] = s[k][p];
      got   = onehot_val(col, NSP, 2);
      exp_v = ref_sum(xs[p], ys[p]);
      checks++;
      if (got != exp_v) begin
        failures++;
        $display("FAIL (%0d,%0d): sum planes %b, expected %0d", xs[p], ys[p], col, exp_v);
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
    for (int p = 0; p < PIX; p++) begin xs[p] = p / 7 - 3; ys[p] = p % 7 - 3; end
    apply_and_check();
    for (int i = 0; i < 50; i++) begin
      for (int p = 0; p < PIX; p++) begin
        xs[p] = $urandom_range(6, 0) - 3;
        ys[p] = $urandom_range(6, 0) - 3;
      end
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
