// tb_ddp_encoder -- every digit -3..3 must light exactly its own plane, and
// the unused code -4 must light none. Random digit arrays.
module tb_ddp_encoder;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;
  localparam int PIX = 16;
  qsd_digit_t [PIX-1:0]          digits;
  logic       [NDP-1:0][PIX-1:0] planes;
  int checks = 0, failures = 0;

  ddp_encoder #(.PIX(PIX)) dut (.digits(digits), .planes(planes));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int p = 0; p < PIX; p++) digits[p] = qsd_digit_t'($urandom_range(7, 0));
      #1;
      for (int p = 0; p < PIX; p++) begin
        logic [6:0] col;
        int v;
        for (int k = 0; k < NDP; k++) col[k] = planes[k][p];
        v = onehot_val(col, 7, 3);
        checks++;
        if (digits[p] == -4) begin
          if (col != '0) begin failures++; $display("FAIL code -4 lit %b", col); end
        end else if (v != int'(digits[p])) begin
          failures++;
          $display("FAIL digit %0d planes %b", digits[p], col);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
