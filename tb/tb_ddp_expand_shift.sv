// tb_ddp_expand_shift -- random one-hot sum and carry planes for 3 numbers
// of 4 digits. Each widened sum digit must equal the input digit below the
// top and 0 at the top; each shifted carry digit must equal the carry of
// the digit below it in the same number, and 0 at the bottom.
module tb_ddp_expand_shift;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;
  localparam int NUM = 3, ND = 4;
  localparam int PI = NUM * ND, PO = NUM * (ND + 1);
  logic [NSP-1:0][PI-1:0] s_in;
  logic [NCP-1:0][PI-1:0] c_in;
  logic [NSP-1:0][PO-1:0] s_ext;
  logic [NCP-1:0][PO-1:0] c_shift;
  int sv [PI], cv [PI];
  int checks = 0, failures = 0;

  ddp_expand_shift #(.NUM(NUM), .ND(ND)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      s_in = '0; c_in = '0;
      for (int p = 0; p < PI; p++) begin
        sv[p] = $urandom_range(4, 0) - 2;
        cv[p] = $urandom_range(2, 0) - 1;
        s_in[sv[p] + 2][p] = 1'b1;
        c_in[cv[p] + 1][p] = 1'b1;
      end
      #1;
      for (int q = 0; q < NUM; q++)
        for (int d = 0; d <= ND; d++) begin
          logic [6:0] scol, ccol;
          int es, ec;
          scol = '0;
          ccol = '0;
          for (int k = 0; k < NSP; k++) scol[k] = s_ext[k][q*(ND+1) + d];
          for (int k = 0; k < NCP; k++) ccol[k] = c_shift[k][q*(ND+1) + d];
          es = (d < ND) ? sv[q*ND + d] : 0;
          ec = (d > 0) ? cv[q*ND + d - 1] : 0;
          checks += 2;
          if (onehot_val(scol, NSP, 2) != es) begin
            failures++;
            $display("FAIL num %0d digit %0d: s planes %b, expected %0d", q, d, scol, es);
          end
          if (onehot_val(ccol, NCP, 1) != ec) begin
            failures++;
            $display("FAIL num %0d digit %0d: c' planes %b, expected %0d", q, d, ccol, ec);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
