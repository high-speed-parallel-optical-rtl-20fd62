// tb_ddp_plane_or -- checks the masked beam-combiner OR against a bit-by-bit
// reference on random planes, with a mask that leaves two planes out.
module tb_ddp_plane_or;
  localparam int K = 4, W = 12;
  localparam logic [K-1:0] MASK = 4'b1010;
  logic [K-1:0][W-1:0] planes;
  logic [W-1:0] y, exp_y;
  int checks = 0, failures = 0;

  ddp_plane_or #(.K(K), .W(W), .MASK(MASK)) dut (.planes(planes), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int k = 0; k < K; k++) planes[k] = W'($urandom);
      #1;
      for (int p = 0; p < W; p++) exp_y[p] = planes[1][p] | planes[3][p];
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL planes=%h y=%h exp=%h", planes, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
