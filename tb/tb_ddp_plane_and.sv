// tb_ddp_plane_and -- checks the plane cascade (pixel AND) on random planes
// and on the all-dark and all-bright corner cases.
module tb_ddp_plane_and;
  localparam int W = 20;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  ddp_plane_and #(.W(W)) dut (.a(a), .b(b), .y(y));

  task automatic check();
    #1;
    for (int p = 0; p < W; p++) begin
      checks++;
      if (y[p] !== (a[p] && b[p])) begin
        failures++;
        $display("FAIL pixel %0d a=%b b=%b y=%b", p, a[p], b[p], y[p]);
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
    a = '0; b = '1; check();
    a = '1; b = '1; check();
    for (int i = 0; i < 100; i++) begin
      a = W'($urandom); b = W'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
