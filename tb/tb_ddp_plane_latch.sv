// tb_ddp_plane_latch -- reset darkens all pixels; with load high the latch
// takes the input at the clock edge, with load low it keeps its content.
module tb_ddp_plane_latch;
  localparam int W = 40;
  logic clk = 0, rst_n, load;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  ddp_plane_latch #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 1; d = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    model = '0;
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom_range(1, 0));
      d    = W'({$urandom, $urandom});
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d load=%b q=%h expected %h", i, load, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
