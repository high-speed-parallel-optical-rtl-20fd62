// tb_qsd_adder_ctrl -- drives random in_valid and follows each accepted
// operation: load_mid must come exactly one cycle after the accept, load_out
// two cycles after, out_valid three cycles after, and two accepts must be
// at least two cycles apart. With in_valid held high the controller must
// accept every second cycle (one result per two cycles).
module tb_qsd_adder_ctrl;
  logic clk = 0, rst_n, in_valid;
  logic in_ready, load_in, load_mid, load_out, out_valid, busy;
  int checks = 0, failures = 0;
  int cyc = 0, last_accept = -10, accepts = 0;
  logic [3:0] pipe;  // pipe[i]: an accept happened i+1 cycles ago

  qsd_adder_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // Sample just before each edge.
  always @(negedge clk) if (rst_n) begin
    check(load_mid == pipe[0], "load_mid one cycle after accept");
    check(load_out == pipe[1], "load_out two cycles after accept");
    check(out_valid == pipe[2], "out_valid three cycles after accept");
    check(busy == (pipe[0] || pipe[1] || load_mid || load_out), "busy while a step runs");
    check(load_in == (in_valid && in_ready), "load_in is the handshake");
    if (load_in) begin
      check(cyc - last_accept >= 2, "accepts at least two cycles apart");
      check(in_ready == !pipe[0], "ready except in the step-1 cycle");
    end
  end

  always @(posedge clk) begin
    if (!rst_n) pipe <= '0;
    else begin
      pipe <= {pipe[2:0], load_in};
      if (load_in) begin last_accept <= cyc; accepts <= accepts + 1; end
    end
    cyc <= cyc + 1;
  end

  initial begin
    int start_acc;
    rst_n = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(in_ready == 1'b1 && busy == 1'b0, "idle and ready after reset");
    // random traffic
    for (int i = 0; i < 400; i++) begin
      @(posedge clk); #1 in_valid = ($urandom_range(2, 0) != 0);
    end
    // saturated traffic: one accept per two cycles
    in_valid = 1;
    @(posedge clk); @(posedge clk);
    start_acc = accepts;
    repeat (40) @(posedge clk);
    check(accepts - start_acc == 20, "20 accepts in 40 cycles at full rate");
    in_valid = 0;
    repeat (5) @(posedge clk);
    #1 check(busy == 1'b0 && out_valid == 1'b0, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
