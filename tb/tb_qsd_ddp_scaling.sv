// tb_qsd_ddp_scaling -- the adder's time per operation must not depend on
// the array size. Three adders of very different sizes (1 x 1 x 1,
// 4 x 3 x 2 and 8 x 8 x 8) get random operands with random digits -3..3
// on the same cycle; every result must equal the sum of the operand values
// and all three must report it on the same edge, the second after the
// accept edge.
module tb_qsd_ddp_scaling;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;

  logic clk = 0, rst_n, in_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // One adder instance per size, each with its own operand generator and
  // result checker.
  logic [2:0] ready, valid;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    localparam int M  = (g == 0) ? 1 : (g == 1) ? 4 : 8;
    localparam int N  = (g == 0) ? 1 : (g == 1) ? 3 : 8;
    localparam int ND = (g == 0) ? 1 : (g == 1) ? 2 : 8;
    localparam int NUM = M * N;
    qsd_digit_t [NUM*ND-1:0]        a, b;
    logic [NDP-1:0][NUM*(ND+1)-1:0] z;
    logic busy;
    longint exp_v [NUM];

    qsd_ddp_array_adder #(.M(M), .N(N), .ND(ND)) dut (
      .clk, .rst_n, .in_valid, .in_ready(ready[g]), .a_digits(a), .b_digits(b),
      .out_valid(valid[g]), .busy(busy), .z_planes(z)
    );

    task automatic randomize_operands();
      for (int q = 0; q < NUM; q++) begin
        longint w = 1;
        exp_v[q] = 0;
        for (int d = 0; d < ND; d++) begin
          a[q*ND + d] = qsd_digit_t'($urandom_range(6, 0) - 3);
          b[q*ND + d] = qsd_digit_t'($urandom_range(6, 0) - 3);
          exp_v[q] += (longint'(a[q*ND + d]) + longint'(b[q*ND + d])) * w;
          w *= 4;
        end
      end
    endtask

    task automatic check_results();
      for (int q = 0; q < NUM; q++) begin
        longint v = 0, w = 1;
        int bad = 0;
        for (int d = 0; d <= ND; d++) begin
          logic [6:0] col;
          int zd;
          for (int k = 0; k < NDP; k++) col[k] = z[k][q*(ND+1) + d];
          zd = onehot_val(col, 7, 3);
          if (zd == BAD) bad = 1; else v += zd * w;
          w *= 4;
        end
        check(bad == 0 && v == exp_v[q],
              $sformatf("size %0dx%0dx%0d number %0d: got %0d expected %0d", M, N, ND, q, v, exp_v[q]));
      end
    endtask
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    rst_n = 0; in_valid = 0;
    g_dut[0].randomize_operands(); g_dut[1].randomize_operands(); g_dut[2].randomize_operands();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      g_dut[0].randomize_operands(); g_dut[1].randomize_operands(); g_dut[2].randomize_operands();
      in_valid = 1;
      check(ready == 3'b111, "all sizes ready together");
      @(posedge clk);
      acc = cyc;
      #1 in_valid = 0;
      check(valid == 3'b000, "no result on the accept edge");
      @(posedge clk); #1;
      check(valid == 3'b000, "no result one edge after the accept");
      @(posedge clk); #1;
      check(valid == 3'b111, "all sizes report on the second edge after the accept");
      g_dut[0].check_results(); g_dut[1].check_results(); g_dut[2].check_results();
      repeat ($urandom_range(1, 0)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
