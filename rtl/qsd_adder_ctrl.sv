// qsd_adder_ctrl -- sequences the two steps of the array adder.
//
// One addition occupies two clock cycles, one per step, as in the optical
// system where each step waits one modulator response time, giving one
// result array per two cycles:
//   accept edge : operands written into the input latch (in_valid & in_ready)
//   STEP1 cycle : first step evaluates; at its end the intermediate latch
//                 loads S and C (load_mid)
//   STEP2 cycle : second step evaluates; at its end the output latch loads Z
//                 (load_out); the input latch is free again, so in_ready is
//                 high and the next operands can be accepted on the same edge
// out_valid is high for the one cycle after load_out; the result stays in
// the output latch until the next one replaces it. There is no output
// back-pressure. Reset is synchronous, active-low.
module qsd_adder_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load_in,
  output logic load_mid,
  output logic load_out,
  output logic out_valid,
  output logic busy
);
  typedef enum logic [1:0] {IDLE, STEP1, STEP2} state_t;
  state_t state;

  assign in_ready = (state != STEP1);
  assign load_in  = in_valid && in_ready;
  assign load_mid = (state == STEP1);
  assign load_out = (state == STEP2);
  assign busy     = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load_out;
      unique case (state)
        IDLE:    if (load_in) state <= STEP1;
        STEP1:   state <= STEP2;
        STEP2:   state <= load_in ? STEP1 : IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The intermediate latch loads exactly one cycle after an accept.
  a_mid_after_accept: assert property (@(posedge clk) disable iff (!rst_n)
    load_in |=> load_mid);
  // No operands may be taken while the first step still reads them.
  a_no_accept_in_step1: assert property (@(posedge clk) disable iff (!rst_n)
    load_mid |-> !load_in);
endmodule
