// prog_clock_gen_model -- behavioural model of a programmable clock generator
// (not synthesizable; for simulation only).
//
// Produces clk with a period set in picoseconds. Out of reset-free start-up it
// runs at INIT_PS. When req is high it keeps the old period for LOCK_CYCLES
// more rising edges (standing in for the relock time of a real generator),
// then switches to period_ps without a glitch and raises ack for one cycle of
// the new clock. cur_ps reports the period currently generated.
module prog_clock_gen_model #(
  parameter int LOCK_CYCLES = 3,
  parameter int INIT_PS     = 5000
) (
  input  logic        req,
  input  logic [15:0] period_ps,
  output logic        clk,
  output logic        ack,
  output int          cur_ps
);
  timeunit 1ns;
  timeprecision 1ps;

  int cnt;

  initial begin
    clk    = 1'b0;
    ack    = 1'b0;
    cnt    = 0;
    cur_ps = INIT_PS;
    forever begin
      #(real'(cur_ps / 2) / 1000.0) clk = 1'b1;
      #(real'(cur_ps - cur_ps / 2) / 1000.0) clk = 1'b0;
    end
  end

  always @(posedge clk) begin
    if (ack) begin
      ack <= 1'b0;
      cnt <= 0;
    end else if (req) begin
      if (cnt == LOCK_CYCLES) begin
        cur_ps <= int'(period_ps);
        ack    <= 1'b1;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
