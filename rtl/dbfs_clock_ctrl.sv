// dbfs_clock_ctrl -- Dynamic Bitwidth-Frequency Scaling controller.
//
// The AU's critical path is a constant part (shifter, multiplexers) plus a
// ripple carry chain as long as the current subword, so the shortest safe
// clock period is T(W) = T_CONST + W * T_BIT for subword width W, against the
// design-time period for the full 48-bit word. This block looks at the mode of
// the next micro-operation waiting to enter the AU. If it equals the mode the
// clock is set for, the operation may issue (issue_ok). Otherwise issue is
// held: the controller asks the clock generator for period T(W) (clk_req
// high, clk_period_ps valid) and waits for clk_ack, then records the new mode
// and lets the operation go on the next cycle. Because nothing issues while
// the request is pending, the AU never starts an operation under a clock that
// is too fast for it, whether the width grows (accumulation) or shrinks.
//
// Default constants: T_CONST = 945.4 ps and T_BIT = 88.42 ps, the straight line
// through the two run-time frequencies stated for the described 28 nm layout
// (826 MHz at 3 bits, 326 MHz at 24 bits); the other widths are interpolated
// with that line. Out of reset no mode is set and the design-time period
// (NOMINAL_PS, 200 MHz) is requested, so the first operation always switches.
//
// Clock generator contract: while clk_req is high, clk_period_ps is stable;
// the generator changes its output period glitch-free and then raises clk_ack
// for one cycle of the new clock. switches counts completed changes.
module dbfs_clock_ctrl
  import softsimd_pkg::*;
#(
  parameter int unsigned T_CONST_FS = 945400,
  parameter int unsigned T_BIT_FS   = 88420,
  parameter int unsigned NOMINAL_PS = 5000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nxt_valid,
  input  mode_e       nxt_mode,
  output logic        issue_ok,
  output logic        clk_req,
  output logic [15:0] clk_period_ps,
  input  logic        clk_ack,
  output mode_e       cur_mode,
  output logic        cur_set,
  output logic [31:0] switches
);

  // run-time period for a subword width, rounded up to whole ps
  function automatic logic [15:0] period_ps(mode_e m);
    longint unsigned fs;
    fs = longint'(T_CONST_FS) + longint'(mode_width(m)) * longint'(T_BIT_FS);
    return 16'((fs + 999) / 1000);
  endfunction

  logic  wait_q;
  mode_e req_mode_q;

  assign issue_ok      = nxt_valid && cur_set && !wait_q && (cur_mode == nxt_mode);
  assign clk_req       = wait_q;
  assign clk_period_ps = wait_q  ? period_ps(req_mode_q) :
                         cur_set ? period_ps(cur_mode)   : 16'(NOMINAL_PS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q     <= 1'b0;
      req_mode_q <= M24;
      cur_mode   <= M24;
      cur_set    <= 1'b0;
      switches   <= '0;
    end else if (wait_q) begin
      if (clk_ack) begin
        wait_q   <= 1'b0;
        cur_mode <= req_mode_q;
        cur_set  <= 1'b1;
        switches <= switches + 1;
      end
    end else if (nxt_valid && !(cur_set && cur_mode == nxt_mode)) begin
      wait_q     <= 1'b1;
      req_mode_q <= nxt_mode;
    end
  end

  // the requested period must not move while the generator is switching
  assert property (@(posedge clk) disable iff (!rst_n)
                   (clk_req && !clk_ack) |=> $stable(clk_period_ps))
    else $error("dbfs_clock_ctrl: period changed during a request");

  // an operation issues only under the clock set for its own width
  assert property (@(posedge clk) disable iff (!rst_n)
                   issue_ok |-> (cur_set && cur_mode == nxt_mode && !clk_req))
    else $error("dbfs_clock_ctrl: issue under a foreign clock");

endmodule
