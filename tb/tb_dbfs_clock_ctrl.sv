// tb_dbfs_clock_ctrl -- self-checking test of the DBFS clock controller.
// The controller is clocked by the behavioural clock generator it programs.
// A random sequence of next-operation modes is presented; the test checks the
// design-time period after reset, the period requested for every width
// against T = 945.4 ps + W * 88.42 ps (826 MHz at 3 bits, 326 MHz at 24 bits),
// that issue is allowed only when the generated period is the one for the
// pending mode, the measured clock period after each switch, the number of
// stall cycles per switch and the switch counter.
module tb_dbfs_clock_ctrl;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int LOCK = 3;

  logic        clk, rst_n = 0, ack, req, nxt_valid, issue_ok, cur_set;
  logic [15:0] period;
  mode_e       nxt_mode, cur_mode;
  logic [31:0] switches;
  int          gen_ps;
  int checks = 0, failures = 0;

  prog_clock_gen_model #(.LOCK_CYCLES(LOCK)) u_gen (.req, .period_ps(period), .clk, .ack, .cur_ps(gen_ps));

  dbfs_clock_ctrl dut (.clk, .rst_n, .nxt_valid, .nxt_mode, .issue_ok, .clk_req(req),
                       .clk_period_ps(period), .clk_ack(ack), .cur_mode, .cur_set, .switches);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int exp_ps(int unsigned m);
    return int'($ceil(945.4 + 88.42 * real'(width_of(m)) - 1e-6));
  endfunction

  initial begin
    int nsw;
    realtime t0, t1;
    nxt_valid = 0; nxt_mode = M3;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(period == 16'd5000 && !req, "design-time period after reset");
    check(exp_ps(0) == 1211 && exp_ps(6) == 3068, "period table sanity");
    check(1.0e6 / exp_ps(0) > 825.0 && 1.0e6 / exp_ps(0) < 827.0, "826 MHz at 3 bits");
    check(1.0e6 / exp_ps(6) > 325.0 && 1.0e6 / exp_ps(6) < 327.0, "326 MHz at 24 bits");
    nsw = 0;
    for (int n = 0; n < 200; n++) begin
      int unsigned m;
      int stall;
      bit change;
      m = (n < 7) ? n : $urandom_range(0, 6);
      @(negedge clk);
      change = !(cur_set && cur_mode == mode_e'(m));
      nxt_valid = 1;
      nxt_mode  = mode_e'(m);
      stall = 0;
      #1;
      while (!issue_ok) begin
        check(!(cur_set && cur_mode == mode_e'(m)), "held although clock is right");
        if (req) check(period == 16'(exp_ps(m)), $sformatf("requested period w=%0d: %0d", width_of(m), period));
        @(negedge clk);
        #1;
        stall++;
      end
      check(gen_ps == exp_ps(m), $sformatf("generated period %0d for w=%0d", gen_ps, width_of(m)));
      if (change) begin
        nsw++;
        check(stall >= LOCK + 2 && stall <= LOCK + 3, $sformatf("stall cycles %0d", stall));
      end else begin
        check(stall == 0, "no stall without a change");
      end
      // measure the clock period
      @(posedge clk); t0 = $realtime;
      @(posedge clk); t1 = $realtime;
      check((t1 - t0) * 1000.0 > real'(exp_ps(m)) - 1.5 && (t1 - t0) * 1000.0 < real'(exp_ps(m)) + 1.5,
            $sformatf("measured period %0f ns", t1 - t0));
      nxt_valid = ($urandom_range(0, 1) == 0);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      nxt_valid = 0;
    end
    check(switches == 32'(nsw), "switch counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
