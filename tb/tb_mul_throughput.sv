// tb_mul_throughput -- workload test: random scalar x vector multiplications
// for every multiplicand width (3..24 bits) and multiplier widths of 3, 4, 6
// and 8 bits, run through the whole pipeline under DBFS.
//
// For each combination, 16 multiplications with random multiplicands (w-1
// bits of information per lane) and random multipliers are issued. Every
// lane is checked against an integer model of the shift-add product. The
// time the AU spends on the steps is measured from the generated clock, and
// throughput is reported as multiplications completed per 5 ns (one
// design-time clock period), with DBFS and for the same steps at 200 MHz.
// The DBFS gain must equal 5000 ps / T(W) for multiplicand width W.
module tb_mul_throughput;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NMUL = 16;

  logic          clk, rst_n = 0;
  logic          cmd_valid = 0, cmd_ready;
  cmd_t          cmd;
  logic          ld_en = 0;
  logic [1:0]    ld_addr = 0;
  logic [47:0]   ld_data = 0;
  logic          out_valid;
  logic [1:0]    out_dst;
  logic [47:0]   out_data;
  logic          clk_req, clk_ack, busy, mul_done, conv_err;
  logic [15:0]   clk_period_ps;
  mode_e         clk_mode;
  logic [31:0]   freq_switches, raw_stalls;
  int            gen_ps;
  int checks = 0, failures = 0;

  prog_clock_gen_model #(.LOCK_CYCLES(3)) u_gen (
    .req(clk_req), .period_ps(clk_period_ps), .clk, .ack(clk_ack), .cur_ps(gen_ps));

  softsimd_dbfs_top dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .ld_en, .ld_addr, .ld_data,
    .out_valid, .out_dst, .out_data, .clk_req, .clk_period_ps, .clk_ack,
    .busy, .mul_done, .conv_err, .clk_mode, .freq_switches, .raw_stalls);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // measured AU busy time: length of every clock cycle in which a step issued
  realtime last_edge = 0, step_time = 0;
  int      step_cnt = 0;
  bit      issued_q = 0;
  always @(posedge clk) begin
    if (issued_q) begin
      step_time += $realtime - last_edge;
      step_cnt++;
    end
    issued_q  = rst_n && dut.issue;
    last_edge = $realtime;
  end

  logic [47:0] last_out;
  always @(posedge clk) if (out_valid) last_out <= out_data;

  task automatic send(cmd_t c);
    cmd       = c;
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy || cmd_valid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic load(int r, logic [47:0] d);
    wait_idle();
    ld_en = 1; ld_addr = 2'(r); ld_data = d;
    @(negedge clk);
    ld_en = 0;
  endtask

  initial begin
    int mbs [4] = '{3, 4, 6, 8};
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    $display("multiplicand  multiplier  steps/mul  mul per 5 ns (DBFS)  mul per 5 ns (200 MHz)");
    for (int m = 0; m < 7; m++) begin
      for (int q = 0; q < 4; q++) begin
        int unsigned w, lanes;
        int mb, steps0;
        realtime t0;
        real thr, thr_nom, expect_gain;
        w     = width_of(m);
        lanes = 48 / w;
        mb    = mbs[q];
        steps0 = step_cnt;
        t0     = step_time;
        for (int n = 0; n < NMUL; n++) begin
          longint a [16];
          longint wv;
          logic [47:0] word;
          cmd_t c;
          wv   = longint'($urandom_range(0, (1 << mb) - 1)) - (longint'(1) << (mb - 1));
          word = '0;
          for (int j = 0; j < int'(lanes); j++) begin
            a[j] = rand_narrow(w);
            word = lane_put(word, w, j, a[j]);
          end
          load(0, word);
          c = '0;
          c.kind = CMD_MUL; c.w = 16'(wv); c.mbits = 5'(mb); c.mmode = mode_e'(m);
          c.msrc = SRC_R0; c.mwb = 1; c.mdst = 2'd1;
          send(c);
          wait_idle();
          for (int j = 0; j < int'(lanes); j++)
            check(lane_get(last_out, w, j) == ref_mul(a[j], wv, mb),
                  $sformatf("w=%0d mb=%0d lane %0d: got %0d exp %0d", w, mb, j,
                            lane_get(last_out, w, j), ref_mul(a[j], wv, mb)));
        end
        thr     = real'(lanes * NMUL) * 5.0 / (step_time - t0);
        thr_nom = real'(lanes * NMUL) * 5.0 / (real'(step_cnt - steps0) * 5.0);
        expect_gain = 5.0 / ($ceil(945.4 + 88.42 * real'(w) - 1e-6) / 1000.0);
        check(thr / thr_nom > expect_gain * 0.999 && thr / thr_nom < expect_gain * 1.001,
              $sformatf("DBFS gain %0f for w=%0d, expected %0f", thr / thr_nom, w, expect_gain));
        $display("%8d-bit  %8d-bit  %9.2f  %19.2f  %22.2f", w, mb,
                 real'(step_cnt - steps0) / real'(NMUL), thr, thr_nom);
      end
    end
    check(!conv_err, "no conversion error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
