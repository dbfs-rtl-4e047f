// tb_softsimd_dbfs_top -- end-to-end test of the Soft SIMD / DBFS pipeline.
//
// The pipeline is clocked by the behavioural programmable clock generator,
// which it drives through its DBFS request port. Three parts:
//  A. A quantised dot product mapped as for a convolution layer: six 8-bit
//     lanes hold six different activations, six 4-bit scalar weights are
//     applied one after another (CSD shift-add multiplication), products are
//     accumulated in 8-bit lanes, the accumulator is widened to 12 bits
//     (two words) before it can overflow, further products are widened and
//     added in 12-bit mode, and the result is finally narrowed back to one
//     8-bit word (dropping 4 LSBs). Activations are multiples of 8 so every
//     product is exact and the sums can be compared exactly.
//  B. Random multiplications in 3-bit mode: the clock must run at the 3-bit
//     period (826 MHz, 4.13x the 200 MHz design-time clock) and one
//     shift-add step must issue per cycle.
//  C. A 24-bit multiplication by 0x4001 (16-bit multiplier): a digit gap of 14
//     forces a split shift; checks the step count and the exact product.
// Every mechanism is counted and must occur at least once: clock switches to
// a wider and to a narrower mode, the read-after-write stall, feedback
// operands, CSD subtraction steps, multi-position (zero-skipping) shifts,
// split shifts, DPU widening, DPU narrowing across two words.
module tb_softsimd_dbfs_top;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

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

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (100000) @(posedge clk);
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

  // ------------------------------------------------------------ monitors
  int n_up = 0, n_down = 0, n_fb = 0, n_sub = 0, n_skip = 0, n_split = 0;
  int n_widen = 0, n_narrow2 = 0, n_issue = 0, n_badclk = 0;
  mode_e last_mode;
  bit    have_mode = 0;
  int    mark_iss = -1;
  realtime first_t, last_t;

  always @(posedge clk) if (rst_n) begin
    if (dut.issue) begin
      uop_t u;
      u = dut.cand;
      if (n_issue == mark_iss) first_t = $realtime;
      last_t = $realtime;
      n_issue++;
      if (u.xsel == SRC_FB || u.ysel == SRC_FB) n_fb++;
      if (u.op == OP_SUB) n_sub++;
      if (u.shamt > 1 && u.ysel != SRC_ZERO) n_skip++;
      if (u.shamt == 7 && u.ysel == SRC_ZERO && u.xsel == SRC_FB) n_split++;
      if (u.wb && u.dmode > u.mode) n_widen++;
      if (u.wb && u.dmode < u.mode && u.offset + mode_lanes(u.dmode) > mode_lanes(u.mode)) n_narrow2++;
      // DBFS safety: the clock must be the period for this operation's width
      if (gen_ps != int'($ceil(945.4 + 88.42 * real'(mode_width(u.mode)) - 1e-6))) n_badclk++;
      if (have_mode && u.mode > last_mode) n_up++;
      if (have_mode && u.mode < last_mode) n_down++;
      last_mode = u.mode;
      have_mode = 1;
    end
  end

  logic [47:0] last_out;
  logic [1:0]  last_dst;
  always @(posedge clk) if (out_valid) begin
    last_out <= out_data;
    last_dst <= out_dst;
  end

  // ------------------------------------------------------------ drivers
  // called at a falling edge; returns at the falling edge after acceptance,
  // so consecutive calls present commands back to back
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

  function automatic cmd_t mk_uop(src_e x, logic [2:0] k, src_e y, aluop_e op, mode_e m,
                                  bit wb, int dst, mode_e dm, int hisel = 0, int off = 0,
                                  bit msb = 0);
    cmd_t c;
    c = '0;
    c.kind = CMD_UOP;
    c.uop.xsel = x; c.uop.shamt = k; c.uop.ysel = y; c.uop.op = op; c.uop.mode = m;
    c.uop.wb = wb; c.uop.dst = 2'(dst); c.uop.dmode = dm; c.uop.hisel = 2'(hisel);
    c.uop.offset = 5'(off); c.uop.msb_align = msb;
    return c;
  endfunction

  function automatic cmd_t mk_mul(src_e s, longint w, int mb, mode_e m, bit wb = 0, int dst = 0);
    cmd_t c;
    c = '0;
    c.kind = CMD_MUL; c.w = 16'(w); c.mbits = 5'(mb); c.mmode = m; c.msrc = s;
    c.mwb = wb; c.mdst = 2'(dst);
    return c;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    longint act [6][6];      // [step][lane]
    longint wt  [6];
    longint sum [6];
    logic [47:0] word;
    cmd_t c;

    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- A: dot product, 6 lanes, 6 weights
    for (int j = 0; j < 6; j++) sum[j] = 0;
    for (int i = 0; i < 6; i++) begin
      wt[i] = longint'($urandom_range(0, 15)) - 8;
      if (i == 0) wt[i] = 7;                     // 0111 -> CSD 100-1 (subtract step)
      for (int j = 0; j < 6; j++) begin
        act[i][j] = 8 * (longint'($urandom_range(0, 14)) - 7);
        sum[j] += act[i][j] * wt[i] / 8;
      end
    end
    for (int i = 0; i < 6; i++) begin
      word = '0;
      for (int j = 0; j < 6; j++) word = lane_put(word, 8, j, act[i][j]);
      load(0, word);
      send(mk_mul(SRC_R0, wt[i], 4, M8));
      if (i == 0) begin
        send(mk_uop(SRC_ZERO, 0, SRC_FB, OP_ADD, M8, 1, 1, M8));          // R1 = p0
      end else if (i == 1) begin
        send(mk_uop(SRC_R1, 0, SRC_FB, OP_ADD, M8, 1, 1, M8));            // R1 += p1
        send(mk_uop(SRC_R1, 0, SRC_ZERO, OP_ADD, M8, 1, 2, M12, 0, 0));   // R2 = lanes 0..3 widened
        send(mk_uop(SRC_R1, 0, SRC_ZERO, OP_ADD, M8, 1, 3, M12, 0, 4));   // R3 = lanes 4..5 widened
      end else begin
        send(mk_uop(SRC_FB, 0, SRC_ZERO, OP_ADD, M8, 1, 0, M12, 0, 4));   // R0 = p lanes 4..5
        send(mk_uop(SRC_FB, 0, SRC_ZERO, OP_ADD, M8, 1, 1, M12, 0, 0));   // R1 = p lanes 0..3
        send(mk_uop(SRC_R2, 0, SRC_R1, OP_ADD, M12, 1, 2, M12));          // R2 += R1 (RAW stall)
        send(mk_uop(SRC_R3, 0, SRC_R0, OP_ADD, M12, 1, 3, M12));          // R3 += R0
      end
    end
    // read back the 12-bit accumulators
    send(mk_uop(SRC_R2, 0, SRC_ZERO, OP_ADD, M12, 1, 2, M12));
    wait_idle();
    for (int j = 0; j < 4; j++)
      check(lane_get(last_out, 12, j) == sum[j],
            $sformatf("acc lane %0d got %0d exp %0d", j, lane_get(last_out, 12, j), sum[j]));
    send(mk_uop(SRC_R3, 0, SRC_ZERO, OP_ADD, M12, 1, 3, M12));
    wait_idle();
    for (int j = 4; j < 6; j++)
      check(lane_get(last_out, 12, j - 4) == sum[j],
            $sformatf("acc lane %0d got %0d exp %0d", j, lane_get(last_out, 12, j - 4), sum[j]));
    // narrow to 8 bits, keeping the MSBs, gathering R2 (lanes 0..3) and R3 (4..5)
    send(mk_uop(SRC_R2, 0, SRC_ZERO, OP_ADD, M12, 1, 0, M8, 3, 0, 1));
    wait_idle();
    check(last_dst == 2'd0, "narrow destination");
    for (int j = 0; j < 6; j++)
      check(lane_get(last_out, 8, j) == asr(sum[j], 4),
            $sformatf("narrowed lane %0d got %0d exp %0d", j, lane_get(last_out, 8, j), asr(sum[j], 4)));

    // ---------------- B: 3-bit mode multiplications at the 3-bit clock
    for (int n = 0; n < 20; n++) begin
      longint a [16];
      longint wv;
      int mb, steps0;
      mb = $urandom_range(2, 3);
      wv = longint'($urandom_range(0, (1 << mb) - 1)) - (longint'(1) << (mb - 1));
      word = '0;
      for (int j = 0; j < 16; j++) begin
        a[j] = rand_narrow(3);
        word = lane_put(word, 3, j, a[j]);
      end
      load(1, word);
      steps0   = n_issue;
      mark_iss = n_issue;
      send(mk_mul(SRC_R1, wv, mb, M3, 1, 2));
      wait_idle();
      check(gen_ps == 1211, $sformatf("3-bit clock period %0d ps", gen_ps));
      // consecutive steps, one per 1.211 ns cycle
      check(last_t - first_t > real'(n_issue - steps0 - 1) * 1.2105 - 0.001 &&
            last_t - first_t < real'(n_issue - steps0 - 1) * 1.2115 + 0.001,
            $sformatf("%0d steps in %0f ns", n_issue - steps0, last_t - first_t));
      for (int j = 0; j < 16; j++) begin
        real ex;
        ex = real'(a[j]) * real'(wv) / real'(1 << (mb - 1));
        check(real'(lane_get(last_out, 3, j)) <= ex + 1e-9 &&
              ex - real'(lane_get(last_out, 3, j)) < 3.0,
              $sformatf("3-bit product lane %0d got %0d exp %0f", j, lane_get(last_out, 3, j), ex));
      end
    end
    check(5000.0 / 1211.0 > 4.12 && 5000.0 / 1211.0 < 4.14, "4.13x over design-time clock");

    // ---------------- C: 24-bit multiplication by 0x4001 (split shift)
    begin
      longint r0, r1;
      int s0;
      r0 = 100; r1 = -77;
      word = '0;
      word = lane_put(word, 24, 0, r0 << 15);
      word = lane_put(word, 24, 1, r1 << 15);
      load(3, word);
      s0 = n_issue;
      send(mk_mul(SRC_R3, 16'h4001, 16, M24, 1, 0));
      wait_idle();
      check(n_issue - s0 == 4, $sformatf("steps for 0x4001: %0d", n_issue - s0));
      check(lane_get(last_out, 24, 0) == r0 * 16385 && lane_get(last_out, 24, 1) == r1 * 16385,
            "24-bit product");
      check(gen_ps == 3068, "24-bit clock period");
    end

    check(!conv_err, "no conversion error");
    check(n_badclk == 0, "every operation issued at its own clock period");
    check(n_up > 0,      "switch to a wider mode");
    check(n_down > 0,    "switch to a narrower mode");
    check(freq_switches >= 32'(n_up + n_down), "clock switch counter");
    check(raw_stalls > 0, "read-after-write stall");
    check(n_fb > 0,      "feedback operand");
    check(n_sub > 0,     "CSD subtraction step");
    check(n_skip > 0,    "zero-skipping shift");
    check(n_split > 0,   "split shift");
    check(n_widen > 0,   "DPU widening");
    check(n_narrow2 > 0, "DPU narrowing across two words");
    $display("mechanisms: up=%0d down=%0d clk_switches=%0d raw=%0d fb=%0d sub=%0d skip=%0d split=%0d widen=%0d narrow2=%0d issues=%0d",
             n_up, n_down, freq_switches, raw_stalls, n_fb, n_sub, n_skip, n_split, n_widen, n_narrow2, n_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
