// tb_cnn_layers -- workload test: convolution layers of the CNNs the
// architecture targets (LeNet-5, VGG16, ResNet20 on 32x32 CIFAR-sized input),
// each with its own weight precision (heterogeneous quantisation).
//
// A layer is mapped as a convolution after im2col: each filter tap is a scalar
// weight, and six neighbouring output pixels sit in the six 8-bit lanes of a
// word, so one multiplication command advances six dot products. Activations
// are 8-bit with 7 bits of information; weights are Q1.(b-1) with b bits. The
// products are accumulated with growing width to stay free of overflow, as
// the pipeline's DPU is meant to be used:
//   taps  0..1  : 8-bit accumulator (R1)
//   taps  2..31 : product widened 8->12 (two words), added in 12-bit mode
//   after tap 31 (or the last tap): accumulator widened 12->16
//   taps 32..   : each product widened 8->12->16 and added in 16-bit mode
// Finally the sums are requantised to 8 bits (16->12->8, dropping 8 LSBs).
// 16-bit sums of products below 64 in magnitude are safe up to 512 taps;
// every layer here has at least 2 taps.
// Every lane is compared with an integer model of the same arithmetic at each
// width stage. Each layer also reports the time spent with DBFS against the
// same cycle count at the 200 MHz design-time clock and requires a gain.
// One output channel and six output pixels are simulated per layer.
module tb_cnn_layers;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NPIX   = 6;    // output pixels per word (8-bit lanes)
  localparam int NLAYER = 4;
  // layer shapes (kernel x kernel x input channels) and weight bits
  localparam string LNAME [NLAYER] = '{"LeNet-5 conv1 5x5x3", "LeNet-5 conv2 5x5x6",
                                       "VGG16 conv1_1 3x3x3", "ResNet20 stage-1 conv 3x3x16"};
  localparam int KS  [NLAYER] = '{5, 5, 3, 3};
  localparam int CIN [NLAYER] = '{3, 6, 3, 16};
  localparam int WB  [NLAYER] = '{4, 3, 6, 5};

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
    repeat (400000) @(posedge clk);
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

  int      cycles = 0;
  realtime t_start, t_end;
  always @(posedge clk) if (rst_n) cycles++;

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

  function automatic cmd_t uop(src_e x, src_e y, mode_e m, int dst, mode_e dm,
                               int hisel = 0, int off = 0, bit msb = 0);
    cmd_t c;
    c = '0;
    c.kind = CMD_UOP;
    c.uop.xsel = x; c.uop.ysel = y; c.uop.op = OP_ADD; c.uop.mode = m;
    c.uop.wb = 1; c.uop.dst = 2'(dst); c.uop.dmode = dm; c.uop.hisel = 2'(hisel);
    c.uop.offset = 5'(off); c.uop.msb_align = msb;
    return c;
  endfunction

  function automatic cmd_t mul(longint w, int mb);
    cmd_t c;
    c = '0;
    c.kind = CMD_MUL; c.w = 16'(w); c.mbits = 5'(mb); c.mmode = M8; c.msrc = SRC_R0;
    return c;
  endfunction

  // read a register through a pass-through write-back
  task automatic peek(int r, mode_e m, output logic [47:0] v);
    send(uop(src_e'(r), SRC_ZERO, m, r, m));
    wait_idle();
    v = last_out;
  endtask

  initial begin
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NLAYER; l++) run_layer(l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int l);
    longint img [16][5][5 + NPIX];
    longint wt  [400];
    longint act [400][NPIX];
    longint sum [NPIX];
    logic [47:0] word, r2, r3;
    int t, taps, mb, wend, sw0;

    mb   = WB[l];
    taps = KS[l] * KS[l] * CIN[l];
    wend = (taps < 32) ? taps - 1 : 31;
    // random image patch and filter
    foreach (img[c, y, x]) img[c][y][x] = longint'($urandom_range(0, 126)) - 63;
    for (int k = 0; k < taps; k++)
      wt[k] = longint'($urandom_range(0, (1 << mb) - 1)) - (longint'(1) << (mb - 1));
    t = 0;
    for (int c = 0; c < CIN[l]; c++)
      for (int ky = 0; ky < KS[l]; ky++)
        for (int kx = 0; kx < KS[l]; kx++) begin
          for (int p = 0; p < NPIX; p++) act[t][p] = img[c][ky][kx + p];   // im2col
          t++;
        end
    for (int p = 0; p < NPIX; p++) sum[p] = 0;

    wait_idle();
    t_start = $realtime;
    cycles  = 0;
    sw0     = int'(freq_switches);

    for (int k = 0; k < taps; k++) begin
      word = '0;
      for (int p = 0; p < NPIX; p++) begin
        word = lane_put(word, 8, p, act[k][p]);
        sum[p] += ref_mul(act[k][p], wt[k], mb);
      end
      load(0, word);
      send(mul(wt[k], mb));
      if (k == 0) begin
        send(uop(SRC_ZERO, SRC_FB, M8, 1, M8));                 // R1 = p
      end else if (k == 1) begin
        send(uop(SRC_R1, SRC_FB, M8, 1, M8));                   // R1 += p
        send(uop(SRC_R1, SRC_ZERO, M8, 2, M12, 0, 0));          // widen acc to 12 bits
        send(uop(SRC_R1, SRC_ZERO, M8, 3, M12, 0, 4));
      end else if (k < 32) begin
        send(uop(SRC_FB, SRC_ZERO, M8, 0, M12, 0, 4));          // product lanes 4..5
        send(uop(SRC_FB, SRC_ZERO, M8, 1, M12, 0, 0));          // product lanes 0..3
        send(uop(SRC_R2, SRC_R1, M12, 2, M12));
        send(uop(SRC_R3, SRC_R0, M12, 3, M12));
      end else begin
        send(uop(SRC_FB, SRC_ZERO, M8, 0, M12, 0, 0));          // lanes 0..3 (12)
        send(uop(SRC_FB, SRC_ZERO, M8, 1, M12, 0, 4));          // lanes 4..5 (12)
        send(uop(SRC_R0, SRC_ZERO, M12, 1, M16, 1, 3));         // lanes 3..5 (16)
        send(uop(SRC_R0, SRC_ZERO, M12, 0, M16, 1, 0));         // lanes 0..2 (16)
        send(uop(SRC_R2, SRC_R0, M16, 2, M16));
        send(uop(SRC_R3, SRC_R1, M16, 3, M16));
      end
      if (k == wend) begin
        peek(2, M12, r2);
        peek(3, M12, r3);
        for (int p = 0; p < NPIX; p++)
          check((p < 4 ? lane_get(r2, 12, p) : lane_get(r3, 12, p - 4)) == sum[p],
                $sformatf("%s: 12-bit partial sum lane %0d", LNAME[l], p));
        // widen the accumulator 12 -> 16: lanes 0..2 and 3..5 (gathered)
        send(uop(SRC_R2, SRC_ZERO, M12, 1, M16, 3, 3));
        send(uop(SRC_R2, SRC_ZERO, M12, 2, M16, 3, 0));
        send(uop(SRC_R1, SRC_ZERO, M16, 3, M16));
      end
    end
    peek(2, M16, r2);
    peek(3, M16, r3);
    for (int p = 0; p < NPIX; p++)
      check((p < 3 ? lane_get(r2, 16, p) : lane_get(r3, 16, p - 3)) == sum[p],
            $sformatf("%s: 16-bit sum lane %0d got %0d exp %0d", LNAME[l], p,
                      p < 3 ? lane_get(r2, 16, p) : lane_get(r3, 16, p - 3), sum[p]));
    // requantise: 16 -> 12 -> 8, keeping MSBs
    send(uop(SRC_R2, SRC_ZERO, M16, 0, M12, 3, 0, 1));
    send(uop(SRC_R2, SRC_ZERO, M16, 1, M12, 3, 4, 1));
    send(uop(SRC_R0, SRC_ZERO, M12, 2, M8, 1, 0, 1));
    wait_idle();
    t_end = $realtime;
    for (int p = 0; p < NPIX; p++)
      check(lane_get(last_out, 8, p) == asr(asr(sum[p], 4), 4),
            $sformatf("%s: requantised lane %0d got %0d exp %0d", LNAME[l], p,
                      lane_get(last_out, 8, p), asr(asr(sum[p], 4), 4)));
    check(!conv_err, "no conversion error");
    check(int'(freq_switches) - sw0 > 2, "clock follows the widths");
    $display("%s, %0d-bit weights, 6 pixels x %0d taps: %0d cycles, %0.1f ns with DBFS, %0.1f ns at 200 MHz (%0.2fx), %0d clock changes",
             LNAME[l], mb, taps, cycles, t_end - t_start, real'(cycles) * 5.0,
             real'(cycles) * 5.0 / (t_end - t_start), int'(freq_switches) - sw0);
    check(t_end - t_start < real'(cycles) * 5.0, "DBFS faster than the design-time clock");
  endtask
endmodule
