// tb_mul_sequencer -- self-checking test of the shift-add multiplication
// sequencer.
// The emitted micro-operations are executed on a lane-wise integer model of
// the AU. For random multiplicands (information in w-1 bits), multipliers and
// multiplier widths it checks: the product of every lane is A*w/2^(mbits-1)
// truncated by at most one LSB per shift step, the number of steps equals the
// number of non-zero CSD digits (computed here by the integer NAF method) plus
// the splits of shifts over 7, only the last step writes back, and with
// uop_ready held high one step issues per cycle.
module tb_mul_sequencer;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start, wb, busy, uop_valid, uop_ready, done;
  logic [15:0] w;
  logic [4:0]  mbits;
  mode_e       mode;
  src_e        src;
  logic [1:0]  dst;
  uop_t        uop;
  int checks = 0, failures = 0;

  mul_sequencer dut (.clk, .rst_n, .start, .w, .mbits, .mode, .src, .wb, .dst,
                     .busy, .uop_valid, .uop, .uop_ready, .done);

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // expected number of steps from the non-adjacent form of v
  function automatic int exp_steps(longint v, int mb);
    int p [$];
    int n, i;
    i = 0;
    while (v != 0) begin
      if (v % 2 != 0) begin
        longint d;
        d = ((v % 4 + 4) % 4 == 1) ? 1 : -1;
        p.push_back(i);
        v -= d;
      end
      v = v / 2;
      i++;
    end
    if (p.size() == 0) return 1;
    n = 1;
    for (int q = 1; q < p.size(); q++) n += (p[q] - p[q-1] + 6) / 7;
    if (mb - 1 > p[p.size()-1]) n += (mb - 1 - p[p.size()-1] + 6) / 7;
    return n;
  endfunction

  initial begin
    start = 0; w = 0; mbits = 8; mode = M8; src = SRC_R0; wb = 1; dst = 0; uop_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int unsigned m, wl, steps, cycles, shifts, mb;
      longint wv;
      logic [47:0] a, acc;
      bit ready_rand;
      m  = $urandom_range(0, 6);
      wl = width_of(m);
      mb = $urandom_range(2, 16);
      wv = longint'($urandom_range(0, (1 << mb) - 1)) - (longint'(1) << (mb - 1));
      if (n % 10 == 0) wv = 0;
      if (n % 10 == 1) wv = (longint'(1) << (mb - 1)) - 1;
      if (n % 10 == 2) wv = -(longint'(1) << (mb - 1));
      a = '0;
      for (int i = 0; i < 48 / int'(wl); i++) a = lane_put(a, wl, i, rand_narrow(wl));
      ready_rand = (n % 3 == 0);
      @(negedge clk);
      start = 1; w = 16'(wv); mbits = 5'(mb); mode = mode_e'(m);
      src = src_e'($urandom_range(0, 3)); dst = 2'($urandom); wb = 1'($urandom);
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      acc = 48'h5a5a_5a5a_5a5a;   // must not matter: first step starts from zero
      steps = 0; cycles = 0; shifts = 0;
      while (busy) begin
        uop_ready = ready_rand ? 1'($urandom) : 1'b1;
        #1;
        if (uop_valid && uop_ready) begin
          logic [47:0] xv, yv, nx;
          bit is_last;
          uop_t u;
          is_last = 0;
          u = uop;
          xv = (uop.xsel == SRC_FB) ? acc : (uop.xsel <= SRC_R3) ? a : '0;
          yv = (uop.ysel == SRC_FB) ? acc : (uop.ysel <= SRC_R3) ? a : '0;
          if (uop.xsel <= SRC_R3) check(uop.xsel == src, "x source");
          if (uop.ysel <= SRC_R3) check(uop.ysel == src, "y source");
          check(uop.mode == mode_e'(m) && uop.dmode == mode_e'(m), "mode");
          nx = '0;
          for (int i = 0; i < 48 / int'(wl); i++) begin
            longint e;
            e = asr(lane_get(xv, wl, i), uop.shamt);
            e = (uop.op == OP_SUB) ? e - lane_get(yv, wl, i) : e + lane_get(yv, wl, i);
            nx = lane_put(nx, wl, i, e);
          end
          acc = nx;
          if (uop.shamt != 0) shifts++;
          steps++;
          @(posedge clk);
          #1;
          is_last = !busy;
          if (u.wb) check(is_last && wb, "write-back only on the last step");
          if (is_last) begin
            check(done, "done pulse");
            check(u.wb == wb && (!wb || u.dst == dst), "last step write-back");
          end
        end else begin
          @(posedge clk);
        end
        cycles++;
        @(negedge clk);
      end
      check(steps == exp_steps(wv, mb), $sformatf("steps %0d exp %0d (w=%0d mb=%0d)",
                                                  steps, exp_steps(wv, mb), wv, mb));
      if (!ready_rand) check(cycles == steps, "one step per cycle");
      for (int i = 0; i < 48 / int'(wl); i++) begin
        real ex, got;
        ex  = real'(lane_get(a, wl, i)) * real'(wv) / real'(longint'(1) << (mb - 1));
        got = real'(lane_get(acc, wl, i));
        check(got <= ex + 1e-9 && ex - got < real'(shifts) + 1e-9,
              $sformatf("lane %0d w=%0d a=%0d m=%0d mb=%0d got %0f exp %0f",
                        i, wl, lane_get(a, wl, i), wv, mb, got, ex));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
