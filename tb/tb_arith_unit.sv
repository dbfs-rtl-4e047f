// tb_arith_unit -- self-checking test of the AU pipeline stage.
// Random micro-operations (random operand sources including the feedback
// register and zero, random shift, add/sub, mode) against a lane-wise integer
// model; the result must appear exactly one clock after issue, and the
// result register must hold its value on cycles without a valid operation.
module tb_arith_unit;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid;
  uop_t        in_uop, out_uop;
  logic [47:0] regs [NREGS];
  logic        out_valid;
  logic [47:0] res_q;
  int checks = 0, failures = 0;

  arith_unit dut (.clk, .rst_n, .in_valid, .in_uop, .regs, .out_valid, .out_uop, .res_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] pick(src_e s, logic [47:0] fb);
    if (s <= SRC_R3) return regs[s[1:0]];
    if (s == SRC_FB) return fb;
    return '0;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [47:0] model_fb, xv, yv, exp_w;
    in_valid = 0;
    in_uop   = '0;
    for (int r = 0; r < 4; r++) regs[r] = '0;
    model_fb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int unsigned m, w;
      @(negedge clk);
      m = $urandom_range(0, 6);
      w = width_of(m);
      for (int r = 0; r < 4; r++) begin
        regs[r] = '0;
        for (int i = 0; i < 48 / int'(w); i++) regs[r] = lane_put(regs[r], w, i, rand_narrow(w));
      end
      in_valid      = ($urandom_range(0, 3) != 0);
      in_uop        = '0;
      in_uop.xsel   = src_e'($urandom_range(0, 5));
      in_uop.ysel   = src_e'($urandom_range(0, 5));
      in_uop.shamt  = 3'($urandom);
      in_uop.op     = aluop_e'($urandom_range(0, 1));
      in_uop.mode   = mode_e'(m);
      in_uop.dst    = 2'($urandom);
      // the feedback value may be in another mode: reinterpret it in this one
      xv = pick(in_uop.xsel, model_fb);
      yv = pick(in_uop.ysel, model_fb);
      exp_w = '0;
      for (int i = 0; i < 48 / int'(w); i++) begin
        longint e;
        e = asr(lane_get(xv, w, i), in_uop.shamt);
        e = (in_uop.op == OP_SUB) ? e - lane_get(yv, w, i) : e + lane_get(yv, w, i);
        exp_w = lane_put(exp_w, w, i, e);
      end
      @(posedge clk);
      #1;
      check(out_valid == in_valid, "out_valid");
      if (in_valid) begin
        check(res_q == exp_w, $sformatf("res w=%0d got %h exp %h", w, res_q, exp_w));
        check(out_uop == in_uop, "uop carried");
        model_fb = exp_w;
      end else begin
        check(res_q == model_fb, "result held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
