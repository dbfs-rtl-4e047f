// tb_au_adder -- self-checking test of the Soft SIMD carry-ripple adder.
// Random operands (full-range and guardbit-respecting), every mode, add and
// subtract; each lane must equal the integer sum/difference modulo 2^w, and
// for guardbit-respecting operands it must equal the exact result.
module tb_au_adder;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;

  logic [47:0] a, b, s, mask;
  logic        sub;
  int checks = 0, failures = 0;

  au_adder dut (.a, .b, .mask, .sub, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int unsigned m, w;
      bit narrow;
      m      = $urandom_range(0, 6);
      w      = width_of(m);
      sub    = 1'($urandom);
      narrow = n[0];
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (narrow)
        for (int i = 0; i < 48 / int'(w); i++) begin
          a = lane_put(a, w, i, rand_narrow(w));
          b = lane_put(b, w, i, rand_narrow(w));
        end
      mask = mode_mask(mode_e'(m));
      #1;
      for (int i = 0; i < 48 / int'(w); i++) begin
        longint ex, got;
        ex  = sub ? lane_get(a, w, i) - lane_get(b, w, i)
                  : lane_get(a, w, i) + lane_get(b, w, i);
        got = lane_get(s, w, i);
        checks++;
        if (got != wrap(ex, w) || (narrow && got != ex)) begin
          failures++;
          if (failures < 10)
            $display("FAIL w=%0d sub=%0d lane %0d: %0d,%0d got %0d exp %0d",
                     w, sub, i, lane_get(a, w, i), lane_get(b, w, i), got, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
