// tb_au_shifter -- self-checking test of the Soft SIMD arithmetic shifter.
// Random words, every mode and every shift amount 0..7; each lane is compared
// with an integer arithmetic shift of the lane value.
module tb_au_shifter;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;

  logic [47:0] x, y, mask;
  logic [2:0]  shamt;
  int checks = 0, failures = 0;

  au_shifter dut (.x, .mask, .shamt, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int unsigned m, w;
      m     = $urandom_range(0, 6);
      w     = width_of(m);
      x     = {$urandom, $urandom};
      shamt = 3'($urandom);
      mask  = mode_mask(mode_e'(m));
      #1;
      for (int i = 0; i < 48 / int'(w); i++) begin
        longint exp_v, got;
        exp_v = asr(lane_get(x, w, i), shamt);
        got   = lane_get(y, w, i);
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL w=%0d k=%0d lane %0d: x=%0d got %0d exp %0d",
                     w, shamt, i, lane_get(x, w, i), got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
