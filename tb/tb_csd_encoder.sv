// tb_csd_encoder -- exhaustive test of the CSD recoder for all 16-bit values.
// Checks: digit value sum equals the input, no digit is both +1 and -1, no
// two adjacent non-zero digits, and the highest non-zero digit of a value that
// fits in m bits lies at position m-1 or below.
module tb_csd_encoder;
  logic [15:0] b, pos, neg;
  int checks = 0, failures = 0;
  longint total_nz = 0;

  csd_encoder dut (.b, .pos, .neg);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      longint sum;
      int top, m;
      b = 16'(v);
      #1;
      sum = 0;
      top = -1;
      for (int i = 0; i < 16; i++) begin
        if (pos[i]) sum += longint'(1) << i;
        if (neg[i]) sum -= longint'(1) << i;
        if (pos[i] | neg[i]) begin
          top = i;
          total_nz++;
        end
      end
      // smallest two's complement width holding v
      m = 1;
      while (!(v >= -(1 << (m - 1)) && v < (1 << (m - 1)))) m++;
      checks++;
      if (sum != v || (pos & neg) != '0 || ((pos | neg) & ((pos | neg) >> 1)) != '0 ||
          top > m - 1) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d pos=%b neg=%b", v, pos, neg);
      end
    end
    // CSD averages about W/3 non-zero digits
    checks++;
    if (total_nz > 65536 * 16 / 3 + 65536) failures++;
    $display("average non-zero digits: %0.2f", real'(total_nz) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
