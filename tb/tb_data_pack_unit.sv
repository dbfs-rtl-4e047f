// tb_data_pack_unit -- self-checking test of the DPU repacking network.
// For random source words and every (source, destination) mode pair, each
// output lane is compared with a value computed by integer arithmetic:
// LSB-aligned = the same integer (wrapped when narrowing), MSB-aligned =
// the value scaled by 2^(wd-ws) (floor when narrowing). Non-adjacent pairs
// must raise err.
module tb_data_pack_unit;
  import softsimd_pkg::*;
  import tb_lane_pkg::*;

  logic [47:0] lo, hi, y;
  mode_e       smode, dmode;
  logic [4:0]  offset;
  logic        msb_align, err;
  int checks = 0, failures = 0;

  data_pack_unit dut (.lo, .hi, .smode, .dmode, .offset, .msb_align, .y, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int unsigned s, d, ws, wd, ls, ld;
      bit adj;
      s  = $urandom_range(0, 6);
      d  = (n % 4 == 0) ? $urandom_range(0, 6)
                        : int'(s) + $urandom_range(0, 2) - 1;
      if (d > 6) d = s;
      ws = width_of(s);
      wd = width_of(d);
      ls = 48 / ws;
      ld = 48 / wd;
      adj = (int'(s) - int'(d) <= 1) && (int'(d) - int'(s) <= 1);
      lo = {$urandom, $urandom};
      hi = {$urandom, $urandom};
      smode = mode_e'(s);
      dmode = mode_e'(d);
      offset = 5'($urandom_range(0, 2 * ls - 1));
      msb_align = 1'($urandom);
      #1;
      checks++;
      if (err != !adj) begin
        failures++;
        $display("FAIL err %0d->%0d", ws, wd);
      end
      if (adj) begin
        for (int j = 0; j < int'(ld); j++) begin
          longint v, e, got;
          int unsigned k;
          k = offset + j;
          if (k >= 2 * ls)    v = 0;
          else if (k < ls)    v = lane_get(lo, ws, k);
          else                v = lane_get(hi, ws, k - ls);
          if (!msb_align)     e = wrap(v, wd);
          else if (wd >= ws)  e = v * (longint'(1) << (wd - ws));
          else                e = asr(v, ws - wd);
          got = lane_get(y, wd, j);
          checks++;
          if (got != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d->%0d off=%0d msb=%0d lane %0d: got %0d exp %0d",
                       ws, wd, offset, msb_align, j, got, e);
          end
        end
      end else begin
        checks++;
        if (y != '0) begin
          failures++;
          $display("FAIL nonzero output on unsupported conversion");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
