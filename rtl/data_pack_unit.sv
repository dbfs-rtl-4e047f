// data_pack_unit -- second pipeline stage (Data Pack Unit, DPU).
//
// Repacks subwords from the AU's mode to the same or an adjacent width
// (3<->4<->6<->8<->12<->16<->24), using multiplexers only. Widening is what
// an accumulation needs to stay free of overflow; narrowing brings results
// back to a smaller operand size.
//
// The source is the sequence of subwords of {hi, lo}: lo (the AU result)
// supplies subwords 0..L-1 and hi (a register) supplies L..2L-1, L being the
// number of source subwords per word. Output subword j takes source subword
// offset+j (zero when that is past the end). Because a widened set of values
// no longer fits one word, a set of L values is converted by two operations
// with different offsets; the two-word source lets a narrowing gather values
// from two words into one.
// Value conversion: msb_align=0 keeps the integer value (sign extension when
// widening, dropping MSBs when narrowing); msb_align=1 keeps the fixed-point
// fraction (zeros appended at the LSB end when widening, LSBs dropped when
// narrowing).
// A non-adjacent conversion is not supported: err is raised and y is zero.
//
// Combinational; the stage's register is the register file it writes. The
// two-word source, the offset and the alignment choice are this design's own;
// the supported set of conversions follows the described design.
module data_pack_unit
  import softsimd_pkg::*;
#(
  parameter int unsigned DW = softsimd_pkg::DATA_W
) (
  input  logic [DW-1:0] lo,
  input  logic [DW-1:0] hi,
  input  mode_e         smode,
  input  mode_e         dmode,
  input  logic [4:0]    offset,
  input  logic          msb_align,
  output logic [DW-1:0] y,
  output logic          err
);

  localparam int unsigned WIDTHS [NMODES] = '{3, 4, 6, 8, 12, 16, 24};

  // Convert a lane from width ws to width wd (both adjacent or equal).
  function automatic logic [23:0] conv(input logic [23:0] v, input int unsigned ws,
                                       input int unsigned wd, input logic msb);
    logic signed [23:0] sx;
    sx = $signed(v << (24 - ws)) >>> (24 - ws);   // sign-extended value
    if (wd >= ws) return msb ? (v << (wd - ws)) : 24'(sx);
    else          return msb ? 24'(sx >>> (ws - wd)) : v;
  endfunction

  // Source lanes, LSB-aligned raw bits: lo supplies lanes 0..L-1, hi L..2L-1.
  logic [2*DW-1:0] src;
  logic [23:0]     lane_s [NMODES][32];
  logic [23:0]     lane   [32];
  logic [DW-1:0]   y_d    [NMODES];

  assign src = {hi, lo};

  for (genvar s = 0; s < int'(NMODES); s++) begin : g_src
    for (genvar k = 0; k < 32; k++) begin : g_lane
      if (k < 2 * int'(DW / WIDTHS[s])) begin : g_used
        assign lane_s[s][k] = 24'(src[k*WIDTHS[s] +: WIDTHS[s]]);
      end else begin : g_unused
        assign lane_s[s][k] = '0;
      end
    end
  end

  assign lane = lane_s[smode];

  // one candidate output word per destination mode
  for (genvar d = 0; d < int'(NMODES); d++) begin : g_dst
    localparam int unsigned WD = WIDTHS[d];
    for (genvar j = 0; j < int'(DW / WD); j++) begin : g_out
      logic [5:0]  k;
      logic [23:0] v, r;
      always_comb begin
        k = 6'(offset) + 6'(j);
        v = (k < 6'd32) ? lane[k[4:0]] : '0;
        r = '0;
        if (d > 0 && int'(smode) == d - 1)              r = conv(v, WIDTHS[d > 0 ? d - 1 : 0], WD, msb_align);
        if (int'(smode) == d)                           r = conv(v, WD, WD, msb_align);
        if (d < int'(NMODES) - 1 && int'(smode) == d + 1) r = conv(v, WIDTHS[d < int'(NMODES) - 1 ? d + 1 : d], WD, msb_align);
      end
      assign y_d[d][j*WD +: WD] = r[WD-1:0];
    end
  end

  assign err = !conv_ok(smode, dmode);
  assign y   = err ? '0 : y_d[dmode];

endmodule
