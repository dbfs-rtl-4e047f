// softsimd_pkg -- types and constants shared by the Soft SIMD / DBFS pipeline.
//
// A 48-bit datapath word is split at run time into equal subwords of one of
// seven widths (3, 4, 6, 8, 12, 16 or 24 bits). The most significant bit of
// every subword is its guardbit position: the adder forces it to a fixed value
// so carries never cross into the next subword, and the shifter copies the sign
// there instead of shifting in bits of the neighbour. The subword layout is
// carried through the datapath as a 48-bit mask with a 1 at every subword MSB.
//
// The widths, the 48-bit datapath and the 0..7 shift range follow the design
// described in the text; the encodings (mode codes, operand selects, micro-op
// layout) are this implementation's own.
package softsimd_pkg;

  localparam int unsigned DATA_W = 48;  // datapath width
  localparam int unsigned SHW    = 3;   // shift amount width (0..7)
  localparam int unsigned NMODES = 7;
  localparam int unsigned NREGS  = 4;   // feedback registers
  localparam int unsigned MULW   = 16;  // scalar multiplier width (max operand size)

  // Soft SIMD mode = subword width
  typedef enum logic [2:0] {
    M3  = 3'd0,
    M4  = 3'd1,
    M6  = 3'd2,
    M8  = 3'd3,
    M12 = 3'd4,
    M16 = 3'd5,
    M24 = 3'd6
  } mode_e;

  // AU operand sources
  typedef enum logic [2:0] {
    SRC_R0   = 3'd0,
    SRC_R1   = 3'd1,
    SRC_R2   = 3'd2,
    SRC_R3   = 3'd3,
    SRC_FB   = 3'd4,   // AU result register (feedback loop)
    SRC_ZERO = 3'd5
  } src_e;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } aluop_e;

  // One pipeline micro-operation.
  //   stage 1 (AU):  res = (x >>> shamt) +/- y   in subword mode 'mode'
  //   stage 2 (DPU): if wb, R[dst] <= repack({hi, res}) from 'mode' to 'dmode'
  typedef struct packed {
    src_e             xsel;    // shifted operand
    logic [SHW-1:0]   shamt;   // 0..7
    src_e             ysel;    // added / subtracted operand
    aluop_e           op;
    mode_e            mode;    // AU subword mode
    logic             wb;      // write the DPU result back to a register
    logic [1:0]       dst;     // destination register
    mode_e            dmode;   // DPU output subword mode
    logic [1:0]       hisel;   // register used as the upper input word of the DPU
    logic [4:0]       offset;  // first source subword taken by the DPU (0..31)
    logic             msb_align; // DPU: 1 = keep MSBs (fractional), 0 = keep LSBs (integer)
  } uop_t;

  // Command accepted by the pipeline: one micro-operation, or a whole
  // scalar x vector multiplication expanded by the multiplication sequencer.
  typedef enum logic {
    CMD_UOP = 1'b0,
    CMD_MUL = 1'b1
  } cmd_kind_e;

  typedef struct packed {
    cmd_kind_e        kind;
    uop_t             uop;     // CMD_UOP
    logic [MULW-1:0]  w;       // CMD_MUL: scalar multiplier, Q1.(mbits-1)
    logic [4:0]       mbits;   // CMD_MUL: multiplier width, 2..16
    mode_e            mmode;   // CMD_MUL: subword mode
    src_e             msrc;    // CMD_MUL: multiplicand register
    logic             mwb;     // CMD_MUL: write the product back
    logic [1:0]       mdst;    // CMD_MUL: destination register
  } cmd_t;

  function automatic int unsigned mode_width(mode_e m);
    case (m)
      M3:      return 3;
      M4:      return 4;
      M6:      return 6;
      M8:      return 8;
      M12:     return 12;
      M16:     return 16;
      default: return 24;
    endcase
  endfunction

  function automatic int unsigned mode_lanes(mode_e m);
    return DATA_W / mode_width(m);
  endfunction

  // 1 at the MSB (guardbit position) of every subword.
  function automatic logic [DATA_W-1:0] mode_mask(mode_e m);
    logic [DATA_W-1:0] mk;
    int unsigned w;
    w  = mode_width(m);
    mk = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      if ((i % w) == w - 1) mk[i] = 1'b1;
    return mk;
  endfunction

  // True for the conversions the DPU supports: same width or adjacent widths.
  function automatic logic conv_ok(mode_e s, mode_e d);
    int sd;
    sd = int'(s) - int'(d);
    return (s <= M24) && (d <= M24) && (sd >= -1) && (sd <= 1);
  endfunction

endpackage
