// mul_sequencer -- iterative shift-add multiplication of a subword vector by
// a scalar.
//
// Multiplies every subword of a register by the same scalar multiplier w,
// read as a fixed-point number with one integer bit (Q1.(mbits-1), range
// [-1,1)), by issuing a series of AU micro-operations. The multiplier is
// first recoded into canonical signed digits (csd_encoder). Digits are then
// consumed from the least significant end, Horner style:
//   first non-zero digit d_i:       acc = 0 +/- A
//   next non-zero digit d_j, j > i: acc = (acc >>> (j-i)) +/- A
//   after the last digit d_k:       acc = acc >>> (mbits-1-k)
// so zero digits cost nothing (several positions are skipped in one shift),
// and the result, acc = A * w / 2^(mbits-1), keeps A's format with the LSBs
// truncated. acc is the AU result register (operand SRC_FB). A shift longer
// than the AU's maximum of 7 is split into extra 'acc >>> 7' steps. w = 0
// produces one 'acc = 0 + 0' step. The last step carries the write-back to
// register 'dst' when wb is set (DPU in pass-through, same mode).
//
// Handshake: start is taken when busy is low (w, mbits, mode, src, wb, dst
// are captured then). While busy, uop_valid is high and each cycle with
// uop_ready high consumes one micro-operation; done pulses for one cycle
// right after the last one is consumed. One micro-operation per cycle at most. 'src' must name a register,
// not SRC_FB or SRC_ZERO, and w must be representable in mbits bits.
// The step order and the splitting of long shifts are this design's choices;
// the CSD recoding and zero skipping follow the described multiplication.
module mul_sequencer
  import softsimd_pkg::*;
#(
  parameter int unsigned W = softsimd_pkg::MULW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [W-1:0]         w,
  input  logic [4:0]           mbits,
  input  mode_e                mode,
  input  src_e                 src,
  input  logic                 wb,
  input  logic [1:0]           dst,
  output logic                 busy,
  output logic                 uop_valid,
  output uop_t                 uop,
  input  logic                 uop_ready,
  output logic                 done
);

  localparam int unsigned PW = $clog2(W) + 1;

  logic [W-1:0]  pos_d, neg_d;      // recoded multiplier (combinational)
  logic [W-1:0]  pos_q, neg_q;      // digits still to consume
  logic [PW-1:0] prev_q;            // scale position of acc
  logic          first_q;
  logic [4:0]    mb_q;
  mode_e         mode_q;
  src_e          src_q;
  logic          wb_q;
  logic [1:0]    dst_q;

  csd_encoder #(.W(W)) u_csd (.b(w), .pos(pos_d), .neg(neg_d));

  // next step, computed from the state
  logic [W-1:0]  nz, nz_rest;
  logic          has;
  logic [PW-1:0] n;                 // lowest remaining non-zero digit
  logic [PW-1:0] gap, top;
  logic          last, consume;
  logic [PW-1:0] prev_n;

  always_comb begin
    nz  = pos_q | neg_q;
    has = |nz;
    n   = '0;
    for (int i = int'(W) - 1; i >= 0; i--)
      if (nz[i]) n = PW'(i);
    nz_rest = nz & ~(W'(1) << n);
    top     = PW'(mb_q) - PW'(1);

    uop          = '0;
    uop.mode     = mode_q;
    uop.dmode    = mode_q;
    uop.dst      = dst_q;
    uop.xsel     = SRC_FB;
    uop.ysel     = SRC_ZERO;
    uop.op       = OP_ADD;
    last         = 1'b0;
    consume      = 1'b0;
    prev_n       = prev_q;
    gap          = '0;

    if (first_q) begin
      uop.xsel = SRC_ZERO;
      if (has) begin
        uop.ysel = src_q;
        uop.op   = neg_q[n[PW-2:0]] ? OP_SUB : OP_ADD;
        consume  = 1'b1;
        prev_n   = n;
        last     = (nz_rest == '0) && (n >= top);
      end else begin
        last     = 1'b1;                          // w == 0
      end
    end else if (has) begin
      gap = n - prev_q;
      if (gap > PW'(7)) begin
        uop.shamt = 3'd7;
        prev_n    = prev_q + PW'(7);
      end else begin
        uop.shamt = gap[2:0];
        uop.ysel  = src_q;
        uop.op    = neg_q[n[PW-2:0]] ? OP_SUB : OP_ADD;
        consume   = 1'b1;
        prev_n    = n;
        last      = (nz_rest == '0) && (n >= top);
      end
    end else begin
      gap = (top > prev_q) ? top - prev_q : '0;
      if (gap > PW'(7)) begin
        uop.shamt = 3'd7;
        prev_n    = prev_q + PW'(7);
      end else begin
        uop.shamt = gap[2:0];
        last      = 1'b1;
      end
    end
    uop.wb = last && wb_q;
  end

  assign uop_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      pos_q   <= '0;
      neg_q   <= '0;
      prev_q  <= '0;
      first_q <= 1'b0;
      mb_q    <= 5'd1;
      mode_q  <= M3;
      src_q   <= SRC_R0;
      wb_q    <= 1'b0;
      dst_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          pos_q   <= pos_d;
          neg_q   <= neg_d;
          prev_q  <= '0;
          first_q <= 1'b1;
          mb_q    <= mbits;
          mode_q  <= mode;
          src_q   <= src;
          wb_q    <= wb;
          dst_q   <= dst;
        end
      end else if (uop_ready) begin
        first_q <= 1'b0;
        prev_q  <= prev_n;
        if (consume) begin
          pos_q <= pos_q & ~(W'(1) << n);
          neg_q <= neg_q & ~(W'(1) << n);
        end
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the multiplicand must be a register, the feedback register is the accumulator
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy) |-> (src <= SRC_R3))
    else $error("mul_sequencer: multiplicand must be R0..R3");

endmodule
