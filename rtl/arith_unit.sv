// arith_unit -- first pipeline stage (Arithmetic Unit, AU).
//
// Computes res = (X >>> shamt) +/- Y on all subwords in parallel, where X and
// Y are each taken from one of the four feedback registers, from the AU's own
// result register (the feedback loop used by iterative shift-add
// multiplication) or from zero. The shifter sits in front of the adder, as in
// the described AU: shifter delay + operand multiplexers + ripple adder form
// the stage's critical path, and only the adder part depends on the subword
// width.
//
// Timing: an operation presented with in_valid is computed in that cycle and
// appears in res_q / out_uop / out_valid after the next rising edge. res_q
// only changes on a valid operation, so it can be read back (SRC_FB) by the
// operation issued in the next cycle. Reset clears the result register.
module arith_unit
  import softsimd_pkg::*;
#(
  parameter int unsigned DW = softsimd_pkg::DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  uop_t          in_uop,
  input  logic [DW-1:0] regs [NREGS],
  output logic          out_valid,
  output uop_t          out_uop,
  output logic [DW-1:0] res_q
);

  logic [DW-1:0] xv, yv, xs, sum, mask;

  function automatic logic [DW-1:0] pick(src_e s, logic [DW-1:0] r [NREGS],
                                         logic [DW-1:0] fb);
    case (s)
      SRC_R0:  return r[0];
      SRC_R1:  return r[1];
      SRC_R2:  return r[2];
      SRC_R3:  return r[3];
      SRC_FB:  return fb;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    xv   = pick(in_uop.xsel, regs, res_q);
    yv   = pick(in_uop.ysel, regs, res_q);
    mask = mode_mask(in_uop.mode);
  end

  au_shifter #(.DW(DW), .SHW(SHW)) u_shift (
    .x(xv), .mask(mask), .shamt(in_uop.shamt), .y(xs)
  );

  au_adder #(.DW(DW)) u_add (
    .a(xs), .b(yv), .mask(mask), .sub(in_uop.op == OP_SUB), .s(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q     <= '0;
      out_valid <= 1'b0;
      out_uop   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        res_q   <= sum;
        out_uop <= in_uop;
      end
    end
  end

endmodule
