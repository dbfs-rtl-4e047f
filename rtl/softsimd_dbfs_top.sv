// softsimd_dbfs_top -- two-stage Soft SIMD pipeline with Dynamic
// Bitwidth-Frequency Scaling.
//
// Datapath: a 48-bit word holds equal signed subwords of 3, 4, 6, 8, 12, 16 or
// 24 bits. Stage 1, the Arithmetic Unit (arith_unit), computes
// (X >>> k) +/- Y on all subwords at once; stage 2, the Data Pack Unit
// (data_pack_unit), repacks the result to the same or an adjacent subword
// width and writes it into one of four feedback registers (reg_file). The
// AU result register also feeds back into the AU, so iterative shift-add
// multiplication runs at one step per cycle.
//
// Control: commands arrive on a valid/ready port. CMD_UOP issues one
// micro-operation; CMD_MUL hands a scalar x vector multiplication to the
// multiplication sequencer (CSD recoded, zero digits skipped), which then
// issues its steps. Before a step enters the AU, the DBFS controller checks
// that the clock is set for the step's subword width; if not, issue stops
// until the external clock generator has switched to the period for that
// width (clk_req / clk_period_ps / clk_ack). Issue also stops for one cycle
// when a step reads a register that the step ahead of it in the DPU stage is
// about to write (read-after-write interlock); a result needed immediately
// is read from the AU result register instead (SRC_FB), which needs no wait.
//
// Timing: a micro-operation issued in cycle t is in the AU in cycle t, in the
// DPU in cycle t+1, and its write-back lands in the register file and on
// out_valid/out_data at the edge ending cycle t+1. load (ld_*) writes a
// register directly; the caller keeps it away from registers the pipeline is
// using. The command encoding, the interlock and the clock handshake are this
// implementation's choices; the stages, their functions and the DBFS policy
// follow the described design.
module softsimd_dbfs_top
  import softsimd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // commands
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  cmd_t          cmd,
  // direct register load
  input  logic          ld_en,
  input  logic [1:0]    ld_addr,
  input  logic [DATA_W-1:0] ld_data,
  // results written back by the DPU
  output logic          out_valid,
  output logic [1:0]    out_dst,
  output logic [DATA_W-1:0] out_data,
  // programmable clock generator
  output logic          clk_req,
  output logic [15:0]   clk_period_ps,
  input  logic          clk_ack,
  // status
  output logic          busy,
  output logic          mul_done,
  output logic          conv_err,
  output mode_e         clk_mode,
  output logic [31:0]   freq_switches,
  output logic [31:0]   raw_stalls
);

  logic [DATA_W-1:0] regs [NREGS];

  // ---------------------------------------------------------------- issue
  logic  seq_busy, seq_valid, seq_ready, seq_done, seq_start;
  uop_t  seq_uop;
  logic  cand_valid, issue, raw_hazard, clk_ok, clk_set;
  uop_t  cand;

  logic  s1_valid;
  uop_t  s1_uop;
  logic [DATA_W-1:0] s1_res;

  mul_sequencer u_seq (
    .clk, .rst_n,
    .start     (seq_start),
    .w         (cmd.w),
    .mbits     (cmd.mbits),
    .mode      (cmd.mmode),
    .src       (cmd.msrc),
    .wb        (cmd.mwb),
    .dst       (cmd.mdst),
    .busy      (seq_busy),
    .uop_valid (seq_valid),
    .uop       (seq_uop),
    .uop_ready (seq_ready),
    .done      (seq_done)
  );

  function automatic logic reads_reg(src_e s, logic [1:0] r);
    return (s <= SRC_R3) && (s[1:0] == r);
  endfunction

  always_comb begin
    if (seq_busy) begin
      cand_valid = seq_valid;
      cand       = seq_uop;
    end else begin
      cand_valid = cmd_valid && (cmd.kind == CMD_UOP);
      cand       = cmd.uop;
    end
    raw_hazard = s1_valid && s1_uop.wb &&
                 (reads_reg(cand.xsel, s1_uop.dst) || reads_reg(cand.ysel, s1_uop.dst));
  end

  dbfs_clock_ctrl u_dbfs (
    .clk, .rst_n,
    .nxt_valid     (cand_valid),
    .nxt_mode      (cand.mode),
    .issue_ok      (clk_ok),
    .clk_req       (clk_req),
    .clk_period_ps (clk_period_ps),
    .clk_ack       (clk_ack),
    .cur_mode      (clk_mode),
    .cur_set       (clk_set),
    .switches      (freq_switches)
  );

  assign issue     = cand_valid && clk_ok && !raw_hazard;
  assign seq_ready = seq_busy && issue;
  assign seq_start = cmd_valid && !seq_busy && (cmd.kind == CMD_MUL);
  assign cmd_ready = !seq_busy && ((cmd.kind == CMD_MUL) || issue);

  // ---------------------------------------------------------------- stage 1
  arith_unit u_au (
    .clk, .rst_n,
    .in_valid  (issue),
    .in_uop    (cand),
    .regs      (regs),
    .out_valid (s1_valid),
    .out_uop   (s1_uop),
    .res_q     (s1_res)
  );

  // ---------------------------------------------------------------- stage 2
  logic [DATA_W-1:0] dpu_y;
  logic          dpu_err;
  logic [DATA_W-1:0] hi_word;

  assign hi_word = regs[s1_uop.hisel];

  data_pack_unit u_dpu (
    .lo        (s1_res),
    .hi        (hi_word),
    .smode     (s1_uop.mode),
    .dmode     (s1_uop.dmode),
    .offset    (s1_uop.offset),
    .msb_align (s1_uop.msb_align),
    .y         (dpu_y),
    .err       (dpu_err)
  );

  logic wr;
  assign wr = s1_valid && s1_uop.wb;

  reg_file u_rf (
    .clk, .rst_n,
    .we      (wr),
    .waddr   (s1_uop.dst),
    .wdata   (dpu_y),
    .ld_en   (ld_en),
    .ld_addr (ld_addr),
    .ld_data (ld_data),
    .rdata   (regs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_dst    <= '0;
      out_data   <= '0;
      conv_err   <= 1'b0;
      raw_stalls <= '0;
    end else begin
      out_valid <= wr;
      if (wr) begin
        out_dst  <= s1_uop.dst;
        out_data <= dpu_y;
      end
      conv_err <= wr && dpu_err;
      if (cand_valid && clk_ok && raw_hazard) raw_stalls <= raw_stalls + 1;
    end
  end

  // command handshake: a command is held, unchanged, until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cmd_valid && !cmd_ready) |=> (cmd_valid && $stable(cmd)))
    else $error("softsimd_dbfs_top: command withdrawn or changed before acceptance");

  // no micro-operation enters the AU under a clock set for another width
  assert property (@(posedge clk) disable iff (!rst_n)
                   issue |-> (clk_set && clk_mode == cand.mode))
    else $error("softsimd_dbfs_top: issue under a foreign clock");

  assign mul_done = seq_done;
  assign busy = seq_busy || s1_valid || clk_req;

endmodule
