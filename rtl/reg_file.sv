// reg_file -- the four feedback registers of the Soft SIMD pipeline.
//
// Four DW-bit registers hold operands and partial results close to the
// datapath (data reuse and localisation). All four are read in parallel by
// the AU operand multiplexers and by the DPU (its upper source word). They are
// written at the end of the DPU stage (port w*) or loaded from outside the
// pipeline (port ld*); when both address the same register in one cycle the
// pipeline write wins and the load is dropped. Reset clears all registers.
//
// The register count follows the described design; the two write ports and
// their priority are this implementation's choices.
module reg_file
  import softsimd_pkg::*;
#(
  parameter int unsigned DW = softsimd_pkg::DATA_W,
  parameter int unsigned NR = softsimd_pkg::NREGS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [$clog2(NR)-1:0] waddr,
  input  logic [DW-1:0]         wdata,
  input  logic                  ld_en,
  input  logic [$clog2(NR)-1:0] ld_addr,
  input  logic [DW-1:0]         ld_data,
  output logic [DW-1:0]         rdata [NR]
);

  logic [DW-1:0] r [NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NR); i++) r[i] <= '0;
    end else begin
      if (ld_en && !(we && waddr == ld_addr)) r[ld_addr] <= ld_data;
      if (we) r[waddr] <= wdata;
    end
  end

  assign rdata = r;

endmodule
