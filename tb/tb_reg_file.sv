// tb_reg_file -- self-checking test of the four feedback registers.
// Random pipeline writes and external loads against a model array, including
// same-register collisions (pipeline write must win) and reset clearing.
module tb_reg_file;
  logic        clk = 0, rst_n = 0;
  logic        we, ld_en;
  logic [1:0]  waddr, ld_addr;
  logic [47:0] wdata, ld_data;
  logic [47:0] rdata [4];
  logic [47:0] model [4];
  int checks = 0, failures = 0, collisions = 0;

  reg_file dut (.clk, .rst_n, .we, .waddr, .wdata, .ld_en, .ld_addr, .ld_data, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ld_en = 0; waddr = 0; ld_addr = 0; wdata = 0; ld_data = 0;
    #12 rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rdata[r] != '0) failures++;
      model[r] = '0;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we      = 1'($urandom);
      ld_en   = 1'($urandom);
      waddr   = 2'($urandom);
      ld_addr = 2'($urandom);
      wdata   = {$urandom, $urandom};
      ld_data = {$urandom, $urandom};
      if (we && ld_en && waddr == ld_addr) collisions++;
      if (ld_en) model[ld_addr] = ld_data;
      if (we)    model[waddr]   = wdata;
      @(posedge clk);
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rdata[r] != model[r]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d got %h exp %h", r, rdata[r], model[r]);
        end
      end
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
