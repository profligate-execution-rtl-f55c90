// tb_garf: random writes and reads on all four read ports against a reference
// array, after checking the reset contents.
module tb_garf;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [5:0] wreg;
  logic [63:0] wdata;
  logic [3:0][5:0] rreg;
  logic [3:0][63:0] rdata;
  logic [63:0] ref_rf [64];
  int checks = 0, failures = 0;

  garf dut (.clk, .rst_n, .we, .wreg, .wdata, .rreg, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wreg = 0; wdata = 0; rreg = '0;
    foreach (ref_rf[i]) ref_rf[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      rreg[i%4] = 6'(i); #1; checks++;
      if (rdata[i%4] != 0) begin failures++; $display("reset reg %0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wreg = 6'($urandom); wdata = {$urandom, $urandom};
      for (int p = 0; p < 4; p++) rreg[p] = 6'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] != ref_rf[rreg[p]]) begin failures++; $display("port %0d reg %0d", p, rreg[p]); end
      end
      @(posedge clk);
      if (we) ref_rf[wreg] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
