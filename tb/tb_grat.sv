// tb_grat: random writes to the alias table and reads on both ports, compared
// with a reference array; reset contents are checked first.
module tb_grat;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [5:0] wreg, ra, rb;
  logic [8:0] widx, ia, ib;
  logic [8:0] ref_tab [64];
  int checks = 0, failures = 0;

  grat dut (.clk, .rst_n, .we, .wreg, .widx, .rreg_a(ra), .ridx_a(ia), .rreg_b(rb), .ridx_b(ib));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wreg = 0; widx = 0; ra = 0; rb = 0;
    foreach (ref_tab[i]) ref_tab[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      ra = 6'(i); #1; checks++;
      if (ia != 0) begin failures++; $display("reset entry %0d = %0d", i, ia); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0; wreg = 6'($urandom); widx = 9'($urandom);
      ra = 6'($urandom); rb = 6'($urandom);
      #1;
      checks += 2;
      if (ia != ref_tab[ra]) begin failures++; $display("port a reg %0d: %0d vs %0d", ra, ia, ref_tab[ra]); end
      if (ib != ref_tab[rb]) begin failures++; $display("port b reg %0d: %0d vs %0d", rb, ib, ref_tab[rb]); end
      @(posedge clk);
      if (we) ref_tab[wreg] = widx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
