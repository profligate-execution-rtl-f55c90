// tb_load_resolve: all 32 combinations of the lookup results against the load
// decision order (STQ forward, L1 hit, wait for GSQ, GSQ match poisons, L2).
module tb_load_resolve;
  logic stq_hit, stq_dv, l1_hit, gdone, gmatch;
  logic [2:0] act;
  int checks = 0, failures = 0;

  load_resolve dut (.stq_hit, .stq_data_avail(stq_dv), .l1_hit, .gsq_done(gdone),
                    .gsq_match(gmatch), .src_action(act));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [2:0] exp;
      {stq_hit, stq_dv, l1_hit, gdone, gmatch} = 5'(v);
      #1;
      // expected: written as independent cases
      if (v[4] & v[3])      exp = 3'd0;
      else if (v[2])        exp = 3'd1;
      else if (v[1] && v[0]) exp = 3'd2;
      else if (v[1])        exp = 3'd3;
      else                  exp = 3'd4;
      checks++;
      if (act !== exp) begin
        failures++;
        $display("combination %05b: got %0d expected %0d", v[4:0], act, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
