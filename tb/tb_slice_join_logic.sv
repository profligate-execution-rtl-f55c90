// tb_slice_join_logic: exhaustive check of the nine source-state cases of the
// slice join rules against a table written out here row by row.
module tb_slice_join_logic;
  import pe_pkg::*;
  reg_state_e l, r, d;
  logic ex, rg, wg;
  int checks = 0, failures = 0;

  slice_join_logic dut (.left_i(l), .right_i(r), .dest_o(d), .execute_o(ex),
                        .read_grob_o(rg), .write_grob_o(wg));

  // rows: left, right, dest, execute, read GROB, write GROB
  typedef struct { reg_state_e l, r, d; bit ex, rg, wg; } row_t;
  row_t rows [9] = '{
    '{RS_INV, RS_INV, RS_INV, 0, 0, 0},
    '{RS_INV, RS_S,   RS_INV, 0, 0, 0},
    '{RS_INV, RS_O,   RS_INV, 0, 0, 0},
    '{RS_S,   RS_INV, RS_INV, 0, 0, 0},
    '{RS_S,   RS_S,   RS_S,   1, 0, 0},
    '{RS_S,   RS_O,   RS_O,   1, 0, 1},
    '{RS_O,   RS_INV, RS_O,   1, 1, 1},
    '{RS_O,   RS_S,   RS_O,   1, 0, 1},
    '{RS_O,   RS_O,   RS_O,   1, 0, 1}
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rows[i]) begin
      l = rows[i].l; r = rows[i].r;
      #1;
      checks += 4;
      if (d  != rows[i].d)  begin failures++; $display("row %0d dest %s", i, d.name()); end
      if (ex != rows[i].ex) begin failures++; $display("row %0d execute", i); end
      if (rg != rows[i].rg) begin failures++; $display("row %0d read", i); end
      if (wg != rows[i].wg) begin failures++; $display("row %0d write", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
