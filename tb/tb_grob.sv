// tb_grob: two cores on an 8-entry GROB with a 4-cycle read latency.
// Checks: tails and the slowest-tail head; reclaim into the GARF; a read of a
// written entry answers exactly LAT cycles after the request; a read of an
// entry not yet written blocks until the owner writes it; a read of an entry
// recycled by a newer instruction is served from the GARF; the full flag stops
// a core GROB-size entries ahead of the head; a restart pulls a core's tail
// back and drops the entries it wrote past the restart point.
module tb_grob;
  localparam int N = 2, E = 8, LAT = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] adv, wr, full, rd_req, rd_busy, rd_ack, fromg;
  logic [N-1:0][5:0] wreg, rd_reg;
  logic [N-1:0][63:0] wdata, rd_data;
  logic [N-1:0][3:0] tail, rd_ts;
  logic [3:0] head, realign_tail;
  logic [N-1:0] realign;
  logic [N-1:0][2:0] rd_idx;
  int checks = 0, failures = 0;

  grob #(.NPROC(N), .ENTRIES(E), .LAT(LAT)) dut (.clk, .rst_n, .adv, .wr, .wreg, .wdata,
    .tail, .full, .head, .realign, .realign_tail, .rd_req, .rd_idx, .rd_reg, .rd_ts, .rd_busy, .rd_ack,
    .rd_data, .rd_from_garf(fromg));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // one commit of a slice instruction by core p; w: owner writes reg/value
  task automatic commit(input int p, input bit w, input logic [5:0] r, input logic [63:0] v);
    @(negedge clk);
    adv = '0; wr = '0;
    adv[p] = 1; wr[p] = w; wreg[p] = r; wdata[p] = v;
    @(negedge clk);
    adv = '0; wr = '0;
  endtask

  // issue a read from core p; returns the data and the cycles until ack
  task automatic read(input int p, input logic [2:0] idx, input logic [5:0] r,
                      input logic [3:0] ts, output logic [63:0] d, output bit g, output int cyc);
    @(negedge clk);
    rd_req[p] = 1; rd_idx[p] = idx; rd_reg[p] = r; rd_ts[p] = ts;
    @(negedge clk);
    rd_req[p] = 0;
    cyc = 1;
    while (!rd_ack[p]) begin @(negedge clk); cyc++; end
    d = rd_data[p]; g = fromg[p];
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] d; bit g; int cyc;
  initial begin
    realign = 0; realign_tail = 0;
    adv = 0; wr = 0; wreg = 0; wdata = 0; rd_req = 0; rd_idx = 0; rd_reg = 0; rd_ts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // P0 owns r1 (entry 0) and r2 (entry 1); P1 discards both
    commit(0, 1, 6'd1, 64'h11);
    commit(0, 1, 6'd2, 64'h22);
    chk("tail0", tail[0], 2); chk("head before P1", head, 0);
    commit(1, 0, 0, 0);
    commit(1, 0, 0, 0);
    @(negedge clk);
    chk("head after both", head, 2);
    // entries 0 and 1 reclaimed: a consumer at timestamp 2 gets them from the GARF
    read(1, 3'd0, 6'd1, 4'd2, d, g, cyc);
    chk("garf r1", d, 64'h11); chk("r1 from garf", g, 1);
    read(1, 3'd1, 6'd2, 4'd2, d, g, cyc);
    chk("garf r2", d, 64'h22); chk("r2 from garf", g, 1);
    // P0 discards entries 2,3; P1 owns r4 (entry 2) but not yet r5 (entry 3)
    commit(0, 0, 0, 0);
    commit(0, 0, 0, 0);
    commit(1, 1, 6'd4, 64'h44);
    // entry 2 was reclaimed (both tails past it): r4 now comes from the GARF
    read(0, 3'd2, 6'd4, 4'd4, d, g, cyc);
    chk("r4 data", d, 64'h44); chk("r4 from garf", g, 1); chk("latency", cyc, LAT);
    // blocking read of entry 3, written by P1 only later
    fork
      read(0, 3'd3, 6'd5, 4'd4, d, g, cyc);
      begin repeat (12) @(negedge clk); commit(1, 1, 6'd5, 64'h55); end
    join
    chk("r5 data", d, 64'h55); chk("r5 from grob", g, 0);
    checks++; if (cyc < 13) begin failures++; $display("read did not block: %0d", cyc); end
    // P1 runs ahead: head is 4 (P0), P1 may go up to 12 and recycles entry 3
    for (int i = 4; i < 11; i++) commit(1, 1, 6'd9, 64'h900 + 64'(i));
    chk("P1 not full at 11", full[1], 0);
    // read of a written live entry: exactly LAT cycles
    read(1, 3'd5, 6'd9, 4'd11, d, g, cyc);
    chk("entry 5", d, 64'h905); chk("entry 5 from grob", g, 0); chk("latency", cyc, LAT);
    commit(1, 1, 6'd9, 64'h90B);
    chk("P1 full", full[1], 1);
    chk("tail1", tail[1], 12);
    commit(1, 1, 6'd9, 64'hBAD);      // refused while full
    chk("tail1 held", tail[1], 12);
    // P0 (timestamp 4) asks for r5 at entry 3: entry now newer -> GARF
    read(0, 3'd3, 6'd5, 4'd4, d, g, cyc);
    chk("recycled r5", d, 64'h55); chk("recycled from garf", g, 1);
    // P1 (timestamp 12) asks for r9 at entry 11: written, older -> GROB
    read(1, 3'd3, 6'd9, 4'd12, d, g, cyc);
    chk("r9 from grob", d, 64'h90B); chk("r9 grob flag", g, 0);
    // restart: P1 is pulled back to P0's tail (4); entries 4-11 are dropped
    @(negedge clk);
    realign[1] = 1; realign_tail = tail[0];
    @(negedge clk);
    realign = 0;
    chk("tail1 pulled back", tail[1], 4); chk("P1 no longer full", full[1], 0);
    chk("head unchanged", head, 4);
    commit(1, 1, 6'd9, 64'hA4);
    read(0, 3'd4, 6'd9, 4'd5, d, g, cyc);
    chk("rewritten entry 4", d, 64'hA4); chk("entry 4 from grob", g, 0);
    // entry 5 held 0x905 before the restart; a read must now wait for P1
    fork
      read(0, 3'd5, 6'd9, 4'd6, d, g, cyc);
      begin repeat (8) @(negedge clk); commit(1, 1, 6'd9, 64'hA5); end
    join
    chk("rewritten entry 5", d, 64'hA5);
    checks++; if (cyc < 9) begin failures++; $display("dropped entry did not block: %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
