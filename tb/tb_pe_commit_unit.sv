// tb_pe_commit_unit: one commit unit with a simple GROB model in the bench.
// Replays one core's side of a two-core example (this core owns the first
// miss, the other core owns the second), then stores, an exception and stalls:
//   LD r1,0(r8)   own miss      -> r1 O, writes slot 0
//   ADD r2,r1,1                 -> r2 O, writes slot 1
//   ADD r3,r3,1                 -> r3 S, no slot
//   LD r4,0(r9)   discarded     -> r4 INV, GRAT r4 = 2
//   ADD r5,r4,64                -> r5 INV, GRAT r5 = 3
//   LD r6,(r1+r5) slice join    -> fetch r5 from slot 3 (timestamp 4), r6 O
//   BNEZ r1                     -> commits, no fetch
//   ST r4 -> [r3]               -> GSQ without data, L1 invalidate
//   ST r3 -> [r4]               -> fetch r4 first, GSQ with data, L1 write
//   LD r7 discarded, exception  -> scan fetches r7, recovered
// plus a GROB-full stall, a GSQ-full stall and a restart.
module tb_pe_commit_unit;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic head_valid, head_ready, restart, gop_wr, exc_rec;
  commit_t head;
  reg_state_e [63:0] rstate;
  logic [5:0] gop_reg, rd_reg, probe_reg;
  logic [63:0] gop_val, rd_data, wdata, gaddr, gdata, l1_addr;
  logic grob_adv, grob_wr, grob_full, rd_req, rd_busy, rd_ack;
  logic gsq_ins, gsq_dv, gsq_full, l1_wr, l1_inv;
  logic [5:0] wreg;
  logic [9:0] tail, rd_ts;
  logic [8:0] rd_idx, probe_idx;
  int checks = 0, failures = 0;
  int exc_seen = 0;
  always @(posedge clk) if (exc_rec) exc_seen++;

  pe_commit_unit dut (.clk, .rst_n, .head_valid, .head, .head_ready, .rstate, .restart,
    .gop_wr, .gop_reg, .gop_val, .exc_recovered(exc_rec),
    .grob_adv, .grob_wr, .grob_wreg(wreg), .grob_wdata(wdata), .grob_tail(tail), .grob_full,
    .rd_req, .rd_idx, .rd_reg, .rd_ts, .rd_busy, .rd_ack, .rd_data,
    .gsq_ins, .gsq_addr(gaddr), .gsq_dv, .gsq_data(gdata), .gsq_full,
    .l1_wr, .l1_inv, .l1_addr, .grat_probe_reg(probe_reg), .grat_probe_idx(probe_idx));

  always #5 clk = ~clk;

  // GROB model: tail counter, values of slots owned elsewhere, 3-cycle reads
  logic [63:0] slot_val [512];
  logic [8:0]  last_idx; logic [5:0] last_reg; logic [9:0] last_ts;
  int nreads = 0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tail <= '0;
    else if (grob_adv) tail <= tail + 1'b1;
  always @(posedge clk) begin
    if (grob_wr) slot_val[tail[8:0]] <= wdata;
  end
  initial begin
    rd_busy = 0; rd_ack = 0; rd_data = 0;
    forever begin
      @(posedge clk);
      if (rd_req && rst_n) begin
        last_idx = rd_idx; last_reg = rd_reg; last_ts = rd_ts; nreads++;
        rd_busy <= 1;
        repeat (2) @(posedge clk);
        rd_busy <= 0; rd_ack <= 1; rd_data <= slot_val[last_idx];
        @(posedge clk);
        rd_ack <= 0;
      end
    end
  end

  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // what the unit did in the cycle the instruction committed
  logic c_adv, c_wr, c_ins, c_dv, c_l1w, c_l1i;
  logic [63:0] c_wdata;
  int c_cycles;

  task automatic present(input op_e op, input logic [5:0] d, s1, s2, input ld_outcome_e ld,
                         input logic [63:0] res, input bit exc = 0);
    head = '{op: op, dest: d, src1: s1, src2: s2, ld: ld, exc: exc, result: res,
             addr: 64'h8000 + 64'(s1), sdata: 64'h5000 + 64'(s2)};
    head_valid = 1;
    c_cycles = 0;
    #1;
    while (!head_ready) begin @(negedge clk); c_cycles++; #1; end
    c_adv = grob_adv; c_wr = grob_wr; c_wdata = wdata; c_ins = gsq_ins; c_dv = gsq_dv;
    c_l1w = l1_wr; c_l1i = l1_inv;
    @(negedge clk);
    head_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_valid = 0; head = '0; restart = 0; grob_full = 0; gsq_full = 0; probe_reg = 0;
    foreach (slot_val[i]) slot_val[i] = 64'hEEEE_0000 + 64'(i);
    slot_val[3] = 64'h55;          // r5, written by the other core
    slot_val[2] = 64'h44;          // r4, written by the other core
    slot_val[7] = 64'h77;          // r7, written by the other core
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    present(OP_LOAD, 1, 8, 8, LD_MISS_OWN, 64'hA1);
    chk("ld r1 state", rstate[1], RS_O); chk("ld r1 alloc", c_adv, 1); chk("ld r1 write", c_wr, 1);
    chk("ld r1 value", c_wdata, 64'hA1);
    present(OP_ALU, 2, 1, 1, LD_HIT, 64'hA2);
    chk("r2 state", rstate[2], RS_O); chk("r2 write", c_wr, 1);
    present(OP_ALU, 3, 3, 3, LD_HIT, 64'h3);
    chk("r3 state", rstate[3], RS_S); chk("r3 no slot", c_adv, 0); chk("tail 2", tail, 2);
    present(OP_LOAD, 4, 9, 9, LD_DISCARD, 0);
    chk("r4 state", rstate[4], RS_INV); chk("r4 slot", c_adv, 1); chk("r4 no write", c_wr, 0);
    present(OP_ALU, 5, 4, 4, LD_HIT, 0);
    chk("r5 state", rstate[5], RS_INV);
    probe_reg = 4; #1 chk("grat r4", probe_idx, 2);
    probe_reg = 5; #1 chk("grat r5", probe_idx, 3);
    chk("tail 4", tail, 4);
    // slice join: left r1 owned, right r5 poisoned
    fork
      present(OP_LOAD, 6, 1, 5, LD_HIT, 64'hA6);
      begin
        @(posedge gop_wr);
        chk("fetched reg", gop_reg, 5); chk("fetched value", gop_val, 64'h55);
      end
    join
    chk("join read idx", last_idx, 3); chk("join read reg", last_reg, 5);
    chk("join consumer ts", last_ts, 4);
    chk("r5 now shared", rstate[5], RS_S); chk("r6 owned", rstate[6], RS_O);
    chk("join writes slot", c_wr, 1); chk("tail 5", tail, 5);
    chk("join waited for the read", c_cycles >= 3, 1);
    present(OP_BRANCH, 0, 1, 1, LD_HIT, 0);
    chk("branch on owned reg: no fetch", nreads, 1);
    present(OP_STORE, 0, 3, 4, LD_HIT, 0);
    chk("store inserted", c_ins, 1); chk("store data missing", c_dv, 0);
    chk("l1 invalidate", c_l1i, 1); chk("no l1 write", c_l1w, 0);
    present(OP_STORE, 0, 4, 3, LD_HIT, 0);
    chk("store address fetched", nreads, 2); chk("addr read idx", last_idx, 2);
    chk("store with data", c_dv, 1); chk("l1 write", c_l1w, 1); chk("r4 shared", rstate[4], RS_S);
    // GROB full holds a slice instruction, not a shared one
    grob_full = 1;
    fork
      present(OP_LOAD, 7, 9, 9, LD_DISCARD, 0);
      begin repeat (5) @(negedge clk); chk("held while full", tail, 6 - 1); grob_full = 0; end
    join
    chk("r7 poisoned", rstate[7], RS_INV); chk("waited for room", c_cycles >= 5, 1);
    probe_reg = 7; #1 chk("grat r7", probe_idx, 5);
    slot_val[5] = 64'h77;
    gsq_full = 1;
    fork
      present(OP_STORE, 0, 3, 3, LD_HIT, 0);
      begin repeat (4) @(negedge clk); gsq_full = 0; end
    join
    chk("store waited for GSQ room", c_cycles >= 4, 1);
    // exception: the scan fetches every poisoned register (r7 only)
    fork
      present(OP_NOP, 0, 0, 0, LD_HIT, 0, 1);
      begin
        @(posedge gop_wr);
        chk("scan fetch reg", gop_reg, 7); chk("scan fetch value", gop_val, 64'h77);
      end
    join
    chk("scan reads", nreads, 3); chk("recovered once", exc_seen, 1);
    begin
      bit anyinv = 0;
      for (int r = 0; r < 64; r++) if (rstate[r] == RS_INV) anyinv = 1;
      chk("no poisoned register after recovery", anyinv, 0);
    end
    // restart from another core's recovery clears owned registers too
    present(OP_LOAD, 9, 3, 3, LD_DISCARD, 0);
    chk("r9 poisoned", rstate[9], RS_INV);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    chk("restart r9", rstate[9], RS_S); chk("restart r1", rstate[1], RS_S);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
