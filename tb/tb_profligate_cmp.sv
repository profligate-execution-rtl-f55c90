// tb_profligate_cmp: end-to-end run of the four-core fabric at its default
// sizes (512-entry GROB, 256-entry GSQ, 10/15-cycle latencies, core 3 lead).
//
// Four behavioural cores commit the same program in order; their loads go to a
// memory model with two cold lines (0x800 and 0x900) and a 500-cycle fill
// (700 for the second line). The program is a two-core synchronisation example
// followed by a long slice loop and a burst of stores:
//   0 LD r1,0(r8)    1 ADD r2,r1,1   2 ADD r3,r3,1   3 LD r4,0(r9)
//   4 ADD r5,r4,64   5 LD r6,(r1+r5) 6 BNEZ r1       7 ST r4 -> 0(r3)
//   8 ST r3 -> 0(r5) 9.. 256 x {ADD r2,r2,1 ; ADD r6,r6,1}
//   then 260 x ST r3 -> 0(r3), an instruction that faults on core 1, then
//   ADD r2,r2,1 and ST r2 -> 0(r3).
// Core 3 starts first and, as lead, drops both misses; core 0 owns the first
// and core 1 the second. Core 0 is held before the join until cores 1-3 have
// filled the GROB, so its join operand has been recycled and comes from the
// GARF. Cores 0, 2 and 3 run past the fault (one GROB slot and one store
// ahead of core 1) before core 1 restarts them there: their tails are pulled
// back, the entries they wrote past the fault are dropped, and all four run the
// last two instructions again with shared registers. The bench checks values against its own arithmetic and counts every
// mechanism: own/discard/lead answers, join, branch, store-address and
// exception fetches, blocking reads, GARF reads, GROB-full and GSQ-full stalls,
// L1 write/invalidate, GSQ search outcomes, in-order store release, restart.
module tb_profligate_cmp;
  import pe_pkg::*;
  localparam int N = 4, LOOP1 = 256, LOOP2 = 260;
  logic clk = 0, rst_n = 0;

  logic [N-1:0] head_valid, head_ready, restart, gop_wr, exc_rec;
  logic [1:0] restart_src;
  commit_t head [N];
  reg_state_e [63:0] rstate [N];
  logic [N-1:0][5:0] gop_reg, probe_reg;
  logic [N-1:0][63:0] gop_val, l1_addr, ld_addr, miss_addr;
  logic [N-1:0][9:0] grob_tail;
  logic [9:0] grob_head;
  logic [N-1:0][8:0] gsq_tail, ld_pos;
  logic [N-1:0][8:0] probe_idx;
  logic [N-1:0] l1_wr, l1_inv, ld_req, ld_stq_hit, ld_stq_dv, ld_l1_hit, ld_ack;
  logic [N-1:0][2:0] ld_action;
  logic [N-1:0] miss_req, miss_gnt, miss_rsp, miss_own;
  logic mem_req, mem_ready, mem_fill, rel_valid, rel_ready;
  logic [57:0] mem_addr, mem_fill_addr;
  logic [63:0] rel_addr, rel_data;

  profligate_cmp dut (.*, .grat_probe_reg(probe_reg), .grat_probe_idx(probe_idx),
                      .exc_recovered(exc_rec));

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("[%0d] %s: got %0h expected %0h", cycle, what, got, exp); end
  endtask

  // ---------------- program ----------------
  typedef struct { op_e op; logic [5:0] d, s1, s2; logic [63:0] imm; bit exc1; } ins_t;
  ins_t prog [$];
  localparam int JOIN_PC = 5;
  int exc_pc;
  function automatic void add(op_e op, int d, int s1, int s2, longint imm, bit exc1 = 0);
    prog.push_back('{op, 6'(d), 6'(s1), 6'(s2), 64'(imm), exc1});
  endfunction

  function automatic logic [63:0] memval(logic [63:0] a);
    return a * 3 + 7;
  endfunction

  // ---------------- memory ----------------
  bit cold [logic [57:0]];
  int due [$]; logic [57:0] due_line [$];
  initial begin cold[58'h20] = 1; cold[58'h24] = 1; end
  always @(posedge clk) begin
    mem_fill <= 0;
    if (rst_n && mem_req) begin
      due.push_back(cycle + (mem_addr == 58'h24 ? 700 : 500)); due_line.push_back(mem_addr);
    end
    if (due.size() > 0 && due[0] <= cycle) begin
      mem_fill <= 1; mem_fill_addr <= due_line[0];
      cold.delete(due_line[0]);
      void'(due.pop_front()); void'(due_line.pop_front());
    end
  end

  // ---------------- cores ----------------
  logic [63:0] arf [N][64];
  int pc [N];
  bit hold [N];
  int start_at [N] = '{20, 40, 60, 0};
  int stop_at [N];

  always @(posedge clk)
    for (int p = 0; p < N; p++) begin
      if (gop_wr[p]) arf[p][gop_reg[p]] = gop_val[p];
      if (head_valid[p] && head_ready[p] && (head[p].op == OP_ALU || head[p].op == OP_LOAD))
        arf[p][head[p].dest] = head[p].result;
    end

  function automatic commit_t build(int p, ins_t i, ld_outcome_e ld);
    commit_t h;
    logic [63:0] a = arf[p][i.s1] + (i.s2 != i.s1 ? arf[p][i.s2] : 0) + i.imm;
    h.op = i.op; h.dest = i.d; h.src1 = i.s1; h.src2 = i.s2; h.ld = ld;
    h.exc = i.exc1 && p == 1;
    h.addr = arf[p][i.s1] + i.imm;
    h.sdata = arf[p][i.s2];
    h.result = (i.op == OP_LOAD) ? memval(a) : a;
    return h;
  endfunction

  task automatic run_core(int p);
    repeat (start_at[p]) @(negedge clk);
    while (pc[p] < stop_at[p]) begin
      ins_t i = prog[pc[p]];
      ld_outcome_e ld = LD_HIT;
      bit resolved = 0;
      forever begin
        @(negedge clk);
        if (hold[p] && pc[p] == JOIN_PC) begin head_valid[p] = 0; continue; end
        if (i.op == OP_LOAD && !resolved && rstate[p][i.s1] != RS_INV && rstate[p][i.s2] != RS_INV) begin
          logic [63:0] a = arf[p][i.s1] + (i.s2 != i.s1 ? arf[p][i.s2] : 0) + i.imm;
          resolved = 1;
          if (cold.exists(a[63:6])) begin
            head_valid[p] = 0;
            miss_req[p] = 1; miss_addr[p] = a;
            do @(negedge clk); while (!miss_rsp[p]);
            miss_req[p] = 0;
            if (miss_own[p]) begin
              while (cold.exists(a[63:6])) @(negedge clk);
              ld = LD_MISS_OWN;
            end else ld = LD_DISCARD;
          end
        end
        head[p] = build(p, i, ld);
        head_valid[p] = 1;
        #1;
        if (head_ready[p]) begin
          @(posedge clk);
          break;
        end
      end
      pc[p]++;
    end
    @(negedge clk);
    head_valid[p] = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_own, n_discard, n_lead_discard, n_fetch_join, n_fetch_branch, n_fetch_staddr,
      n_fetch_exc, n_blocking, n_garf, n_grob_full, n_gsq_full, n_l1w, n_l1i,
      n_rel, n_exc, n_garf_wr;
  int req_at [N];
  logic [63:0] rel_a [$], rel_d [$];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) begin
      if (miss_rsp[p] && miss_own[p]) n_own++;
      if (miss_rsp[p] && !miss_own[p]) begin n_discard++; if (p == 3) n_lead_discard++; end
      if (gop_wr[p]) begin
        if (head[p].exc) n_fetch_exc++;
        else case (head[p].op)
          OP_LOAD, OP_ALU: n_fetch_join++;
          OP_BRANCH:       n_fetch_branch++;
          OP_STORE:        n_fetch_staddr++;
          default: ;
        endcase
      end
      if (dut.u_grob.rd_req[p] && !dut.u_grob.rd_busy[p]) req_at[p] = cycle;
      if (dut.u_grob.rd_ack[p]) begin
        if (cycle - req_at[p] > 10) n_blocking++;
        if (dut.u_grob.rd_from_garf[p]) n_garf++;
      end
      if (head_valid[p] && !head_ready[p] && dut.u_grob.full[p]) n_grob_full++;
      if (head_valid[p] && !head_ready[p] && dut.u_gsq.full[p] && head[p].op == OP_STORE) n_gsq_full++;
      if (l1_wr[p]) n_l1w++;
      if (l1_inv[p]) n_l1i++;
      if (exc_rec[p]) n_exc++;
    end
    if (dut.u_grob.u_garf.we) n_garf_wr++;
    if (rel_valid && rel_ready) begin n_rel++; rel_a.push_back(rel_addr); rel_d.push_back(rel_data); end
  end

  int n_restart = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- load search probes while core 0 is held ----------------
  task automatic search(int p, logic [63:0] a, bit stq, bit stqdv, bit l1, output logic [2:0] act);
    @(negedge clk);
    ld_req[p] = 1; ld_addr[p] = a; ld_pos[p] = gsq_tail[p];
    ld_stq_hit[p] = stq; ld_stq_dv[p] = stqdv; ld_l1_hit[p] = l1;
    #1 act = ld_action[p];
    if (act == 3'd4) begin
      @(negedge clk); ld_req[p] = 0;
      while (!ld_ack[p]) @(negedge clk);
      #1 act = ld_action[p];
    end
    @(negedge clk);
    ld_req[p] = 0; ld_stq_hit[p] = 0; ld_stq_dv[p] = 0; ld_l1_hit[p] = 0;
  endtask

  logic [63:0] v_r1, v_r4, v_r5, v_r6, st0_addr;
  logic [2:0] act;
  int n_poison = 0, n_l2 = 0, n_fwd = 0, n_l1use = 0;
  initial begin
    // program
    add(OP_LOAD, 1, 8, 8, 0);
    add(OP_ALU, 2, 1, 1, 1);
    add(OP_ALU, 3, 3, 3, 1);
    add(OP_LOAD, 4, 9, 9, 0);
    add(OP_ALU, 5, 4, 4, 64);
    add(OP_LOAD, 6, 1, 5, 0);
    add(OP_BRANCH, 0, 1, 1, 0);
    add(OP_STORE, 0, 3, 4, 0);
    add(OP_STORE, 0, 5, 3, 0);
    for (int k = 0; k < LOOP1; k++) begin add(OP_ALU, 2, 2, 2, 1); add(OP_ALU, 6, 6, 6, 1); end
    for (int k = 0; k < LOOP2; k++) add(OP_STORE, 0, 3, 3, 0);
    exc_pc = prog.size();
    add(OP_NOP, 0, 0, 0, 0, 1);
    add(OP_ALU, 2, 2, 2, 1);
    add(OP_STORE, 0, 3, 2, 0);
    for (int p = 0; p < N; p++) begin
      for (int r = 0; r < 64; r++) arf[p][r] = 64'h100 * r;
      pc[p] = 0; hold[p] = (p == 0);
      stop_at[p] = (p == 1) ? exc_pc + 1 : prog.size();
    end
    v_r1 = memval(64'h800); v_r4 = memval(64'h900); v_r5 = v_r4 + 64;
    v_r6 = memval(v_r1 + v_r5); st0_addr = 64'h301;
    head_valid = 0; restart = 0; restart_src = 1; probe_reg = 0; ld_req = 0; ld_addr = 0; ld_pos = 0;
    ld_stq_hit = 0; ld_stq_dv = 0; ld_l1_hit = 0; miss_req = 0; miss_addr = 0;
    mem_ready = 1; rel_ready = 1;
    for (int p = 0; p < N; p++) head[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_core(0); run_core(1); run_core(2); run_core(3);
      begin
        // hold core 0 before the join until cores 1-3 stall on a full GROB
        wait (dut.u_grob.full[1] && dut.u_grob.full[2] && dut.u_grob.full[3]);
        repeat (5) @(negedge clk);
        chk("held core tail", grob_tail[0], 4);
        chk("P0 r1", rstate[0][1], RS_O);  chk("P0 r2", rstate[0][2], RS_O);
        chk("P0 r3", rstate[0][3], RS_S);  chk("P0 r4", rstate[0][4], RS_INV);
        chk("P0 r5", rstate[0][5], RS_INV);
        probe_reg[0] = 4; probe_reg[1] = 1; #1;
        chk("P0 GRAT r4", probe_idx[0], 2); chk("P1 GRAT r1", probe_idx[1], 0);
        probe_reg[0] = 5; #1 chk("P0 GRAT r5", probe_idx[0], 3);
        chk("P1 r4", rstate[1][4], RS_O); chk("P1 r5", rstate[1][5], RS_O);
        chk("P1 r1 fetched by branch", rstate[1][1], RS_S);
        chk("P1 r1 value", arf[1][1], v_r1);
        chk("P3 r5 fetched for store address", arf[3][5], v_r5);
        chk("stores wait for core 0", n_rel, 0);
        // GSQ searches from core 2
        search(2, st0_addr, 0, 0, 0, act); chk("older store matches: poison", act, 2);
        if (act == 2) n_poison++;
        search(2, 64'h7000, 0, 0, 0, act); chk("no match: go to L2", act, 3);
        if (act == 3) n_l2++;
        search(2, 64'h7000, 1, 1, 0, act); chk("STQ forward", act, 0);
        if (act == 0) n_fwd++;
        search(2, 64'h7000, 0, 0, 1, act); chk("L1 hit", act, 1);
        if (act == 1) n_l1use++;
        hold[0] = 0;
        @(posedge gop_wr[0]);
        chk("join operand from GARF", dut.u_grob.rd_from_garf[0], 1);
        chk("join operand value", gop_val[0], v_r5);
      end
    join
    repeat (20) @(negedge clk);
    // values at the fault
    chk("P0 r6", arf[0][6], v_r6 + LOOP1);
    chk("P1 recovered r2", arf[1][2], v_r1 + 1 + LOOP1);
    chk("P1 recovered r6", arf[1][6], v_r6 + LOOP1);
    // cores 0, 2, 3 ran one slice result and one store past the fault
    begin
      logic [9:0] t1;
      logic [8:0] s1;
      t1 = grob_tail[1];
      s1 = gsq_tail[1];
      for (int p = 0; p < N; p++) if (p != 1) begin
        chk("GROB tail ahead of the fault", grob_tail[p], 10'(t1 + 1));
        chk("GSQ tail ahead of the fault", gsq_tail[p], 9'(s1 + 1));
      end
      chk("slot past the fault written", dut.u_grob.written[t1[8:0]], 1);
      chk("store past the fault queued", dut.u_gsq.av[s1[7:0]], 1);
      chk("store past the fault held", n_rel, 2 + LOOP2);
      // restart them at the fault with core 1's registers
      @(negedge clk);
      restart = 4'b1101;
      for (int p = 0; p < N; p++) if (p != 1) begin arf[p] = arf[1]; pc[p] = exc_pc; end
      n_restart++;
      @(negedge clk);
      restart = '0;
      for (int p = 0; p < N; p++) begin
        chk("GROB tail pulled back", grob_tail[p], t1);
        chk("GSQ tail pulled back", gsq_tail[p], s1);
      end
      chk("slot past the fault dropped", dut.u_grob.written[t1[8:0]], 0);
      chk("store past the fault dropped", dut.u_gsq.av[s1[7:0]], 0);
      for (int p = 0; p < N; p++) begin start_at[p] = 0; stop_at[p] = prog.size(); end
      fork run_core(0); run_core(1); run_core(2); run_core(3); join
      repeat (20) @(negedge clk);
      for (int p = 0; p < N; p++) begin
        chk("r2 after restart", arf[p][2], v_r1 + 2 + LOOP1);
        chk("no slice result after restart", grob_tail[p], t1);
        chk("store inserted once", gsq_tail[p], 9'(s1 + 1));
      end
    end
    for (int p = 0; p < N; p++)
      for (int r = 0; r < 64; r++)
        if (p != 1 && rstate[p][r] != RS_S) begin
          failures++; $display("core %0d r%0d not shared after restart", p, r);
        end
    checks++;
    chk("stores released", n_rel, 3 + LOOP2);
    if (rel_a.size() >= 3) begin
      chk("first store addr", rel_a[0], st0_addr); chk("first store data", rel_d[0], v_r4);
      chk("second store addr", rel_a[1], v_r5);    chk("second store data", rel_d[1], st0_addr);
      chk("loop store", rel_d[2], st0_addr);
      chk("store after restart addr", rel_a[rel_a.size()-1], st0_addr);
      chk("store after restart data", rel_d[rel_d.size()-1], v_r1 + 2 + LOOP1);
    end
    // mechanisms
    $display("own=%0d discard=%0d lead=%0d join=%0d branch=%0d staddr=%0d exc=%0d blocking=%0d garf_rd=%0d garf_wr=%0d grob_full=%0d gsq_full=%0d l1w=%0d l1i=%0d rel=%0d restart=%0d",
      n_own, n_discard, n_lead_discard, n_fetch_join, n_fetch_branch, n_fetch_staddr, n_fetch_exc,
      n_blocking, n_garf, n_garf_wr, n_grob_full, n_gsq_full, n_l1w, n_l1i, n_rel, n_restart);
    chk("own misses", n_own, 2);
    chk("lead discards", n_lead_discard, 2);
    checks++; if (n_discard < 4) begin failures++; $display("too few discards"); end
    chk("join fetches", n_fetch_join, 1);
    chk("branch fetches", n_fetch_branch, 3);
    chk("store-address fetches", n_fetch_staddr, 2);
    chk("exception fetches", n_fetch_exc, 2);
    chk("recovered", n_exc, 1);
    chk("restart", n_restart, 1);
    checks++; if (n_blocking == 0) begin failures++; $display("no blocking read"); end
    checks++; if (n_garf == 0) begin failures++; $display("no GARF read"); end
    checks++; if (n_garf_wr < 512) begin failures++; $display("GROB did not wrap"); end
    checks++; if (n_grob_full == 0) begin failures++; $display("no GROB-full stall"); end
    checks++; if (n_gsq_full == 0) begin failures++; $display("no GSQ-full stall"); end
    checks++; if (n_l1w == 0) begin failures++; $display("no L1 write"); end
    checks++; if (n_l1i == 0) begin failures++; $display("no L1 invalidate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
