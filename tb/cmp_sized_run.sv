// cmp_sized_run: drives one profligate_cmp of N cores through a short program
// and checks the result. Used by tb_profligate_cmp_sizes to run the same
// program on chips of different core counts; it reports done/checks/failures.
//
// Program, run by every core (core LEAD starts first, the others follow a few
// cycles apart, all before the memory answers):
//   0 LD  r1,0(r8)     misses: the lead drops it, core 0 waits, the rest drop it
//   1 ADD r2,r1,1      slice: GROB slot 1 (slot 0 is r1)
//   2 ADD r3,r3,1      independent
//   3 ST  r2 -> 0(r3)  data poisoned on every core but core 0
//   4 BNEZ r2          poisoned on every core but core 0: fetched from the GROB
// Expected: core 0 alone owns the miss; every other core reads r2 from the
// GROB, blocking until core 0 has written it; the store reaches the L2 once,
// with core 0's data; every GROB tail ends at 2 and every GSQ tail at 1.
module cmp_sized_run
  import pe_pkg::*;
#(
  parameter int N    = 2,
  parameter int LEAD = 1
) (
  input  logic clk,
  output bit   done,
  output int   checks,
  output int   failures
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;
  localparam logic [63:0] LINE_ADDR = 64'h800;

  logic rst_n = 0;
  logic [N-1:0] head_valid, head_ready, restart, gop_wr, exc_rec;
  commit_t head [N];
  reg_state_e [63:0] rstate [N];
  logic [N-1:0][5:0] gop_reg, probe_reg;
  logic [N-1:0][63:0] gop_val, l1_addr, ld_addr, miss_addr;
  logic [N-1:0][9:0] grob_tail;
  logic [9:0] grob_head;
  logic [N-1:0][8:0] gsq_tail, ld_pos, probe_idx;
  logic [N-1:0] l1_wr, l1_inv, ld_req, ld_stq_hit, ld_stq_dv, ld_l1_hit, ld_ack;
  logic [N-1:0][2:0] ld_action;
  logic [N-1:0] miss_req, miss_gnt, miss_rsp, miss_own;
  logic mem_req, mem_ready, mem_fill, rel_valid, rel_ready;
  logic [57:0] mem_addr, mem_fill_addr;
  logic [63:0] rel_addr, rel_data;
  logic [PW-1:0] restart_src;

  profligate_cmp #(.NPROC(N), .LEAD(LEAD)) dut (.*, .grat_probe_reg(probe_reg),
    .grat_probe_idx(probe_idx), .exc_recovered(exc_rec));

  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("[N=%0d cycle %0d] %s: got %0h expected %0h", N, cycle, what, got, exp);
    end
  endtask

  function automatic logic [63:0] memval(logic [63:0] a);
    return a * 5 + 3;
  endfunction

  // memory: one cold line, answered 300 cycles after the request
  bit cold = 1;
  int fill_at = -1;
  always @(posedge clk) begin
    mem_fill <= 0;
    if (rst_n && mem_req) fill_at = cycle + 300;
    if (fill_at >= 0 && cycle >= fill_at) begin
      mem_fill <= 1; mem_fill_addr <= LINE_ADDR[63:6];
      cold = 0; fill_at = -1;
    end
  end

  // counters
  int n_own, n_discard, n_lead_discard, n_branch_fetch, n_blocking, n_l1i, n_rel;
  int req_at [N];
  logic [63:0] rel_a, rel_d;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) begin
      if (miss_rsp[p] && miss_own[p]) n_own++;
      if (miss_rsp[p] && !miss_own[p]) begin n_discard++; if (p == LEAD) n_lead_discard++; end
      if (gop_wr[p] && head[p].op == OP_BRANCH) n_branch_fetch++;
      if (dut.u_grob.rd_req[p] && !dut.u_grob.rd_busy[p]) req_at[p] = cycle;
      if (dut.u_grob.rd_ack[p] && cycle - req_at[p] > 10) n_blocking++;
      if (l1_inv[p]) n_l1i++;
    end
    if (rel_valid && rel_ready) begin n_rel++; rel_a = rel_addr; rel_d = rel_data; end
  end

  // behavioural cores
  typedef struct { op_e op; logic [5:0] d, s1, s2; logic [63:0] imm; } ins_t;
  ins_t prog [5] = '{
    '{OP_LOAD,   6'd1, 6'd8, 6'd8, 64'd0},
    '{OP_ALU,    6'd2, 6'd1, 6'd1, 64'd1},
    '{OP_ALU,    6'd3, 6'd3, 6'd3, 64'd1},
    '{OP_STORE,  6'd0, 6'd3, 6'd2, 64'd0},
    '{OP_BRANCH, 6'd0, 6'd2, 6'd2, 64'd0}};
  logic [63:0] arf [N][64];

  always @(posedge clk)
    for (int p = 0; p < N; p++) begin
      if (gop_wr[p]) arf[p][gop_reg[p]] = gop_val[p];
      if (head_valid[p] && head_ready[p] && (head[p].op == OP_ALU || head[p].op == OP_LOAD))
        arf[p][head[p].dest] = head[p].result;
    end

  function automatic commit_t build(int p, ins_t i, ld_outcome_e ld);
    commit_t h;
    logic [63:0] a = arf[p][i.s1] + i.imm;
    h.op = i.op; h.dest = i.d; h.src1 = i.s1; h.src2 = i.s2; h.ld = ld; h.exc = 0;
    h.addr = a;
    h.sdata = arf[p][i.s2];
    h.result = (i.op == OP_LOAD) ? memval(a) : a;
    return h;
  endfunction

  task automatic run_core(int p, int start);
    repeat (start) @(negedge clk);
    for (int pc = 0; pc < 5; pc++) begin
      ins_t i = prog[pc];
      ld_outcome_e ld = LD_HIT;
      bit resolved = 0;
      forever begin
        @(negedge clk);
        if (i.op == OP_LOAD && !resolved) begin
          resolved = 1;
          if (cold) begin
            head_valid[p] = 0;
            miss_req[p] = 1; miss_addr[p] = arf[p][i.s1] + i.imm;
            do @(negedge clk); while (!miss_rsp[p]);
            miss_req[p] = 0;
            if (miss_own[p]) begin
              while (cold) @(negedge clk);
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
    end
    @(negedge clk);
    head_valid[p] = 0;
  endtask

  logic [63:0] v_r2;
  initial begin
    done = 0; checks = 0; failures = 0;
    n_own = 0; n_discard = 0; n_lead_discard = 0; n_branch_fetch = 0; n_blocking = 0;
    n_l1i = 0; n_rel = 0; rel_a = 0; rel_d = 0;
    head_valid = 0; restart = 0; restart_src = 0; probe_reg = 0;
    ld_req = 0; ld_addr = 0; ld_pos = 0; ld_stq_hit = 0; ld_stq_dv = 0; ld_l1_hit = 0;
    miss_req = 0; miss_addr = 0; mem_ready = 1; rel_ready = 1;
    for (int p = 0; p < N; p++) begin
      head[p] = '0;
      for (int r = 0; r < 64; r++) arf[p][r] = 64'h100 * r;
    end
    v_r2 = memval(LINE_ADDR) + 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (int p = 0; p < N; p++) begin
          automatic int q = p;
          automatic int start = (q == LEAD) ? 0 : 10 + 10 * q;
          fork run_core(q, start); join_none
        end
        wait fork;
      end
    join
    repeat (20) @(negedge clk);
    chk("one owner", n_own, 1);
    chk("discards", n_discard, N - 1);
    chk("lead discards", n_lead_discard, 1);
    chk("branch fetches", n_branch_fetch, N - 1);
    checks++;
    if (n_blocking == 0) begin failures++; $display("[N=%0d] no blocking read", N); end
    chk("L1 invalidates", n_l1i, N - 1);
    chk("stores released", n_rel, 1);
    chk("store address", rel_a, 64'h301);
    chk("store data from the owner", rel_d, v_r2);
    for (int p = 0; p < N; p++) begin
      chk("GROB tail", grob_tail[p], 2);
      chk("GSQ tail", gsq_tail[p], 1);
      chk("r2 value", arf[p][2], v_r2);
      chk("r2 state", rstate[p][2], (p == 0) ? RS_O : RS_S);
      chk("r1 state", rstate[p][1], (p == 0) ? RS_O : RS_INV);
    end
    chk("GROB head", grob_head, 2);
    done = 1;
  end
endmodule
