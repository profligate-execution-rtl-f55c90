// profligate_cmp: chip-level profligate-execution fabric of an NPROC-core CMP.
//
// All cores run the same program. Each core's commit stage goes through a
// pe_commit_unit, which tracks which registers depend on a miss the core owns
// (O) or discarded (INV), and together they build one large virtual window:
// slice results go into the shared global reorder buffer (grob, with its GARF),
// stores into the shared global store queue (gsq) and out to the L2 in program
// order, and L2 misses are handed to one waiting core by the miss partitioner.
// Per core, load_resolve combines the core's own store-queue and L1 lookups
// with the GSQ search for loads that miss the L1.
//
// The cores, L1/L2 caches and memory are outside: their signals are the ports.
// Per core (index p): commit head/handshake, register slice states, fetched
// operands (gop_*), restart and exception-recovered; GROB tail (timestamp) and
// GSQ tail; L1 write/invalidate; load search (ld_*) and its decision; L2 miss
// request (miss_*). Chip: memory request/fill and the store release to the
// L2. Timings: GROB operand reads take GROB_LAT cycles, GSQ searches GSQ_LAT,
// miss answers one cycle after the grant. A restart pulse on restart[p], after
// core restart_src has recovered from an exception, sets core p's registers to
// shared and pulls its GROB and GSQ tails back to restart_src's; core p must
// have committed up to the faulting instruction by then. Default sizes are the evaluated
// machine: 4 cores, 512-entry GROB, 256-entry GSQ, 10 and 15 cycle latencies,
// core 3 the lead. How the pieces are wired is this design's reading of the
// document's description.
module profligate_cmp
  import pe_pkg::*;
#(
  parameter int unsigned NPROC        = 4,
  parameter int unsigned NREGS        = 64,
  parameter int unsigned DW           = 64,
  parameter int unsigned AW           = 64,
  parameter int unsigned GROB_ENTRIES = 512,
  parameter int unsigned GROB_LAT     = 10,
  parameter int unsigned GSQ_ENTRIES  = 256,
  parameter int unsigned GSQ_LAT      = 15,
  parameter int unsigned LEAD         = 3,
  parameter int unsigned NMSHR        = 16,
  parameter int unsigned LINE_LSB     = 6,
  localparam int unsigned RW          = $clog2(NREGS),
  localparam int unsigned GIW         = $clog2(GROB_ENTRIES),
  localparam int unsigned GTW         = GIW + 1,
  localparam int unsigned STW         = $clog2(GSQ_ENTRIES) + 1,
  localparam int unsigned PW          = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // per-core commit
  input  logic       [NPROC-1:0]      head_valid,
  input  commit_t                     head       [NPROC],
  output logic       [NPROC-1:0]      head_ready,
  output reg_state_e [NREGS-1:0]      rstate     [NPROC],
  input  logic       [NPROC-1:0]      restart,
  input  logic       [PW-1:0]         restart_src,
  output logic       [NPROC-1:0]      gop_wr,
  output logic       [NPROC-1:0][RW-1:0] gop_reg,
  output logic       [NPROC-1:0][DW-1:0] gop_val,
  output logic       [NPROC-1:0]      exc_recovered,
  output logic       [NPROC-1:0][GTW-1:0] grob_tail,
  output logic       [GTW-1:0]        grob_head,
  output logic       [NPROC-1:0][STW-1:0] gsq_tail,
  input  logic       [NPROC-1:0][RW-1:0]  grat_probe_reg,
  output logic       [NPROC-1:0][GIW-1:0] grat_probe_idx,
  // per-core L1 data cache actions at store commit
  output logic       [NPROC-1:0]      l1_wr,
  output logic       [NPROC-1:0]      l1_inv,
  output logic       [NPROC-1:0][AW-1:0] l1_addr,
  // per-core load issue
  input  logic       [NPROC-1:0]      ld_req,
  input  logic       [NPROC-1:0][AW-1:0] ld_addr,
  input  logic       [NPROC-1:0][STW-1:0] ld_pos,
  input  logic       [NPROC-1:0]      ld_stq_hit,
  input  logic       [NPROC-1:0]      ld_stq_dv,
  input  logic       [NPROC-1:0]      ld_l1_hit,
  output logic       [NPROC-1:0]      ld_ack,
  output logic       [NPROC-1:0][2:0] ld_action,
  // per-core L2 misses
  input  logic       [NPROC-1:0]      miss_req,
  input  logic       [NPROC-1:0][AW-1:0] miss_addr,
  output logic       [NPROC-1:0]      miss_gnt,
  output logic       [NPROC-1:0]      miss_rsp,
  output logic       [NPROC-1:0]      miss_own,
  // memory
  output logic                        mem_req,
  output logic       [AW-LINE_LSB-1:0] mem_addr,
  input  logic                        mem_ready,
  input  logic                        mem_fill,
  input  logic       [AW-LINE_LSB-1:0] mem_fill_addr,
  // store release to the L2
  output logic                        rel_valid,
  input  logic                        rel_ready,
  output logic       [AW-1:0]         rel_addr,
  output logic       [DW-1:0]         rel_data
);
  // GROB buses
  logic [NPROC-1:0]           g_adv, g_wr, g_full;
  logic [NPROC-1:0][RW-1:0]   g_wreg;
  logic [NPROC-1:0][DW-1:0]   g_wdata;
  logic [NPROC-1:0]           r_req, r_busy, r_ack, r_fromg;
  logic [NPROC-1:0][GIW-1:0]  r_idx;
  logic [NPROC-1:0][RW-1:0]   r_reg;
  logic [NPROC-1:0][GTW-1:0]  r_ts;
  logic [NPROC-1:0][DW-1:0]   r_data;
  // GSQ buses
  logic [NPROC-1:0]           s_ins, s_dv, s_full, s_match, s_mnd;
  logic [NPROC-1:0][AW-1:0]   s_addr;
  logic [NPROC-1:0][DW-1:0]   s_data;
  logic [STW-1:0]             s_head;

  grob #(.NPROC(NPROC), .ENTRIES(GROB_ENTRIES), .NREGS(NREGS), .DW(DW), .LAT(GROB_LAT)) u_grob (
    .clk, .rst_n,
    .adv(g_adv), .wr(g_wr), .wreg(g_wreg), .wdata(g_wdata),
    .tail(grob_tail), .full(g_full), .head(grob_head),
    .realign(restart), .realign_tail(grob_tail[restart_src]),
    .rd_req(r_req), .rd_idx(r_idx), .rd_reg(r_reg), .rd_ts(r_ts),
    .rd_busy(r_busy), .rd_ack(r_ack), .rd_data(r_data), .rd_from_garf(r_fromg)
  );

  gsq #(.NPROC(NPROC), .ENTRIES(GSQ_ENTRIES), .AW(AW), .DW(DW), .LAT(GSQ_LAT)) u_gsq (
    .clk, .rst_n,
    .ins(s_ins), .ins_addr(s_addr), .ins_dv(s_dv), .ins_data(s_data),
    .tail(gsq_tail), .full(s_full), .head(s_head),
    .realign(restart), .realign_tail(gsq_tail[restart_src]),
    .ld_req, .ld_addr, .ld_pos,
    .ld_ack, .ld_match(s_match), .ld_match_nodata(s_mnd),
    .rel_valid, .rel_ready, .rel_addr, .rel_data
  );

  miss_partitioner #(.NPROC(NPROC), .LEAD(LEAD), .NMSHR(NMSHR), .AW(AW), .LINE_LSB(LINE_LSB)) u_mp (
    .clk, .rst_n,
    .miss_req, .miss_addr, .miss_gnt, .miss_rsp, .miss_own,
    .mem_req, .mem_addr, .mem_ready, .mem_fill, .mem_fill_addr
  );

  for (genvar p = 0; p < NPROC; p++) begin : g_core
    pe_commit_unit #(.NREGS(NREGS), .GROB_ENTRIES(GROB_ENTRIES), .DW(DW), .AW(AW)) u_cu (
      .clk, .rst_n,
      .head_valid(head_valid[p]), .head(head[p]), .head_ready(head_ready[p]),
      .rstate(rstate[p]), .restart(restart[p]),
      .gop_wr(gop_wr[p]), .gop_reg(gop_reg[p]), .gop_val(gop_val[p]),
      .exc_recovered(exc_recovered[p]),
      .grob_adv(g_adv[p]), .grob_wr(g_wr[p]), .grob_wreg(g_wreg[p]), .grob_wdata(g_wdata[p]),
      .grob_tail(grob_tail[p]), .grob_full(g_full[p]),
      .rd_req(r_req[p]), .rd_idx(r_idx[p]), .rd_reg(r_reg[p]), .rd_ts(r_ts[p]),
      .rd_busy(r_busy[p]), .rd_ack(r_ack[p]), .rd_data(r_data[p]),
      .gsq_ins(s_ins[p]), .gsq_addr(s_addr[p]), .gsq_dv(s_dv[p]), .gsq_data(s_data[p]),
      .gsq_full(s_full[p]),
      .l1_wr(l1_wr[p]), .l1_inv(l1_inv[p]), .l1_addr(l1_addr[p]),
      .grat_probe_reg(grat_probe_reg[p]), .grat_probe_idx(grat_probe_idx[p])
    );

    load_resolve u_ld (
      .stq_hit(ld_stq_hit[p]), .stq_data_avail(ld_stq_dv[p]), .l1_hit(ld_l1_hit[p]),
      .gsq_done(ld_ack[p]), .gsq_match(s_match[p]),
      .src_action(ld_action[p])
    );
  end

  // values that only tests and assertions look at
  logic unused;
  assign unused = ^{r_fromg, s_mnd, s_head};
endmodule
