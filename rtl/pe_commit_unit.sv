// pe_commit_unit: the profligate-execution extension at one core's commit stage.
//
// It keeps the slice state (S, O, INV) of every logical register of the core's
// architectural register file, the core's GRAT, and the core's view of the two
// global queues (their tails live in grob/gsq and come back as inputs). For the
// instruction at the core's ROB head it decides, in order:
//   * exception: every INV register is looked up in the GRAT and fetched from
//     the GROB/GARF; then exc_recovered pulses and the instruction leaves.
//   * ALU and load: the slice join rules on (src1, src2). Left O with right INV
//     first fetches the right operand. The destination of a load whose address
//     is valid is the address state on a hit, O on a miss this core waits for,
//     INV on a miss it discards. A result in state O or INV is a slice result:
//     it takes the next GROB slot (tail advances); O writes the value there, INV
//     records the slot in the GRAT.
//   * store: a poisoned address register is fetched first (all cores compute
//     every store address). The store is written into the GSQ at this core's
//     tail, with the data if the data register is valid; otherwise the L1 block
//     is invalidated (l1_inv), else the L1 is written (l1_wr).
//   * branch: a poisoned source is fetched before the branch commits.
// A fetched operand is handed to the core on gop_wr/gop_reg/gop_val, to be
// written into its register file, and the register becomes S; the head is then
// evaluated again, so the core must present a result that uses the new value.
// The consumer timestamp of a fetch is the core's current GROB tail.
//
// Interface: head_valid/head (pe_pkg::commit_t) with head_ready (commit this
// cycle); GROB commit and read ports; GSQ insert port; L1 write/invalidate;
// restart (from another core's exception recovery) sets every register to S.
// One instruction commits per cycle at most; a fetch takes the GROB read
// latency. The rules are the document's; commit-time evaluation, single-
// instruction commit and the handshakes are this design's choices.
module pe_commit_unit
  import pe_pkg::*;
#(
  parameter int unsigned NREGS       = 64,
  parameter int unsigned GROB_ENTRIES = 512,
  parameter int unsigned DW          = 64,
  parameter int unsigned AW          = 64,
  localparam int unsigned RW         = $clog2(NREGS),
  localparam int unsigned GIW        = $clog2(GROB_ENTRIES),
  localparam int unsigned GTW        = GIW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ROB head of the core
  input  logic                 head_valid,
  input  commit_t              head,
  output logic                 head_ready,
  output reg_state_e [NREGS-1:0] rstate,
  input  logic                 restart,
  // operand handed back to the core's register file
  output logic                 gop_wr,
  output logic [RW-1:0]        gop_reg,
  output logic [DW-1:0]        gop_val,
  output logic                 exc_recovered,
  // GROB commit port
  output logic                 grob_adv,
  output logic                 grob_wr,
  output logic [RW-1:0]        grob_wreg,
  output logic [DW-1:0]        grob_wdata,
  input  logic [GTW-1:0]       grob_tail,
  input  logic                 grob_full,
  // GROB read port
  output logic                 rd_req,
  output logic [GIW-1:0]       rd_idx,
  output logic [RW-1:0]        rd_reg,
  output logic [GTW-1:0]       rd_ts,
  input  logic                 rd_busy,
  input  logic                 rd_ack,
  input  logic [DW-1:0]        rd_data,
  // GSQ insert port
  output logic                 gsq_ins,
  output logic [AW-1:0]        gsq_addr,
  output logic                 gsq_dv,
  output logic [DW-1:0]        gsq_data,
  input  logic                 gsq_full,
  // private L1 data cache
  output logic                 l1_wr,
  output logic                 l1_inv,
  output logic [AW-1:0]        l1_addr,
  // GRAT probe (for the core and for tests)
  input  logic [RW-1:0]        grat_probe_reg,
  output logic [GIW-1:0]       grat_probe_idx
);
  typedef enum logic [1:0] {C_EVAL, C_FETCH, C_WAIT, C_SCAN} cstate_e;

  cstate_e        st_q;
  reg_state_e     rs_q [NREGS];
  logic [RW-1:0]  freg_q;     // register being fetched
  logic           fscan_q;    // fetch belongs to the exception scan
  logic [RW:0]    scan_q;     // next register to scan

  always_comb for (int r = 0; r < NREGS; r++) rstate[r] = rs_q[r];

  // slice join rules on the two sources
  reg_state_e s1, s2, sj_dest;
  logic       sj_exec, sj_rd, sj_wr;
  assign s1 = rs_q[head.src1];
  assign s2 = rs_q[head.src2];
  slice_join_logic u_join (
    .left_i(s1), .right_i(s2),
    .dest_o(sj_dest), .execute_o(sj_exec), .read_grob_o(sj_rd), .write_grob_o(sj_wr)
  );

  // GRAT
  logic          grat_we;
  logic [RW-1:0] grat_lookup_reg;
  logic [GIW-1:0] grat_lookup_idx;
  grat #(.NREGS(NREGS), .IDXW(GIW)) u_grat (
    .clk, .rst_n,
    .we(grat_we), .wreg(head.dest), .widx(grob_tail[GIW-1:0]),
    .rreg_a(grat_lookup_reg), .ridx_a(grat_lookup_idx),
    .rreg_b(grat_probe_reg),  .ridx_b(grat_probe_idx)
  );

  // decision for the head in C_EVAL
  reg_state_e d_state;       // destination state
  logic       d_has_dest, d_fetch, d_commit;
  logic [RW-1:0] d_freg;
  always_comb begin
    d_state    = RS_S;
    d_has_dest = 1'b0;
    d_fetch    = 1'b0;
    d_freg     = head.src2;
    unique case (head.op)
      OP_ALU: begin
        d_has_dest = 1'b1;
        d_state    = sj_dest;
        d_fetch    = sj_rd;
      end
      OP_LOAD: begin
        d_has_dest = 1'b1;
        d_fetch    = sj_rd;
        if (!sj_exec)                      d_state = RS_INV;
        else if (head.ld == LD_MISS_OWN)   d_state = RS_O;
        else if (head.ld == LD_DISCARD)    d_state = RS_INV;
        else                               d_state = sj_dest;
      end
      OP_STORE: begin
        d_fetch = (s1 == RS_INV);
        d_freg  = head.src1;
      end
      OP_BRANCH: begin
        d_fetch = (s1 == RS_INV);
        d_freg  = head.src1;
      end
      default: ;
    endcase
    // resources needed to commit now
    d_commit = head_valid && !head.exc && !d_fetch && st_q == C_EVAL
             && !(d_has_dest && d_state != RS_S && grob_full)
             && !(head.op == OP_STORE && gsq_full);
  end

  assign head_ready = d_commit || (st_q == C_SCAN && scan_q == (RW+1)'(NREGS));

  // commit-side outputs
  always_comb begin
    grob_adv   = d_commit && d_has_dest && d_state != RS_S;
    grob_wr    = grob_adv && d_state == RS_O;
    grob_wreg  = head.dest;
    grob_wdata = head.result;
    grat_we    = grob_adv && d_state == RS_INV;
    gsq_ins    = d_commit && head.op == OP_STORE;
    gsq_addr   = head.addr;
    gsq_dv     = (s2 != RS_INV);
    gsq_data   = head.sdata;
    l1_wr      = gsq_ins && gsq_dv;
    l1_inv     = gsq_ins && !gsq_dv;
    l1_addr    = head.addr;
  end

  // operand fetch
  assign grat_lookup_reg = freg_q;
  assign rd_req  = (st_q == C_FETCH) && !rd_busy;
  assign rd_idx  = grat_lookup_idx;
  assign rd_reg  = freg_q;
  assign rd_ts   = grob_tail;
  assign gop_wr  = (st_q == C_WAIT) && rd_ack;
  assign gop_reg = freg_q;
  assign gop_val = rd_data;
  assign exc_recovered = (st_q == C_SCAN) && scan_q == (RW+1)'(NREGS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= C_EVAL;
      freg_q  <= '0;
      fscan_q <= 1'b0;
      scan_q  <= '0;
      for (int r = 0; r < NREGS; r++) rs_q[r] <= RS_S;
    end else begin
      if (restart)
        for (int r = 0; r < NREGS; r++) rs_q[r] <= RS_S;
      unique case (st_q)
        C_EVAL: begin
          if (head_valid && head.exc) begin
            st_q   <= C_SCAN;
            scan_q <= '0;
          end else if (head_valid && d_fetch) begin
            st_q    <= C_FETCH;
            freg_q  <= d_freg;
            fscan_q <= 1'b0;
          end else if (d_commit && d_has_dest) begin
            rs_q[head.dest] <= d_state;
          end
        end
        C_FETCH: if (rd_req) st_q <= C_WAIT;
        C_WAIT: begin
          if (rd_ack) begin
            rs_q[freg_q] <= RS_S;
            st_q         <= fscan_q ? C_SCAN : C_EVAL;
          end
        end
        C_SCAN: begin
          if (scan_q == (RW+1)'(NREGS)) begin
            st_q <= C_EVAL;                     // excepting instruction leaves
          end else begin
            scan_q <= scan_q + 1'b1;
            if (rs_q[scan_q[RW-1:0]] == RS_INV) begin
              st_q    <= C_FETCH;
              freg_q  <= scan_q[RW-1:0];
              fscan_q <= 1'b1;
            end
          end
        end
        default: st_q <= C_EVAL;
      endcase
    end
  end

  // for two-source ALU instructions the GROB write is the join table's
  always_comb
    if (rst_n && d_commit && head.op == OP_ALU)
      assert (grob_wr == sj_wr && (d_state != RS_S) == (sj_dest != RS_S))
        else $error("pe_commit_unit: GROB write disagrees with join table");
endmodule
