// gsq: Global Store Queue between the private L1 caches and the shared L2.
//
// An ordered, non-coalescing FIFO of {address, data} entries. Like the global
// reorder buffer, every core keeps its own tail counter into the one queue: when
// a core commits a store it writes the address at its tail, the data too if its
// copy of the data register is valid, and advances the tail. Cores write the
// same entry redundantly with identical values; data missing at one core
// (poisoned) is filled in later by the core that owns it. Once every tail has
// passed the oldest entry it is released to the L2, so stores reach the L2 in
// program order (no write-after-write violation across cores).
//
// Loads that miss in their L1 and local store queue search the queue by
// address (a CAM). A load names its position in the store stream, ld_pos: the
// count of the first store younger than it; only valid entries from the head up
// to that position are older and can match. The answer comes LAT cycles after
// the request (GSQ access latency), one request per core per cycle, pipelined.
// Addresses are compared on whole 8-byte words (bits above MATCH_LSB).
//
// Interface per core: ins/ins_addr/ins_dv/ins_data with tail and full; ld_req/
// ld_addr/ld_pos -> ld_ack/ld_match/ld_match_nodata. Restart: realign[p] sets
// core p's tail to realign_tail (the recovering core's tail) after an
// exception and drops the stores at or beyond it, which only cores that ran
// ahead had inserted; they insert them again. To the L2: rel_valid/rel_ready/
// rel_addr/rel_data. The FIFO with per-core tails, redundant writes, in-order
// release and the address CAM follow the document; the ld_pos ordering tag,
// word-granularity compare, restart pull-back and handshakes are this
// design's choices.
module gsq #(
  parameter int unsigned NPROC     = 4,
  parameter int unsigned ENTRIES   = 256,
  parameter int unsigned AW        = 64,
  parameter int unsigned DW        = 64,
  parameter int unsigned LAT       = 15,
  parameter int unsigned MATCH_LSB = 3,
  localparam int unsigned IW       = $clog2(ENTRIES),
  localparam int unsigned TW       = IW + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // store insertion at commit
  input  logic [NPROC-1:0]          ins,
  input  logic [NPROC-1:0][AW-1:0]  ins_addr,
  input  logic [NPROC-1:0]          ins_dv,
  input  logic [NPROC-1:0][DW-1:0]  ins_data,
  output logic [NPROC-1:0][TW-1:0]  tail,
  output logic [NPROC-1:0]          full,
  output logic [TW-1:0]             head,
  // exception restart: listed cores take realign_tail as their tail
  input  logic [NPROC-1:0]          realign,
  input  logic [TW-1:0]             realign_tail,
  // load address search
  input  logic [NPROC-1:0]          ld_req,
  input  logic [NPROC-1:0][AW-1:0]  ld_addr,
  input  logic [NPROC-1:0][TW-1:0]  ld_pos,
  output logic [NPROC-1:0]          ld_ack,
  output logic [NPROC-1:0]          ld_match,
  output logic [NPROC-1:0]          ld_match_nodata,
  // in-order release to the L2
  output logic                      rel_valid,
  input  logic                      rel_ready,
  output logic [AW-1:0]             rel_addr,
  output logic [DW-1:0]             rel_data
);
  logic [ENTRIES-1:0] av, dv;
  logic [AW-1:0]      e_addr [ENTRIES];
  logic [DW-1:0]      e_data [ENTRIES];

  logic [NPROC-1:0][TW-1:0] tail_q;
  logic [TW-1:0]            head_q;
  logic [IW-1:0]            head_idx;
  logic                     all_past;

  assign head     = head_q;
  assign tail     = tail_q;
  assign head_idx = head_q[IW-1:0];

  always_comb begin
    all_past = 1'b1;
    for (int p = 0; p < NPROC; p++) begin
      full[p] = ((tail_q[p] - head_q) == TW'(ENTRIES));
      if (tail_q[p] == head_q) all_past = 1'b0;
    end
  end

  assign rel_valid = all_past;
  assign rel_addr  = e_addr[head_idx];
  assign rel_data  = e_data[head_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_q <= '0;
      head_q <= '0;
      av     <= '0;
      dv     <= '0;
    end else begin
      if (rel_valid && rel_ready) begin
        head_q       <= head_q + 1'b1;
        av[head_idx] <= 1'b0;
        dv[head_idx] <= 1'b0;
      end
      for (int p = 0; p < NPROC; p++) begin
        if (ins[p] && !full[p]) begin
          tail_q[p]                  <= tail_q[p] + 1'b1;
          av[tail_q[p][IW-1:0]]      <= 1'b1;
          if (ins_dv[p]) dv[tail_q[p][IW-1:0]] <= 1'b1;
        end
        if (realign[p]) tail_q[p] <= realign_tail;
      end
      // stores at or beyond the restart point came from cores that ran ahead
      if (|realign)
        for (int i = 0; i < ENTRIES; i++)
          if (TW'(IW'(i) - head_idx) >= TW'(realign_tail - head_q)) begin
            av[i] <= 1'b0;
            dv[i] <= 1'b0;
          end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPROC; p++) begin
      if (ins[p] && !full[p]) begin
        e_addr[tail_q[p][IW-1:0]] <= ins_addr[p];
        if (ins_dv[p]) e_data[tail_q[p][IW-1:0]] <= ins_data[p];
      end
    end
  end

  // address CAM, limited to stores older than the load
  logic [NPROC-1:0] m_now, mnd_now;
  always_comb begin
    for (int p = 0; p < NPROC; p++) begin
      m_now[p]   = 1'b0;
      mnd_now[p] = 1'b0;
      for (int i = 0; i < ENTRIES; i++) begin
        if (av[i]
            && (TW'(IW'(i) - head_idx) < TW'(ld_pos[p] - head_q))
            && (e_addr[i][AW-1:MATCH_LSB] == ld_addr[p][AW-1:MATCH_LSB])) begin
          m_now[p] = 1'b1;
          if (!dv[i]) mnd_now[p] = 1'b1;
        end
      end
    end
  end

  // fixed access latency
  logic [LAT-1:0][NPROC-1:0] pv_q, pm_q, pmnd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q   <= '0;
      pm_q   <= '0;
      pmnd_q <= '0;
    end else begin
      pv_q[0]   <= ld_req;
      pm_q[0]   <= m_now & ld_req;
      pmnd_q[0] <= mnd_now & ld_req;
      for (int s = 1; s < LAT; s++) begin
        pv_q[s]   <= pv_q[s-1];
        pm_q[s]   <= pm_q[s-1];
        pmnd_q[s] <= pmnd_q[s-1];
      end
    end
  end
  assign ld_ack          = pv_q[LAT-1];
  assign ld_match        = pm_q[LAT-1];
  assign ld_match_nodata = pmnd_q[LAT-1];

  // a store leaves only with its data: its owner wrote it before passing it
  always_comb
    if (rst_n && rel_valid && rel_ready)
      assert (av[head_idx] && dv[head_idx]) else $error("gsq: released store without data");

  // a restarted core has reached the restart point and inserts nothing then
  always_comb
    for (int p = 0; p < NPROC; p++)
      if (rst_n && realign[p])
        assert (TW'(tail_q[p] - head_q) >= TW'(realign_tail - head_q) && !ins[p]
                && TW'(realign_tail - head_q) <= TW'(ENTRIES))
          else $error("gsq: restart point ahead of a restarted core");
endmodule
