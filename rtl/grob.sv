// grob: Global Reorder Buffer with its Global Architectural Register File.
//
// A circular queue with one entry per miss-dependent (slice) instruction of the
// global instruction stream. Every core walks the same queue with a tail counter
// of its own: it advances its tail whenever it commits a slice instruction, and
// the core that owns the instruction (executed it) also writes the entry with
// {timestamp, destination register, value}. The tail counter is one bit wider
// than the index and doubles as the logical timestamp (log2(ENTRIES)+1 bits).
// The head follows the slowest tail; an entry the head passes is reclaimed and,
// if it was written, its value is copied into the GARF.
//
// Operand reads (for a slice join, a poisoned branch or store-address source, or
// exception recovery) name a GROB index taken from the core's GRAT, the source
// register and the timestamp of the consuming instruction. If the entry's
// timestamp is not older than the consumer, the producer's entry has been
// recycled and the value comes from the GARF; otherwise the read blocks until
// the owner has written the entry. A read answers no sooner than LAT cycles
// after it is issued (the GRAT+GROB latency). For an entry not yet written in
// its current generation the timestamp is derived from the head position.
//
// After an exception the recovering core restarts the others at the faulting
// instruction. realign[p] sets core p's tail to realign_tail (the recovering
// core's tail) and drops every entry at or beyond that point, since only cores
// that ran ahead wrote them. The restarted cores must have reached that point.
//
// Per-core interface: adv/wr/wreg/wdata commit port, tail (= timestamp) and
// full outputs, a restart port (realign/realign_tail), and a one-outstanding
// read port rd_req -> rd_ack (one-cycle pulse) with rd_data. Queue
// organisation, fields, sizes, reclaim into the GARF and the timestamp test
// follow the document; the one-commit-per-cycle port, the handshake, the
// restart pull-back and the derived timestamp of unwritten entries are this
// design's choices.
module grob
  import pe_pkg::*;
#(
  parameter int unsigned NPROC   = 4,
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned NREGS   = 64,
  parameter int unsigned DW      = 64,
  parameter int unsigned LAT     = 10,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned TW     = IW + 1,
  localparam int unsigned RW     = $clog2(NREGS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // commit ports
  input  logic [NPROC-1:0]           adv,
  input  logic [NPROC-1:0]           wr,
  input  logic [NPROC-1:0][RW-1:0]   wreg,
  input  logic [NPROC-1:0][DW-1:0]   wdata,
  output logic [NPROC-1:0][TW-1:0]   tail,
  output logic [NPROC-1:0]           full,
  output logic [TW-1:0]              head,
  // exception restart: listed cores take realign_tail as their tail
  input  logic [NPROC-1:0]           realign,
  input  logic [TW-1:0]              realign_tail,
  // operand read ports
  input  logic [NPROC-1:0]           rd_req,
  input  logic [NPROC-1:0][IW-1:0]   rd_idx,
  input  logic [NPROC-1:0][RW-1:0]   rd_reg,
  input  logic [NPROC-1:0][TW-1:0]   rd_ts,
  output logic [NPROC-1:0]           rd_busy,
  output logic [NPROC-1:0]           rd_ack,
  output logic [NPROC-1:0][DW-1:0]   rd_data,
  output logic [NPROC-1:0]           rd_from_garf
);
  // entry storage
  logic [ENTRIES-1:0] written;
  logic [TW-1:0]      e_ts  [ENTRIES];
  logic [RW-1:0]      e_reg [ENTRIES];
  logic [DW-1:0]      e_val [ENTRIES];

  logic [NPROC-1:0][TW-1:0] tail_q;
  logic [TW-1:0]            head_q;
  logic                     head_adv;
  logic [IW-1:0]            head_idx;

  assign tail     = tail_q;
  assign head     = head_q;
  assign head_idx = head_q[IW-1:0];

  always_comb begin
    head_adv = 1'b1;
    for (int p = 0; p < NPROC; p++) begin
      full[p] = ((tail_q[p] - head_q) == TW'(ENTRIES));
      if (tail_q[p] == head_q) head_adv = 1'b0;
    end
  end

  // GARF, written on reclaim
  logic [NPROC-1:0][RW-1:0] garf_rreg;
  logic [NPROC-1:0][DW-1:0] garf_rdata;
  garf #(.NREGS(NREGS), .DW(DW), .NRD(NPROC)) u_garf (
    .clk, .rst_n,
    .we   (head_adv && written[head_idx]),
    .wreg (e_reg[head_idx]),
    .wdata(e_val[head_idx]),
    .rreg (garf_rreg),
    .rdata(garf_rdata)
  );

  // tails, head and entries
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_q  <= '0;
      head_q  <= '0;
      written <= '0;
    end else begin
      if (head_adv) begin
        head_q            <= head_q + 1'b1;
        written[head_idx] <= 1'b0;
      end
      for (int p = 0; p < NPROC; p++) begin
        if (adv[p] && !full[p]) begin
          tail_q[p] <= tail_q[p] + 1'b1;
          if (wr[p]) written[tail_q[p][IW-1:0]] <= 1'b1;
        end
        if (realign[p]) tail_q[p] <= realign_tail;
      end
      // entries at or beyond the restart point were written by cores that ran
      // ahead of it; they will be written again
      if (|realign)
        for (int i = 0; i < ENTRIES; i++)
          if (TW'(IW'(i) - head_idx) >= TW'(realign_tail - head_q)) written[i] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPROC; p++) begin
      if (adv[p] && wr[p] && !full[p]) begin
        e_ts [tail_q[p][IW-1:0]] <= tail_q[p];
        e_reg[tail_q[p][IW-1:0]] <= wreg[p];
        e_val[tail_q[p][IW-1:0]] <= wdata[p];
      end
    end
  end

  // operand read ports
  logic [NPROC-1:0]           busy_q;
  logic [NPROC-1:0][IW-1:0]   ridx_q;
  logic [NPROC-1:0][RW-1:0]   rreg_q;
  logic [NPROC-1:0][TW-1:0]   rts_q;
  logic [NPROC-1:0][7:0]      cnt_q;
  logic [NPROC-1:0]           ack_q, fromg_q;
  logic [NPROC-1:0][DW-1:0]   data_q;

  logic [NPROC-1:0][TW-1:0]   eff_ts;
  logic [NPROC-1:0]           recycled, ready;

  always_comb begin
    for (int p = 0; p < NPROC; p++) begin
      garf_rreg[p] = rreg_q[p];
      if (written[ridx_q[p]])
        eff_ts[p] = e_ts[ridx_q[p]];
      else
        eff_ts[p] = head_q + TW'(IW'(ridx_q[p] - head_idx));
      // entry timestamp not older than the consumer: producer already retired
      recycled[p] = ((eff_ts[p] - rts_q[p]) & (TW'(1) << (TW-1))) == '0;
      ready[p]    = recycled[p] || written[ridx_q[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= '0;
      ack_q   <= '0;
      fromg_q <= '0;
      cnt_q   <= '0;
      ridx_q  <= '0;
      rreg_q  <= '0;
      rts_q   <= '0;
      data_q  <= '0;
    end else begin
      for (int p = 0; p < NPROC; p++) begin
        ack_q[p] <= 1'b0;
        if (!busy_q[p]) begin
          if (rd_req[p]) begin
            busy_q[p] <= 1'b1;
            ridx_q[p] <= rd_idx[p];
            rreg_q[p] <= rd_reg[p];
            rts_q[p]  <= rd_ts[p];
            cnt_q[p]  <= 8'(LAT - 2);
          end
        end else if (cnt_q[p] != 0) begin
          cnt_q[p] <= cnt_q[p] - 1'b1;
        end else if (ready[p]) begin
          busy_q[p]  <= 1'b0;
          ack_q[p]   <= 1'b1;
          fromg_q[p] <= recycled[p];
          data_q[p]  <= recycled[p] ? garf_rdata[p] : e_val[ridx_q[p]];
        end
      end
    end
  end

  assign rd_busy      = busy_q;
  assign rd_ack       = ack_q;
  assign rd_data      = data_q;
  assign rd_from_garf = fromg_q;

  initial assert (LAT >= 2 && LAT < 256) else $error("grob: LAT must be 2..255");

  // a written entry is live, so its stored timestamp is its generation's
  always_comb
    for (int p = 0; p < NPROC; p++)
      if (rst_n && busy_q[p] && written[ridx_q[p]])
        assert (e_ts[ridx_q[p]] == head_q + TW'(IW'(ridx_q[p] - head_idx)))
          else $error("grob: stale timestamp in written entry");

  // a restarted core has reached the restart point and commits nothing then
  always_comb
    for (int p = 0; p < NPROC; p++)
      if (rst_n && realign[p])
        assert (TW'(tail_q[p] - head_q) >= TW'(realign_tail - head_q) && !adv[p]
                && TW'(realign_tail - head_q) <= TW'(ENTRIES))
          else $error("grob: restart point ahead of a restarted core");
endmodule
