// miss_partitioner: L2 cache-controller policy that decides which core waits
// for a miss to main memory.
//
// One core is the lead (LEAD): it never waits for a miss, but its miss still
// goes to memory and so acts as a prefetch. The first non-lead core that misses
// on a line whose fill is outstanding (or that starts a fill) is told to own the
// miss and wait for it; every later core missing on the same line is told to
// discard the load and poison its destination. Outstanding fills are tracked in
// NMSHR entries of {line, owner assigned, owner}; an entry is freed when memory
// returns the line, so a later miss on that line starts over.
//
// Interface: per core miss_req/miss_addr with miss_gnt (one core per cycle,
// lowest index first); the answer miss_rsp/miss_own follows one cycle after the
// grant. mem_req/mem_addr (line address) goes to memory with mem_ready, and
// mem_fill/mem_fill_addr frees the entry. The lead rule and first-trailer-owns
// rule follow the document; the per-line tracking table, its size, the fixed
// priority and the handshake are this design's choices. A core is refused
// (no grant) while the table is full or memory is not ready for a new line.
module miss_partitioner #(
  parameter int unsigned NPROC    = 4,
  parameter int unsigned LEAD     = 3,
  parameter int unsigned NMSHR    = 16,
  parameter int unsigned AW       = 64,
  parameter int unsigned LINE_LSB = 6,
  localparam int unsigned PW      = $clog2(NPROC)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NPROC-1:0]          miss_req,
  input  logic [NPROC-1:0][AW-1:0]  miss_addr,
  output logic [NPROC-1:0]          miss_gnt,
  output logic [NPROC-1:0]          miss_rsp,
  output logic [NPROC-1:0]          miss_own,
  output logic                      mem_req,
  output logic [AW-LINE_LSB-1:0]    mem_addr,
  input  logic                      mem_ready,
  input  logic                      mem_fill,
  input  logic [AW-LINE_LSB-1:0]    mem_fill_addr
);
  typedef struct packed {
    logic                  valid;
    logic [AW-LINE_LSB-1:0] line;
    logic                  assigned;
    logic [PW-1:0]         owner;
  } mshr_t;

  mshr_t tab [NMSHR];

  logic                   any;
  logic [PW-1:0]          sel;
  logic [AW-LINE_LSB-1:0] line;
  logic                   hit, freeok;
  logic [$clog2(NMSHR)-1:0] hit_i, free_i;
  logic                   do_grant;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int p = NPROC - 1; p >= 0; p--)
      if (miss_req[p]) begin any = 1'b1; sel = PW'(p); end
    line   = miss_addr[sel][AW-1:LINE_LSB];
    hit    = 1'b0;
    hit_i  = '0;
    freeok = 1'b0;
    free_i = '0;
    for (int i = NMSHR - 1; i >= 0; i--) begin
      if (tab[i].valid && tab[i].line == line) begin hit = 1'b1; hit_i = $clog2(NMSHR)'(i); end
      if (!tab[i].valid) begin freeok = 1'b1; free_i = $clog2(NMSHR)'(i); end
    end
    do_grant = any && (hit || (freeok && mem_ready));
    mem_req  = any && !hit && freeok && mem_ready;
    mem_addr = line;
    miss_gnt = '0;
    if (do_grant) miss_gnt[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMSHR; i++) tab[i] <= '0;
      miss_rsp <= '0;
      miss_own <= '0;
    end else begin
      miss_rsp <= '0;
      miss_own <= '0;
      if (mem_fill)
        for (int i = 0; i < NMSHR; i++)
          if (tab[i].valid && tab[i].line == mem_fill_addr) tab[i].valid <= 1'b0;
      if (do_grant) begin
        miss_rsp[sel] <= 1'b1;
        if (hit) begin
          if (sel != PW'(LEAD) && !tab[hit_i].assigned) begin
            tab[hit_i].assigned <= 1'b1;
            tab[hit_i].owner    <= sel;
            miss_own[sel]       <= 1'b1;
          end else begin
            miss_own[sel] <= tab[hit_i].assigned && tab[hit_i].owner == sel;
          end
        end else begin
          tab[free_i].valid    <= 1'b1;
          tab[free_i].line     <= line;
          tab[free_i].assigned <= (sel != PW'(LEAD));
          tab[free_i].owner    <= sel;
          miss_own[sel]        <= (sel != PW'(LEAD));
        end
      end
    end
  end
endmodule
