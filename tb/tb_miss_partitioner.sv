// tb_miss_partitioner: four cores, core 3 the lead, four tracking entries.
// Checks: the lead never owns; the first non-lead core on a line owns it and
// later cores discard; only the first miss on a line goes to memory; a fill
// frees the line; one grant per cycle, lowest core first; no grant while the
// table is full or memory is not ready.
module tb_miss_partitioner;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, rsp, own;
  logic [N-1:0][63:0] maddr;
  logic mem_req, mem_ready, mem_fill;
  logic [57:0] mem_addr, fill_addr;
  int checks = 0, failures = 0, memreqs = 0;

  miss_partitioner #(.NPROC(N), .LEAD(3), .NMSHR(4)) dut (.clk, .rst_n, .miss_req(req),
    .miss_addr(maddr), .miss_gnt(gnt), .miss_rsp(rsp), .miss_own(own), .mem_req,
    .mem_addr, .mem_ready, .mem_fill, .mem_fill_addr(fill_addr));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && mem_req) memreqs++;

  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // core p misses on address a; returns whether it must wait
  task automatic miss(input int p, input logic [63:0] a, output bit o);
    @(negedge clk);
    req[p] = 1; maddr[p] = a;
    while (!gnt[p]) @(negedge clk);
    @(negedge clk);
    req[p] = 0;
    checks++;
    if (!rsp[p]) begin failures++; $display("no answer for core %0d", p); end
    o = own[p];
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit o;
  initial begin
    req = 0; maddr = 0; mem_ready = 1; mem_fill = 0; fill_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    miss(3, 64'h1000, o); chk("lead discards", o, 0); chk("prefetch sent", memreqs, 1);
    miss(1, 64'h1008, o); chk("first trailer owns", o, 1);
    miss(0, 64'h1010, o); chk("second trailer discards", o, 0);
    miss(2, 64'h1000, o); chk("third trailer discards", o, 0);
    miss(1, 64'h1000, o); chk("owner asks again", o, 1);
    chk("one memory request per line", memreqs, 1);
    miss(0, 64'h2000, o); chk("new line owned by first", o, 1); chk("second fetch", memreqs, 2);
    // simultaneous misses on a new line: core 0 first, core 2 next
    @(negedge clk);
    req = 4'b0101; maddr[0] = 64'h3000; maddr[2] = 64'h3000;
    #1 chk("core 0 granted first", gnt, 4'b0001);
    @(negedge clk);
    req[0] = 0;
    chk("core 0 owns", own[0], 1);
    #1 chk("core 2 granted next", gnt, 4'b0100);
    @(negedge clk);
    chk("core 2 discards", own[2], 0);
    req = 0;
    // fill of 0x1000's line frees it; next miss starts over
    @(negedge clk); mem_fill = 1; fill_addr = 58'h40;
    @(negedge clk); mem_fill = 0;
    miss(2, 64'h1000, o); chk("after fill, new owner", o, 1); chk("refetch", memreqs, 4);
    // table: 0x1000, 0x2000, 0x3000 and one more fill the four entries
    miss(3, 64'h4000, o); chk("lead on fourth line", o, 0);
    @(negedge clk); req[1] = 1; maddr[1] = 64'h5000;
    repeat (3) begin #1 chk("no grant when table full", gnt[1], 0); @(negedge clk); end
    mem_fill = 1; fill_addr = 58'h80;     // frees 0x2000
    @(negedge clk); mem_fill = 0;
    #1 chk("granted after free", gnt[1], 1);
    @(negedge clk); req = 0;
    @(negedge clk); mem_fill = 1; fill_addr = 58'h140;   // frees 0x5000
    @(negedge clk); mem_fill = 0; mem_ready = 0;
    @(negedge clk); req[0] = 1; maddr[0] = 64'h6000;
    #1 chk("no grant while memory busy", gnt[0], 0);
    @(negedge clk); mem_ready = 1;
    #1 chk("granted when memory ready", gnt[0], 1);
    @(negedge clk); req = 0;
    chk("owns new line", own[0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
