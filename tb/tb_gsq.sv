// tb_gsq: two cores on an 8-entry GSQ with a 3-cycle search latency.
// Checks: stores leave for the L2 only after both cores have inserted them and
// in program order; data skipped by one core is taken from the other; the
// address search sees only stores older than the load's position, flags
// missing data, and answers after exactly LAT cycles; full stops a core; a
// restart pulls a core's tail back and drops the stores it inserted past it.
module tb_gsq;
  localparam int N = 2, E = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ins, dv, full, ld_req, ld_ack, ld_match, ld_mnd;
  logic [N-1:0][63:0] addr, data, ld_addr;
  logic [N-1:0][3:0] tail, ld_pos;
  logic [3:0] head, realign_tail;
  logic [N-1:0] realign;
  logic rel_valid, rel_ready;
  logic [63:0] rel_addr, rel_data;
  int checks = 0, failures = 0;
  logic [63:0] rel_log_a [$], rel_log_d [$];

  gsq #(.NPROC(N), .ENTRIES(E), .LAT(LAT)) dut (.clk, .rst_n, .ins, .ins_addr(addr),
    .ins_dv(dv), .ins_data(data), .tail, .full, .head, .realign, .realign_tail, .ld_req, .ld_addr, .ld_pos,
    .ld_ack, .ld_match, .ld_match_nodata(ld_mnd), .rel_valid, .rel_ready, .rel_addr, .rel_data);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n && rel_valid && rel_ready) begin
      rel_log_a.push_back(rel_addr); rel_log_d.push_back(rel_data);
    end

  task automatic chk(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic store(input int p, input logic [63:0] a, input bit v, input logic [63:0] d);
    @(negedge clk);
    ins = '0; ins[p] = 1; addr[p] = a; dv[p] = v; data[p] = d;
    @(negedge clk);
    ins = '0;
  endtask

  task automatic search(input int p, input logic [63:0] a, input logic [3:0] pos,
                        output bit m, output bit mnd, output int cyc);
    @(negedge clk);
    ld_req[p] = 1; ld_addr[p] = a; ld_pos[p] = pos;
    @(negedge clk);
    ld_req[p] = 0;
    cyc = 1;
    while (!ld_ack[p]) begin @(negedge clk); cyc++; end
    m = ld_match[p]; mnd = ld_mnd[p];
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m, mnd; int cyc;
  initial begin
    realign = 0; realign_tail = 0;
    ins = 0; dv = 0; addr = 0; data = 0; ld_req = 0; ld_addr = 0; ld_pos = 0; rel_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // P0 commits three stores; data of the first is poisoned on P0
    store(0, 64'h200, 0, 0);
    store(0, 64'h300, 1, 64'h3);
    store(0, 64'h400, 1, 64'h4);
    chk("tail0", tail[0], 3);
    chk("nothing released yet", 64'(rel_log_a.size()), 0);
    // P1 searches: load positioned after two stores, address of the second
    search(1, 64'h300, 4'd2, m, mnd, cyc);
    chk("match older store", m, 1); chk("has data", mnd, 0); chk("search latency", cyc, LAT);
    search(1, 64'h304, 4'd2, m, mnd, cyc);
    chk("same word matches", m, 1);
    search(1, 64'h300, 4'd1, m, mnd, cyc);
    chk("younger store ignored", m, 0);
    search(1, 64'h200, 4'd1, m, mnd, cyc);
    chk("match missing data", m, 1); chk("missing data flag", mnd, 1);
    search(1, 64'h500, 4'd3, m, mnd, cyc);
    chk("no match", m, 0);
    // P1 owns the first store's data, then inserts the others
    store(1, 64'h200, 1, 64'h2);
    @(negedge clk);
    chk("first released", 64'(rel_log_a.size()), 1);
    store(1, 64'h300, 1, 64'h3);
    store(1, 64'h400, 0, 0);
    repeat (2) @(negedge clk);
    chk("three released", 64'(rel_log_a.size()), 3);
    if (rel_log_a.size() == 3) begin
      chk("order a0", rel_log_a[0], 64'h200); chk("data d0", rel_log_d[0], 64'h2);
      chk("order a1", rel_log_a[1], 64'h300); chk("data d1", rel_log_d[1], 64'h3);
      chk("order a2", rel_log_a[2], 64'h400); chk("data d2", rel_log_d[2], 64'h4);
    end
    search(0, 64'h200, 4'd3, m, mnd, cyc);
    chk("released store no longer matches", m, 0);
    // L2 back-pressure and full
    rel_ready = 0;
    for (int i = 0; i < 8; i++) store(0, 64'h1000 + 64'(i) * 8, 1, 64'(i));
    chk("P0 full", full[0], 1);
    store(0, 64'hDEAD, 1, 0);
    chk("tail held", tail[0], 4'd11);
    for (int i = 0; i < 8; i++) store(1, 64'h1000 + 64'(i) * 8, 1, 64'(i));
    chk("held by L2", 64'(rel_log_a.size()), 3);
    rel_ready = 1;
    repeat (10) @(negedge clk);
    chk("all released", 64'(rel_log_a.size()), 11);
    if (rel_log_a.size() == 11) chk("last address", rel_log_a[10], 64'h1038);
    // P0 runs two stores past a fault on P1, then is restarted at P1's tail
    store(0, 64'h500, 1, 64'h5);
    store(0, 64'h508, 1, 64'h6);
    @(negedge clk);
    realign[0] = 1; realign_tail = tail[1];
    @(negedge clk);
    realign = 0;
    chk("tail0 pulled back", tail[0], 4'd11);
    search(1, 64'h500, 4'd13, m, mnd, cyc);
    chk("dropped store does not match", m, 0);
    store(0, 64'h600, 1, 64'h66);
    store(1, 64'h600, 1, 64'h66);
    repeat (4) @(negedge clk);
    chk("one store after restart", 64'(rel_log_a.size()), 12);
    if (rel_log_a.size() == 12) begin
      chk("store after restart addr", rel_log_a[11], 64'h600);
      chk("store after restart data", rel_log_d[11], 64'h66);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
