// load_resolve: where an issuing load gets its value.
//
// The decision order for a load at issue: a hit in the core's private store
// queue with the store data available forwards that data; otherwise the L1 data
// cache and the global store queue are searched in parallel. An L1 hit uses the
// L1 data. An L1 miss that matches an older store in the global store queue is
// treated as a miss and discarded: the load and its destination are poisoned.
// Otherwise the load goes to the L2, where an L2 miss is handed to the miss
// partitioner, which answers own (wait) or discard.
//
// Combinational. The inputs are the results of the individual lookups, with
// gsq_done telling that the global store queue answer has arrived; src_action
// says which source the core should use. The order of the tests follows the
// document's flow chart for loads; the encoding is this design's own.
module load_resolve (
  input  logic       stq_hit,
  input  logic       stq_data_avail,
  input  logic       l1_hit,
  input  logic       gsq_done,
  input  logic       gsq_match,
  output logic [2:0] src_action   // see localparams below
);
  localparam logic [2:0] A_FWD_STQ = 3'd0;  // forward store data from the STQ
  localparam logic [2:0] A_USE_L1  = 3'd1;  // use L1 data
  localparam logic [2:0] A_POISON  = 3'd2;  // mark load and destination INV
  localparam logic [2:0] A_L2      = 3'd3;  // access the L2
  localparam logic [2:0] A_WAIT    = 3'd4;  // GSQ answer still outstanding

  always_comb begin
    if (stq_hit && stq_data_avail) src_action = A_FWD_STQ;
    else if (l1_hit)               src_action = A_USE_L1;
    else if (!gsq_done)            src_action = A_WAIT;
    else if (gsq_match)            src_action = A_POISON;
    else                           src_action = A_L2;
  end
endmodule
