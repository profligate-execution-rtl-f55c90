// grat: Global Register Alias Table of one core.
//
// One entry per logical register holding the global reorder buffer index of the
// most recent miss-dependent producer of that register (9 bits for a 512-entry
// buffer, 64 registers). One synchronous write port, used at commit, and two
// combinational read ports, one for the commit logic's operand lookup and one
// spare. Entries reset to index 0; the document does not say what an unwritten
// entry holds, and the commit logic only reads entries of poisoned registers,
// which were written when they were poisoned.
module grat #(
  parameter int unsigned NREGS = 64,
  parameter int unsigned IDXW  = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(NREGS)-1:0]  wreg,
  input  logic [IDXW-1:0]           widx,
  input  logic [$clog2(NREGS)-1:0]  rreg_a,
  output logic [IDXW-1:0]           ridx_a,
  input  logic [$clog2(NREGS)-1:0]  rreg_b,
  output logic [IDXW-1:0]           ridx_b
);
  logic [IDXW-1:0] tab [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) tab[i] <= '0;
    end else if (we) begin
      tab[wreg] <= widx;
    end
  end

  assign ridx_a = tab[rreg_a];
  assign ridx_b = tab[rreg_b];
endmodule
