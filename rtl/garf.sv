// garf: Global Architectural Register File.
//
// Holds, for each of the 64 logical registers, the value of the youngest slice
// producer whose global reorder buffer entry has been reclaimed. One synchronous
// write port (driven by reclaim), NRD combinational read ports (one per core's
// operand request). Registers reset to zero; the document does not give an
// initial value.
module garf #(
  parameter int unsigned NREGS = 64,
  parameter int unsigned DW    = 64,
  parameter int unsigned NRD   = 4
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                we,
  input  logic [$clog2(NREGS)-1:0]            wreg,
  input  logic [DW-1:0]                       wdata,
  input  logic [NRD-1:0][$clog2(NREGS)-1:0]   rreg,
  output logic [NRD-1:0][DW-1:0]              rdata
);
  logic [DW-1:0] rf [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else if (we) begin
      rf[wreg] <= wdata;
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = rf[rreg[p]];
endmodule
