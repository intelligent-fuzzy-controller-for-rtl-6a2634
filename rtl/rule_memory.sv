// rule_memory: the R rule memory holding one overall fuzzy relation per
// CSFO FSM state.
//
// A relation R is U_MAX rows of W_MAX degrees (25 x 75 bits, about 1/4 kbyte).
// To feed PATHS parallel datapaths, a memory word carries PATHS consecutive
// rows: word g of relation k holds rows g*PATHS .. g*PATHS+PATHS-1, and the
// words of relation k sit at addresses k*GROUPS .. k*GROUPS+GROUPS-1 with
// GROUPS = ceil(U_MAX/PATHS). Rows beyond U_MAX in the last word are padding.
// The original design gives the capacity and that every state gets its own relation;
// the word organisation is this design's choice.
//
// Timing: synchronous read, data valid the cycle after rd_en. Writes take
// effect at the clock edge, with one enable per row lane so a single row can
// be written. Reading and writing the same word in one cycle returns the old
// contents. The array is not reset.
module rule_memory
  import fuzzy_pkg::*;
#(
  parameter int unsigned PATHS    = 4,
  parameter int unsigned NSTATES  = N_STATES,
  localparam int unsigned GROUPS  = (U_MAX + PATHS - 1) / PATHS,
  localparam int unsigned DEPTH   = NSTATES * GROUPS,
  localparam int unsigned ADDR_W  = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output fvec_t             rd_data [PATHS],
  input  logic [PATHS-1:0]  wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  fvec_t             wr_data [PATHS]
);

  // One simple dual-port array per row lane.
  for (genvar p = 0; p < int'(PATHS); p++) begin : g_lane
    fvec_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (rd_en)    rd_data[p]     <= mem[rd_addr];
      if (wr_en[p]) mem[wr_addr]   <= wr_data[p];
    end
  end

endmodule
