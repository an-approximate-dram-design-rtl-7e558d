// addr_decoder: cache-line address to rank, bank, row and column of the hybrid memory.
//
// The hybrid memory puts precise data (code, critical data) in a precise rank of 4 Gb x8 devices
// and approximate data (DNN weights and feature maps) in the APPROX2 rank of 4 Gb x4 devices. The
// line address space is laid out as
//     [0, P_LINES)                 precise rank, P_LINES = 2^(P_COLL_W+BANK_W+ROW_W)   (4 GB)
//     [P_LINES, P_LINES+A_LINES)   approximate rank, A_LINES = 2^(A_COLL_W+BANK_W+ROW_W) (8 GB)
//     above                        unmapped (valid = 0)
// Within a rank the line index is split row:bank:column, the column part selecting one of the
// eight-beat bursts of a row (a x8 row of 1K columns holds 128 lines, a x4 row of 2K columns 256).
// The region split by address range follows the document's precise and approximate memory space;
// the sizes and the row:bank:column order are this design's choices. Combinational.
module addr_decoder
  import approx_pkg::*;
#(
  parameter int unsigned P_COLL_W = 7,  // line index bits within a precise-rank row
  parameter int unsigned A_COLL_W = 8   // line index bits within an approximate-rank row
) (
  input  logic [LINE_ADDR_W-1:0] line_addr,
  output dram_loc_t              loc,
  output logic                   valid
);
  localparam logic [LINE_ADDR_W:0] P_LINES = (LINE_ADDR_W+1)'(1) << (P_COLL_W + BANK_W + ROW_W);
  localparam logic [LINE_ADDR_W:0] A_LINES = (LINE_ADDR_W+1)'(1) << (A_COLL_W + BANK_W + ROW_W);
  localparam int unsigned BURST_W = $clog2(BURST_LEN);

  logic [LINE_ADDR_W:0] a_idx;

  always_comb begin
    a_idx = {1'b0, line_addr} - P_LINES;
    loc   = '0;
    valid = 1'b1;
    if ({1'b0, line_addr} < P_LINES) begin
      loc.region = REGION_PRECISE;
      loc.col    = COL_W'(line_addr[P_COLL_W-1:0]) << BURST_W;
      loc.bank   = line_addr[P_COLL_W +: BANK_W];
      loc.row    = line_addr[P_COLL_W+BANK_W +: ROW_W];
    end else begin
      loc.region = REGION_APPROX;
      loc.col    = COL_W'(a_idx[A_COLL_W-1:0]) << BURST_W;
      loc.bank   = a_idx[A_COLL_W +: BANK_W];
      loc.row    = a_idx[A_COLL_W+BANK_W +: ROW_W];
      valid      = (a_idx < A_LINES);
    end
  end
endmodule
