// approx2_bit_map: APPROX2 bit-significance data mapping for one 64-bit beat.
//
// A beat holds two 32-bit words, DATA1 in bits [63:32] and DATA0 in bits [31:0]. On the way to
// the approximate rank the bits are regrouped so that device n (data pins [4n+3:4n]) receives
// {DATA1[2n+1:2n], DATA0[2n+1:2n]}: device 15 gets both words' bits [31:30], device 14 bits [29:28],
// and so on down to device 0 with bits [1:0]. The read path applies the inverse permutation.
// The mapping is applied only while en is high (an access to the approximate rank); with en low
// both paths pass the beat unchanged, which is the conventional layout of the precise rank.
// The grouping by two bit positions follows the document; the order of the four bits inside a
// device (DATA1 pair above DATA0 pair) is this design's choice. Purely combinational, no latency.
module approx2_bit_map
  import approx_pkg::*;
#(
  parameter int unsigned NDEV   = NUM_DEV,  // devices in the rank
  parameter int unsigned GRAN   = 2         // bits of one word per device (APPROX2: 2)
) (
  input  logic                   en,        // 1: approximate rank, apply the mapping
  input  logic [2*NDEV*GRAN-1:0] wr_beat,   // {DATA1, DATA0} from the controller
  output logic [2*NDEV*GRAN-1:0] wr_dq,     // to the rank data pins
  input  logic [2*NDEV*GRAN-1:0] rd_dq,     // from the rank data pins
  output logic [2*NDEV*GRAN-1:0] rd_beat    // {DATA1, DATA0} back to the controller
);
  localparam int unsigned W = NDEV * GRAN;  // word width (32)

  logic [2*NDEV*GRAN-1:0] wr_perm, rd_perm;

  assign wr_dq   = en ? wr_perm : wr_beat;
  assign rd_beat = en ? rd_perm : rd_dq;

  always_comb begin
    for (int n = 0; n < NDEV; n++) begin
      for (int b = 0; b < GRAN; b++) begin
        // Device n nibble: upper GRAN bits from DATA1, lower GRAN bits from DATA0.
        wr_perm[n*2*GRAN + GRAN + b] = wr_beat[W + n*GRAN + b];
        wr_perm[n*2*GRAN + b]        = wr_beat[n*GRAN + b];
        rd_perm[W + n*GRAN + b]      = rd_dq[n*2*GRAN + GRAN + b];
        rd_perm[n*GRAN + b]          = rd_dq[n*2*GRAN + b];
      end
    end
  end
endmodule
