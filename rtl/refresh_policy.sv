// refresh_policy: per-device refresh period of the APPROX2 rank, Eq. (1) of the scheme.
//
// Periods are counted in 64-ms rounds, the normal DDR3 refresh period, because every approximate
// period must be a multiple of it. Devices FIRST..NDEV-1 (11..15, the sign and exponent bits) are
// precise and get a period of one round. Approximate device n (0..FIRST-1) gets
//     RP(n) = (FIRST-1-n) * incr + offset
// so the least significant device has the longest period. The result saturates at the largest
// PERIOD_W-bit value and is at least one round. With cfg.approx_off set the approximate devices
// get period 0, which the scheduler reads as "never refresh". The saturation, the one-round
// minimum and the encoding of "off" as 0 are this design's choices. Combinational.
module refresh_policy
  import approx_pkg::*;
#(
  parameter int unsigned NDEV  = NUM_DEV,
  parameter int unsigned FIRST = FIRST_PRECISE
) (
  input  refresh_cfg_t cfg,
  output period_t      period [NDEV]
);
  localparam int unsigned EXT_W = PERIOD_W + 5;  // room for (FIRST-1) * incr
  localparam logic [EXT_W-1:0] PMAX = EXT_W'({PERIOD_W{1'b1}});

  always_comb begin
    for (int n = 0; n < NDEV; n++) begin
      logic [EXT_W-1:0] rp;
      rp = EXT_W'(FIRST - 1 - n) * EXT_W'(cfg.incr) + EXT_W'(cfg.offset);
      if (n >= FIRST)          period[n] = period_t'(1);
      else if (cfg.approx_off) period[n] = '0;
      else if (rp > PMAX)      period[n] = '1;
      else if (rp == '0)       period[n] = period_t'(1);
      else                     period[n] = rp[PERIOD_W-1:0];
    end
  end
endmodule
