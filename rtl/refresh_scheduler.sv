// refresh_scheduler: refresh timing of the hybrid memory, with per-device refresh rounds.
//
// Three counters, as in a conventional DDR3 controller plus one:
//  * the refresh interval counter raises a refresh request every T_REFI cycles (7.8 us);
//  * the row counter counts issued REF commands; ROWS_PER_ROUND of them (8192) make one 64-ms
//    round, after which every row of the device has been refreshed once;
//  * the retention time round counter counts rounds. Beside the global round count, each device
//    keeps the number of rounds left until its next refreshed round. A device is "due" in the
//    current round when that number is 0; at the end of a round a due device reloads period-1, the
//    others count down. So a device with period P is refreshed in rounds 0, P, 2P, ...
// ref_mask (one bit per device, combinational from the round state and the period inputs) says
// which devices take part in the REF commands of the current round; the command sequencer turns it
// into chip selects. Period 0 means never refresh. If a period is lowered below the rounds already
// left, the device is due at once, so lowering a period never stretches a refresh interval.
//
// Handshake: ref_req stays high while at least one refresh is owed; ref_ack is a one-cycle pulse
// when a REF is issued. Up to MAX_PENDING refreshes may be postponed (DDR3 allows 8); the
// assertion below flags a sequencer that falls further behind.
// The per-device countdowns are this design's realisation of the round counter; the document says
// only that the round counter decides whether a device is refreshed in the current round.
module refresh_scheduler
  import approx_pkg::*;
#(
  parameter int unsigned NDEV           = NUM_DEV,
  parameter int unsigned T_REFI         = 5200,  // 7.8 us at 666.67 MHz (DDR3-1333)
  parameter int unsigned ROWS_PER_ROUND = 8192,  // REF commands per 64 ms
  parameter int unsigned MAX_PENDING    = 8,
  parameter int unsigned ROUND_W        = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  period_t             period [NDEV],
  input  logic                ref_ack,
  output logic                ref_req,
  output logic [NDEV-1:0]     ref_mask,
  output logic [$clog2(ROWS_PER_ROUND)-1:0] row_cnt,
  output logic [ROUND_W-1:0]  round_cnt,
  output logic                round_end   // pulse: last REF of a round was issued
);
  localparam int unsigned TW = $clog2(T_REFI);
  localparam int unsigned PW = $clog2(MAX_PENDING + 1);

  logic [TW-1:0] interval_q;
  logic [PW-1:0] pending_q;
  period_t       left_q [NDEV];
  logic          tick;

  assign tick      = (interval_q == TW'(T_REFI - 1));
  assign ref_req   = (pending_q != '0);
  assign round_end = ref_ack && ref_req && (row_cnt == $bits(row_cnt)'(ROWS_PER_ROUND - 1));

  always_comb begin
    for (int n = 0; n < NDEV; n++)
      ref_mask[n] = (period[n] != '0) && ((left_q[n] == '0) || (left_q[n] >= period[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval_q <= '0;
      pending_q  <= '0;
      row_cnt    <= '0;
      round_cnt  <= '0;
      for (int n = 0; n < NDEV; n++) left_q[n] <= '0;
    end else begin
      interval_q <= tick ? '0 : interval_q + 1'b1;
      case ({tick, ref_ack && ref_req})
        2'b10:   if (pending_q != PW'(MAX_PENDING)) pending_q <= pending_q + 1'b1;
        2'b01:   pending_q <= pending_q - 1'b1;
        default: ;
      endcase
      if (ref_ack && ref_req) begin
        if (round_end) begin
          row_cnt   <= '0;
          round_cnt <= round_cnt + 1'b1;
          for (int n = 0; n < NDEV; n++) begin
            if (period[n] == '0)  left_q[n] <= '0;
            else if (ref_mask[n]) left_q[n] <= period[n] - 1'b1;
            else                  left_q[n] <= left_q[n] - 1'b1;
          end
        end else begin
          row_cnt <= row_cnt + 1'b1;
        end
      end
    end
  end

  // A refresh owed beyond the postponement limit would be lost.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(tick && !(ref_ack && ref_req) && pending_q == PW'(MAX_PENDING)));
  a_ack_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) ref_ack |-> ref_req);
endmodule
