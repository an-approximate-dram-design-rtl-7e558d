// tb_refresh_scheduler: runs the scheduler at T_REFI = 10 cycles and 4 rows per round for 40
// rounds with a mix of periods (1 for the precise devices, 0 = never, 2..13 rounds for the
// others), acknowledging each request after a random 0..3 cycles. It checks the request spacing
// (one per T_REFI), the number of REF commands each device takes part in (ROWS x the number of
// rounds r with r mod P = 0), the round counter, three postponed refreshes being served back to
// back, and that lowering a period makes a device due at once.
module tb_refresh_scheduler;
  import approx_pkg::*;
  localparam int T_REFI = 10, ROWS = 4, ROUNDS = 40;

  logic clk = 0, rst_n = 0;
  period_t period [NUM_DEV];
  logic ref_ack = 0, ref_req, round_end;
  logic [NUM_DEV-1:0] ref_mask;
  logic [$clog2(ROWS)-1:0] row_cnt;
  logic [15:0] round_cnt;
  int checks = 0, failures = 0;
  int dev_refs [NUM_DEV];
  int rounds_seen = 0;

  refresh_scheduler #(.T_REFI(T_REFI), .ROWS_PER_ROUND(ROWS)) dut (
    .clk, .rst_n, .period, .ref_ack, .ref_req, .ref_mask, .row_cnt, .round_cnt, .round_end);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Count, per device, the REF commands it takes part in.
  always @(posedge clk) if (rst_n && ref_ack && ref_req) begin
    for (int n = 0; n < NUM_DEV; n++) if (ref_mask[n]) dev_refs[n]++;
    if (round_end) rounds_seen++;
  end

  initial begin
    int last_rise, now;
    for (int n = 0; n < NUM_DEV; n++) begin
      dev_refs[n] = 0;
      period[n]   = (n >= 11) ? period_t'(1) : (n == 0) ? period_t'(0) : period_t'(n + 2);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    now = 0; last_rise = -1;
    // Main run: acknowledge each request after 0..3 cycles.
    while (rounds_seen < ROUNDS) begin
      @(negedge clk);
      now++;
      if (ref_req) begin
        if (last_rise >= 0) check(now - last_rise == T_REFI, $sformatf("request spacing %0d", now - last_rise));
        last_rise = now;
        repeat ($urandom_range(0, 3)) begin @(negedge clk); now++; end
        ref_ack = 1;
        @(negedge clk); now++;
        ref_ack = 0;
        check(!ref_req, "request cleared after acknowledge");
      end
    end
    for (int n = 0; n < NUM_DEV; n++) begin
      int p, expected;
      p = int'(period[n]);
      expected = (p == 0) ? 0 : ROWS * ((ROUNDS + p - 1) / p);
      check(dev_refs[n] == expected, $sformatf("device %0d period %0d: %0d REFs, expected %0d",
                                               n, p, dev_refs[n], expected));
    end
    check(round_cnt == 16'(ROUNDS), "round counter");
    check(row_cnt == '0, "row counter at round start");
    // Postponement: let three intervals pass, then serve them back to back.
    while (ref_req) @(negedge clk);
    repeat (3 * T_REFI) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      check(ref_req, $sformatf("postponed refresh %0d still owed", i));
      ref_ack = 1;
      @(negedge clk);
      ref_ack = 0;
    end
    check(!ref_req, "all postponed refreshes served");
    // Lowering a period below the rounds left makes the device due immediately.
    // Device 10 (period 12) is due only every 12th round; serve refreshes until it is not due.
    for (int i = 0; i < 20 * ROWS * T_REFI && ref_mask[10]; i++) begin
      ref_ack = ref_req;
      @(negedge clk);
      ref_ack = 0;
    end
    check(!ref_mask[10], "device 10 not due in this round");
    period[10] = period_t'(1);
    #1;
    check(ref_mask[10], "device 10 due after its period was lowered to 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
