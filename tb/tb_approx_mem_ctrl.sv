// tb_approx_mem_ctrl: end-to-end test of the hybrid memory controller with eight x8 device
// models on the precise rank and sixteen x4 models on the approximate rank, at a shortened
// refresh timebase (T_REFI = 64 cycles, 4 rows per round, T_RFC = 20).
//  1. (offset, incr) = (3, 1) rounds: random line writes and reads in both regions for 30 rounds,
//     every read compared with a reference copy; then the REF count of every device is compared
//     with 4 x ceil(30 / RP(n)) and the precise devices with every REF issued.
//  2. Mode switch to approx_off: after the approximate devices have gone longer than their
//     retention time unrefreshed, their contents leak to 0. Reads of approximate lines must still
//     return bits [31:22] of every word exactly (devices 11..15), and precise lines intact.
//  3. An address above the mapped space is answered with resp_err.
//  A burst phase between 1 and 2 writes and then reads 24 distinct lines back to back through an
//  8-entry queue, so that the queue fills and row hits are served out of order; data is checked
//  by tag.
// Each mechanism (refresh stall, masked REF, full REF, round end, leak, mode switch, unmapped
// error, access to each rank, row hit, full queue, out-of-order response) is counted and must
// occur at least once.
module tb_approx_mem_ctrl;
  import approx_pkg::*;
  localparam int T_REFI = 64, ROWS = 4, T_RFC = 20, ROUNDS = 30;
  localparam int ROUND_CYC = T_REFI * ROWS;
  localparam longint RET = 20 * ROUND_CYC;
  localparam int INCR = 1, OFFSET = 3;
  localparam longint P_LINES = 64'd1 << 26;
  localparam int Q_DEPTH = 8;
  localparam int QCW = $clog2(Q_DEPTH + 1);

  logic clk = 0, rst_n = 0;
  refresh_cfg_t ref_cfg;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [LINE_ADDR_W-1:0] req_addr = '0;
  logic [LINE_W-1:0] req_wdata = '0, resp_rdata;
  logic [TAG_W-1:0] req_tag = '0, resp_tag;
  logic resp_valid, resp_we, resp_err;
  dram_cmd_e dram_cmd;
  logic [BANK_W-1:0] dram_ba;
  logic [ROW_W-1:0] dram_addr;
  logic cs_n_p, dq_oe;
  logic [NUM_DEV-1:0] cs_n_a, ref_mask;
  logic [BEAT_W-1:0] dq_out, dq_in, dq_p, dq_a;
  logic [15:0] round_cnt;
  logic [$clog2(ROWS)-1:0] row_cnt;
  logic round_end;
  logic [QCW-1:0] queue_count;
  int checks = 0, failures = 0;

  approx_mem_ctrl #(.Q_DEPTH(Q_DEPTH), .T_REFI(T_REFI), .ROWS_PER_ROUND(ROWS), .T_RFC(T_RFC)) dut (.*);

  for (genvar k = 0; k < NUM_DEV_P; k++) begin : g_p
    dram_dev_model #(.W(8)) m (.clk, .cs_n(cs_n_p), .cmd(dram_cmd), .ba(dram_ba), .addr(dram_addr),
                               .dq_wr(dq_out[8*k +: 8]), .dq_rd(dq_p[8*k +: 8]));
  end
  for (genvar n = 0; n < NUM_DEV; n++) begin : g_a
    dram_dev_model #(.W(4), .RET_CYCLES(RET)) m (.clk, .cs_n(cs_n_a[n]), .cmd(dram_cmd), .ba(dram_ba),
                               .addr(dram_addr), .dq_wr(dq_out[4*n +: 4]), .dq_rd(dq_a[4*n +: 4]));
  end
  assign dq_in = dq_p | dq_a;

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_stall = 0, n_ref_masked = 0, n_ref_full = 0, n_round = 0, n_err = 0, n_prec = 0,
      n_appr = 0, n_switch = 0, refs_total = 0, n_hit = 0, n_full = 0, n_reorder = 0;
  dram_cmd_e last_cmd = CMD_NOP;
  // Responses as they come back, for the burst phase.
  logic [LINE_W-1:0] resp_data [int];
  int resp_order [$];
  always @(posedge clk) if (rst_n && resp_valid) begin
    resp_data[int'(resp_tag)] = resp_rdata;
    resp_order.push_back(int'(resp_tag));
  end

  always @(posedge clk) if (rst_n) begin
    if (req_valid && !req_ready && dut.ref_req) n_stall++;  // waiting because a refresh is owed
    if (dram_cmd == CMD_REF) begin
      refs_total++;
      if (cs_n_a == '0) n_ref_full++; else n_ref_masked++;
    end
    if (round_end) n_round++;
    if (dram_cmd == CMD_ACT && !cs_n_p) n_prec++;
    if (dram_cmd == CMD_ACT && cs_n_a == '0) n_appr++;
    if (dram_cmd inside {CMD_RD, CMD_WR} && last_cmd != CMD_ACT) n_hit++;
    if (dram_cmd != CMD_NOP) last_cmd = dram_cmd;
    if (req_valid && !req_ready && queue_count == QCW'(Q_DEPTH)) n_full++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit we, longint a, logic [LINE_W-1:0] d, output logic [LINE_W-1:0] q,
                        output logic err);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = LINE_ADDR_W'(a); req_wdata = d; req_tag = req_tag + 1'b1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_tag == req_tag, "response tag");
    q = resp_rdata;
    err = resp_err;
  endtask

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic logic [LINE_W-1:0] keep_critical(logic [LINE_W-1:0] l);
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] &= 32'hFFC0_0000;
    return l;
  endfunction

  logic [LINE_W-1:0] ref_mem [longint];
  longint addrs [$];

  initial begin
    logic [LINE_W-1:0] q;
    logic err;
    ref_cfg = '{approx_off: 1'b0, incr: PERIOD_W'(INCR), offset: PERIOD_W'(OFFSET)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. Traffic over ROUNDS rounds.
    for (int i = 0; i < 12; i++) begin
      longint a;
      a = (i % 2 == 0) ? longint'($urandom_range(0, 1 << 20)) :
                         P_LINES + longint'($urandom_range(0, 1 << 20));
      if (i == 2) a = P_LINES;                      // first approximate line
      if (i == 3) a = P_LINES - 1;                  // last precise line
      addrs.push_back(a);
      ref_mem[a] = rand_line();
      access(1, a, ref_mem[a], q, err);
      check(!err, "mapped write accepted");
    end
    while (round_cnt < 16'(ROUNDS - 1)) begin
      longint a;
      a = addrs[$urandom_range(0, addrs.size() - 1)];
      if ($urandom_range(0, 3) == 0) begin
        ref_mem[a] = rand_line();
        access(1, a, ref_mem[a], q, err);
      end else begin
        access(0, a, '0, q, err);
        check(q == ref_mem[a], $sformatf("read back line %h", a));
      end
    end
    while (!round_end) @(posedge clk);
    @(negedge clk);
    check(round_cnt == 16'(ROUNDS), "round counter");
    check(g_p[0].m.ref_count == refs_total && g_p[7].m.ref_count == refs_total,
          "precise rank sees every REF");
    check(refs_total == ROUNDS * ROWS, $sformatf("%0d REF commands in %0d rounds", refs_total, ROUNDS));
    begin
      int got [NUM_DEV];
      got[0] = g_a[0].m.ref_count;   got[1] = g_a[1].m.ref_count;   got[2] = g_a[2].m.ref_count;
      got[3] = g_a[3].m.ref_count;   got[4] = g_a[4].m.ref_count;   got[5] = g_a[5].m.ref_count;
      got[6] = g_a[6].m.ref_count;   got[7] = g_a[7].m.ref_count;   got[8] = g_a[8].m.ref_count;
      got[9] = g_a[9].m.ref_count;   got[10] = g_a[10].m.ref_count; got[11] = g_a[11].m.ref_count;
      got[12] = g_a[12].m.ref_count; got[13] = g_a[13].m.ref_count; got[14] = g_a[14].m.ref_count;
      got[15] = g_a[15].m.ref_count;
      for (int n = 0; n < NUM_DEV; n++) begin
        int p, expected;
        p = (n >= 11) ? 1 : (10 - n) * INCR + OFFSET;
        expected = ROWS * ((ROUNDS + p - 1) / p);
        check(got[n] == expected, $sformatf("device %0d RP=%0d: %0d REFs, expected %0d",
                                            n, p, got[n], expected));
      end
    end
    check(g_a[0].m.leak_events == 0, "no leak while refreshed");
    // Burst phase: many distinct lines in two rows of two banks of each rank, issued back to back,
    // so the queue fills and FR-FCFS serves row hits out of order.
    begin
      longint ba [24];
      logic [LINE_W-1:0] bd [24];
      for (int i = 0; i < 24; i++) begin
        longint row, bank, col;
        row = i % 2; bank = (i / 2) % 2; col = 100 + i;
        ba[i] = (i % 3 == 0) ? (row << 10) | (bank << 7) | (col % 128)
                             : P_LINES + ((row << 11) | (bank << 8) | col);
        bd[i] = rand_line();
      end
      for (int pass = 0; pass < 2; pass++) begin
        resp_order.delete();
        for (int i = 0; i < 24; i++) begin
          @(negedge clk);
          req_valid = 1; req_we = (pass == 0); req_addr = LINE_ADDR_W'(ba[i]);
          req_wdata = bd[i]; req_tag = TAG_W'(i);
          @(posedge clk);
          while (!req_ready) @(posedge clk);
        end
        @(negedge clk);
        req_valid = 0;
        while (resp_order.size() < 24) @(negedge clk);
        for (int i = 0; i < 24; i++) if (resp_order[i] != i) n_reorder++;
        if (pass == 1)
          for (int i = 0; i < 24; i++)
            check(resp_data[i] == bd[i], $sformatf("burst read %0d", i));
      end
      for (int i = 0; i < 24; i++) begin
        addrs.push_back(ba[i]);
        ref_mem[ba[i]] = bd[i];
      end
    end
    // 2. Switch the approximate refresh off and wait past the retention time.
    ref_cfg.approx_off = 1'b1;
    n_switch++;
    repeat (int'(RET) + 2 * ROUND_CYC) @(posedge clk);
    check(g_a[0].m.leak_events > 0 && g_a[10].m.leak_events > 0, "approximate devices leaked");
    check(g_a[11].m.leak_events == 0 && g_a[15].m.leak_events == 0, "precise devices kept refreshed");
    foreach (addrs[i]) begin
      longint a;
      a = addrs[i];
      access(0, a, '0, q, err);
      if (a >= P_LINES) check(q == keep_critical(ref_mem[a]), $sformatf("critical bits kept %h", a));
      else              check(q == ref_mem[a], $sformatf("precise line intact %h", a));
    end
    // Switch back: freshly written data is kept again.
    ref_cfg.approx_off = 1'b0;
    n_switch++;
    ref_mem[addrs[1]] = rand_line();
    access(1, addrs[1], ref_mem[addrs[1]], q, err);
    repeat (4 * ROUND_CYC) @(posedge clk);
    access(0, addrs[1], '0, q, err);
    check(q == ref_mem[addrs[1]], "approximate line kept after refresh is back on");
    // 3. Unmapped address.
    access(0, (64'd1 << 28) - 5, '0, q, err);
    check(err, "unmapped address answered with error");
    n_err += err;
    check(n_stall > 0, $sformatf("refresh stalls: %0d", n_stall));
    check(n_ref_masked > 0, $sformatf("masked REFs: %0d", n_ref_masked));
    check(n_ref_full > 0, $sformatf("full-rank REFs: %0d", n_ref_full));
    check(n_round > 0, $sformatf("round ends: %0d", n_round));
    check(n_prec > 0 && n_appr > 0, $sformatf("accesses precise %0d approximate %0d", n_prec, n_appr));
    check(n_switch == 2 && n_err == 1, "mode switches and error response");
    check(n_hit > 0, $sformatf("row hits: %0d", n_hit));
    check(n_full > 0, $sformatf("queue-full cycles: %0d", n_full));
    check(n_reorder > 0, $sformatf("responses out of order: %0d", n_reorder));
    $display("stalls=%0d masked_refs=%0d full_refs=%0d rounds=%0d precise_acts=%0d approx_acts=%0d",
             n_stall, n_ref_masked, n_ref_full, n_round, n_prec, n_appr);
    $display("row_hits=%0d queue_full=%0d reordered=%0d", n_hit, n_full, n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
