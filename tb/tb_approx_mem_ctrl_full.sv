// tb_approx_mem_ctrl_full: the hybrid memory controller at its default parameters (DDR3-1333
// timing, tREFI = 5200 cycles = 7.8 us, 8192 REF commands per 64-ms round) with the
// (offset, incr) = (1024 ms, 256 ms) configuration, i.e. (16, 4) rounds. It writes and reads
// lines in both ranks, checks that REF commands come every T_REFI cycles, runs through two
// complete 64-ms rounds (85 million cycles) and checks that every device took part in all 8192
// REFs of round 0 while only the precise devices 11..15 took part in those of round 1, then reads
// the lines back.
module tb_approx_mem_ctrl_full;
  import approx_pkg::*;
  localparam int T_REFI = 5200, ROWS = 8192;
  localparam longint P_LINES = 64'd1 << 26;
  localparam int QCW = $clog2(64 * NUM_RANKS + 1);

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
  longint cyc = 0;
  longint last_ref = -1;
  int refs = 0, ref_spacing_bad = 0;

  approx_mem_ctrl dut (.*);

  for (genvar k = 0; k < NUM_DEV_P; k++) begin : g_p
    dram_dev_model #(.W(8)) m (.clk, .cs_n(cs_n_p), .cmd(dram_cmd), .ba(dram_ba), .addr(dram_addr),
                               .dq_wr(dq_out[8*k +: 8]), .dq_rd(dq_p[8*k +: 8]));
  end
  for (genvar n = 0; n < NUM_DEV; n++) begin : g_a
    dram_dev_model #(.W(4)) m (.clk, .cs_n(cs_n_a[n]), .cmd(dram_cmd), .ba(dram_ba),
                               .addr(dram_addr), .dq_wr(dq_out[4*n +: 4]), .dq_rd(dq_a[4*n +: 4]));
  end
  assign dq_in = dq_p | dq_a;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // REF spacing while no request is in flight.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dram_cmd == CMD_REF) begin
      if (last_ref >= 0 && cyc - last_ref != T_REFI && cyc > 2 * T_REFI) ref_spacing_bad++;
      last_ref = cyc;
      refs++;
    end
  end

  initial begin
    repeat (3 * ROWS * T_REFI) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit we, longint a, logic [LINE_W-1:0] d, output logic [LINE_W-1:0] q);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = LINE_ADDR_W'(a); req_wdata = d; req_tag = req_tag + 1'b1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_tag == req_tag, "response tag");
    q = resp_rdata;
  endtask

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic int dev_refs(int n);
    case (n)
      0: return g_a[0].m.ref_count;   1: return g_a[1].m.ref_count;
      2: return g_a[2].m.ref_count;   3: return g_a[3].m.ref_count;
      4: return g_a[4].m.ref_count;   5: return g_a[5].m.ref_count;
      6: return g_a[6].m.ref_count;   7: return g_a[7].m.ref_count;
      8: return g_a[8].m.ref_count;   9: return g_a[9].m.ref_count;
      10: return g_a[10].m.ref_count; 11: return g_a[11].m.ref_count;
      12: return g_a[12].m.ref_count; 13: return g_a[13].m.ref_count;
      14: return g_a[14].m.ref_count; default: return g_a[15].m.ref_count;
    endcase
  endfunction

  initial begin
    logic [LINE_W-1:0] d [4], q;
    longint a [4];
    ref_cfg = '{approx_off: 1'b0, incr: PERIOD_W'(4), offset: PERIOD_W'(16)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    a[0] = 5; a[1] = P_LINES - 1; a[2] = P_LINES; a[3] = P_LINES + 123456;
    for (int i = 0; i < 4; i++) begin
      d[i] = rand_line();
      access(1, a[i], d[i], q);
    end
    for (int i = 0; i < 4; i++) begin
      access(0, a[i], '0, q);
      check(q == d[i], $sformatf("read back line %h", a[i]));
    end
    check(refs == 0, "no REF before the first tREFI");
    wait (refs == 1);
    check(cyc >= T_REFI - 1 && cyc <= T_REFI + 60, $sformatf("first REF at cycle %0d", cyc));
    check(ref_mask == '1, "all devices refreshed in round 0");
    while (!round_end) @(posedge clk);
    @(negedge clk);
    check(round_cnt == 16'd1 && row_cnt == '0, "round 0 complete");
    for (int n = 0; n < NUM_DEV; n++)
      check(dev_refs(n) == ROWS, $sformatf("device %0d: %0d REFs in round 0", n, dev_refs(n)));
    check(ref_mask == 16'hF800, "only precise devices due in round 1");
    while (!round_end) @(posedge clk);
    @(negedge clk);
    check(round_cnt == 16'd2, "round 1 complete");
    for (int n = 0; n < NUM_DEV; n++) begin
      int expected;
      expected = (n >= 11) ? 2 * ROWS : ROWS;
      check(dev_refs(n) == expected, $sformatf("device %0d: %0d REFs after round 1", n, dev_refs(n)));
    end
    check(g_p[0].m.ref_count == 2 * ROWS, "precise rank refreshed every round");
    check(ref_spacing_bad == 0, $sformatf("%0d REFs off the tREFI grid", ref_spacing_bad));
    for (int i = 0; i < 4; i++) begin
      access(0, a[i], '0, q);
      check(q == d[i], $sformatf("read back line %h after two rounds", a[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
