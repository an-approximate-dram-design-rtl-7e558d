// tb_cmd_sequencer: drives cache-line writes and reads to both ranks through the open-page
// sequencer, with two beat-wide memory models (one behind cs_n_p, one behind the approximate chip
// selects) and a scripted refresh request. Checks: data written comes back; a column command
// after ACT comes T_RCD later, and a row hit gets no ACT; a row conflict closes the bank with
// PRE; ACT-to-PRE >= T_RAS per bank; PRE-to-next >= T_RP; REF-to-next >= T_RFC; write recovery
// >= T_WR; read latency (resp_valid T_CL+8 cycles after RD) and tags; banks open at a refresh are
// closed by a precharge-all before the REF; a REF carries cs_n_p low and cs_n_a = ~ref_mask;
// requests stall while a refresh is owed, and a refresh owed together with a request goes first.
module tb_cmd_sequencer;
  import approx_pkg::*;
  localparam int T_RCD = 9, T_CL = 9, T_CWL = 7, T_RP = 9, T_RAS = 24, T_WR = 10, T_RFC = 40;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  mem_req_t req = '0;
  logic [LINE_W-1:0] resp_rdata;
  logic resp_valid, resp_we;
  logic [TAG_W-1:0] resp_tag;
  bank_state_t bank_state [NUM_RANKS][NUM_BANKS];
  logic ref_req = 0, ref_ack;
  logic [NUM_DEV-1:0] ref_mask = '0;
  dram_cmd_e dram_cmd;
  logic [BANK_W-1:0] dram_ba;
  logic [ROW_W-1:0] dram_addr;
  logic cs_n_p;
  logic [NUM_DEV-1:0] cs_n_a;
  region_e cur_region;
  logic wr_en;
  logic [BEAT_W-1:0] wr_beat, rd_beat, rd_p, rd_a;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_act [2][8];
  bit open_tb [2][8];
  int t_col = -1000, t_pre = -1000, t_ref = -1000, t_last_wbeat = -1000;
  dram_cmd_e last_cmd = CMD_NOP;
  bit last_we = 0;
  int stalls = 0, refs = 0, n_hit = 0, n_conflict = 0, n_prea = 0;

  cmd_sequencer #(.T_RCD(T_RCD), .T_CL(T_CL), .T_CWL(T_CWL), .T_RP(T_RP), .T_RAS(T_RAS),
                  .T_WR(T_WR), .T_RFC(T_RFC)) dut (.*);

  dram_dev_model #(.W(64), .CL(T_CL), .CWL(T_CWL)) m_p (
    .clk, .cs_n(cs_n_p), .cmd(dram_cmd), .ba(dram_ba), .addr(dram_addr), .dq_wr(wr_beat), .dq_rd(rd_p));
  dram_dev_model #(.W(64), .CL(T_CL), .CWL(T_CWL)) m_a (
    .clk, .cs_n(cs_n_a[0]), .cmd(dram_cmd), .ba(dram_ba), .addr(dram_addr), .dq_wr(wr_beat), .dq_rd(rd_a));
  assign rd_beat = rd_p | rd_a;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cyc, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timing monitor on the command bus.
  always @(posedge clk) if (rst_n) begin
    int rk;
    rk = cs_n_p ? 1 : 0;
    cyc <= cyc + 1;
    if (wr_en) t_last_wbeat = cyc;
    if (req_valid && !req_ready && ref_req) stalls++;
    if (dram_cmd != CMD_NOP) begin
      check(cyc - t_pre >= T_RP || dram_cmd == CMD_PRE, "PRE to next command >= T_RP");
      check(cyc - t_ref >= T_RFC, "REF to next command >= T_RFC");
      if (last_we) check(cyc - t_last_wbeat > T_WR, "write recovery before the next command");
    end
    case (dram_cmd)
      CMD_ACT: begin
        check(!open_tb[rk][dram_ba], "ACT to a closed bank");
        check((!cs_n_p) ^ (cs_n_a == '0), "ACT selects one rank");
        t_act[rk][dram_ba] = cyc;
        open_tb[rk][dram_ba] = 1;
      end
      CMD_RD, CMD_WR: begin
        check(open_tb[rk][dram_ba], "column command to an open bank");
        if (last_cmd == CMD_ACT)
          check(cyc - t_act[rk][dram_ba] == T_RCD, $sformatf("ACT to column %0d", cyc - t_act[rk][dram_ba]));
        else
          n_hit++;
        t_col = cyc;
        last_we = (dram_cmd == CMD_WR);
      end
      CMD_PRE: begin
        if (dram_addr[10]) begin
          n_prea++;
          check(!cs_n_p && cs_n_a == '0, "precharge-all selects both ranks");
          for (int r = 0; r < 2; r++)
            for (int b = 0; b < 8; b++) begin
              if (open_tb[r][b]) check(cyc - t_act[r][b] >= T_RAS, "ACT to PRE-all >= T_RAS");
              open_tb[r][b] = 0;
            end
        end else begin
          n_conflict++;
          check(open_tb[rk][dram_ba] && cyc - t_act[rk][dram_ba] >= T_RAS, "ACT to PRE >= T_RAS");
          open_tb[rk][dram_ba] = 0;
        end
        if (last_we) check(cyc - t_last_wbeat > T_WR, "write recovery before PRE");
        t_pre = cyc;
      end
      CMD_REF: begin
        refs++;
        check(cs_n_p == 1'b0 && cs_n_a == ~ref_mask, "REF chip selects follow the mask");
        check(ref_ack, "REF acknowledged");
        for (int r = 0; r < 2; r++) for (int b = 0; b < 8; b++) check(!open_tb[r][b], "all banks closed at REF");
        t_ref = cyc;
      end
      default: ;
    endcase
    if (dram_cmd != CMD_NOP) last_cmd = dram_cmd;
    if (resp_valid && !resp_we) check(cyc - t_col == T_CL + BURST_LEN, $sformatf("read latency %0d", cyc - t_col));
  end

  task automatic access(bit we, region_e r, int bank, int row, int col, logic [LINE_W-1:0] d,
                        int tag, output logic [LINE_W-1:0] q);
    @(negedge clk);
    req_valid = 1;
    req = '{we: we, tag: TAG_W'(tag), data: d,
            loc: '{region: r, bank: BANK_W'(bank), row: ROW_W'(row), col: COL_W'(col)}};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_tag == TAG_W'(tag), "response tag");
    check(resp_we == we, "response write flag");
    q = resp_rdata;
  endtask

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    logic [LINE_W-1:0] d [5], q;
    for (int r = 0; r < 2; r++) for (int b = 0; b < 8; b++) begin t_act[r][b] = -1000; open_tb[r][b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) d[i] = rand_line();
    access(1, REGION_PRECISE, 1, 100, 8, d[0], 1, q);
    access(1, REGION_APPROX, 2, 200, 16, d[1], 2, q);
    access(1, REGION_PRECISE, 3, 7, 0, d[2], 3, q);
    access(0, REGION_PRECISE, 1, 100, 8, '0, 4, q);     // row hit
    check(q == d[0], "precise read back");
    access(0, REGION_APPROX, 2, 200, 16, '0, 5, q);     // row hit
    check(q == d[1], "approximate read back");
    check(n_hit == 2, $sformatf("row hits %0d", n_hit));
    access(1, REGION_PRECISE, 1, 101, 0, d[4], 6, q);   // row conflict
    check(n_conflict == 1, "row conflict closed the bank");
    access(0, REGION_PRECISE, 1, 100, 8, '0, 7, q);     // conflict back to row 100
    check(q == d[0], "read back after reopening the row");
    check(bank_state[0][1].open && bank_state[0][1].row == 16'd100, "bank state exported");
    // Refresh owed at the same time as a request: banks are closed, REF first, request stalls.
    @(negedge clk);
    ref_mask = 16'hF80F;
    ref_req = 1;
    req_valid = 1;
    req = '{we: 1'b0, tag: 8'd8, data: '0, loc: '{region: REGION_PRECISE, bank: 3'd3, row: 16'd7, col: 11'd0}};
    while (!ref_ack) begin
      check(!req_ready, "request stalls while refresh owed");
      @(negedge clk);
    end
    check(n_prea == 1, "open banks precharged before REF");
    @(negedge clk);
    ref_req = 0;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_rdata == d[2] && resp_tag == 8'd8, "read after refresh");
    // A refresh with an empty approximate mask still refreshes the precise rank.
    @(negedge clk);
    ref_mask = '0; ref_req = 1;
    while (!ref_ack) @(negedge clk);
    @(negedge clk);
    ref_req = 0;
    access(1, REGION_APPROX, 0, 0, 0, d[3], 9, q);
    access(0, REGION_APPROX, 0, 0, 0, '0, 10, q);
    check(q == d[3], "approximate read back after refresh");
    check(refs == 2, "two REF commands");
    check(stalls > 0, "stall observed");
    check(m_p.ref_count == 2 && m_a.ref_count == 1, "REF reached precise twice, masked device once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
