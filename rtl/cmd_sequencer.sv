// cmd_sequencer: DDR3 command sequencing for cache-line requests and per-device refresh.
//
// Open-page policy, one request at a time. The sequencer keeps the open row of every bank of both
// ranks (exported on bank_state for the request scheduler). A request to an open row (row hit)
// gets its RD or WR at once; to a closed bank it gets ACT and, T_RCD later, the column command;
// to a bank with another row open (row conflict) the sequencer first issues PRE for that bank
// (once T_RAS has passed since its ACT), waits T_RP and then treats the bank as closed. The
// request is accepted (req_ready high) in the cycle its ACT or column command goes out, so on a
// conflict the scheduler may pick again after the PRE. After a write burst the sequencer waits
// T_WR before its next command, which also covers write-to-read and write-to-precharge spacing.
//
// Refresh: a REF owed by the refresh scheduler has priority over new requests. If any bank is
// open, a precharge-all (PRE with dram_addr[10] set, both ranks selected) is issued first, then
// T_RP later the REF, then T_RFC before the next command. A REF asserts cs_n_p and only those
// cs_n_a whose bit in ref_mask is set: the approximate devices not due in the current round
// ignore the command. This separation of chip selects is the change the scheme makes to a
// conventional controller. ACT/RD/WR/PRE to one bank select one whole rank.
//
// Data timing: beat k of the burst (line bits [64k+63:64k], i.e. words 2k+1 and 2k) is driven on
// wr_beat T_CWL+k cycles after WR, or sampled from rd_beat T_CL+k cycles after RD. The bus is
// abstracted to one beat per controller cycle. resp_valid pulses for one cycle after the last beat
// with the request's tag; resp_rdata holds the line until the next request is accepted. The
// handshake, the timing defaults (DDR3-1333 9-9-9, 4 Gb tRFC = 260 ns at 1.5 ns) and the
// simplifications (one burst in flight, T_WR after every write) are this design's choices; the
// open-page policy follows the evaluated system.
module cmd_sequencer
  import approx_pkg::*;
#(
  parameter int unsigned NDEV  = NUM_DEV,
  parameter int unsigned T_RCD = 9,
  parameter int unsigned T_CL  = 9,
  parameter int unsigned T_CWL = 7,
  parameter int unsigned T_RP  = 9,
  parameter int unsigned T_RAS = 24,
  parameter int unsigned T_WR  = 10,
  parameter int unsigned T_RFC = 174
) (
  input  logic              clk,
  input  logic              rst_n,
  // cache-line request port
  input  logic              req_valid,
  output logic              req_ready,
  input  mem_req_t          req,
  output logic              resp_valid,
  output logic              resp_we,
  output logic [TAG_W-1:0]  resp_tag,
  output logic [LINE_W-1:0] resp_rdata,
  output bank_state_t       bank_state [NUM_RANKS][NUM_BANKS],
  // refresh scheduler
  input  logic              ref_req,
  input  logic [NDEV-1:0]   ref_mask,
  output logic              ref_ack,
  // DRAM command bus
  output dram_cmd_e         dram_cmd,
  output logic [BANK_W-1:0] dram_ba,
  output logic [ROW_W-1:0]  dram_addr,
  output logic              cs_n_p,
  output logic [NDEV-1:0]   cs_n_a,
  // DRAM data, before the per-rank bit mapping
  output region_e           cur_region,
  output logic              wr_en,
  output logic [BEAT_W-1:0] wr_beat,
  input  logic [BEAT_W-1:0] rd_beat
);
  typedef enum logic [2:0] {
    S_IDLE, S_ACT_WAIT, S_DATA, S_RECOVER, S_PRE_WAIT, S_REF_WAIT
  } state_e;

  localparam int unsigned CW = 9;  // wide enough for every timing value
  localparam int unsigned BW = $clog2(BURST_LEN);

  state_e            state_q;
  logic [CW-1:0]     wait_q, cyc_q;
  logic [CW-1:0]     ras_q [NUM_RANKS][NUM_BANKS];
  logic              we_q;
  logic [TAG_W-1:0]  tag_q;
  dram_loc_t         loc_q;
  logic [LINE_W-1:0] line_q;
  logic [CW-1:0]     lat;
  logic              beat_act;
  logic [BW-1:0]     beat_idx;
  logic [CW-1:0]     beat_off;

  // Classification of the offered request against the open rows.
  logic              req_rank;
  bank_state_t       req_bs;
  logic              row_hit, bank_closed, any_open, all_ras_done, req_ras_done;

  assign req_rank     = (req.loc.region == REGION_APPROX);
  assign req_bs       = bank_state[req_rank][req.loc.bank];
  assign row_hit      = req_bs.open && (req_bs.row == req.loc.row);
  assign bank_closed  = !req_bs.open;
  assign req_ras_done = (ras_q[req_rank][req.loc.bank] == '0);

  always_comb begin
    any_open     = 1'b0;
    all_ras_done = 1'b1;
    for (int r = 0; r < NUM_RANKS; r++)
      for (int b = 0; b < NUM_BANKS; b++) begin
        any_open     |= bank_state[r][b].open;
        all_ras_done &= (ras_q[r][b] == '0);
      end
  end

  assign lat        = we_q ? CW'(T_CWL) : CW'(T_CL);
  assign beat_off   = cyc_q - lat;
  assign beat_act   = (state_q == S_DATA) && (cyc_q >= lat) && (beat_off < CW'(BURST_LEN));
  assign beat_idx   = beat_off[BW-1:0];
  assign req_ready  = (state_q == S_IDLE) && !ref_req && req_valid && (row_hit || bank_closed);
  assign cur_region = loc_q.region;
  assign wr_en      = beat_act && we_q;
  assign wr_beat    = line_q[beat_idx*BEAT_W +: BEAT_W];
  assign resp_rdata = line_q;
  assign resp_we    = we_q;
  assign resp_tag   = tag_q;

  // Command, bank, address and which ranks it selects, for this cycle.
  logic cmd_all;       // precharge-all or REF: both ranks
  region_e cmd_region;

  always_comb begin
    dram_cmd   = CMD_NOP;
    dram_ba    = loc_q.bank;
    dram_addr  = '0;
    ref_ack    = 1'b0;
    cmd_all    = 1'b0;
    cmd_region = loc_q.region;
    unique case (state_q)
      S_IDLE: begin
        if (ref_req) begin
          if (!any_open) begin
            dram_cmd = CMD_REF;
            ref_ack  = 1'b1;
            cmd_all  = 1'b1;
          end else if (all_ras_done) begin
            dram_cmd      = CMD_PRE;     // precharge all banks of both ranks
            dram_addr[10] = 1'b1;
            cmd_all       = 1'b1;
          end
        end else if (req_valid) begin
          dram_ba    = req.loc.bank;
          cmd_region = req.loc.region;
          if (row_hit) begin
            dram_cmd  = req.we ? CMD_WR : CMD_RD;
            dram_addr = ROW_W'(req.loc.col);
          end else if (bank_closed) begin
            dram_cmd  = CMD_ACT;
            dram_addr = req.loc.row;
          end else if (req_ras_done) begin
            dram_cmd  = CMD_PRE;             // row conflict: close this bank
          end
        end
      end
      S_ACT_WAIT: if (wait_q == '0) begin
        dram_cmd  = we_q ? CMD_WR : CMD_RD;
        dram_addr = ROW_W'(loc_q.col);
      end
      default: ;
    endcase
  end

  always_comb begin
    cs_n_p = 1'b1;
    cs_n_a = '1;
    if (dram_cmd == CMD_REF) begin
      cs_n_p = 1'b0;
      cs_n_a = ~ref_mask;
    end else if (dram_cmd != CMD_NOP) begin
      if (cmd_all || cmd_region == REGION_PRECISE) cs_n_p = 1'b0;
      if (cmd_all || cmd_region == REGION_APPROX)  cs_n_a = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      wait_q     <= '0;
      cyc_q      <= '0;
      we_q       <= 1'b0;
      tag_q      <= '0;
      loc_q      <= '0;
      line_q     <= '0;
      resp_valid <= 1'b0;
      for (int r = 0; r < NUM_RANKS; r++)
        for (int b = 0; b < NUM_BANKS; b++) begin
          ras_q[r][b]      <= '0;
          bank_state[r][b] <= '0;
        end
    end else begin
      resp_valid <= 1'b0;
      for (int r = 0; r < NUM_RANKS; r++)
        for (int b = 0; b < NUM_BANKS; b++)
          if (ras_q[r][b] != '0) ras_q[r][b] <= ras_q[r][b] - 1'b1;
      if (wait_q != '0) wait_q <= wait_q - 1'b1;
      unique case (state_q)
        S_IDLE: begin
          if (dram_cmd == CMD_REF) begin
            wait_q  <= CW'(T_RFC - 1);
            state_q <= S_REF_WAIT;
          end else if (dram_cmd == CMD_PRE) begin
            if (cmd_all) begin
              for (int r = 0; r < NUM_RANKS; r++)
                for (int b = 0; b < NUM_BANKS; b++) bank_state[r][b].open <= 1'b0;
            end else begin
              bank_state[req_rank][req.loc.bank].open <= 1'b0;
            end
            wait_q  <= CW'(T_RP - 1);
            state_q <= S_PRE_WAIT;
          end else if (req_ready) begin
            we_q   <= req.we;
            tag_q  <= req.tag;
            loc_q  <= req.loc;
            line_q <= req.data;
            if (row_hit) begin
              cyc_q   <= CW'(1);
              state_q <= S_DATA;
            end else begin
              bank_state[req_rank][req.loc.bank] <= '{open: 1'b1, row: req.loc.row};
              ras_q[req_rank][req.loc.bank]      <= CW'(T_RAS - 1);
              wait_q  <= CW'(T_RCD - 1);
              state_q <= S_ACT_WAIT;
            end
          end
        end
        S_ACT_WAIT: if (wait_q == '0) begin
          cyc_q   <= CW'(1);
          state_q <= S_DATA;
        end
        S_DATA: begin
          cyc_q <= cyc_q + 1'b1;
          if (beat_act && !we_q) line_q[beat_idx*BEAT_W +: BEAT_W] <= rd_beat;
          if (beat_act && beat_idx == BW'(BURST_LEN - 1)) begin
            resp_valid <= 1'b1;
            if (we_q) begin
              wait_q  <= CW'(T_WR - 1);
              state_q <= S_RECOVER;
            end else begin
              state_q <= S_IDLE;
            end
          end
        end
        S_RECOVER:  if (wait_q == '0) state_q <= S_IDLE;
        S_PRE_WAIT: if (wait_q == '0) state_q <= S_IDLE;
        S_REF_WAIT: if (wait_q == '0) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A REF may only reach the devices while every bank is closed.
  a_ref_closed: assert property (@(posedge clk) disable iff (!rst_n)
      (dram_cmd == CMD_REF) |-> (state_q == S_IDLE && !any_open));
  // Outside REF the sixteen approximate devices act as one rank.
  a_rank_cs: assert property (@(posedge clk) disable iff (!rst_n)
      (dram_cmd != CMD_REF) |-> (cs_n_a == '0 || cs_n_a == '1));
endmodule
