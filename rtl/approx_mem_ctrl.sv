// approx_mem_ctrl: memory controller of a hybrid precise/approximate DRAM for DNN data.
//
// Refreshing costs DRAM power whether or not the data is needed. DNN weights and feature maps
// (32-bit floats) tolerate errors in their mantissa, but not in their sign and exponent. This
// controller stores approximate data in a rank of sixteen x4 devices with the APPROX2 bit mapping
// (device n holds bits [2n+1:2n] of each word), so that the devices holding sign and exponent
// (11..15) can be refreshed every 64 ms while the mantissa devices (0..10) are refreshed every
// RP(n) = (10-n)*incr + offset rounds, or not at all. Precise data lives in a conventional rank of
// eight x8 devices, always refreshed at the normal rate.
//
// Structure: addr_decoder picks rank/bank/row/column from the line address; req_queue holds the
// requests and offers the sequencer the oldest row hit, else the oldest request (FR-FCFS);
// cmd_sequencer runs the open-page DDR3 command sequence and the eight-beat burst;
// refresh_policy turns (incr, offset) into per-device periods; refresh_scheduler counts tREFI,
// rows and rounds and gives the mask of devices refreshed in the current round, which the
// sequencer drives onto the per-device chip selects of REF commands; approx2_bit_map sits on the
// data path of the approximate rank only.
//
// Interface: req_* is a valid/ready cache-line port (line address in 64-byte units) with a tag;
// requests may complete out of order, and resp_valid pulses with resp_tag when a write has been
// written or a read line is in resp_rdata. At most one request per line may be outstanding.
// A request with an address above the mapped 12 GB is answered with resp_err and its tag, with
// no DRAM access, in the first cycle the sequencer is not responding. The DRAM side is one shared
// command bus and 64-bit data bus with cs_n_p for the precise rank and cs_n_a[15:0] for the
// approximate devices; data is one beat per clock (see cmd_sequencer). The refresh configuration
// may be changed at any time and takes effect at once (see refresh_scheduler).
//
// The bit mapping, the period formula, the round counter and the per-device chip selects follow
// the published APPROX2 scheme; the queue size, FR-FCFS and open-page policy follow the system it
// was evaluated in. The rank sizes, the address split (12 GB, a third precise, where the evaluated
// 16 GB module was a quarter precise), the tags and the error response are this design's choices.
module approx_mem_ctrl
  import approx_pkg::*;
#(
  parameter int unsigned Q_DEPTH        = 64 * NUM_RANKS,
  parameter int unsigned T_REFI         = 5200,
  parameter int unsigned ROWS_PER_ROUND = 8192,
  parameter int unsigned T_RCD          = 9,
  parameter int unsigned T_CL           = 9,
  parameter int unsigned T_CWL          = 7,
  parameter int unsigned T_RP           = 9,
  parameter int unsigned T_RAS          = 24,
  parameter int unsigned T_WR           = 10,
  parameter int unsigned T_RFC          = 174
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  refresh_cfg_t           ref_cfg,
  // cache-line port
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [LINE_ADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0]      req_wdata,
  input  logic [TAG_W-1:0]       req_tag,
  output logic                   resp_valid,
  output logic [TAG_W-1:0]       resp_tag,
  output logic                   resp_we,
  output logic                   resp_err,
  output logic [LINE_W-1:0]      resp_rdata,
  // DRAM channel
  output dram_cmd_e              dram_cmd,
  output logic [BANK_W-1:0]      dram_ba,
  output logic [ROW_W-1:0]       dram_addr,
  output logic                   cs_n_p,
  output logic [NUM_DEV-1:0]     cs_n_a,
  output logic                   dq_oe,
  output logic [BEAT_W-1:0]      dq_out,
  input  logic [BEAT_W-1:0]      dq_in,
  // refresh status: devices refreshed this round, round and row counters, end-of-round pulse
  output logic [NUM_DEV-1:0]     ref_mask,
  output logic [15:0]            round_cnt,
  output logic [$clog2(ROWS_PER_ROUND)-1:0] row_cnt,
  output logic                   round_end,
  output logic [$clog2(Q_DEPTH+1)-1:0] queue_count
);
  dram_loc_t          loc;
  logic               loc_valid;
  period_t            period [NUM_DEV];
  logic               ref_req, ref_ack;
  region_e            cur_region;
  logic [BEAT_W-1:0]  wr_beat, rd_beat;
  logic               q_in_ready, q_out_valid, seq_ready, seq_resp_valid;
  logic [TAG_W-1:0]   seq_resp_tag;
  logic               seq_resp_we;
  mem_req_t           q_in, q_out;
  bank_state_t        bank_state [NUM_RANKS][NUM_BANKS];
  logic               err_q;
  logic [TAG_W-1:0]   err_tag_q;

  addr_decoder u_dec (.line_addr(req_addr), .loc(loc), .valid(loc_valid));

  assign q_in = '{we: req_we, tag: req_tag, loc: loc, data: req_wdata};

  req_queue #(.DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(req_valid && loc_valid), .in_ready(q_in_ready), .in_req(q_in),
    .out_valid(q_out_valid), .out_ready(seq_ready), .out_req(q_out),
    .bank_state, .count(queue_count)
  );

  refresh_policy u_policy (.cfg(ref_cfg), .period(period));

  refresh_scheduler #(
    .T_REFI(T_REFI), .ROWS_PER_ROUND(ROWS_PER_ROUND)
  ) u_sched (
    .clk, .rst_n, .period, .ref_ack, .ref_req, .ref_mask,
    .row_cnt, .round_cnt, .round_end
  );

  cmd_sequencer #(
    .T_RCD(T_RCD), .T_CL(T_CL), .T_CWL(T_CWL), .T_RP(T_RP),
    .T_RAS(T_RAS), .T_WR(T_WR), .T_RFC(T_RFC)
  ) u_seq (
    .clk, .rst_n,
    .req_valid(q_out_valid), .req_ready(seq_ready), .req(q_out),
    .resp_valid(seq_resp_valid), .resp_we(seq_resp_we), .resp_tag(seq_resp_tag), .resp_rdata,
    .bank_state,
    .ref_req, .ref_mask, .ref_ack,
    .dram_cmd, .dram_ba, .dram_addr, .cs_n_p, .cs_n_a,
    .cur_region, .wr_en(dq_oe), .wr_beat, .rd_beat
  );

  // The bit mapping applies to the approximate rank only; the precise rank is conventional.
  approx2_bit_map u_map (
    .en(cur_region == REGION_APPROX), .wr_beat(wr_beat), .wr_dq(dq_out),
    .rd_dq(dq_in), .rd_beat(rd_beat)
  );

  // Unmapped addresses are accepted one at a time and answered when the sequencer is silent.
  assign req_ready  = loc_valid ? q_in_ready : !err_q;
  assign resp_valid = seq_resp_valid || err_q;
  assign resp_err   = !seq_resp_valid && err_q;
  assign resp_tag   = seq_resp_valid ? seq_resp_tag : err_tag_q;
  assign resp_we    = seq_resp_valid ? seq_resp_we : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q     <= 1'b0;
      err_tag_q <= '0;
    end else if (req_valid && !loc_valid && !err_q) begin
      err_q     <= 1'b1;
      err_tag_q <= req_tag;
    end else if (err_q && !seq_resp_valid) begin
      err_q     <= 1'b0;
    end
  end
endmodule
