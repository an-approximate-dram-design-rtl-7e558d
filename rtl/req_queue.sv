// req_queue: cache-line request queue with first-ready, first-come-first-served (FR-FCFS) issue.
//
// Holds up to DEPTH requests in arrival order (entry 0 is the oldest). Each cycle it offers the
// sequencer one request: the oldest one whose bank has its row open on that row (a row hit,
// judged from the sequencer's bank_state), or the oldest request if none hits. When the offer is
// taken (out_valid && out_ready) the entry is removed and the younger ones move down one place; a
// new request is appended behind them in the same cycle. in_ready is low while the queue is full.
// Only the request headers (write flag, tag, location and a slot number) are kept in age order;
// the 512-bit write data stays in a slot-indexed memory, written at push into the lowest free
// slot and read at the offered entry's slot, so no line data moves inside the queue.
//
// FR-FCFS and the queue size follow the evaluated controller (64 entries per rank; here one
// shared queue of 64 x NUM_RANKS entries). Requests are reordered freely, so the requester must
// not have two requests to the same line outstanding (as a cache with miss registers guarantees);
// an assertion checks this. There is no starvation limit on old row misses. Both are this
// design's choices. The offer is combinational from the queue and bank state; in_ready is
// registered state only.
module req_queue
  import approx_pkg::*;
#(
  parameter int unsigned DEPTH = 64 * NUM_RANKS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  mem_req_t    in_req,
  output logic        out_valid,
  input  logic        out_ready,
  output mem_req_t    out_req,
  input  bank_state_t bank_state [NUM_RANKS][NUM_BANKS],
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic              we;
    logic [TAG_W-1:0]  tag;
    dram_loc_t         loc;
    logic [IW-1:0]     slot;
  } hdr_t;

  hdr_t              hdr_q [DEPTH];
  logic [LINE_W-1:0] data_mem [DEPTH];
  logic [DEPTH-1:0]  used_q;
  logic [IW-1:0]     sel, free_slot;
  logic              push, pop;

  function automatic logic is_hit(dram_loc_t l, bank_state_t bs [NUM_RANKS][NUM_BANKS]);
    bank_state_t s;
    s = bs[l.region == REGION_APPROX][l.bank];
    return s.open && (s.row == l.row);
  endfunction

  // Oldest row hit, else the oldest entry.
  always_comb begin
    logic found;
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!found && CW'(i) < count && is_hit(hdr_q[i].loc, bank_state)) begin
        found = 1'b1;
        sel   = IW'(i);
      end
    end
  end

  // Lowest free data slot.
  always_comb begin
    logic found;
    found     = 1'b0;
    free_slot = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!found && !used_q[i]) begin
        found     = 1'b1;
        free_slot = IW'(i);
      end
    end
  end

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_req   = '{we: hdr_q[sel].we, tag: hdr_q[sel].tag, loc: hdr_q[sel].loc,
                       data: data_mem[hdr_q[sel].slot]};
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) data_mem[free_slot] <= in_req.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      used_q <= '0;
      for (int i = 0; i < DEPTH; i++) hdr_q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (pop && IW'(i) >= sel && i < DEPTH - 1) hdr_q[i] <= hdr_q[i + 1];
        if (push && CW'(i) == count - CW'(pop))
          hdr_q[i] <= '{we: in_req.we, tag: in_req.tag, loc: in_req.loc, slot: free_slot};
      end
      if (pop)  used_q[hdr_q[sel].slot] <= 1'b0;
      if (push) used_q[free_slot]       <= 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // A new request must not target a line that is already queued.
  always_ff @(posedge clk) begin
    if (rst_n && push) begin
      for (int i = 0; i < DEPTH; i++)
        a_unique_line: assert (!(CW'(i) < count && !(pop && IW'(i) == sel) &&
                                 hdr_q[i].loc == in_req.loc));
    end
  end
endmodule
