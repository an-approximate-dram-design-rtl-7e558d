// tb_req_queue: checks FR-FCFS selection of the request queue against a reference model kept in a
// SystemVerilog queue. Random pushes and pops run against a randomly changing set of open rows;
// every offered request must be the oldest row hit, or the oldest request when none hits, and
// must carry the pushed contents. Also checks that in_ready falls when the queue is full and
// that the count matches.
module tb_req_queue;
  import approx_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  mem_req_t in_req, out_req;
  bank_state_t bank_state [NUM_RANKS][NUM_BANKS];
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, hits_seen = 0, full_seen = 0, oldest_seen = 0;
  mem_req_t model [$];
  int line_id = 0;

  req_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit hit(mem_req_t r);
    bank_state_t s;
    s = bank_state[r.loc.region == REGION_APPROX][r.loc.bank];
    return s.open && s.row == r.loc.row;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NUM_RANKS; r++)
      for (int b = 0; b < NUM_BANKS; b++) bank_state[r][b] = '0;
    in_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // Random open rows, drawn from a small set so that hits happen.
      if ($urandom_range(0, 7) == 0) begin
        int r, b;
        r = $urandom_range(0, 1); b = $urandom_range(0, 3);
        bank_state[r][b] = '{open: 1'($urandom_range(0, 1)), row: ROW_W'($urandom_range(0, 2))};
      end
      in_valid = ($urandom_range(0, 2) != 0);
      in_req.we   = 1'($urandom);
      in_req.tag  = TAG_W'(line_id);
      in_req.loc  = '{region: region_e'($urandom_range(0, 1)), bank: BANK_W'($urandom_range(0, 3)),
                      row: ROW_W'($urandom_range(0, 2)), col: COL_W'(line_id * 8)};
      in_req.data = {16{$urandom}};
      out_ready = ($urandom_range(0, 2) == 0);
      #1;
      check(int'(count) == model.size(), "count");
      check(in_ready == (model.size() < DEPTH), "in_ready");
      if (!in_ready) full_seen++;
      check(out_valid == (model.size() > 0), "out_valid");
      if (out_valid) begin
        int exp_i;
        exp_i = 0;
        for (int i = model.size() - 1; i >= 0; i--) if (hit(model[i])) exp_i = i;
        if (hit(model[exp_i])) hits_seen++; else oldest_seen++;
        check(out_req == model[exp_i], $sformatf("offer is entry %0d", exp_i));
        @(posedge clk);
        if (out_ready) model.delete(exp_i);
      end else begin
        @(posedge clk);
      end
      if (in_valid && in_ready) begin
        model.push_back(in_req);
        line_id++;
      end
    end
    check(hits_seen > 0 && oldest_seen > 0 && full_seen > 0,
          $sformatf("hits %0d oldest %0d full %0d", hits_seen, oldest_seen, full_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
