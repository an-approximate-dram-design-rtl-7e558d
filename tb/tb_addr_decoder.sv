// tb_addr_decoder: checks region, bank, row and column for boundary and random line addresses
// of the 4 GB precise rank, the 8 GB approximate rank and the unmapped top of the space.
module tb_addr_decoder;
  import approx_pkg::*;
  logic [LINE_ADDR_W-1:0] line_addr;
  dram_loc_t loc;
  logic      valid;
  int checks = 0, failures = 0;

  addr_decoder dut (.line_addr, .loc, .valid);

  localparam longint P_LINES = 64'd1 << 26;  // 4 GB of 64-byte lines
  localparam longint A_LINES = 64'd1 << 27;  // 8 GB

  task automatic check(longint a);
    longint idx;
    int cw;
    bit exp_valid, exp_approx;
    line_addr = LINE_ADDR_W'(a);
    #1;
    exp_approx = (a >= P_LINES);
    exp_valid  = (a < P_LINES + A_LINES);
    idx = exp_approx ? a - P_LINES : a;
    cw  = exp_approx ? 8 : 7;
    checks++;
    if (valid !== exp_valid || (loc.region == REGION_APPROX) !== exp_approx) begin
      failures++;
      $display("FAIL %h region/valid", a);
    end else if (exp_valid) begin
      checks++;
      if (int'(loc.col) != int'((idx % (1 << cw)) * 8) ||
          int'(loc.bank) != int'((idx >> cw) % 8) ||
          int'(loc.row) != int'((idx >> (cw + 3)) % 65536)) begin
        failures++;
        $display("FAIL %h: bank %0d row %0d col %0d", a, loc.bank, loc.row, loc.col);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(127); check(128); check(P_LINES - 1); check(P_LINES);
    check(P_LINES + 255); check(P_LINES + 256); check(P_LINES + A_LINES - 1);
    check(P_LINES + A_LINES); check((64'd1 << 28) - 1);
    for (int i = 0; i < 1000; i++) check(longint'($urandom) & ((64'd1 << 28) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
