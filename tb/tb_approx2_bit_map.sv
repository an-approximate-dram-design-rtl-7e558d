// tb_approx2_bit_map: checks the APPROX2 beat mapping against the device-by-device rule
// (device n nibble = {DATA1[2n+1], DATA1[2n], DATA0[2n+1], DATA0[2n]}) for fixed and random
// beats, checks that the read path restores the beat, and that with en low (precise rank) both
// paths leave the beat unchanged.
module tb_approx2_bit_map;
  import approx_pkg::*;
  logic        en = 1;
  logic [63:0] wr_beat, wr_dq, rd_dq, rd_beat;
  int checks = 0, failures = 0;

  approx2_bit_map dut (.en, .wr_beat, .wr_dq, .rd_dq, .rd_beat);

  function automatic logic [63:0] expect_map(logic [63:0] b);
    logic [31:0] d1, d0;
    logic [63:0] r;
    d1 = b[63:32];
    d0 = b[31:0];
    r = '0;
    for (int n = 0; n < 16; n++)
      r |= 64'({d1[2*n+1], d1[2*n], d0[2*n+1], d0[2*n]}) << (4 * n);
    return r;
  endfunction

  task automatic check(logic [63:0] b);
    wr_beat = b;
    rd_dq   = expect_map(b);
    #1;
    checks++;
    if (wr_dq !== expect_map(b)) begin
      failures++;
      $display("FAIL map %h -> %h, expected %h", b, wr_dq, expect_map(b));
    end
    checks++;
    if (rd_beat !== b) begin
      failures++;
      $display("FAIL unmap %h -> %h, expected %h", rd_dq, rd_beat, b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // DATA1[31:30] and DATA0[31:30] both set: only device 15 is non-zero.
    check(64'hC0000000_C0000000);
    checks++;
    if (wr_dq !== 64'hF000_0000_0000_0000) begin failures++; $display("FAIL chip 15"); end
    // DATA0[1:0] only: device 0 low pair.
    check(64'h00000000_00000003);
    checks++;
    if (wr_dq !== 64'h0000_0000_0000_0003) begin failures++; $display("FAIL chip 0"); end
    // DATA1 bit 23 (lowest exponent bit) lands in device 11, upper pair, bit 1.
    check(64'h00800000_00000000);
    checks++;
    if (wr_dq !== (64'h8 << 44)) begin failures++; $display("FAIL chip 11"); end
    for (int i = 0; i < 500; i++) check({$urandom, $urandom});
    // Precise rank: no mapping in either direction.
    en = 0;
    for (int i = 0; i < 100; i++) begin
      wr_beat = {$urandom, $urandom};
      rd_dq   = {$urandom, $urandom};
      #1;
      checks++;
      if (wr_dq !== wr_beat || rd_beat !== rd_dq) begin failures++; $display("FAIL pass-through"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
