// tb_refresh_policy: checks the per-device refresh periods of Eq. (1) for several (incr, offset)
// pairs given in 64-ms rounds, the switch-off mode, saturation and the one-round minimum.
module tb_refresh_policy;
  import approx_pkg::*;
  refresh_cfg_t cfg;
  period_t      period [NUM_DEV];
  int checks = 0, failures = 0;

  refresh_policy dut (.cfg, .period);

  task automatic run(bit off, int incr, int offset);
    cfg.approx_off = off;
    cfg.incr       = PERIOD_W'(incr);
    cfg.offset     = PERIOD_W'(offset);
    #1;
    for (int n = 0; n < 16; n++) begin
      int exp;
      if (n >= 11)     exp = 1;
      else if (off)    exp = 0;
      else begin
        exp = (10 - n) * incr + offset;
        if (exp > 4095) exp = 4095;
        if (exp < 1)    exp = 1;
      end
      checks++;
      if (int'(period[n]) != exp) begin
        failures++;
        $display("FAIL off=%0d incr=%0d offset=%0d dev %0d: %0d expected %0d",
                 off, incr, offset, n, period[n], exp);
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
    run(0, 4, 16);     // (offset, incr) = (1024 ms, 256 ms)
    run(0, 4, 64);     // (4096 ms, 256 ms)
    run(0, 0, 48);     // all approximate devices at 3072 ms
    run(0, 0, 0);      // minimum of one round
    run(0, 400, 100);  // saturates for the low devices
    run(1, 4, 16);     // approximate refresh switched off
    for (int i = 0; i < 200; i++) run(0, $urandom_range(0, 600), $urandom_range(0, 4095));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
