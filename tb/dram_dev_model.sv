// dram_dev_model: behavioural model of one DDR3 device (x4 or x8) for the testbenches.
//
// Not synthesizable and not a model of DDR3 electrical timing. It decodes the abstract command
// bus while its chip select is low: ACT opens a row per bank, WR captures eight beats of W bits
// starting CWL cycles after the command, RD returns eight beats starting CL cycles after it, and
// REF is counted. Storage is a sparse associative array indexed by {bank, row, column}.
// Retention: when RET_CYCLES is non-zero and a device has gone RET_CYCLES cycles without a REF
// reaching it, all it stores leaks to 0 (a crude stand-in for the leaky cells of an unrefreshed
// device). Counters ref_count and max_gap (longest stretch without REF, in cycles) let a
// testbench check the refresh schedule each device saw. Timing convention: the bus value of a
// cycle is sampled at the rising edge that ends it; read data is driven during cycles
// CL..CL+7 after the RD cycle and is 0 otherwise, so the outputs of several ranks can be ORed.
module dram_dev_model
  import approx_pkg::*;
#(
  parameter int unsigned W          = 4,
  parameter int unsigned CL         = 9,
  parameter int unsigned CWL        = 7,
  parameter longint unsigned RET_CYCLES = 0
) (
  input  logic              clk,
  input  logic              cs_n,
  input  dram_cmd_e         cmd,
  input  logic [BANK_W-1:0] ba,
  input  logic [ROW_W-1:0]  addr,
  input  logic [W-1:0]      dq_wr,
  output logic [W-1:0]      dq_rd
);
  logic [W-1:0]     mem [longint unsigned];
  logic [ROW_W-1:0] open_row [2**BANK_W];
  longint unsigned  cyc = 0;
  longint unsigned  wr_t = 0, rd_t = 0, last_ref = 0;
  logic             wr_pend = 0, rd_pend = 0;
  longint unsigned  wr_base = 0, rd_base = 0;
  int unsigned      ref_count = 0;
  longint unsigned  max_gap = 0;
  int unsigned      leak_events = 0;

  function automatic longint unsigned key(logic [BANK_W-1:0] b, logic [ROW_W-1:0] r,
                                          longint unsigned c);
    return (longint'(b) << 40) | (longint'(r) << 16) | c;
  endfunction

  initial dq_rd = '0;

  always @(posedge clk) begin
    longint unsigned now;
    now = cyc;
    cyc <= cyc + 1;
    if (!cs_n) begin
      case (cmd)
        CMD_ACT: open_row[ba] = addr;
        CMD_WR:  begin wr_pend = 1; wr_t = now; wr_base = key(ba, open_row[ba], addr); end
        CMD_RD:  begin rd_pend = 1; rd_t = now; rd_base = key(ba, open_row[ba], addr); end
        CMD_REF: begin
          if (now - last_ref > max_gap) max_gap = now - last_ref;
          last_ref = now;
          ref_count++;
        end
        default: ;
      endcase
    end
    if (wr_pend && now >= wr_t + CWL && now < wr_t + CWL + BURST_LEN)
      mem[wr_base + (now - wr_t - CWL)] = dq_wr;
    if (wr_pend && now == wr_t + CWL + BURST_LEN - 1) wr_pend = 0;
    if (rd_pend && now + 1 >= rd_t + CL && now + 1 < rd_t + CL + BURST_LEN)
      dq_rd <= mem.exists(rd_base + (now + 1 - rd_t - CL)) ? mem[rd_base + (now + 1 - rd_t - CL)] : '0;
    else
      dq_rd <= '0;
    if (rd_pend && now + 1 == rd_t + CL + BURST_LEN - 1) rd_pend = 0;
    if (RET_CYCLES != 0 && now - last_ref == RET_CYCLES) begin
      foreach (mem[k]) mem[k] = '0;
      leak_events++;
    end
  end
endmodule
