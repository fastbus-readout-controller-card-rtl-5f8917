// tpdram_ctrl_gen_tb: checks the TPDRAM control generator clock by clock against the
// transfer cycle it is meant to make: one set-up clock with the row address selected,
// T_RCD clocks of RAS alone, T_CAS clocks of RAS and CAS with the column address selected,
// T_RP clocks of precharge and a one-clock Tx-RDY to the requester, 8 clocks in all at the
// default timing. The operation lines and X-STS must be held for the whole cycle. Random
// operations are requested from both SAM sides; when both ask at once SAMb must go first.
module tpdram_ctrl_gen_tb;
  import frc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic ta_oper_rq = 0, tb_oper_rq = 0, ta_rdy, tb_rdy;
  tp_ctl_t ta_ctl = '0, tb_ctl = '0;
  logic x_ras_n, x_cas_n, x_tr_oe_n, x_me_we_n, x_dsf1, x_dsf2, x_trm, x_sts, x_dmxs;
  int checks = 0, failures = 0;
  localparam int T_RCD = 2, T_CAS = 2, T_RP = 2;

  tpdram_ctrl_gen dut (.clk, .rst_n, .ta_oper_rq, .ta_ctl, .ta_rdy, .tb_oper_rq, .tb_ctl,
    .tb_rdy, .x_ras_n, .x_cas_n, .x_tr_oe_n, .x_me_we_n, .x_dsf1, .x_dsf2, .x_trm, .x_sts,
    .x_dmxs);

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %0t", m, $time); end
  endtask

  // expected line levels in clock k (0 = set-up) of a cycle
  task automatic check_cycle(tp_ctl_t c, bit b);
    int n = 1 + T_RCD + T_CAS + T_RP;
    for (int k = 0; k < n; k++) begin
      bit ras = (k >= 1) && (k < 1 + T_RCD + T_CAS);
      bit cas = (k >= 1 + T_RCD) && (k < 1 + T_RCD + T_CAS);
      chk(x_ras_n == !ras, "RAS");
      chk(x_cas_n == !cas, "CAS");
      chk(x_dmxs == cas, "DMXS");
      chk({x_trm, x_me_we_n, x_dsf1, x_dsf2} == c, "operation lines");
      chk(x_tr_oe_n == !c.trm, "TR/OE");
      chk(x_sts == b, "STS");
      chk(!ta_rdy && !tb_rdy, "early RDY");
      @(negedge clk);
    end
    chk(x_ras_n && x_cas_n, "idle after cycle");
    chk(tb_rdy == b && ta_rdy == !b, "RDY pulse");
  endtask

  initial begin
    tp_ctl_t ca, cb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(x_ras_n && x_cas_n && !ta_rdy && !tb_rdy, "idle");
    repeat (40) begin
      int who = $urandom % 3;   // 0 a, 1 b, 2 both
      ca = tp_ctl_t'(4'($urandom)); cb = tp_ctl_t'(4'($urandom));
      ta_ctl = ca; tb_ctl = cb;
      ta_oper_rq = (who != 1); tb_oper_rq = (who != 0);
      @(negedge clk);             // request seen at this posedge; now in set-up
      if (who != 0) begin
        check_cycle(cb, 1'b1);
        tb_oper_rq = 0;
        if (who == 2) begin
          @(negedge clk);         // generator back to idle, sees the waiting SAMa request
          check_cycle(ca, 1'b0);
          ta_oper_rq = 0;
        end
      end else begin
        check_cycle(ca, 1'b0);
        ta_oper_rq = 0;
      end
      @(negedge clk);
      chk(!ta_rdy && !tb_rdy && x_ras_n, "single RDY pulse, no repeat");
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
