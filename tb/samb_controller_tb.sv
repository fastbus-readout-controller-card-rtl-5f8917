// samb_controller_tb: drives the SAMb controller through its initialisation paths and its
// run-time service, with a simple local bus arbiter (grant one clock after a request) and a
// simple transfer responder (Tb-RDY pulse three clocks after Tb-OPER-RQ). Every transfer
// operation and every pointer strobe is logged, and the log is compared with the sequence
// the state diagram and the half-buffer scheme prescribe:
//   master write  (path a): clear BMR, pseudo write, clear latch, masked split write
//   master read   (path g): full read, clear latch + step, split read
//   slave write   (path b,d): store NTA, clear BMR, pseudo write, clear latch, masked split
//   random read   (path b,c,n): store NTA, full read, no second transfer
//   QSF flip, write: masked split write then step;  read: step then split read
//   end of write: masked full write;  end of read: no transfer
//   SbC-RS abort returns to idle with the serial port disabled.
module samb_controller_tb;
  import frc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sbc_rs = 0, sb_init_rq = 0, sb_end_rq = 0, sb_rd_wr_n = 0, f_ms_n = 1, f_rnd = 0;
  logic sb_rdy, sb_breq, sb_bgnt = 0, tb_oper_rq, tb_rdy = 0, pe_pt, cl_pt, ce_pt;
  logic qsf = 0, se_n, fanout;
  tp_ctl_t tb_ctl;
  int checks = 0, failures = 0;

  // log codes: 0..15 = operation started, 16 = PE, 17 = CL, 18 = CE
  int log_q[$];

  samb_controller dut (.clk, .rst_n, .sbc_rs, .sb_init_rq, .sb_end_rq, .sb_rd_wr_n, .f_ms_n,
    .f_rnd, .sb_rdy, .sb_breq, .sb_bgnt, .tb_oper_rq, .tb_ctl, .tb_rdy, .pe_pt, .cl_pt, .ce_pt,
    .qsf, .se_n, .fanout);

  int busy = 0;
  int n_ops = 0;
  always @(posedge clk) begin
    sb_bgnt <= sb_breq;
    tb_rdy  <= 1'b0;
    if (rst_n && pe_pt) log_q.push_back(16);
    if (rst_n && cl_pt) log_q.push_back(17);
    if (rst_n && ce_pt) log_q.push_back(18);
    if (rst_n && tb_oper_rq && !sb_bgnt) begin
      failures++; $display("FAIL: transfer requested without the bus");
    end
    if (rst_n && busy == 0 && tb_oper_rq && !tb_rdy) begin
      log_q.push_back(int'(tb_ctl)); n_ops++; busy = 4;
    end
    if (busy > 0) begin
      busy--;
      if (busy == 0) tb_rdy <= 1'b1;
    end
  end

  task automatic expect_log(string name, int exp[$]);
    checks++;
    if (log_q != exp) begin
      failures++;
      $display("FAIL: %s: log %p expected %p", name, log_q, exp);
    end
    log_q.delete();
  endtask

  task automatic wait_rdy(bit level);
    int n = 0;
    while (sb_rdy != level && n < 200) begin @(posedge clk); n++; end
    checks++;
    if (sb_rdy != level) begin failures++; $display("FAIL: Sb-RDY never %0d", level); end
  endtask

  task automatic init(bit rd, bit master, bit rnd);
    @(negedge clk);
    sb_rd_wr_n = rd; f_ms_n = master; f_rnd = rnd; sb_init_rq = 1;
    wait_rdy(1);
    @(negedge clk);
    checks++;
    if (se_n || fanout != rd) begin failures++; $display("FAIL: port not enabled"); end
    sb_init_rq = 0;
    wait_rdy(0);
    repeat (3) @(negedge clk);
  endtask

  task automatic flip_qsf();
    @(negedge clk) qsf = !qsf;
    repeat (20) @(negedge clk);
  endtask

  task automatic finish_end();
    @(negedge clk) sb_end_rq = 1;
    wait_rdy(1);
    @(negedge clk) sb_end_rq = 0;
    wait_rdy(0);
    @(negedge clk);
    checks++;
    if (!se_n) begin failures++; $display("FAIL: port still enabled after end"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // master write
    init(0, 1, 0);
    expect_log("master write init", '{int'(OP_CLEAR_BMR), int'(OP_PSEUDO_WRITE), 17, int'(OP_MWRITE_SPLIT)});
    flip_qsf();
    expect_log("write QSF", '{int'(OP_MWRITE_SPLIT), 18});
    flip_qsf();
    expect_log("write QSF 2", '{int'(OP_MWRITE_SPLIT), 18});
    finish_end();
    expect_log("write end", '{int'(OP_MWRITE_FULL)});
    // master read
    init(1, 1, 0);
    expect_log("master read init", '{int'(OP_READ_FULL), 17, 18, int'(OP_READ_SPLIT)});
    flip_qsf();
    expect_log("read QSF", '{18, int'(OP_READ_SPLIT)});
    finish_end();
    expect_log("read end", '{});
    // slave write
    init(0, 0, 0);
    expect_log("slave write init", '{16, int'(OP_CLEAR_BMR), int'(OP_PSEUDO_WRITE), 17, int'(OP_MWRITE_SPLIT)});
    finish_end();
    expect_log("slave write end", '{int'(OP_MWRITE_FULL)});
    // slave random read
    init(1, 0, 1);
    expect_log("random read init", '{16, int'(OP_READ_FULL)});
    finish_end();
    expect_log("random read end", '{});
    // abort while running
    init(1, 1, 0);
    log_q.delete();
    @(negedge clk) sbc_rs = 1;
    @(negedge clk) sbc_rs = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (!se_n || sb_breq) begin failures++; $display("FAIL: abort"); end
    flip_qsf();
    expect_log("no service after abort", '{});
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
