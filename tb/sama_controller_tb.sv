// sama_controller_tb: drives the SAMa controller through read and write streams with a
// simple local bus arbiter (grant one clock after a request) and a simple transfer responder
// (Ta-RDY pulse three clocks after Ta-OPER-RQ). Every transfer and pointer strobe is logged
// and compared with the sequence of the half-buffer scheme:
//   read init:  full read, clear latch + step, split read;   QSF flip: step, split read
//   write init: pseudo write, clear latch;                   QSF flip: split write, step
//   end of write: split write of the current half;           end of read: nothing
//   SaC-RS abort returns to idle with the serial port disabled.
module sama_controller_tb;
  import frc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sac_rs = 0, sa_init_rq = 0, sa_end_rq = 0, sa_rd_wr_n = 0;
  logic sa_rdy, sa_breq, sa_bgnt = 0, ta_oper_rq, ta_rdy = 0, cl_pt, ce_pt;
  logic qsf = 0, se_n, fanout;
  tp_ctl_t ta_ctl;
  int checks = 0, failures = 0;
  int log_q[$];   // 0..15 = operation started, 17 = CL, 18 = CE

  sama_controller dut (.clk, .rst_n, .sac_rs, .sa_init_rq, .sa_end_rq, .sa_rd_wr_n, .sa_rdy,
    .sa_breq, .sa_bgnt, .ta_oper_rq, .ta_ctl, .ta_rdy, .cl_pt, .ce_pt, .qsf, .se_n, .fanout);

  int busy = 0;
  always @(posedge clk) begin
    sa_bgnt <= sa_breq;
    ta_rdy  <= 1'b0;
    if (rst_n && cl_pt) log_q.push_back(17);
    if (rst_n && ce_pt) log_q.push_back(18);
    if (rst_n && ta_oper_rq && !sa_bgnt) begin
      failures++; $display("FAIL: transfer requested without the bus");
    end
    if (rst_n && busy == 0 && ta_oper_rq && !ta_rdy) begin
      log_q.push_back(int'(ta_ctl)); busy = 4;
    end
    if (busy > 0) begin
      busy--;
      if (busy == 0) ta_rdy <= 1'b1;
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
    while (sa_rdy != level && n < 200) begin @(posedge clk); n++; end
    checks++;
    if (sa_rdy != level) begin failures++; $display("FAIL: Sa-RDY never %0d", level); end
  endtask

  task automatic init(bit rd);
    @(negedge clk);
    sa_rd_wr_n = rd; sa_init_rq = 1;
    wait_rdy(1);
    @(negedge clk);
    checks++;
    if (se_n || fanout != rd) begin failures++; $display("FAIL: port not enabled"); end
    sa_init_rq = 0;
    wait_rdy(0);
    repeat (3) @(negedge clk);
  endtask

  task automatic flip_qsf();
    @(negedge clk) qsf = !qsf;
    repeat (20) @(negedge clk);
  endtask

  task automatic finish_end();
    @(negedge clk) sa_end_rq = 1;
    wait_rdy(1);
    @(negedge clk) sa_end_rq = 0;
    wait_rdy(0);
    @(negedge clk);
    checks++;
    if (!se_n) begin failures++; $display("FAIL: port still enabled after end"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    init(1);
    expect_log("read init", '{int'(OP_READ_FULL), 17, 18, int'(OP_READ_SPLIT)});
    flip_qsf();
    expect_log("read QSF", '{18, int'(OP_READ_SPLIT)});
    flip_qsf();
    expect_log("read QSF 2", '{18, int'(OP_READ_SPLIT)});
    finish_end();
    expect_log("read end", '{});
    init(0);
    expect_log("write init", '{int'(OP_PSEUDO_WRITE), 17});
    flip_qsf();
    expect_log("write QSF", '{int'(OP_WRITE_SPLIT), 18});
    finish_end();
    expect_log("write end", '{int'(OP_WRITE_SPLIT)});
    init(1);
    log_q.delete();
    @(negedge clk) sac_rs = 1;
    @(negedge clk) sac_rs = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (!se_n || sa_breq) begin failures++; $display("FAIL: abort"); end
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
