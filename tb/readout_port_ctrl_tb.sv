// readout_port_ctrl_tb: tests the Readout Port Controller on its own, with a Scanner bus
// master and a stand-in for the SAMa controller and SAM a (four-phase Sa-INIT-RQ/Sa-END-RQ
// answered by Sa-RDY, a word array stepped by the serial clock). Checked:
//   - the pointer register loads the SAMa pointer (S-SAR)
//   - a broadcast poll is answered with the bit of the own address once an event is ready,
//     and with nothing before
//   - a read of N words sends each word as two 16-bit halves, low half first; the word
//     counter counts down, the SAMa controller is told to end, done and the interrupt follow
//   - at the fastest allowed pace (one half every 4 clocks of 25 ns) a word takes 200 ns,
//     the 20 MByte/s peak rate
//   - a Scanner write puts the words into SAM a; another slave address is ignored
//   - abort returns to idle
module readout_port_ctrl_tb;
  import frc_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = !clk;
  logic rst_n = 0;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        cpu_req = 0, cpu_we = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_drdy, irq;
  logic        sc_as = 0, sc_ds = 0; logic [15:0] sc_ad = 0, sc_ad_o; logic sc_ad_oe;
  logic        sa_init_rq, sa_end_rq, sa_rd_wr_n, sac_rs, sa_rdy = 0, s_sar, sa_sc;
  ptr_t        sar_ptr;
  logic [31:0] sa_sdq_o, sa_sdq_i;

  readout_port_ctrl dut (.clk, .rst_n, .my_addr(4'd6), .cpu_req, .cpu_we, .cpu_addr,
    .cpu_wdata, .cpu_rdata, .cpu_drdy, .irq, .sc_as_i(sc_as), .sc_ds_i(sc_ds), .sc_ad_i(sc_ad),
    .sc_ad_o, .sc_ad_oe, .sa_init_rq, .sa_end_rq, .sa_rd_wr_n, .sac_rs, .sa_rdy, .s_sar,
    .sar_ptr, .sa_sc, .sa_sdq_o, .sa_sdq_i);

  // SAMa stand-in
  logic [31:0] sam [512];
  int sp = 0, n_init = 0, n_end = 0, rdy_cnt = 0;
  ptr_t ptr_ld = 0;
  assign sa_sdq_i = sam[sp];
  always @(posedge clk) if (rst_n) begin
    if (s_sar) ptr_ld <= sar_ptr;
    if ((sa_init_rq || sa_end_rq) && !sa_rdy) begin
      rdy_cnt <= rdy_cnt + 1;
      if (rdy_cnt == 5) begin
        sa_rdy <= 1; rdy_cnt <= 0;
        if (sa_init_rq) begin n_init++; sp = 0; end else n_end++;
      end
    end else if (!sa_init_rq && !sa_end_rq) sa_rdy <= 0;
    if (sa_sc) begin
      if (!sa_rd_wr_n) sam[sp] = sa_sdq_o;
      sp = (sp + 1) % 512;
    end
  end

  task automatic cpu(input bit we, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_drdy);
    q = cpu_rdata;
    @(negedge clk);
    cpu_req = 0; cpu_we = 0;
  endtask
  task automatic sc_addr(input logic [15:0] a);
    @(negedge clk); sc_ad = a; sc_as = 1;
    repeat (2) @(negedge clk);
    sc_ad = 0;
  endtask
  task automatic sc_read(output logic [15:0] d);
    repeat (3) @(negedge clk);
    d = sc_ad_o;
    @(negedge clk); sc_ds = !sc_ds;
  endtask
  task automatic sc_write(input logic [15:0] d);
    repeat (3) @(negedge clk);
    sc_ad = d;
    @(negedge clk); sc_ds = !sc_ds;
  endtask
  task automatic sc_end();
    @(negedge clk); sc_as = 0; sc_ad = 0;
    repeat (2) @(negedge clk);
  endtask

  localparam logic [31:0] R_PTR = {A_RO, 16'h0}, R_CNT = {A_RO, 16'h4}, R_CTL = {A_RO, 16'h8};

  initial begin
    logic [31:0] q; logic [15:0] lo, hi;
    int n = 50, bad;
    realtime t0, t1;
    for (int i = 0; i < 512; i++) sam[i] = 32'h5A00_0000 ^ (i * 32'h0001_0101);
    repeat (3) @(posedge clk);
    rst_n = 1;
    sc_addr(16'h0010); sc_read(lo); sc_read(hi); sc_end();
    check(lo == 0 && hi == 0, "poll answered with nothing before an event is ready");
    cpu(1, R_PTR, 32'h0003_1000, q);
    check(ptr_ld == 20'h3_1000, "pointer register loads the SAMa pointer");
    cpu(1, R_CNT, n, q);
    cpu(1, R_CTL, 32'h7, q);     // start, read direction, interrupt enable
    repeat (30) @(negedge clk);
    check(n_init == 1 && sa_rd_wr_n, "SAMa initialised for reading");
    sc_addr(16'h0010); sc_read(lo); sc_read(hi); sc_end();
    check(lo == 16'h0040 && hi == 0, "poll answered with bit 6");
    sc_addr(16'h0006);
    bad = 0;
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      sc_read(lo); sc_read(hi);
      if ({hi, lo} != (32'h5A00_0000 ^ (i * 32'h0001_0101))) bad++;
    end
    t1 = $realtime;
    sc_end();
    check(bad == 0, "read data, low half first");
    check((t1 - t0) / n == 200.0, $sformatf("word time %0.1f ns (200 ns = 20 MByte/s)", (t1 - t0) / n));
    repeat (30) @(negedge clk);
    check(n_end == 1 && irq, "end request and interrupt after the last word");
    cpu(0, R_CTL, 0, q);
    check(q[2] && !q[4], "done, not busy");
    check(!irq, "status read clears the interrupt");
    cpu(0, R_CNT, 0, q);
    check(q == 0, "word counter at zero");
    // write direction
    cpu(1, R_CNT, 10, q);
    cpu(1, R_CTL, 32'h1, q);     // start, write direction
    repeat (30) @(negedge clk);
    sc_addr(16'h0029);           // write to slave 9: not us
    sc_write(16'hFFFF); sc_write(16'hFFFF); sc_end();
    sc_addr(16'h0026);
    for (int i = 0; i < 10; i++) begin sc_write(16'h1000 + i); sc_write(16'hBEE0 + i); end
    sc_end();
    repeat (30) @(negedge clk);
    bad = 0;
    for (int i = 0; i < 10; i++) if (sam[i] != {16'hBEE0 + 16'(i), 16'h1000 + 16'(i)}) bad++;
    check(bad == 0 && n_end == 2, "Scanner write into SAM a");
    // abort
    cpu(1, R_CNT, 10, q);
    cpu(1, R_CTL, 32'h3, q);
    repeat (30) @(negedge clk);
    cpu(1, R_CTL, 32'h8, q);
    check(sac_rs == 0, "abort strobe is one clock");
    cpu(0, R_CTL, 0, q);
    check(!q[4] && !q[3], "idle after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
