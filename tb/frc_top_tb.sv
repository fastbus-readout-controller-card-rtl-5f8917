// frc_top_tb: end-to-end test of the FRC readout logic at its default parameters.
//
// Around frc_top it places a TPDRAM model, a processor bus driver, a FASTBUS arbiter, three
// FASTBUS slaves (slot 5 answers with a data pattern, slot 9 answers address cycles with
// SS=2, slot 12 is empty), a FASTBUS master that addresses the FRC as a slave, and a
// Scanner bus master. The FASTBUS and Scanner lines are wired-OR of all drivers.
// Sequence:
//   1  own CSRs written and read back by the processor
//   2  master block read of 600 words from slot 5 into the TPDRAM (not pipelined),
//      starting in the middle of a SAM half; memory checked word by word, neighbours intact
//   3  pipelined block read at 100 ns per word; the word rate is checked (40 MByte/s)
//   4  single data read through the SAR; posted primary address to slot 9 (error) followed
//      by a SAR access that must end in BERR*; primary address to slot 12 (timeout)
//   5  master block write of 300 words to slot 5, pipelined at 150 ns, data compared
//   6  FRC as slave: block write of 300 words into its data space, CSR#0 read, an invalid
//      cycle (non-zero SS), a random single-word read, a block read of the 300 words, a
//      pipelined block write and read of 400 words at 100 ns (first cycle handshaked), and
//      a FASTBUS broadcast of its own class (answered) and of another class (ignored)
//   7  Scanner readout: broadcast poll, 600-word read, 20 MByte/s word rate checked, while a
//      FASTBUS block read runs at the same time (both SAM controllers compete for the bus)
//   8  Scanner write of 100 words into the TPDRAM
// Each mechanism is counted and must occur at least once.
module frc_top_tb;
  import frc_pkg::*;
  localparam logic [2:0] MS_ADDR_DATA = 3'd0;   // primary address, data space
  localparam logic [2:0] MS_ADDR_CSR  = 3'd1;   // primary address, CSR space

  logic clk = 1'b0;
  always #12.5 clk = !clk;   // 40 MHz
  logic rst_n;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ DUT
  logic        cpu_req = 0, cpu_we = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_drdy, cpu_berr, cpu_breq_n, cpu_bgnt = 0;
  logic        irq_fastbus, irq_readout;
  logic        x_ras_n, x_cas_n, x_tr_oe_n, x_me_we_n, x_dsf1, x_dsf2, x_trm, x_sts, x_dmxs;
  logic [8:0]  tp_ma;
  logic [1:0]  tp_bank;
  logic        sa_sc, sa_se_n, sa_qsf, sa_fanout, sb_sc, sb_se_n, sb_mask, sb_qsf, sb_fanout;
  logic [31:0] sa_sdq_o, sa_sdq_i, sb_sdq_o, sb_sdq_i;
  logic [31:0] fb_ad_o;  logic fb_ad_oe; logic [2:0] fb_ms_o; logic fb_eg_o, fb_as_o, fb_ds_o;
  logic fb_rd_o, fb_ak_o, fb_dk_o; logic [2:0] fb_ss_o; logic fb_ar_o; logic [5:0] fb_al_o;
  logic fb_gk_o;
  logic [15:0] sc_ad_o; logic sc_ad_oe;
  logic        sc_as = 0, sc_ds = 0; logic [15:0] sc_ad = 0;
  logic        fb_ag = 0;

  // wired-OR FASTBUS: FRC + slave models + test master
  logic [31:0] sl_ad, tm_ad;
  logic        sl_ak, sl_dk; logic [2:0] sl_ss;
  logic        tm_as = 0, tm_ds = 0, tm_eg = 0, tm_rd = 0; logic [2:0] tm_ms = 0;
  logic [31:0] bus_ad;
  assign bus_ad = (fb_ad_oe ? fb_ad_o : 32'h0) | sl_ad | tm_ad;

  frc_top dut (
    .clk, .rst_n, .ga(5'd3), .scanner_addr(4'd6),
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_drdy, .cpu_berr,
    .cpu_breq_n, .cpu_bgnt, .irq_fastbus, .irq_readout,
    .x_ras_n, .x_cas_n, .x_tr_oe_n, .x_me_we_n, .x_dsf1, .x_dsf2, .x_trm, .x_sts, .x_dmxs,
    .tp_ma, .tp_bank,
    .sa_sc, .sa_se_n, .sa_sdq_o, .sa_sdq_i, .sa_qsf, .sa_fanout,
    .sb_sc, .sb_se_n, .sb_sdq_o, .sb_mask, .sb_sdq_i, .sb_qsf, .sb_fanout,
    .fb_ad_o, .fb_ad_oe, .fb_ms_o, .fb_eg_o, .fb_as_o, .fb_ds_o, .fb_rd_o, .fb_ak_o,
    .fb_dk_o, .fb_ss_o, .fb_ar_o, .fb_al_o, .fb_gk_o,
    .fb_ad_i(bus_ad), .fb_ms_i(fb_ms_o | tm_ms), .fb_eg_i(fb_eg_o | tm_eg),
    .fb_as_i(fb_as_o | tm_as), .fb_ds_i(fb_ds_o | tm_ds), .fb_rd_i(fb_rd_o | tm_rd),
    .fb_ak_i(fb_ak_o | sl_ak), .fb_dk_i(fb_dk_o | sl_dk), .fb_ss_i(fb_ss_o | sl_ss),
    .fb_ag_i(fb_ag),
    .sc_as_i(sc_as), .sc_ds_i(sc_ds), .sc_ad_i(sc_ad), .sc_ad_o, .sc_ad_oe
  );

  tpdram_model u_mem (
    .clk, .x_ras_n, .x_cas_n, .x_tr_oe_n, .x_me_we_n, .x_dsf1, .x_dsf2, .x_trm, .x_sts,
    .tp_ma, .tp_bank,
    .sa_sc, .sa_se_n, .sa_sdq_i(sa_sdq_o), .sa_sdq_o(sa_sdq_i), .sa_qsf,
    .sb_sc, .sb_se_n, .sb_sdq_i(sb_sdq_o), .sb_mask_i(sb_mask), .sb_sdq_o(sb_sdq_i), .sb_qsf
  );

  // ------------------------------------------------------------------ processor bus grant
  // the processor finishes its own bus cycle first: grant 8 clocks after BREQ*
  int n_contend = 0, n_prio_ok = 0, bg_cnt = 0;
  bit both_wait = 0;
  always @(posedge clk) begin
    if (!cpu_breq_n) begin
      bg_cnt <= bg_cnt + 1;
      if (bg_cnt >= 7) cpu_bgnt <= 1'b1;
    end else begin
      bg_cnt <= 0; cpu_bgnt <= 1'b0;
    end
    if (dut.sb_breq && dut.sa_breq && !dut.sb_bgnt && !dut.sa_bgnt) both_wait <= 1;
    if (both_wait && (dut.sb_bgnt || dut.sa_bgnt)) begin
      both_wait <= 0; n_contend++;
      if (dut.sb_bgnt) n_prio_ok++;
    end
  end

  // ------------------------------------------------------------------ FASTBUS arbiter
  int arb_cnt = 0, n_arb = 0;
  always @(posedge clk) begin
    if (fb_ar_o) begin
      arb_cnt <= arb_cnt + 1;
      if (arb_cnt == 3) begin fb_ag <= 1'b1; n_arb++; end
    end else begin
      arb_cnt <= 0; fb_ag <= 1'b0;
    end
  end

  // ------------------------------------------------------------------ FASTBUS slave models
  function automatic logic [31:0] pat(int i);
    return 32'hA5000000 ^ (i * 32'h00010003) ^ 32'h55;
  endfunction
  logic [4:0]  sl_slot = 0;        // slot addressed now, 0 = none
  logic        sl_con = 0, as_d = 0, ds_seen = 0;
  int          sl_idx = 0, sl_dly = 0;
  logic [31:0] sl_nta = 0;
  logic [31:0] sl_wr [int];
  int          sl_nwr = 0;
  logic        sl_rdq = 0;
  always @(posedge clk) begin
    as_d <= fb_as_o;
    sl_ad <= '0;
    if (fb_as_o && !as_d && fb_eg_o) begin
      sl_slot <= fb_ad_o[4:0];
      ds_seen <= fb_ds_o;
      sl_idx  <= 0;
      if (fb_ad_o[4:0] == 5) begin sl_ak <= 1; sl_ss <= 0; end
      else if (fb_ad_o[4:0] == 9) begin sl_ak <= 1; sl_ss <= 3'd2; end
    end else if (!fb_as_o) begin
      sl_ak <= 0; sl_ss <= 0; sl_slot <= 0; sl_dly <= 0; sl_dk <= 0;
    end else if (sl_slot == 5) begin
      if (sl_dly != 0) begin
        sl_dly <= sl_dly - 1;
        if (sl_dly == 1) begin
          sl_dk <= !sl_dk;
          if (sl_rdq) sl_ad <= pat(sl_idx - 1);
        end
      end else if (fb_ds_o != ds_seen) begin
        ds_seen <= fb_ds_o;
        sl_dly  <= 2;
        sl_rdq  <= fb_rd_o;
        if (fb_ms_o == MS_SEC_ADDR) begin sl_nta <= fb_ad_o; sl_idx <= 0; end
        else if (!fb_rd_o) begin sl_wr[sl_idx] = fb_ad_o; sl_nwr++; sl_idx <= sl_idx + 1; end
        else sl_idx <= sl_idx + 1;
      end
    end
  end
  initial begin sl_ak = 0; sl_dk = 0; sl_ss = 0; sl_ad = 0; tm_ad = 0; end

  // ------------------------------------------------------------------ processor tasks
  task automatic cpu(input bit we, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q, output bit berr);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    forever begin
      @(posedge clk);
      if (cpu_drdy || cpu_berr) break;
    end
    q = cpu_rdata; berr = cpu_berr;
    @(negedge clk);
    cpu_req = 0; cpu_we = 0;
  endtask
  logic [31:0] q; bit be;

  task automatic wait_block(output logic [31:0] st);
    int guard = 0;
    do begin
      cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);
      guard++;
    end while (st[26] && guard < 10000);
  endtask

  function automatic logic [31:0] mem_rd(int a);
    return u_mem.mem.exists(a) ? u_mem.mem[a] : 32'hDEAD_BEEF;
  endfunction

  // ------------------------------------------------------------------ test master (FRC as slave)
  task automatic tm_cycle(input logic [2:0] ms, input bit rd, input logic [31:0] d,
                          output logic [31:0] r, output logic [2:0] ss);
    @(negedge clk);
    tm_ms = ms; tm_rd = rd; tm_ad = rd ? 0 : d; tm_ds = !tm_ds;
    do @(posedge clk); while (fb_dk_o != tm_ds);
    r = bus_ad; ss = fb_ss_o;
    @(negedge clk); tm_ad = 0;
  endtask
  task automatic tm_address(input logic [2:0] ms, output logic [2:0] ss, output bit ak);
    automatic int g = 0;
    @(negedge clk);
    tm_ds = fb_dk_o; tm_ms = ms; tm_eg = 1; tm_ad = 32'd3; tm_as = 1;
    @(negedge clk); tm_ad = 0; tm_eg = 0;
    do begin @(posedge clk); g++; end while (!fb_ak_o && g < 20);
    ak = fb_ak_o; ss = fb_ss_o;
  endtask
  // broadcast address cycle (EG=0, MS bit 1) with a class word on AD
  task automatic tm_broadcast(input logic [2:0] ms, input logic [31:0] cls, output bit ak);
    automatic int g = 0;
    @(negedge clk);
    tm_ds = fb_dk_o; tm_ms = ms; tm_eg = 0; tm_ad = cls; tm_as = 1;
    @(negedge clk); tm_ad = 0;
    do begin @(posedge clk); g++; end while (!fb_ak_o && g < 20);
    ak = fb_ak_o;
  endtask
  // pipelined cycles: DS toggles every `period` clocks without waiting for DK; DK edges
  // are counted, and for reads the data is taken at each DK edge
  int pipe_dk = 0;
  logic [31:0] pipe_rd [$];
  task automatic tm_pipe(input bit rd, input int n, input int period, input logic [31:0] base);
    logic dk_d;
    pipe_dk = 0; pipe_rd.delete();
    dk_d = fb_dk_o;
    fork
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        tm_ms = MS_DATA_BLOCK; tm_rd = rd; tm_ad = rd ? 0 : base + i; tm_ds = !tm_ds;
        repeat (period - 1) @(negedge clk);
      end
      while (pipe_dk < n) begin
        @(posedge clk);
        if (fb_dk_o != dk_d) begin
          dk_d = fb_dk_o; pipe_dk++;
          if (rd) pipe_rd.push_back(bus_ad);
        end
      end
    join
    @(negedge clk); tm_ad = 0;
  endtask
  task automatic tm_release();
    @(negedge clk); tm_as = 0; tm_ms = 0; tm_rd = 0;
    do @(posedge clk); while (fb_ak_o);
  endtask

  // ------------------------------------------------------------------ Scanner master
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

  // ------------------------------------------------------------------ mechanism counters
  int n_qsf_split_b = 0, n_qsf_split_a = 0, n_pipe = 0, n_posted_berr = 0, n_timeout = 0;
  int n_slave_pipe = 0, n_fb_bcast = 0, n_slave_busy = 0, n_ss_invalid = 0, n_bcast = 0, n_slave_blk = 0, n_rnd = 0;
  int n_dk_edges = 0;
  always @(posedge clk) begin
    if (dut.u_samb.st_q == dut.u_samb.Q_XFER && dut.tb_rdy) n_qsf_split_b++;
    if (dut.u_sama.st_q == dut.u_sama.Q_XFER && dut.ta_rdy) n_qsf_split_a++;
  end

  // ------------------------------------------------------------------ test
  localparam int N1 = 600;
  localparam logic [19:0] P1 = 20'h04480;   // row 2, half 0, tap 0x80
  localparam logic [19:0] P2 = 20'h10000;
  localparam logic [19:0] P3 = 20'h20100;
  localparam logic [19:0] P4 = 20'h30000;

  initial begin
    int t0, t1, tfirst, tlast;
    logic [31:0] st, r; logic [2:0] ss; bit ak;
    logic [15:0] lo, hi;
    rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1 CSRs
    cpu(1, {A_CSR, 16'd8}, 32'd3, q, be);
    cpu(1, {A_CSR, 16'd7}, 32'h0000_0010, q, be);
    cpu(0, {A_CSR, 16'd8}, 0, q, be);   check(q == 3, "CSR#8 read back");
    cpu(0, {A_CSR, 16'd0}, 0, q, be);   check(q[31:16] == 16'hF8C0, "CSR#0 module id");
    cpu(1, {A_STCR, 16'h0}, 32'h0000_0004, q, be);   // interrupt enable, 100 ns

    // sentinels around the first block
    u_mem.mem[int'(P1) - 1] = 32'h1111_1111;
    u_mem.mem[int'(P1) + N1] = 32'h2222_2222;

    // 2 primary address (not pipelined), secondary address, block read of N1 words
    cpu(1, {A_PAR, 16'h0800}, 32'd5, q, be);   check(!be && dut.fb_gk_o, "PAR slot 5 accepted, master");
    check(fb_al_o == 6'd3, "arbitration level from CSR#8");
    cpu(1, {A_SAR, 16'h4000}, 32'h0000_0000, q, be);   check(!be && sl_nta == 0, "secondary address");
    t0 = $time;
    cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0001_0000 | N1, q, be);
    begin
      automatic int g = 0;
      while (!irq_fastbus && g < 100000) begin @(posedge clk); g++; end
    end
    check(irq_fastbus, "block done interrupt");
    wait_block(st);
    check(st[27] == 0 && st[25] && st[15:0] == 0, "block read status");
    begin
      automatic int bad = 0;
      for (int i = 0; i < N1; i++) if (mem_rd(int'(P1) + i) != pat(i)) bad++;
      check(bad == 0, $sformatf("block read data in TPDRAM (%0d bad)", bad));
    end
    check(mem_rd(int'(P1) - 1) == 32'h1111_1111 && mem_rd(int'(P1) + N1) == 32'h2222_2222,
          "bit mask kept neighbours");
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    repeat (4) @(posedge clk);
    check(!fb_as_o && !fb_gk_o, "released");

    // 3 pipelined (PAR bit 10) block read, 100 ns
    cpu(1, {A_PAR, 16'h1C00}, 32'd5, q, be);          // retain + pipelined, posted
    cpu(1, {A_SAR, 16'h4000}, 32'h0000_0000, q, be);   // posted secondary address
    n_dk_edges = 0;
    fork
      begin : cnt_dk
        logic d0; d0 = fb_dk_o | sl_dk; tfirst = 0; tlast = 0;
        forever begin
          @(posedge clk);
          if ((fb_dk_o | sl_dk) != d0) begin
            d0 = fb_dk_o | sl_dk;
            if (dut.u_fastbus.m_st == dut.u_fastbus.M_BLK) n_dk_edges++;
            if (n_dk_edges == 1) tfirst = $time; tlast = $time;
          end
        end
      end
      begin
        cpu(1, {A_TCR_HI, P2, 2'b00}, 32'h0003_0000 | 256, q, be);
        wait_block(st);
        disable cnt_dk;
      end
    join
    n_pipe++;
    check(n_dk_edges == 256, $sformatf("pipelined word count %0d", n_dk_edges));
    check((tlast - tfirst) == 255 * 100, $sformatf("pipelined word spacing: %0d ns for 255 words", tlast - tfirst));
    begin
      automatic int bad = 0;
      for (int i = 0; i < 256; i++) if (mem_rd(int'(P2) + i) != pat(i)) bad++;
      check(bad == 0, "pipelined block data");
    end
    // single data read through the SAR (MS=0, read)
    cpu(0, {A_SAR, 16'h0000}, 0, q, be);
    check(!be && q == pat(256), $sformatf("single data read %h", q));
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    repeat (4) @(posedge clk);
    check(fb_gk_o, "mastership retained");

    // 4 posted primary address to slot 9 -> SS=2; next access gets BERR*
    cpu(1, {A_PAR, 16'h1C00}, 32'd9, q, be);   check(!be, "posted PAR answered at once");
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);    check(be, "BERR after failed posted PAR");
    if (be) n_posted_berr++;
    cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);      check(st[31:29] == 3'd2, "SS of failed cycle in TCR");
    begin
      bit be2;
      cpu(1, {A_PAR, 16'h0800}, 32'd12, q, be2);  check(be2, "timeout on empty slot");
      cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);       check(st[28], "timeout flag");
      if (be2 && st[28]) n_timeout++;
    end

    // 5 block write of 300 words, pipelined 150 ns
    cpu(1, {A_STCR, 16'h0}, 32'h0000_0005, q, be);
    cpu(1, {A_PAR, 16'h0800}, 32'd5, q, be);
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);
    sl_nwr = 0; sl_wr.delete();
    cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0002_0000 | 300, q, be);
    wait_block(st);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 300; i++) if (!sl_wr.exists(i) || sl_wr[i] != pat(i)) bad++;
      check(bad == 0 && sl_nwr == 300, $sformatf("block write data (%0d bad, %0d words)", bad, sl_nwr));
    end
    n_pipe++;
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    repeat (4) @(posedge clk);
    check(!fb_gk_o, "mastership given up");

    // 6b FRC as slave: block write into data space
    tm_address(MS_ADDR_DATA, ss, ak);
    check(ak && ss == SS_OK, "FRC answers geographic address");
    tm_cycle(MS_SEC_ADDR, 0, int'(P3), r, ss);
    for (int i = 0; i < 300; i++) tm_cycle(MS_DATA_BLOCK, 0, 32'hC0DE_0000 + i, r, ss);
    tm_cycle(3'd5, 0, 0, r, ss);
    check(ss == SS_INVALID, "invalid slave cycle answered with non-zero SS");
    if (ss != 0) n_ss_invalid++;
    tm_release();
    repeat (40) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 300; i++) if (mem_rd(int'(P3) + i) != 32'hC0DE_0000 + i) bad++;
      check(bad == 0, $sformatf("slave block write data (%0d bad)", bad));
    end
    n_slave_blk++;
    cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);   check(st[24], "slave done flag");
    // CSR#0 over FASTBUS, random read of TPDRAM data
    tm_address(MS_ADDR_CSR, ss, ak);
    tm_cycle(MS_SEC_ADDR, 0, 0, r, ss);
    tm_cycle(MS_DATA_RANDOM, 1, 0, r, ss);
    check(r[31:16] == 16'hF8C0 && ss == 0, "CSR#0 read over FASTBUS");
    tm_release();
    tm_address(MS_ADDR_DATA, ss, ak);
    tm_cycle(MS_SEC_ADDR, 0, int'(P3) + 7, r, ss);
    tm_cycle(MS_DATA_RANDOM, 1, 0, r, ss);
    check(r == 32'hC0DE_0007, $sformatf("random slave read %h", r));
    if (r == 32'hC0DE_0007) n_rnd++;
    tm_release();
    repeat (20) @(posedge clk);
    // 6c slave block read of the 300 words, crossing SAM halves
    tm_address(MS_ADDR_DATA, ss, ak);
    tm_cycle(MS_SEC_ADDR, 0, int'(P3), r, ss);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 300; i++) begin
        tm_cycle(MS_DATA_BLOCK, 1, 0, r, ss);
        if (r != 32'hC0DE_0000 + i) bad++;
      end
      check(bad == 0, $sformatf("slave block read data (%0d bad)", bad));
      if (bad == 0) n_slave_blk++;
    end
    tm_release();
    repeat (20) @(posedge clk);
    // 6d pipelined slave write at 100 ns and pipelined slave read at 100 ns: the first
    // cycle is handshaked (it starts the SAMb stream), the rest are pipelined
    tm_address(MS_ADDR_DATA, ss, ak);
    tm_cycle(MS_SEC_ADDR, 0, int'(P3) + 1024, r, ss);
    tm_cycle(MS_DATA_BLOCK, 0, 32'h7700_0000, r, ss);
    tm_pipe(0, 399, 4, 32'h7700_0001);
    tm_release();
    repeat (40) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 400; i++) if (mem_rd(int'(P3) + 1024 + i) != 32'h7700_0000 + i) bad++;
      check(bad == 0 && pipe_dk == 399, $sformatf("pipelined slave write (%0d bad, %0d DK)", bad, pipe_dk));
      if (bad == 0) n_slave_pipe++;
    end
    tm_address(MS_ADDR_DATA, ss, ak);
    tm_cycle(MS_SEC_ADDR, 0, int'(P3) + 1024, r, ss);
    tm_cycle(MS_DATA_BLOCK, 1, 0, r, ss);
    tm_pipe(1, 399, 4, 0);
    tm_release();
    begin
      automatic int bad;
      bad = (r != 32'h7700_0000) ? 1 : 0;
      for (int i = 0; i < 399; i++) if (pipe_rd[i] != 32'h7700_0001 + i) bad++;
      check(bad == 0, $sformatf("pipelined slave read (%0d bad)", bad));
      if (bad == 0) n_slave_pipe++;
    end
    repeat (20) @(posedge clk);
    // 6e FASTBUS broadcast: class 0x10 matches CSR#7, class 0x20 does not
    tm_broadcast(3'd3, 32'h0000_0010, ak);
    check(ak, "FRC answers a broadcast of its class");
    tm_cycle(MS_SEC_ADDR, 0, 32'd7, r, ss);
    tm_cycle(MS_DATA_RANDOM, 1, 0, r, ss);
    check(r == 32'h0000_0010, "CSR#7 read after broadcast address");
    if (ak && r == 32'h10) n_fb_bcast++;
    tm_release();
    tm_broadcast(3'd3, 32'h0000_0020, ak);
    check(!ak, "FRC ignores a broadcast of another class");
    @(negedge clk); tm_as = 0; tm_ms = 0;
    repeat (20) @(posedge clk);

    // 7 Scanner readout of the first block, with a FASTBUS block read running alongside
    cpu(1, {A_RO, 16'h0000}, {12'd0, P1}, q, be);
    cpu(1, {A_RO, 16'h0004}, N1, q, be);
    cpu(1, {A_STCR, 16'h0}, 32'h0000_0004, q, be);
    cpu(1, {A_PAR, 16'h0800}, 32'd5, q, be);
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);
    // start the readout and a FASTBUS block read back to back: both SAM controllers
    // ask for the local bus while the processor still holds it
    cpu(1, {A_RO, 16'h0008}, 32'h0000_0007, q, be);   // start, Scanner reads, irq enable
    fork
      begin
        cpu(1, {A_TCR_HI, P4, 2'b00}, 32'h0003_0000 | 1000, q, be);
        wait_block(st);
        cpu(1, {A_REL, 16'h0}, 0, q, be);
      end
      begin
        automatic int bad = 0;
        repeat (60) @(posedge clk);
        sc_addr(16'h0010);   // broadcast
        sc_read(lo); sc_read(hi);
        sc_end();
        check(lo == 16'h0040 && hi == 0, $sformatf("broadcast poll answer %h", lo));
        if (lo[6]) n_bcast++;
        sc_addr(16'h0006);
        t0 = $time;
        for (int i = 0; i < N1; i++) begin
          sc_read(lo); sc_read(hi);
          if ({hi, lo} != pat(i)) bad++;
        end
        t1 = $time;
        sc_end();
        check(bad == 0, $sformatf("Scanner readout data (%0d bad)", bad));
        check(t1 - t0 == N1 * 2 * 100, $sformatf("Scanner rate: %0d ns for %0d words", t1 - t0, N1));
      end
    join
    begin
      automatic int bad = 0;
      for (int i = 0; i < 1000; i++) if (mem_rd(int'(P4) + i) != pat(i)) bad++;
      check(bad == 0, "concurrent block read data");
    end
    repeat (40) @(posedge clk);
    check(irq_readout, "readout done interrupt");
    cpu(0, {A_RO, 16'h0008}, 0, q, be);  check(q[2] && !q[4], "readout done status");

    // 8 Scanner writes 100 words into the TPDRAM
    cpu(1, {A_RO, 16'h0000}, {12'd0, 20'h38000}, q, be);
    cpu(1, {A_RO, 16'h0004}, 100, q, be);
    cpu(1, {A_RO, 16'h0008}, 32'h0000_0005, q, be);   // start, Scanner writes
    repeat (60) @(posedge clk);
    sc_addr(16'h0026);
    for (int i = 0; i < 100; i++) begin
      sc_write(16'(i)); sc_write(16'hBEEF);
    end
    sc_end();
    repeat (60) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 100; i++) if (mem_rd(32'h38000 + i) != {16'hBEEF, 16'(i)}) bad++;
      check(bad == 0, $sformatf("Scanner write data (%0d bad)", bad));
    end

    // mechanisms
    $display("mechanisms: arbitration=%0d qsf_split_b=%0d qsf_split_a=%0d contention=%0d prio_b=%0d pipelined=%0d posted_berr=%0d timeout=%0d ss_invalid=%0d broadcast=%0d slave_block=%0d random=%0d clear_bmr=%0d masked_full=%0d pseudo_write=%0d",
             n_arb, n_qsf_split_b, n_qsf_split_a, n_contend, n_prio_ok, n_pipe, n_posted_berr, n_timeout,
             n_ss_invalid, n_bcast, n_slave_blk, n_rnd,
             u_mem.n_op[OP_CLEAR_BMR], u_mem.n_op[OP_MWRITE_FULL], u_mem.n_op[OP_PSEUDO_WRITE]);
    check(n_arb > 0, "mechanism: FASTBUS arbitration");
    check(n_qsf_split_b > 0, "mechanism: SAMb half transfer on QSF");
    check(n_qsf_split_a > 0, "mechanism: SAMa half transfer on QSF");
    check(n_contend > 0, "mechanism: both SAM controllers request the local bus");
    check(n_prio_ok == n_contend, "SAMb served first when both request");
    check(n_pipe > 0, "mechanism: pipelined transfer");
    check(n_posted_berr > 0, "mechanism: error after posted cycle");
    check(n_timeout > 0, "mechanism: timeout");
    check(n_ss_invalid > 0, "mechanism: invalid slave operation");
    check(n_bcast > 0, "mechanism: Scanner broadcast poll");
    check(n_slave_blk > 0, "mechanism: slave block transfer");
    check(n_rnd > 0, "mechanism: random slave access");
    check(n_slave_pipe == 2, "mechanism: pipelined slave write and read");
    check(n_fb_bcast > 0, "mechanism: FASTBUS broadcast to the FRC");
    check(u_mem.n_op[OP_CLEAR_BMR] > 0 && u_mem.n_op[OP_MWRITE_FULL] > 0 &&
          u_mem.n_op[OP_PSEUDO_WRITE] > 0 && u_mem.n_op[OP_READ_FULL] > 0 &&
          u_mem.n_op[OP_WRITE_SPLIT] > 0, "mechanism: all transfer types");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
