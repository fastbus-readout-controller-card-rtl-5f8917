// fastbus_port_ctrl_tb: tests the FASTBUS Port Controller on its own, with a FASTBUS
// arbiter, a FASTBUS slave in slot 5 (answers with a data pattern), an empty slot 12, a
// FASTBUS master that addresses the controller as a slave, and a stand-in for the SAMb
// controller and SAM b (four-phase Sb-INIT-RQ/Sb-END-RQ answered by Sb-RDY, a word array
// stepped by the serial clock). Checked:
//   - arbitration before the first address cycle, EG and MS taken from the PAR address bits
//   - the secondary address cycle carries MS=2 and the NTA
//   - a non-pipelined block read lands in SAM b word by word with the mask bit set, the
//     SAMb pointer is loaded from the TCR address, status and interrupt at the end
//   - a pipelined block read toggles DS every 4 clocks (100 ns, 40 MByte/s)
//   - a block write sends the SAM b words to the slave
//   - an STCR abort stops a running block transfer and pulses SbC-RS
//   - a timeout on an empty slot ends in BERR* and sets the timeout flag
//   - a logical address cycle drives EG low with the address word on AD
//   - as a slave: CSR#0 read returns the module id, a data-space block write reaches SAM b
//     through the SAMb requests with F-M/S*=0 and the NTA, an unknown MS code gets SS=6
module fastbus_port_ctrl_tb;
  import frc_pkg::*;
  localparam logic [2:0] MS_ADDR_DATA = 3'd0;   // primary address, data space
  localparam logic [2:0] MS_ADDR_CSR  = 3'd1;   // primary address, CSR space

  logic clk = 1'b0;
  always #12.5 clk = !clk;   // 40 MHz
  logic rst_n = 0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        cpu_req = 0, cpu_we = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_drdy, cpu_berr, irq;
  logic [31:0] fb_ad_o;  logic fb_ad_oe; logic [2:0] fb_ms_o; logic fb_eg_o, fb_as_o, fb_ds_o;
  logic fb_rd_o, fb_ak_o, fb_dk_o; logic [2:0] fb_ss_o; logic fb_ar_o; logic [5:0] fb_al_o;
  logic fb_gk_o;
  logic        fb_ag = 0;
  logic        sb_init_rq, sb_end_rq, sb_rd_wr_n, f_ms_n, f_rnd, sb_rdy = 0, sbc_rs;
  logic        s_ftcr, sb_sc, sb_mask_o;
  ptr_t        ftcr_ptr, nta;
  logic [31:0] sb_sdq_o, sb_sdq_i;

  logic [31:0] sl_ad, tm_ad;
  logic        sl_ak, sl_dk; logic [2:0] sl_ss;
  logic        tm_as = 0, tm_ds = 0, tm_eg = 0, tm_rd = 0; logic [2:0] tm_ms = 0;
  logic [31:0] bus_ad;
  assign bus_ad = (fb_ad_oe ? fb_ad_o : 32'h0) | sl_ad | tm_ad;

  fastbus_port_ctrl dut (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_drdy, .cpu_berr,
    .irq,
    .fb_ad_o, .fb_ad_oe, .fb_ms_o, .fb_eg_o, .fb_as_o, .fb_ds_o, .fb_rd_o, .fb_ak_o,
    .fb_dk_o, .fb_ss_o, .fb_ar_o, .fb_al_o, .fb_gk_o,
    .fb_ad_i(bus_ad), .fb_ms_i(fb_ms_o | tm_ms), .fb_eg_i(fb_eg_o | tm_eg),
    .fb_as_i(fb_as_o | tm_as), .fb_ds_i(fb_ds_o | tm_ds), .fb_rd_i(fb_rd_o | tm_rd),
    .fb_ak_i(fb_ak_o | sl_ak), .fb_dk_i(fb_dk_o | sl_dk), .fb_ss_i(fb_ss_o | sl_ss),
    .fb_ag_i(fb_ag), .fb_ga_i(5'd3),
    .sb_init_rq, .sb_end_rq, .sb_rd_wr_n, .f_ms_n, .f_rnd, .sb_rdy, .sbc_rs,
    .s_ftcr, .ftcr_ptr, .nta, .sb_sc, .sb_sdq_o, .sb_mask_o, .sb_sdq_i
  );

  // ------------------------------------------------------------------ SAMb stand-in
  logic [31:0] sam [512];
  int          sp = 0, n_init = 0, n_end = 0, n_mask = 0;
  bit          last_ms_n = 1, last_rw = 0;
  ptr_t        ptr_ld = 0;
  int          rdy_cnt = 0;
  assign sb_sdq_i = sam[sp];
  always @(posedge clk) if (rst_n) begin
    if (s_ftcr) ptr_ld <= ftcr_ptr;
    if ((sb_init_rq || sb_end_rq) && !sb_rdy) begin
      rdy_cnt <= rdy_cnt + 1;
      if (rdy_cnt == 5) begin
        sb_rdy <= 1; rdy_cnt <= 0;
        if (sb_init_rq) begin
          n_init++; sp = 0; last_ms_n = f_ms_n; last_rw = sb_rd_wr_n;
          if (!f_ms_n) ptr_ld <= nta;
        end else n_end++;
      end
    end else if (!sb_init_rq && !sb_end_rq) sb_rdy <= 0;
    if (sb_sc) begin
      if (!last_rw) begin sam[sp] = sb_sdq_o; if (sb_mask_o) n_mask++; end
      sp = (sp + 1) % 512;
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
  task automatic tm_release();
    @(negedge clk); tm_as = 0; tm_ms = 0; tm_rd = 0;
    do @(posedge clk); while (fb_ak_o);
  endtask

  // ------------------------------------------------------------------ sequence
  localparam logic [19:0] P1 = 20'h2_4080;
  int ds_t [$];
  logic dsd = 0;
  bit blk_on = 0;
  always @(posedge clk) begin
    dsd <= fb_ds_o;
    if (fb_ds_o != dsd && blk_on) ds_t.push_back($time);
  end

  initial begin
    logic [31:0] st, r; logic [2:0] ss; bit ak, be2;
    int seen_ar;
    for (int i = 0; i < 512; i++) sam[i] = 32'h0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cpu(1, {A_STCR, 16'h0}, 32'h0000_0004, q, be);   // interrupt enable, 100 ns period
    // primary address cycle: arbitration first, EG and MS from the address bits
    fork
      cpu(1, {A_PAR, 16'h0800}, 32'd5, q, be);
      begin
        seen_ar = 0;
        while (!fb_as_o) begin @(posedge clk); if (fb_ar_o) seen_ar = 1; end
        check(fb_eg_o && fb_ms_o == 3'd0 && fb_ad_o == 32'd5, "address cycle lines");
      end
    join
    check(seen_ar == 1 && n_arb == 1, "arbitration before the address cycle");
    check(!be && fb_gk_o && sl_ak, "slot 5 connected, FRC is master");
    cpu(1, {A_SAR, 16'h4000}, 32'h0000_0000, q, be);
    check(!be && sl_nta == 0, "secondary address cycle");
    // non-pipelined block read of 40 words
    cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0001_0000 | 40, q, be);
    check(!be && ptr_ld == P1, "SAMb pointer loaded from the TCR address");
    begin
      automatic int g = 0;
      while (!irq && g < 5000) begin @(posedge clk); g++; end
    end
    check(irq, "interrupt at the end of the block");
    wait_block(st);
    check(st[26] == 0 && st[25] && st[15:0] == 0 && st[31:29] == 0, "block read status");
    check(last_rw == 0 && last_ms_n == 1, "SAMb initialised for a master write into SAM");
    begin
      automatic int bad = 0;
      for (int i = 0; i < 40; i++) if (sam[i] !== pat(i)) bad++;
      check(bad == 0 && n_mask == 40, "block read data and mask bits in SAM b");
    end
    check(n_end == 1, "SAM saved at the end");
    check(!irq, "status read clears the interrupt");
    // pipelined block read, DS every 4 clocks
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    cpu(1, {A_PAR, 16'h1C00}, 32'd5, q, be);
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);
    ds_t.delete();
    blk_on = 1;
    cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0003_0000 | 64, q, be);
    wait_block(st);
    blk_on = 0;
    check(st[26] == 0 && st[15:0] == 0, "pipelined block done");
    begin
      automatic int bad = 0;
      for (int i = 1; i < ds_t.size(); i++) if (ds_t[i] - ds_t[i-1] != 100) bad++;
      check(ds_t.size() == 64 && bad == 0, $sformatf("pipelined DS period 100 ns (%0d toggles, %0d off)", ds_t.size(), bad));
      for (int i = 0; i < 64; i++) if (sam[i] !== pat(i)) bad++;
      check(bad == 0, "pipelined data");
    end
    // block write of 30 words from SAM b
    for (int i = 0; i < 512; i++) sam[i] = 32'h1234_0000 + i;
    sl_wr.delete(); sl_nwr = 0;
    cpu(1, {A_STCR, 16'h0}, 32'h0000_0000, q, be);
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);
    cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0000_0000 | 30, q, be);
    wait_block(st);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 30; i++) if (!sl_wr.exists(i) || sl_wr[i] != 32'h1234_0000 + i) bad++;
      check(bad == 0 && sl_nwr == 30 && last_rw == 1, "block write data at the slave");
    end
    // abort of a running block transfer through the STCR (SbC-RS)
    cpu(1, {A_SAR, 16'h4000}, 32'h0, q, be);
    begin
      int n_rs;
      n_rs = 0;
      cpu(1, {A_TCR_HI, P1, 2'b00}, 32'h0001_0000 | 2000, q, be);
      repeat (100) @(posedge clk);
      fork
        cpu(1, {A_STCR, 16'h0}, 32'h0000_0008, q, be);
        repeat (4) begin @(posedge clk); if (sbc_rs) n_rs++; end
      join
      cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);
      check(n_rs == 1 && !st[26] && st[15:0] != 0, "STCR abort: SbC-RS pulse, transfer stopped early");
    end
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    check(!fb_as_o && fb_gk_o, "connection ended, mastership kept (PAR bit 12)");
    // timeout on an empty slot
    cpu(1, {A_PAR, 16'h0800}, 32'd12, q, be2);
    check(be2, "BERR after timeout");
    cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);
    check(st[28], "timeout flag");
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    // logical address cycle (PAR bit 11 clear): EG low, address word on AD, MS from bits 15:13
    fork
      cpu(1, {A_PAR, 16'h2000}, 32'h0000_ABCD, q, be2);
      begin
        while (!fb_as_o) @(posedge clk);
        check(!fb_eg_o && fb_ms_o == 3'd1 && fb_ad_o == 32'h0000_ABCD, "logical address cycle lines");
      end
    join
    check(be2, "no slave answers the logical address: BERR");
    cpu(1, {A_REL, 16'h0}, 0, q, be);
    // the FRC as a slave
    cpu(1, {A_CSR, 16'h0000}, 32'h0000_0001, q, be);
    tm_address(MS_ADDR_CSR, ss, ak);
    check(ak && ss == SS_OK, "slave connects in CSR space");
    tm_cycle(MS_SEC_ADDR, 0, 32'd0, r, ss);
    tm_cycle(MS_DATA_RANDOM, 1, 0, r, ss);
    check(r == 32'hF8C0_0001 && ss == SS_OK, "CSR#0 read");
    tm_cycle(3'd5, 1, 0, r, ss);
    check(ss == SS_INVALID, "unknown MS code answered with SS=6");
    tm_release();
    tm_address(MS_ADDR_DATA, ss, ak);
    check(ak, "slave connects in data space");
    tm_cycle(MS_SEC_ADDR, 0, 32'h0000_1200, r, ss);
    for (int i = 0; i < 20; i++) tm_cycle(MS_DATA_BLOCK, 0, 32'hC0DE_0000 + i, r, ss);
    tm_release();
    repeat (20) @(posedge clk);
    check(last_ms_n == 0 && ptr_ld == 20'h01200, "slave access through SAMb with the NTA");
    begin
      automatic int bad = 0;
      for (int i = 0; i < 20; i++) if (sam[i] != 32'hC0DE_0000 + i) bad++;
      check(bad == 0, "slave block write data in SAM b");
    end
    cpu(0, {A_TCR_HI, 22'h0}, 0, st, be);
    check(st[24], "slave-done flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
