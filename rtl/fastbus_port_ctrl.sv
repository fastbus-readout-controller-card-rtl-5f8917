// fastbus_port_ctrl: FASTBUS Port Controller of the FRC, master and slave.
//
// Master side. The processor drives FASTBUS through memory-mapped registers (the PAR
// address is the document's; the rest of the map is in frc_pkg):
//   PAR  BE02 MN00, write: primary address cycle to the slave address in the data word.
//        Address bits 15:13 -> MS lines, 11 -> EG, 12 = keep mastership after release,
//        10 = pipelined operation. Arbitration (level from own CSR#8) is done first if
//        the FRC is not already master.
//   SAR  BE03 MN00: one data cycle with MS = address bits 15:13. MS=2 is the secondary
//        address (NTA) write; other codes are single data reads or writes.
//   TCR  BD00 0000 + 4*pointer, write: block transfer of data[15:0] words between FASTBUS
//        and the TPDRAM through SAMb; the address bits 21:2 load the SAMb pointer (S-FTCR).
//        data[16]=1 reads from FASTBUS into the TPDRAM, 0 writes TPDRAM data to FASTBUS;
//        data[17]=1 pipelines it. Read: status {SS, timeout, error, busy, done,
//        slave-done, 8'b0, words left}.
//   STCR BE05: [1:0] pipeline period 100/150/200 ns, [2] interrupt enable, [3] write 1:
//        abort a block transfer and reset the SAMb controller (SbC-RS).
//   REL  BE06, write: end the connection (drop AS); mastership is also given up unless
//        the PAR access had bit 12 set.
//   CSR  BE07 00nn: the FRC's own CSR#0/#7/#8.
// In pipelined mode (PAR bit 10) the processor gets DRDY* at once and the cycle runs
// afterwards, while the next access waits until it is over; if the posted cycle failed, that
// next access is not performed and ends with BERR* (document, Section III). A non-zero SS
// response or a timeout gives BERR* for non-posted cycles. A block transfer reports its end,
// and any error, in the TCR status and by interrupt.
//
// Block transfers: each data cycle toggles DS and completes on a DK edge. Non-pipelined,
// the next DS toggle waits for DK; pipelined, DS toggles every period (4/6/8 clocks of the
// 40 MHz clock for 100/150/200 ns) and words are counted on the DK edges. Every word read
// from FASTBUS is clocked into SAMb with a 1 on the bit-mask input.
//
// Slave side: answers geographic address cycles (EG=1, AD[4:0] = slot) and broadcasts
// (MS bit 1) whose class matches CSR#7, with AK and SS. In CSR space NTA 0, 7 and 8 are the
// CSRs; other NTAs, and all of data space, reach the TPDRAM through the SAMb controller
// (F-M/S*=0, pointer loaded from the NTA). Slave writes are saved to the TPDRAM when the
// master drops AS, which also raises the slave-done flag and interrupt. Each DS edge is one
// data cycle, answered by a DK edge two clocks later; read data stays on AD until the next DS
// edge, so a pipelined master at 100 ns is served once the first (handshaked) cycle of the
// connection has started the SAMb stream.
// The document says the controller avoids the deadlock between its master and slave roles
// but not how. Here the slave side ignores address cycles while the FRC holds mastership,
// and SAMb is never shared: a TCR block transfer is not started while a slave connection
// holds SAMb (the processor's access simply waits).
//
// FASTBUS lines are split into inputs and outputs; the wired-OR bus and ECL transceivers are
// outside. Handshake details (DS/DK toggling, SS codes, MS codes of data cycles, timeouts)
// are this design's reading of FASTBUS, not given by the document.
module fastbus_port_ctrl
  import frc_pkg::*;
#(
  parameter int unsigned CLK_NS    = 25,        // 40 MHz board clock
  parameter int unsigned TIMEOUT   = 255,       // clocks without AK/DK before giving up
  parameter logic [15:0] MODULE_ID = 16'hF8C0   // CSR#0 bits 31:16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor local bus (request held until drdy or berr)
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_drdy,
  output logic        cpu_berr,
  output logic        irq,
  // FASTBUS, outputs
  output logic [31:0] fb_ad_o,
  output logic        fb_ad_oe,
  output logic [2:0]  fb_ms_o,
  output logic        fb_eg_o,
  output logic        fb_as_o,
  output logic        fb_ds_o,
  output logic        fb_rd_o,
  output logic        fb_ak_o,
  output logic        fb_dk_o,
  output logic [2:0]  fb_ss_o,
  output logic        fb_ar_o,
  output logic [5:0]  fb_al_o,
  output logic        fb_gk_o,
  // FASTBUS, inputs
  input  logic [31:0] fb_ad_i,
  input  logic [2:0]  fb_ms_i,
  input  logic        fb_eg_i,
  input  logic        fb_as_i,
  input  logic        fb_ds_i,
  input  logic        fb_rd_i,
  input  logic        fb_ak_i,
  input  logic        fb_dk_i,
  input  logic [2:0]  fb_ss_i,
  input  logic        fb_ag_i,
  input  logic [4:0]  fb_ga_i,
  // SAMb controller requests
  output logic        sb_init_rq,
  output logic        sb_end_rq,
  output logic        sb_rd_wr_n,
  output logic        f_ms_n,
  output logic        f_rnd,
  input  logic        sb_rdy,
  output logic        sbc_rs,     // SbC-RS: abort the SAMb controller (STCR bit 3)
  // SAMb pointer loads
  output logic        s_ftcr,     // load pointer from processor address bits 21:2
  output ptr_t        ftcr_ptr,
  output ptr_t        nta,        // FASTBUS NTA(0:19) to the pointer mux
  // SAMb serial port
  output logic        sb_sc,
  output logic [31:0] sb_sdq_o,
  output logic        sb_mask_o,
  input  logic [31:0] sb_sdq_i
);
  // ------------------------------------------------------------------ decode
  logic a_par, a_sar, a_tcr, a_stcr, a_rel, a_csr;
  assign a_par  = cpu_addr[31:16] == A_PAR;
  assign a_sar  = cpu_addr[31:16] == A_SAR;
  assign a_stcr = cpu_addr[31:16] == A_STCR;
  assign a_rel  = cpu_addr[31:16] == A_REL;
  assign a_csr  = cpu_addr[31:16] == A_CSR;
  assign a_tcr  = cpu_addr[31:22] == A_TCR_HI;

  localparam int unsigned P100 = (100 + CLK_NS - 1) / CLK_NS;
  localparam int unsigned P150 = (150 + CLK_NS - 1) / CLK_NS;
  localparam int unsigned P200 = (200 + CLK_NS - 1) / CLK_NS;

  // ------------------------------------------------------------------ CSRs (slave side)
  logic [15:0] csr0_ctl_q;
  logic [31:0] csr7_q;      // broadcast class
  logic [5:0]  csr8_q;      // arbitration level

  // ------------------------------------------------------------------ master state
  typedef enum logic [3:0] {
    M_IDLE, M_ARB, M_PA, M_DC, M_BINIT, M_BWAIT, M_BLK, M_BEND, M_BEND2, M_REL
  } mst_e;
  mst_e        m_st;
  logic        resp_q;
  logic        gk_q, as_q, ds_q, connected_q;
  logic        retain_q, pipe_q, posted_q, we_q, err_pend_q;
  logic [2:0]  ms_q;
  logic        eg_q;
  logic [31:0] ad_q;
  logic [2:0]  ss_q;
  logic        to_q, err_q, done_q, sdone_q;
  logic [1:0]  speed_q;
  logic        irq_en_q;
  logic [15:0] cnt_q, iss_q;
  logic        bdir_rd_q, bpipe_q;
  logic [7:0]  tmo_q;
  logic [7:0]  ptmr_q;
  logic        dk_seen_q;
  logic        m_sc_q;
  logic [31:0] m_wd_q;
  logic [31:0] rdata_q;
  logic        drdy_q, berr_q;

  logic s_busy;             // slave side holds SAMb (from the slave FSM)
  logic m_uses_sam;
  assign m_uses_sam = (m_st == M_BINIT) || (m_st == M_BWAIT) || (m_st == M_BLK) ||
                      (m_st == M_BEND)  || (m_st == M_BEND2);

  logic reg_acc, cmd_acc;
  assign reg_acc = cpu_req && !resp_q &&
                   ((a_tcr && !cpu_we) || a_stcr || a_csr);
  assign cmd_acc = cpu_req && !resp_q && (m_st == M_IDLE) &&
                   ((a_par && cpu_we) || a_sar || (a_tcr && cpu_we && !s_busy) ||
                    (a_rel && cpu_we));

  logic [31:0] tcr_status;
  assign tcr_status = {ss_q, to_q, err_q, (m_st != M_IDLE), done_q, sdone_q, 8'h00, cnt_q};

  logic [31:0] csr_rd;
  always_comb begin
    unique case (cpu_addr[7:0])
      8'd0:    csr_rd = {MODULE_ID, csr0_ctl_q};
      8'd7:    csr_rd = csr7_q;
      8'd8:    csr_rd = {26'd0, csr8_q};
      default: csr_rd = '0;
    endcase
  end

  logic [7:0] period;
  always_comb begin
    unique case (speed_q)
      2'd0:    period = 8'(P100);
      2'd1:    period = 8'(P150);
      default: period = 8'(P200);
    endcase
  end

  logic dk_edge;
  assign dk_edge = (fb_dk_i != dk_seen_q);

  // processor writes to the CSRs, applied by the slave block
  logic cpu_csr_we;
  assign cpu_csr_we = reg_acc && a_csr && cpu_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_st <= M_IDLE; resp_q <= 1'b0; drdy_q <= 1'b0; berr_q <= 1'b0; rdata_q <= '0;
      gk_q <= 1'b0; as_q <= 1'b0; ds_q <= 1'b0; connected_q <= 1'b0;
      retain_q <= 1'b0; pipe_q <= 1'b0; posted_q <= 1'b0; we_q <= 1'b0; err_pend_q <= 1'b0;
      ms_q <= '0; eg_q <= 1'b0; ad_q <= '0; ss_q <= '0;
      to_q <= 1'b0; err_q <= 1'b0; done_q <= 1'b0;
      speed_q <= 2'd0; irq_en_q <= 1'b0;
      cnt_q <= '0; iss_q <= '0; bdir_rd_q <= 1'b0; bpipe_q <= 1'b0;
      tmo_q <= '0; ptmr_q <= '0; dk_seen_q <= 1'b0; m_sc_q <= 1'b0; m_wd_q <= '0;
    end else begin
      drdy_q <= 1'b0;
      berr_q <= 1'b0;
      m_sc_q <= 1'b0;
      if (resp_q) resp_q <= 1'b0;

      // ---------------- register accesses, served in any state
      if (reg_acc) begin
        resp_q <= 1'b1; drdy_q <= 1'b1;
        if (a_tcr) begin
          rdata_q <= tcr_status;
          done_q  <= 1'b0;       // reading the status acknowledges the flags
        end else if (a_stcr) begin
          if (cpu_we) begin speed_q <= cpu_wdata[1:0]; irq_en_q <= cpu_wdata[2]; end

          rdata_q <= {29'd0, irq_en_q, speed_q};
        end else begin
          rdata_q <= csr_rd;
        end
      end

      unique case (m_st)
        M_IDLE: if (cmd_acc) begin
          resp_q <= 1'b1;
          if (a_par) begin
            ad_q     <= cpu_wdata;
            ms_q     <= cpu_addr[15:13];
            retain_q <= cpu_addr[12];
            eg_q     <= cpu_addr[11];
            pipe_q   <= cpu_addr[10];
            posted_q <= cpu_addr[10];
            err_pend_q <= 1'b0;
            ss_q <= '0; to_q <= 1'b0; err_q <= 1'b0;
            if (cpu_addr[10]) drdy_q <= 1'b1;
            if (connected_q)  begin berr_q <= 1'b1; drdy_q <= 1'b0; end  // release first
            else m_st <= gk_q ? M_PA : M_ARB;
          end else if (err_pend_q || !connected_q) begin
            // SAR/TCR/REL after a failed posted cycle, or SAR/TCR without a connection
            err_pend_q <= 1'b0;
            if (a_rel) begin drdy_q <= 1'b1; m_st <= M_REL; end
            else berr_q <= 1'b1;
          end else if (a_sar) begin
            ms_q <= cpu_addr[15:13];
            we_q <= cpu_we;
            ad_q <= cpu_wdata;
            posted_q <= pipe_q && cpu_we;
            if (pipe_q && cpu_we) drdy_q <= 1'b1;
            ds_q <= !ds_q;
            dk_seen_q <= fb_dk_i;
            tmo_q <= '0;
            m_st <= M_DC;
          end else if (a_tcr) begin
            drdy_q    <= 1'b1;
            cnt_q     <= cpu_wdata[15:0];
            iss_q     <= cpu_wdata[15:0];
            bdir_rd_q <= cpu_wdata[16];
            bpipe_q   <= cpu_wdata[17];
            done_q    <= 1'b0;
            err_q     <= 1'b0; to_q <= 1'b0; ss_q <= '0;
            m_st      <= M_BINIT;
          end else begin // release
            drdy_q <= 1'b1;
            m_st   <= M_REL;
          end
        end

        M_ARB: if (fb_ag_i) begin
          gk_q <= 1'b1;
          m_st <= M_PA;
          tmo_q <= '0;
        end

        M_PA: begin
          as_q <= 1'b1;
          if (as_q && fb_ak_i) begin
            ss_q <= fb_ss_i;
            if (fb_ss_i != SS_OK) begin
              err_q <= 1'b1;
              if (posted_q) err_pend_q <= 1'b1; else berr_q <= 1'b1;
              m_st <= M_REL;
            end else begin
              connected_q <= 1'b1;
              if (!posted_q) drdy_q <= 1'b1;
              m_st <= M_IDLE;
            end
          end else if (as_q) begin
            tmo_q <= tmo_q + 1'b1;
            if (tmo_q == 8'(TIMEOUT)) begin
              to_q <= 1'b1; err_q <= 1'b1;
              if (posted_q) err_pend_q <= 1'b1; else berr_q <= 1'b1;
              m_st <= M_REL;
            end
          end
        end

        M_DC: begin
          if (dk_edge) begin
            dk_seen_q <= fb_dk_i;
            ss_q <= fb_ss_i;
            rdata_q <= fb_ad_i;
            if (fb_ss_i != SS_OK) begin
              err_q <= 1'b1;
              if (posted_q) err_pend_q <= 1'b1; else berr_q <= 1'b1;
            end else if (!posted_q) drdy_q <= 1'b1;
            m_st <= M_IDLE;
          end else begin
            tmo_q <= tmo_q + 1'b1;
            if (tmo_q == 8'(TIMEOUT)) begin
              to_q <= 1'b1; err_q <= 1'b1;
              if (posted_q) err_pend_q <= 1'b1; else berr_q <= 1'b1;
              m_st <= M_IDLE;
            end
          end
        end

        M_BINIT: if (sb_rdy) m_st <= M_BWAIT;
        M_BWAIT: if (!sb_rdy) begin
          m_st <= M_BLK;
          dk_seen_q <= fb_dk_i;
          tmo_q <= '0;
          ptmr_q <= '0;
        end

        M_BLK: begin
          // issue
          if (bpipe_q) begin
            if (ptmr_q != 0) ptmr_q <= ptmr_q - 1'b1;
          end
          if (iss_q != 0 && (bpipe_q ? (ptmr_q == 0) : (iss_q == cnt_q && !dk_edge))) begin
            ds_q  <= !ds_q;
            iss_q <= iss_q - 1'b1;
            ptmr_q <= period - 1'b1;
            if (!bdir_rd_q) begin
              m_wd_q <= sb_sdq_i;   // present the next SAM word, step the SAM
              m_sc_q <= 1'b1;
            end
          end
          // complete
          if (dk_edge) begin
            dk_seen_q <= fb_dk_i;
            tmo_q <= '0;
            cnt_q <= cnt_q - 1'b1;
            ss_q  <= fb_ss_i;
            if (bdir_rd_q && fb_ss_i == SS_OK) begin
              m_wd_q <= fb_ad_i;
              m_sc_q <= 1'b1;
            end
            if (fb_ss_i != SS_OK) begin
              err_q <= 1'b1;
              iss_q <= '0;
              m_st  <= M_BEND;
            end else if (cnt_q == 16'd1) m_st <= M_BEND;
          end else if (cnt_q != 0) begin
            tmo_q <= tmo_q + 1'b1;
            if (tmo_q == 8'(TIMEOUT)) begin
              to_q <= 1'b1; err_q <= 1'b1; iss_q <= '0;
              m_st <= M_BEND;
            end
          end else m_st <= M_BEND;
        end

        M_BEND:  if (sb_rdy) m_st <= M_BEND2;
        M_BEND2: if (!sb_rdy) begin done_q <= 1'b1; m_st <= M_IDLE; end

        M_REL: begin
          as_q <= 1'b0;
          ds_q <= 1'b0;      // DS returns low with the end of the connection
          if (!as_q && !fb_ak_i) begin
            connected_q <= 1'b0;
            if (!retain_q || !connected_q) gk_q <= 1'b0;
            m_st <= M_IDLE;
          end
        end

        default: m_st <= M_IDLE;
      endcase

      if (sbc_rs && m_uses_sam) begin   // aborted block transfer
        err_q <= 1'b1;
        m_st  <= M_IDLE;
      end
    end
  end

  // ------------------------------------------------------------------ slave side
  typedef enum logic [3:0] {
    S_IDLE, S_CONN, S_INIT, S_INITW, S_XFER, S_END, S_ENDW
  } sst_e;
  sst_e        s_st;
  logic        ak_q, dk_q, csr_space_q, sess_q, as_seen_q;
  logic [2:0]  sss_q;
  logic [31:0] nta_q, s_ad_q;
  logic        s_sc_q, s_rd_q, s_rnd_q;
  logic [31:0] s_wd_q;
  logic        s_rdout_q;

  logic addr_match;
  assign addr_match = (fb_eg_i && fb_ad_i[4:0] == fb_ga_i) ||
                      (fb_ms_i[1] && ((fb_ad_i & csr7_q) != 0 || fb_ad_i == 0));

  logic csr_hit;
  assign csr_hit = csr_space_q && (nta_q == 32'd0 || nta_q == 32'd7 || nta_q == 32'd8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_st <= S_IDLE; ak_q <= 1'b0; dk_q <= 1'b0; sss_q <= '0; csr_space_q <= 1'b0;
      sess_q <= 1'b0; as_seen_q <= 1'b0; nta_q <= '0; s_ad_q <= '0;
      s_sc_q <= 1'b0; s_rd_q <= 1'b0; s_rnd_q <= 1'b0; s_wd_q <= '0; s_rdout_q <= 1'b0;
      csr0_ctl_q <= '0; csr7_q <= '0; csr8_q <= '0; sdone_q <= 1'b0;
    end else begin
      s_sc_q <= 1'b0;
      as_seen_q <= fb_as_i;
      if (cpu_csr_we) begin
        unique case (cpu_addr[7:0])
          8'd0: csr0_ctl_q <= cpu_wdata[15:0];
          8'd7: csr7_q     <= cpu_wdata;
          8'd8: csr8_q     <= cpu_wdata[5:0];
          default: ;
        endcase
      end
      if (reg_acc && a_tcr) sdone_q <= 1'b0;
      unique case (s_st)
        S_IDLE: begin
          dk_q <= fb_ds_i;
          if (fb_as_i && !as_seen_q && !gk_q && addr_match) begin
            ak_q <= 1'b1;
            csr_space_q <= fb_ms_i[0];
            sss_q <= SS_OK;
            s_st  <= S_CONN;
          end
        end
        S_CONN: begin
          if (!fb_as_i || fb_ds_i != dk_q) s_rdout_q <= 1'b0;   // read data held until next DS
          if (!fb_as_i) begin
            s_st <= sess_q ? S_END : S_IDLE;
            if (!sess_q) ak_q <= 1'b0;
          end else if (fb_ds_i != dk_q) begin
            if (fb_ms_i == MS_SEC_ADDR && !fb_rd_i) begin
              if (sess_q) s_st <= S_END;          // new address: save the old stream first
              else begin
                nta_q <= fb_ad_i; sss_q <= SS_OK; dk_q <= fb_ds_i;
              end
            end else if (fb_ms_i != MS_DATA_RANDOM && fb_ms_i != MS_DATA_BLOCK) begin
              sss_q <= SS_INVALID; dk_q <= fb_ds_i;
            end else if (csr_hit) begin
              if (fb_ms_i != MS_DATA_RANDOM) sss_q <= SS_INVALID;
              else begin
                sss_q <= SS_OK;
                if (fb_rd_i) begin
                  unique case (nta_q[3:0])
                    4'd0:    s_ad_q <= {MODULE_ID, csr0_ctl_q};
                    4'd7:    s_ad_q <= csr7_q;
                    default: s_ad_q <= {26'd0, csr8_q};
                  endcase
                  s_rdout_q <= 1'b1;
                end else begin
                  unique case (nta_q[3:0])
                    4'd0:    csr0_ctl_q <= fb_ad_i[15:0];
                    4'd7:    csr7_q     <= fb_ad_i;
                    default: csr8_q     <= fb_ad_i[5:0];
                  endcase
                end
              end
              dk_q <= fb_ds_i;
            end else if (!sess_q || s_rd_q != fb_rd_i) begin
              if (sess_q) s_st <= S_END;        // direction changed: close the stream
              else begin
                s_rd_q  <= fb_rd_i;
                s_rnd_q <= (fb_ms_i == MS_DATA_RANDOM);
                s_st    <= S_INIT;
              end
            end else s_st <= S_XFER;
          end
        end
        S_INIT:  if (sb_rdy) s_st <= S_INITW;
        S_INITW: if (!sb_rdy) begin sess_q <= 1'b1; s_st <= S_XFER; end
        S_XFER: begin
          // one data word through SAMb
          sss_q <= SS_OK;
          if (s_rd_q) begin
            s_ad_q    <= sb_sdq_i;
            s_rdout_q <= 1'b1;
          end else s_wd_q <= fb_ad_i;
          s_sc_q <= 1'b1;
          dk_q   <= fb_ds_i;
          s_st   <= S_CONN;
        end
        S_END:  if (sb_rdy) s_st <= S_ENDW;
        S_ENDW: if (!sb_rdy) begin
          sess_q  <= 1'b0;
          sdone_q <= 1'b1;
          if (!fb_as_i) begin ak_q <= 1'b0; s_st <= S_IDLE; end
          else s_st <= S_CONN;
        end
        default: s_st <= S_IDLE;
      endcase
    end
  end

  assign s_busy = sess_q || (s_st == S_INIT) || (s_st == S_INITW) ||
                  (s_st == S_END) || (s_st == S_ENDW);

  // ------------------------------------------------------------------ SAMb requests
  always_comb begin
    sb_init_rq = 1'b0;
    sb_end_rq  = 1'b0;
    sb_rd_wr_n = 1'b0;
    f_ms_n     = 1'b1;
    f_rnd      = 1'b0;
    if (m_uses_sam) begin
      sb_init_rq = (m_st == M_BINIT);
      sb_end_rq  = (m_st == M_BEND);
      sb_rd_wr_n = !bdir_rd_q;   // FASTBUS read = SAM write
    end else if (s_st == S_INIT || s_st == S_INITW || s_st == S_END || s_st == S_ENDW ||
                 sess_q) begin
      f_ms_n     = 1'b0;
      sb_init_rq = (s_st == S_INIT);
      sb_end_rq  = (s_st == S_END);
      sb_rd_wr_n = s_rd_q;
      f_rnd      = s_rnd_q;
    end
  end

  assign sbc_rs    = reg_acc && a_stcr && cpu_we && cpu_wdata[3];
  assign s_ftcr    = cmd_acc && a_tcr && !err_pend_q && connected_q;
  assign ftcr_ptr  = cpu_addr[21:2];
  assign nta       = nta_q[PTR_W-1:0];
  assign sb_sc     = m_sc_q || s_sc_q;
  assign sb_sdq_o  = m_sc_q ? m_wd_q : s_wd_q;
  assign sb_mask_o = (m_sc_q && bdir_rd_q) || (s_sc_q && !s_rd_q);

  // ------------------------------------------------------------------ FASTBUS outputs
  assign fb_ar_o  = (m_st == M_ARB);
  assign fb_al_o  = csr8_q;
  assign fb_gk_o  = gk_q;
  assign fb_as_o  = as_q;
  assign fb_ds_o  = ds_q;
  assign fb_eg_o  = as_q && eg_q && (m_st == M_PA);
  assign fb_ms_o  = !as_q ? 3'd0 : (m_st == M_BLK) ? MS_DATA_BLOCK : ms_q;
  assign fb_rd_o  = (m_st == M_BLK) ? bdir_rd_q : (m_st == M_DC) ? !we_q : 1'b0;
  assign fb_ak_o  = ak_q;
  assign fb_dk_o  = (s_st != S_IDLE) && dk_q;
  assign fb_ss_o  = (s_st != S_IDLE) ? sss_q : SS_OK;

  always_comb begin
    fb_ad_oe = 1'b0;
    fb_ad_o  = '0;
    if (m_st == M_PA) begin
      fb_ad_oe = 1'b1; fb_ad_o = ad_q;
    end else if (m_st == M_DC && we_q) begin
      fb_ad_oe = 1'b1; fb_ad_o = ad_q;
    end else if (m_st == M_BLK && !bdir_rd_q) begin
      fb_ad_oe = 1'b1; fb_ad_o = m_wd_q;
    end else if (s_rdout_q) begin
      fb_ad_oe = 1'b1; fb_ad_o = s_ad_q;
    end
  end

  assign cpu_rdata = rdata_q;
  assign cpu_drdy  = drdy_q;
  assign cpu_berr  = berr_q;
  assign irq       = irq_en_q && (done_q || sdone_q);
endmodule
