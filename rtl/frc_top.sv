// frc_top: readout logic of the FASTBUS Readout Controller (FRC), the part of the card that
// sits in its large programmable gate array: the two SAM controllers with their pointers,
// the local bus arbiter, the TPDRAM control generator, the FASTBUS Port Controller and the
// Readout Port Controller.
//
// Data path (document, Sections I-II): FASTBUS words are clocked into SAM b of the
// triple-port DRAM (TPDRAM) by the FASTBUS Port Controller; the SAMb controller moves each
// filled SAM half into the DRAM. When the Scanner asks, the SAMa controller loads SAM a
// from the DRAM and the Readout Port Controller sends the words out on the Scanner bus.
// The processor only sets up the transfers; the four controllers run them.
//
// Everything the document takes from elsewhere is outside this module and reached through
// its ports: the LR33000 processor (local bus request/response, BREQ*/BGNT), the TPDRAM
// devices (control lines, multiplexed address, the two serial ports), the FASTBUS ECL
// transceivers and arbitration lines, and the Scanner bus RS-485 adapter. The processor bus
// is a simple request/response bus here: cpu_req is held until cpu_drdy or cpu_berr pulses.
//
// DRAM address: while a SAM controller owns the local bus its pointer drives the TPDRAM
// address, otherwise the processor's address bits 21:2 do. X-DMXS from the control
// generator picks row (pointer bits 17:9) or column (bits 8:0) on tp_ma; tp_bank carries
// bits 19:18 (the Sx-SAMP(20:21) lines of Fig. 2 in byte-address numbering).
module frc_top
  import frc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,            // FASTBUS geographic address (slot)
  input  logic [3:0]  scanner_addr,  // Scanner bus slave address
  // processor
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_drdy,
  output logic        cpu_berr,
  output logic        cpu_breq_n,
  input  logic        cpu_bgnt,
  output logic        irq_fastbus,
  output logic        irq_readout,
  // TPDRAM DRAM port
  output logic        x_ras_n,
  output logic        x_cas_n,
  output logic        x_tr_oe_n,
  output logic        x_me_we_n,
  output logic        x_dsf1,
  output logic        x_dsf2,
  output logic        x_trm,
  output logic        x_sts,
  output logic        x_dmxs,
  output logic [MA_W-1:0] tp_ma,
  output logic [1:0]  tp_bank,
  // TPDRAM SAM a port
  output logic        sa_sc,
  output logic        sa_se_n,
  output logic [31:0] sa_sdq_o,
  input  logic [31:0] sa_sdq_i,
  input  logic        sa_qsf,
  output logic        sa_fanout,
  // TPDRAM SAM b port
  output logic        sb_sc,
  output logic        sb_se_n,
  output logic [31:0] sb_sdq_o,
  output logic        sb_mask,
  input  logic [31:0] sb_sdq_i,
  input  logic        sb_qsf,
  output logic        sb_fanout,
  // FASTBUS
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
  // Scanner bus
  input  logic        sc_as_i,
  input  logic        sc_ds_i,
  input  logic [15:0] sc_ad_i,
  output logic [15:0] sc_ad_o,
  output logic        sc_ad_oe
);
  // SAMb side
  logic    sb_init_rq, sb_end_rq, sb_rd_wr_n, f_ms_n, f_rnd, sb_rdy, sbc_rs;
  logic    s_ftcr;
  ptr_t    ftcr_ptr, nta, sb_ptr;
  logic    sb_pe, sb_cl, sb_ce;
  logic    sb_breq, sb_bgnt;
  logic    tb_oper_rq, tb_rdy;
  tp_ctl_t tb_ctl;
  // SAMa side
  logic    sa_init_rq, sa_end_rq, sa_rd_wr_n, sa_rdy, sac_rs;
  logic    s_sar;
  ptr_t    sar_ptr, sa_ptr;
  logic    sa_cl, sa_ce;
  logic    sa_breq, sa_bgnt;
  logic    ta_oper_rq, ta_rdy;
  tp_ctl_t ta_ctl;
  // processor responses
  logic [31:0] fb_rdata, ro_rdata;
  logic        fb_drdy, fb_berr, ro_drdy;

  fastbus_port_ctrl u_fastbus (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata,
    .cpu_rdata(fb_rdata), .cpu_drdy(fb_drdy), .cpu_berr(fb_berr), .irq(irq_fastbus),
    .fb_ad_o, .fb_ad_oe, .fb_ms_o, .fb_eg_o, .fb_as_o, .fb_ds_o, .fb_rd_o, .fb_ak_o,
    .fb_dk_o, .fb_ss_o, .fb_ar_o, .fb_al_o, .fb_gk_o,
    .fb_ad_i, .fb_ms_i, .fb_eg_i, .fb_as_i, .fb_ds_i, .fb_rd_i, .fb_ak_i, .fb_dk_i,
    .fb_ss_i, .fb_ag_i, .fb_ga_i(ga),
    .sb_init_rq, .sb_end_rq, .sb_rd_wr_n, .f_ms_n, .f_rnd, .sb_rdy, .sbc_rs,
    .s_ftcr, .ftcr_ptr, .nta,
    .sb_sc, .sb_sdq_o, .sb_mask_o(sb_mask), .sb_sdq_i
  );

  readout_port_ctrl u_readout (
    .clk, .rst_n, .my_addr(scanner_addr),
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata,
    .cpu_rdata(ro_rdata), .cpu_drdy(ro_drdy), .irq(irq_readout),
    .sc_as_i, .sc_ds_i, .sc_ad_i, .sc_ad_o, .sc_ad_oe,
    .sa_init_rq, .sa_end_rq, .sa_rd_wr_n, .sac_rs, .sa_rdy,
    .s_sar, .sar_ptr,
    .sa_sc, .sa_sdq_o, .sa_sdq_i
  );

  sam_pointer u_sb_ptr (
    .clk, .rst_n,
    .cpu_ld(s_ftcr), .cpu_val(ftcr_ptr), .pe(sb_pe), .pe_val(nta),
    .cl(sb_cl), .ce(sb_ce), .ptr(sb_ptr)
  );

  sam_pointer u_sa_ptr (
    .clk, .rst_n,
    .cpu_ld(s_sar), .cpu_val(sar_ptr), .pe(1'b0), .pe_val('0),
    .cl(sa_cl), .ce(sa_ce), .ptr(sa_ptr)
  );

  samb_controller u_samb (
    .clk, .rst_n, .sbc_rs,
    .sb_init_rq, .sb_end_rq, .sb_rd_wr_n, .f_ms_n, .f_rnd, .sb_rdy,
    .sb_breq, .sb_bgnt,
    .tb_oper_rq, .tb_ctl, .tb_rdy,
    .pe_pt(sb_pe), .cl_pt(sb_cl), .ce_pt(sb_ce),
    .qsf(sb_qsf), .se_n(sb_se_n), .fanout(sb_fanout)
  );

  sama_controller u_sama (
    .clk, .rst_n, .sac_rs,
    .sa_init_rq, .sa_end_rq, .sa_rd_wr_n, .sa_rdy,
    .sa_breq, .sa_bgnt,
    .ta_oper_rq, .ta_ctl, .ta_rdy,
    .cl_pt(sa_cl), .ce_pt(sa_ce),
    .qsf(sa_qsf), .se_n(sa_se_n), .fanout(sa_fanout)
  );

  local_bus_arbiter u_arbiter (
    .clk, .rst_n,
    .sb_breq, .sa_breq, .sb_bgnt, .sa_bgnt,
    .breq_n(cpu_breq_n), .bgnt(cpu_bgnt)
  );

  tpdram_ctrl_gen u_tcg (
    .clk, .rst_n,
    .ta_oper_rq, .ta_ctl, .ta_rdy,
    .tb_oper_rq, .tb_ctl, .tb_rdy,
    .x_ras_n, .x_cas_n, .x_tr_oe_n, .x_me_we_n, .x_dsf1, .x_dsf2, .x_trm, .x_sts, .x_dmxs
  );

  // DRAM address mux (Fig. 2, upper MUX) and row/column selection
  ptr_t dram_ptr;
  always_comb begin
    if (sb_bgnt)      dram_ptr = sb_ptr;
    else if (sa_bgnt) dram_ptr = sa_ptr;
    else              dram_ptr = cpu_addr[21:2];
  end
  assign tp_ma   = x_dmxs ? dram_ptr[8:0] : dram_ptr[17:9];
  assign tp_bank = dram_ptr[19:18];

  // processor read data and responses
  assign cpu_rdata = ro_drdy ? ro_rdata : fb_rdata;
  assign cpu_drdy  = fb_drdy || ro_drdy;
  assign cpu_berr  = fb_berr;
endmodule
