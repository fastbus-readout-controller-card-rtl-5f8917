// sama_controller: SAMa controller (Sa-SAMC). Runs serial access memory a of the TPDRAM for
// the Readout Port Controller, which streams events from the TPDRAM to the Scanner bus
// (read) or takes data written by the Scanner (write).
//
// Same request interface as the SAMb controller (Sa-INIT-RQ, Sa-END-RQ, Sa-RD/WR*, Sa-RDY,
// four-phase) but simpler, as Fig. 2 shows: the pointer is only loaded by the processor
// (S-SAR, outside this module) and there is no bit masked register on this side. The
// document gives the function of this controller, not its states; the sequence below
// mirrors the SAMb diagram:
//   INIT: request bus -> full read (read) or pseudo write (write) -> clear the pointer latch
//         (and step the pointer for a read) -> split read of the second half (read only)
//         -> enable SE*a, release the bus, raise Sa-RDY until Sa-INIT-RQ falls
//   RUN:  on a QSFa flip, read: step pointer then split read into the emptied half;
//         write: split write of the filled half then step the pointer
//   END:  write: split write of the current half, then disable the port; read: disable
// Without a mask, the final split write of a write stream also stores the stale words
// after the last one written in that half. sac_rs (SaC-RS) aborts to idle.
module sama_controller
  import frc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sac_rs,
  input  logic    sa_init_rq,
  input  logic    sa_end_rq,
  input  logic    sa_rd_wr_n,
  output logic    sa_rdy,
  output logic    sa_breq,
  input  logic    sa_bgnt,
  output logic    ta_oper_rq,
  output tp_ctl_t ta_ctl,
  input  logic    ta_rdy,
  output logic    cl_pt,
  output logic    ce_pt,
  input  logic    qsf,
  output logic    se_n,
  output logic    fanout
);
  typedef enum logic [3:0] {
    S_WAIT, S_XFER, S_PTR, S_SPLIT, S_ENABLE, S_RUN,
    Q_REQ, Q_XFER, Q_REL, E_REQ, E_XFER, E_REL, E_DONE
  } st_e;
  st_e  st_q, st_d;
  logic rw_q;
  logic qsf_ref_q;
  tp_op_e op;

  always_comb begin
    st_d       = st_q;
    sa_breq    = 1'b0;
    sa_rdy     = 1'b0;
    ta_oper_rq = 1'b0;
    op         = OP_READ_FULL;
    cl_pt      = 1'b0;
    ce_pt      = 1'b0;
    se_n       = 1'b1;
    unique case (st_q)
      S_WAIT: begin
        sa_breq = sa_init_rq;
        if (sa_init_rq && sa_bgnt) st_d = S_XFER;
      end
      S_XFER: begin
        sa_breq = 1'b1; ta_oper_rq = 1'b1;
        op = rw_q ? OP_READ_FULL : OP_PSEUDO_WRITE;
        if (ta_rdy) st_d = S_PTR;
      end
      S_PTR: begin
        sa_breq = 1'b1; cl_pt = 1'b1; ce_pt = rw_q;
        st_d = rw_q ? S_SPLIT : S_ENABLE;
      end
      S_SPLIT: begin
        sa_breq = 1'b1; ta_oper_rq = 1'b1; op = OP_READ_SPLIT;
        if (ta_rdy) st_d = S_ENABLE;
      end
      S_ENABLE: begin
        se_n = 1'b0; sa_rdy = 1'b1;
        if (!sa_bgnt && !sa_init_rq) st_d = S_RUN;
      end
      S_RUN: begin
        se_n = 1'b0;
        if (qsf != qsf_ref_q) st_d = Q_REQ;
        else if (sa_end_rq)   st_d = rw_q ? E_DONE : E_REQ;
      end
      Q_REQ: begin
        se_n = 1'b0; sa_breq = 1'b1;
        if (sa_bgnt) begin ce_pt = rw_q; st_d = Q_XFER; end
      end
      Q_XFER: begin
        se_n = 1'b0; sa_breq = 1'b1; ta_oper_rq = 1'b1;
        op = rw_q ? OP_READ_SPLIT : OP_WRITE_SPLIT;
        if (ta_rdy) begin ce_pt = !rw_q; st_d = Q_REL; end
      end
      Q_REL: begin
        se_n = 1'b0;
        if (!sa_bgnt) st_d = S_RUN;
      end
      E_REQ: begin
        se_n = 1'b0; sa_breq = 1'b1;
        if (sa_bgnt) st_d = E_XFER;
      end
      E_XFER: begin
        se_n = 1'b0; sa_breq = 1'b1; ta_oper_rq = 1'b1; op = OP_WRITE_SPLIT;
        if (ta_rdy) st_d = E_REL;
      end
      E_REL: if (!sa_bgnt) st_d = E_DONE;
      E_DONE: begin
        sa_rdy = 1'b1;
        if (!sa_end_rq) st_d = S_WAIT;
      end
      default: st_d = S_WAIT;
    endcase
    if (sac_rs) st_d = S_WAIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_WAIT;
      rw_q      <= 1'b0;
      qsf_ref_q <= 1'b0;
    end else begin
      st_q <= st_d;
      if (st_q == S_WAIT && sa_init_rq) rw_q <= sa_rd_wr_n;
      if (st_q == S_ENABLE || (st_q == S_RUN && qsf != qsf_ref_q)) qsf_ref_q <= qsf;
    end
  end

  assign ta_ctl = op2ctl(op);
  assign fanout = !se_n && rw_q;
endmodule
