// samb_controller: SAMb controller (Sb-SAMC). Runs the serial access memory b of the TPDRAM
// for the FASTBUS Port Controller, so that FASTBUS data stream into or out of the TPDRAM
// without the processor.
//
// Requests from the FASTBUS side (four-phase, each answered by sb_rdy):
//   sb_init_rq  program the pointer, initialise SAMb for reading (sb_rd_wr_n=1: SAM -> FASTBUS)
//               or writing (sb_rd_wr_n=0: FASTBUS -> SAM) and enable the SAM port (SE*b=0)
//   sb_end_rq   for a write, save the SAM into DRAM; then disable the SAM port
// While the port is enabled the controller watches QSFb, which tells which SAM half the
// serial side is in. When it flips, the half just left is full (write) or used up (read)
// and the controller moves it: a bit-masked split write of that half followed by a pointer
// increment, or a pointer increment followed by a split read that refills it.
//
// Initialisation follows the document's partial state diagram (states 1..9):
//   1 wait for Sb-INIT-RQ, request the local bus; with the grant go to 3 (master write),
//     5 (master read) or 2 (slave, F-M/S*=0)
//   2 store the FASTBUS secondary address in the pointer (Sb-PE-PT); read -> 5, write -> 3
//   3 clear the bit masked register (BMR), wait for Tb-RDY; 4 wait for Tb-RDY low
//   5 full read or pseudo write transfer; on Tb-RDY go to 8 if F-RND=1, else 6
//   6 clear the pointer latch; increment the pointer for a read
//   7 split read (or bit-masked split write) transfer; on Tb-RDY go to 8
//   8 enable SE*b, release the bus, raise Sb-RDY; leave when Sb-BGNT=0 and Sb-INIT-RQ=0
//   9 wait for Sb-END-RQ or a QSFb transition
// The diagram stops at state 9. The QSF service (Q_*) and end-request (E_*) states after it
// are this design's own, built from the text of the document. F-RND=1 marks a random
// (single word) access that needs no second SAM half; that reading is this design's.
// Because every write into SAMb also clocks a 1 into the BMR, masked write transfers store
// only the positions written since the last transfer.
//
// sbc_rs (SbC-RS) aborts: back to state 1 with the SAM port disabled. Tb-RDY from the
// control generator is a one-clock pulse, so state 4 lasts one clock.
// FANOUTb is not explained in the document; here it is high while the enabled SAM drives
// data toward FASTBUS (read direction).
module samb_controller
  import frc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sbc_rs,
  // FASTBUS port controller side
  input  logic    sb_init_rq,
  input  logic    sb_end_rq,
  input  logic    sb_rd_wr_n,
  input  logic    f_ms_n,      // F-M/S*: 1 = FRC is FASTBUS master, 0 = slave
  input  logic    f_rnd,       // F-RND: random (single word) access
  output logic    sb_rdy,
  // local bus arbiter
  output logic    sb_breq,
  input  logic    sb_bgnt,
  // TPDRAM control generator
  output logic    tb_oper_rq,
  output tp_ctl_t tb_ctl,
  input  logic    tb_rdy,
  // pointer control
  output logic    pe_pt,
  output logic    cl_pt,
  output logic    ce_pt,
  // SAMb port
  input  logic    qsf,
  output logic    se_n,
  output logic    fanout
);
  typedef enum logic [3:0] {
    S1_WAIT, S2_STORE, S3_CLRBMR, S4_WAITLOW, S5_XFER, S6_PTR, S7_SPLIT, S8_ENABLE, S9_RUN,
    Q_REQ, Q_XFER, Q_REL, E_REQ, E_XFER, E_REL, E_DONE
  } st_e;
  st_e  st_q, st_d;
  logic rw_q;       // latched Sb-RD/WR*
  logic qsf_ref_q;  // QSF value of the half being accessed

  tp_op_e op;

  always_comb begin
    st_d       = st_q;
    sb_breq    = 1'b0;
    sb_rdy     = 1'b0;
    tb_oper_rq = 1'b0;
    op         = OP_CLEAR_BMR;
    pe_pt      = 1'b0;
    cl_pt      = 1'b0;
    ce_pt      = 1'b0;
    se_n       = 1'b1;
    unique case (st_q)
      S1_WAIT: begin
        sb_breq = sb_init_rq;
        if (sb_init_rq && sb_bgnt) begin
          if (!f_ms_n)        st_d = S2_STORE;               // b
          else if (sb_rd_wr_n) st_d = S5_XFER;               // g
          else                st_d = S3_CLRBMR;              // a
        end
      end
      S2_STORE: begin
        sb_breq = 1'b1;
        pe_pt   = 1'b1;
        st_d    = sb_rd_wr_n ? S5_XFER : S3_CLRBMR;          // c / d
      end
      S3_CLRBMR: begin
        sb_breq = 1'b1; tb_oper_rq = 1'b1; op = OP_CLEAR_BMR;
        if (tb_rdy) st_d = S4_WAITLOW;                        // f (e: stay)
      end
      S4_WAITLOW: begin
        sb_breq = 1'b1;
        if (!tb_rdy) st_d = S5_XFER;                          // h
      end
      S5_XFER: begin
        sb_breq = 1'b1; tb_oper_rq = 1'b1;
        op = rw_q ? OP_READ_FULL : OP_PSEUDO_WRITE;
        if (tb_rdy) st_d = f_rnd ? S8_ENABLE : S6_PTR;        // n / j (i: stay)
      end
      S6_PTR: begin
        sb_breq = 1'b1;
        cl_pt = 1'b1;
        ce_pt = rw_q;
        st_d  = S7_SPLIT;                                     // k
      end
      S7_SPLIT: begin
        sb_breq = 1'b1; tb_oper_rq = 1'b1;
        op = rw_q ? OP_READ_SPLIT : OP_MWRITE_SPLIT;
        if (tb_rdy) st_d = S8_ENABLE;                         // m (l: stay)
      end
      S8_ENABLE: begin
        se_n   = 1'b0;
        sb_rdy = 1'b1;
        if (!sb_bgnt && !sb_init_rq) st_d = S9_RUN;           // o
      end
      S9_RUN: begin
        se_n = 1'b0;
        if (qsf != qsf_ref_q) st_d = Q_REQ;
        else if (sb_end_rq)   st_d = rw_q ? E_DONE : E_REQ;
      end
      Q_REQ: begin
        se_n = 1'b0; sb_breq = 1'b1;
        if (sb_bgnt) begin
          ce_pt = rw_q;      // read: step to the half to refill first
          st_d  = Q_XFER;
        end
      end
      Q_XFER: begin
        se_n = 1'b0; sb_breq = 1'b1; tb_oper_rq = 1'b1;
        op = rw_q ? OP_READ_SPLIT : OP_MWRITE_SPLIT;
        if (tb_rdy) begin
          ce_pt = !rw_q;     // write: step past the half just stored
          st_d  = Q_REL;
        end
      end
      Q_REL: begin
        se_n = 1'b0;
        if (!sb_bgnt) st_d = S9_RUN;
      end
      E_REQ: begin
        se_n = 1'b0; sb_breq = 1'b1;
        if (sb_bgnt) st_d = E_XFER;
      end
      E_XFER: begin
        se_n = 1'b0; sb_breq = 1'b1; tb_oper_rq = 1'b1; op = OP_MWRITE_FULL;
        if (tb_rdy) st_d = E_REL;
      end
      E_REL: begin
        if (!sb_bgnt) st_d = E_DONE;
      end
      E_DONE: begin
        sb_rdy = 1'b1;
        if (!sb_end_rq) st_d = S1_WAIT;
      end
      default: st_d = S1_WAIT;
    endcase
    if (sbc_rs) st_d = S1_WAIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S1_WAIT;
      rw_q      <= 1'b0;
      qsf_ref_q <= 1'b0;
    end else begin
      st_q <= st_d;
      if (st_q == S1_WAIT && sb_init_rq) rw_q <= sb_rd_wr_n;
      if (st_q == S8_ENABLE || (st_q == S9_RUN && qsf != qsf_ref_q)) qsf_ref_q <= qsf;
    end
  end

  assign tb_ctl = op2ctl(op);
  assign fanout = !se_n && rw_q;
endmodule
