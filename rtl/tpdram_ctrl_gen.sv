// tpdram_ctrl_gen: TPDRAM Control Generator. Turns a transfer request from one of the two
// SAM controllers into one DRAM <-> SAM transfer cycle on the TPDRAM control lines.
//
// Handshake (document): the SAM controller sets its Tx-DSF1/DSF2/TRM/ME*-WR* lines and
// raises Tx-OPER-RQ; when the cycle is over the generator answers with Tx-RDY. Here Tx-RDY
// is a one-clock pulse and the requester must drop Tx-OPER-RQ in the clock after it; the
// generator only starts from idle, so a request held one clock too long is not repeated
// (it is the requester's Moore output, so it always drops). If both SAMs request in the
// same clock SAMb goes first; in the FRC only the local-bus owner requests.
//
// Cycle shape (this design's choice; clock periods, all parameters):
//   SETUP  1          control lines set, X-DMXS=0 (row address on the DRAM address mux)
//   RAS    T_RCD      X-RAS low, row address held
//   CAS    T_CAS      X-DMXS=1 (column address), X-CAS low
//   PRE    T_RP       X-RAS and X-CAS high again
//   DONE   1          Tx-RDY of the requester high
// X-STS selects the SAM of the transfer (1 = SAMb). RAS/CAS/TR*/ME* are active low.
// With the defaults a transfer takes 1+2+2+2+1 = 8 clocks, 200 ns at 40 MHz.
module tpdram_ctrl_gen
  import frc_pkg::*;
#(
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_CAS = 2,
  parameter int unsigned T_RP  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ta_oper_rq,
  input  tp_ctl_t ta_ctl,
  output logic    ta_rdy,
  input  logic    tb_oper_rq,
  input  tp_ctl_t tb_ctl,
  output logic    tb_rdy,
  output logic    x_ras_n,
  output logic    x_cas_n,
  output logic    x_tr_oe_n,
  output logic    x_me_we_n,
  output logic    x_dsf1,
  output logic    x_dsf2,
  output logic    x_trm,
  output logic    x_sts,
  output logic    x_dmxs
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_RAS, S_CAS, S_PRE, S_DONE} st_e;
  st_e     st_q;
  logic    sel_b_q;
  tp_ctl_t ctl_q;
  logic [7:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      sel_b_q <= 1'b0;
      ctl_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: begin
          if (tb_oper_rq) begin
            sel_b_q <= 1'b1; ctl_q <= tb_ctl; st_q <= S_SETUP;
          end else if (ta_oper_rq) begin
            sel_b_q <= 1'b0; ctl_q <= ta_ctl; st_q <= S_SETUP;
          end
        end
        S_SETUP: begin st_q <= S_RAS; cnt_q <= 8'(T_RCD - 1); end
        S_RAS:   if (cnt_q == 0) begin st_q <= S_CAS; cnt_q <= 8'(T_CAS - 1); end
                 else cnt_q <= cnt_q - 1'b1;
        S_CAS:   if (cnt_q == 0) begin st_q <= S_PRE; cnt_q <= 8'(T_RP - 1); end
                 else cnt_q <= cnt_q - 1'b1;
        S_PRE:   if (cnt_q == 0) st_q <= S_DONE;
                 else cnt_q <= cnt_q - 1'b1;
        S_DONE:  st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  logic busy;
  assign busy      = (st_q != S_IDLE) && (st_q != S_DONE);
  assign x_ras_n   = !((st_q == S_RAS) || (st_q == S_CAS));
  assign x_cas_n   = !(st_q == S_CAS);
  assign x_dmxs    = (st_q == S_CAS);
  assign x_tr_oe_n = !(busy && ctl_q.trm);
  assign x_me_we_n = busy ? ctl_q.me_wr_n : 1'b1;
  assign x_dsf1    = busy && ctl_q.dsf1;
  assign x_dsf2    = busy && ctl_q.dsf2;
  assign x_trm     = busy && ctl_q.trm;
  assign x_sts     = busy && sel_b_q;
  assign tb_rdy    = (st_q == S_DONE) &&  sel_b_q;
  assign ta_rdy    = (st_q == S_DONE) && !sel_b_q;
endmodule
