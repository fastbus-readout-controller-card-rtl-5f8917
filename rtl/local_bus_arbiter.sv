// local_bus_arbiter: shares the FRC local bus (address lines of the TPDRAM DRAM port and the
// TPDRAM control generator) between the SAMb controller, the SAMa controller and the
// LR33000 processor. Fixed priority as in the document: SAMb highest, processor lowest.
//
// The processor owns the bus by default. While either SAM controller requests, breq_n
// (BREQ* of Fig. 2) is held low; once the processor answers with bgnt, the bus is given to
// the highest-priority requester, which keeps it until it drops its request (no
// pre-emption). A requester that is still waiting when the owner finishes is served next
// without handing the bus back. Grants are registered: a grant appears the cycle after
// bgnt is seen and falls the cycle after the owner's request falls. Only one grant is
// ever high (asserted below).
module local_bus_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic sb_breq,   // Sb-BREQ
  input  logic sa_breq,   // Sa-BREQ
  output logic sb_bgnt,   // Sb-BGNT
  output logic sa_bgnt,   // Sa-BGNT
  output logic breq_n,    // BREQ* to the processor
  input  logic bgnt       // BGNT from the processor
);
  typedef enum logic [1:0] {OWN_CPU, OWN_SB, OWN_SA} owner_e;
  owner_e own_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) own_q <= OWN_CPU;
    else begin
      unique case (own_q)
        OWN_CPU: if (bgnt) begin
          if (sb_breq)      own_q <= OWN_SB;
          else if (sa_breq) own_q <= OWN_SA;
        end
        OWN_SB: if (!sb_breq) own_q <= (sa_breq && bgnt) ? OWN_SA : OWN_CPU;
        OWN_SA: if (!sa_breq) own_q <= (sb_breq && bgnt) ? OWN_SB : OWN_CPU;
        default: own_q <= OWN_CPU;
      endcase
    end
  end

  assign sb_bgnt = (own_q == OWN_SB);
  assign sa_bgnt = (own_q == OWN_SA);
  assign breq_n  = !(sb_breq || sa_breq);

  a_one_grant: assert property (@(posedge clk) !(sb_bgnt && sa_bgnt));
endmodule
