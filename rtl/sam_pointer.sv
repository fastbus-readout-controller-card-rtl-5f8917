// sam_pointer: programmable TPDRAM word pointer of one SAM controller (Sb-SAMP / Sa-SAMP).
//
// The pointer holds the 20-bit word address used for DRAM <-> SAM transfers. As in the
// document it has two parts: a latch for bits 0:7 (the start tap inside a SAM half) and a
// counter for bits 8:19 (SAM half, row and bank). The latch is never incremented, only
// loaded or cleared: once the SAM has been initialised, transfers move at least one SAM
// half (256 words), so stepping to the next half means counting in bits 8:19.
//
// Loads (one clock each, priority in this order):
//   cpu_ld  load from the processor address bus (uP ADDR(2:21)); strobe S-FTCR for SAMb,
//           S-SAR for SAMa
//   pe      load from the alternative source (FASTBUS NTA(0:19) for SAMb), Sx-PE-PT
//   cl      clear the latch bits 0:7, Sx-CL-PT
//   ce      increment the counter bits 8:19, Sx-CE-PT (cl and ce may be given together)
// Output ptr is registered. The two-source load mux of Fig. 2 is folded in here.
module sam_pointer
  import frc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cpu_ld,
  input  ptr_t cpu_val,
  input  logic pe,
  input  ptr_t pe_val,
  input  logic cl,
  input  logic ce,
  output ptr_t ptr
);
  logic [TAP_W-1:0] tap_q;
  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap_q <= '0;
      cnt_q <= '0;
    end else if (cpu_ld) begin
      {cnt_q, tap_q} <= cpu_val;
    end else if (pe) begin
      {cnt_q, tap_q} <= pe_val;
    end else begin
      if (cl) tap_q <= '0;
      if (ce) cnt_q <= cnt_q + 1'b1;
    end
  end

  assign ptr = {cnt_q, tap_q};
endmodule
