// tpdram_model: behavioural model of the FRC main memory, four banks of triple-port DRAM
// (each bank 256K x 32 with two 512 x 32 serial access memories, SAM a and SAM b), for
// simulation only. It is not the vendor device: it implements just the transfer operations
// the FRC uses, with the operation encoding of frc_pkg, and it is clocked by the board clock
// so that the RAS/CAS edges are seen as sampled levels (on the falling clock edge).
//
//   X-RAS falling: the row address {bank, tp_ma} and the operation lines are latched.
//   X-CAS falling: the column address is latched and the transfer is done at once.
//     read full     DRAM row -> whole SAM, serial pointer = column, SAM in output mode
//     read split    DRAM half row (half = column bit 8) -> same SAM half
//     pseudo write  SAM in input mode, serial pointer = column, no data moved
//     write full / split        SAM (half) -> DRAM row (half)
//     masked write full / split only the positions whose mask bit is set are written,
//                               and those mask bits are cleared
//     clear BMR                 all mask bits of SAM b cleared
//   X-STS picks the SAM (1 = SAM b).
// Serial ports: with SE* low, each clock with SC high moves the serial pointer on by one
// (modulo 512); in input mode the word on sdq_i (and, for SAM b, a 1 on the mask input) is
// stored first. sdq_o shows the word at the serial pointer; QSF is bit 8 of the pointer.
// The mask is one bit per word here (the device masks single bits).
// Counters of each operation are kept for testbenches.
module tpdram_model
  import frc_pkg::*;
(
  input  logic        clk,
  input  logic        x_ras_n,
  input  logic        x_cas_n,
  input  logic        x_tr_oe_n,
  input  logic        x_me_we_n,
  input  logic        x_dsf1,
  input  logic        x_dsf2,
  input  logic        x_trm,
  input  logic        x_sts,
  input  logic [8:0]  tp_ma,
  input  logic [1:0]  tp_bank,
  input  logic        sa_sc,
  input  logic        sa_se_n,
  input  logic [31:0] sa_sdq_i,
  output logic [31:0] sa_sdq_o,
  output logic        sa_qsf,
  input  logic        sb_sc,
  input  logic        sb_se_n,
  input  logic [31:0] sb_sdq_i,
  input  logic        sb_mask_i,
  output logic [31:0] sb_sdq_o,
  output logic        sb_qsf
);
  logic [31:0] mem [int];
  logic [31:0] sam [2][512];
  logic        msk [512];
  logic [8:0]  sp  [2];
  logic        din [2];
  logic        ras_d = 1'b1, cas_d = 1'b1;
  logic [10:0] row_q;
  logic [3:0]  op_q;
  logic        sel_q;
  int          n_op [16];

  initial begin
    for (int s = 0; s < 2; s++) begin
      sp[s] = '0; din[s] = 1'b0;
      for (int i = 0; i < 512; i++) sam[s][i] = '0;
    end
    for (int i = 0; i < 512; i++) msk[i] = 1'b0;
    for (int i = 0; i < 16; i++) n_op[i] = 0;
  end

  function automatic logic [31:0] rd(int a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  task automatic do_xfer(logic [8:0] col);
    int base = int'(row_q) << 9;
    int s = int'(sel_q);
    int lo, hi;
    tp_op_e op = tp_op_e'(op_q);
    n_op[op_q]++;
    lo = col[8] ? 256 : 0;
    hi = lo + 255;
    unique case (op)
      OP_CLEAR_BMR:    for (int i = 0; i < 512; i++) msk[i] = 1'b0;
      OP_READ_FULL:    begin
        for (int i = 0; i < 512; i++) sam[s][i] = rd(base + i);
        sp[s] = col; din[s] = 1'b0;
      end
      OP_READ_SPLIT:   for (int i = lo; i <= hi; i++) sam[s][i] = rd(base + i);
      OP_PSEUDO_WRITE: begin sp[s] = col; din[s] = 1'b1; end
      OP_WRITE_FULL:   for (int i = 0; i < 512; i++) mem[base + i] = sam[s][i];
      OP_WRITE_SPLIT:  for (int i = lo; i <= hi; i++) mem[base + i] = sam[s][i];
      OP_MWRITE_FULL:  for (int i = 0; i < 512; i++)
                         if (s == 0 || msk[i]) begin mem[base + i] = sam[s][i]; msk[i] = 1'b0; end
      OP_MWRITE_SPLIT: for (int i = lo; i <= hi; i++)
                         if (s == 0 || msk[i]) begin mem[base + i] = sam[s][i]; msk[i] = 1'b0; end
      default: ;
    endcase
  endtask

  // The model acts on the falling clock edge, half a cycle after the FRC outputs change.
  always @(negedge clk) begin
    if (!x_ras_n && ras_d) begin
      row_q <= {tp_bank, tp_ma};
      op_q  <= {x_trm, x_me_we_n, x_dsf1, x_dsf2};
      sel_q <= x_sts;
    end
    if (!x_cas_n && cas_d) do_xfer(tp_ma);
    ras_d <= x_ras_n;
    cas_d <= x_cas_n;
    if (sa_sc && !sa_se_n) begin
      if (din[0]) sam[0][sp[0]] = sa_sdq_i;
      sp[0] = sp[0] + 1'b1;
    end
    if (sb_sc && !sb_se_n) begin
      if (din[1]) begin
        sam[1][sp[1]] = sb_sdq_i;
        if (sb_mask_i) msk[sp[1]] = 1'b1;
      end
      sp[1] = sp[1] + 1'b1;
    end
  end

  // TR*/OE* is implied by TRM in this model
  wire unused_tr = x_tr_oe_n;

  assign sa_sdq_o = sam[0][sp[0]];
  assign sa_qsf   = sp[0][8];
  assign sb_sdq_o = sam[1][sp[1]];
  assign sb_qsf   = sp[1][8];
endmodule
