// frc_pkg: types and constants shared by the FASTBUS Readout Controller (FRC) logic.
//
// Main memory of the FRC is four banks of 256K x 32 triple-port DRAM (TPDRAM), each with
// two 512 x 32 serial access memories (SAMa, SAMb). A 32-bit word in the 4 MByte memory is
// addressed by a 20-bit word pointer (processor byte address bits 2..21):
//   bits 0..7   tap inside one SAM half (256 words)         -> pointer latch
//   bit  8      SAM half                                      -> pointer counter
//   bits 9..17  DRAM row                                      -> pointer counter
//   bits 18..19 bank (processor address bits 20..21)          -> pointer counter
// The split of the pointer into a latch for bits 0:7 and a counter for bits 8:19 follows
// the document. The row/column split of bits 0..17 (9 + 9 bits for a 256K-deep device) and
// the encoding of the transfer operations on the DSF1/DSF2/TRM/ME*-WR* lines are this
// design's own: the document names the lines but gives no truth table.
package frc_pkg;

  localparam int unsigned PTR_W   = 20;   // word pointer, 4 MByte / 4 bytes
  localparam int unsigned TAP_W   = 8;    // latch part of the pointer (bits 0:7)
  localparam int unsigned CNT_W   = PTR_W - TAP_W;  // counter part (bits 8:19)
  localparam int unsigned MA_W    = 9;    // multiplexed DRAM address (9 row / 9 column bits),
                                          // 2^9 columns = the 512 words of a SAM

  typedef logic [PTR_W-1:0] ptr_t;

  // DRAM <-> SAM transfer operations used by the FRC (Section II lists them).
  typedef enum logic [3:0] {
    // {trm, me_wr_n, dsf1, dsf2}
    OP_CLEAR_BMR     = 4'b0000,  // clear bit masked register, enable serial mask input
    OP_READ_FULL     = 4'b1100,  // DRAM row -> whole SAM, set tap
    OP_READ_SPLIT    = 4'b1101,  // DRAM half row -> idle SAM half
    OP_PSEUDO_WRITE  = 4'b1110,  // set SAM to serial input, set tap, move no data
    OP_WRITE_FULL    = 4'b1000,  // whole SAM -> DRAM row
    OP_WRITE_SPLIT   = 4'b1001,  // idle SAM half -> DRAM half row
    OP_MWRITE_FULL   = 4'b1010,  // whole SAM -> DRAM row, through the bit mask
    OP_MWRITE_SPLIT  = 4'b1011   // idle SAM half -> DRAM half row, through the bit mask
  } tp_op_e;

  // Control lines a SAM controller hands to the TPDRAM control generator (Tx-... in Fig. 2).
  typedef struct packed {
    logic trm;
    logic me_wr_n;
    logic dsf1;
    logic dsf2;
  } tp_ctl_t;

  function automatic tp_ctl_t op2ctl(tp_op_e op);
    return tp_ctl_t'(op);
  endfunction

  // FASTBUS mode-select (MS) codes used in data cycles by this design.
  localparam logic [2:0] MS_DATA_RANDOM = 3'd0;
  localparam logic [2:0] MS_DATA_BLOCK  = 3'd1;
  localparam logic [2:0] MS_SEC_ADDR    = 3'd2;
  // In primary address cycles MS bit 0 selects CSR space and bit 1 a broadcast.

  // Slave status (SS) codes.
  localparam logic [2:0] SS_OK      = 3'd0;
  localparam logic [2:0] SS_INVALID = 3'd6;

  // Processor register map (upper 16 address bits). PAR at BE02 MN00 is given by the
  // document; the other locations are this design's choice.
  localparam logic [15:0] A_PAR  = 16'hBE02;  // Primary Address Register
  localparam logic [15:0] A_SAR  = 16'hBE03;  // Secondary Address Register / single data
  localparam logic [15:0] A_STCR = 16'hBE05;  // Supplemental Transfer Control Register
  localparam logic [15:0] A_REL  = 16'hBE06;  // Release Register
  localparam logic [15:0] A_CSR  = 16'hBE07;  // own CSRs #0/#7/#8, CSR number in bits 7:0
  localparam logic [15:0] A_RO   = 16'hBE10;  // Readout Port registers, index in bits 3:2
  // Transfer Control Register: 0xBD00_0000..0xBD3F_FFFC; address bits 21:2 carry the
  // TPDRAM word pointer loaded into the SAMb pointer (uP ADDR(2:21) input in Fig. 2).
  localparam logic [9:0]  A_TCR_HI = 10'h2F4;

endpackage
