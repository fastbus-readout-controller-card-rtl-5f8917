// readout_port_ctrl: Readout Port Controller, slave side of the CDF Scanner bus.
//
// The Scanner bus is a single-master bus with up to 16 slaves (FRCs and other readout
// controllers), each with its own 4-bit address, and a multiplexed 16-bit address/data path.
// Every transaction moves whole 32-bit words, so one word takes two 16-bit data cycles.
// There are no per-cycle acknowledges: the receiver has to keep up with the sender. A
// broadcast is a one-word read from all slaves at once, used to poll them; each slave with
// data ready answers by asserting one data bit. Those rules are the document's; the signal
// set and timing below are this design's:
//   sc_as_i   high for the duration of a transaction; on its rising edge sc_ad_i holds
//             [3:0] slave address, [4] broadcast, [5] write (master to slave)
//   sc_ds_i   toggles once per 16-bit data cycle. Write: data is on sc_ad_i at the toggle.
//             Read: the slave drives the current half on sc_ad_o and moves to the next one
//             after each toggle; the master samples before it toggles and toggles at most
//             every 4 clocks (100 ns: 16 bits per 100 ns is the 20 MByte/s peak rate).
//   Low half of a word first. Broadcast answer: bit <own address> of the low half set
//   when an event is ready; high half zero.
// Port-adapter logic (RS-485 drivers and synchronisers) is outside; inputs are taken to be
// synchronous to clk.
//
// Processor registers, base BE10 0000, word index in address bits 3:2:
//   0  write: TPDRAM word pointer, loaded into the SAMa pointer (S-SAR)
//   1  write: number of 32-bit words; read: words left
//   2  write: [0] start, [1] direction (1 = Scanner reads from the FRC), [2] interrupt
//      enable, [3] abort (SaC-RS); read: {busy, ready, done, irq enable, direction}
// Only address bits 31:16 and 3:2 are decoded, so the registers repeat through the 64 KByte
// block, and the pointer register takes data bits 19:0 (a word pointer); the other address
// and data bits are unused on purpose.
// Start asks the SAMa controller to initialise SAMa; when it is ready, a read event is
// flagged "ready" for broadcast polls. After the programmed number of words the SAMa
// controller is told to end (saving written data), "done" is set and, if enabled, an
// interrupt is raised; reading register 2 clears "done".
module readout_port_ctrl
  import frc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  my_addr,
  // processor local bus
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_drdy,
  output logic        irq,
  // Scanner bus
  input  logic        sc_as_i,
  input  logic        sc_ds_i,
  input  logic [15:0] sc_ad_i,
  output logic [15:0] sc_ad_o,
  output logic        sc_ad_oe,
  // SAMa controller
  output logic        sa_init_rq,
  output logic        sa_end_rq,
  output logic        sa_rd_wr_n,
  output logic        sac_rs,
  input  logic        sa_rdy,
  // SAMa pointer load (S-SAR)
  output logic        s_sar,
  output ptr_t        sar_ptr,
  // SAMa serial port
  output logic        sa_sc,
  output logic [31:0] sa_sdq_o,
  input  logic [31:0] sa_sdq_i
);
  typedef enum logic [2:0] {R_IDLE, R_INIT, R_INITW, R_ACTIVE, R_END, R_ENDW} rst_e;
  rst_e        st_q;
  logic        hit;
  logic        resp_q;
  logic [15:0] cnt_q;
  logic        dir_rd_q, irq_en_q, ready_q, done_q, abort_q;
  logic [31:0] rdata_q;
  // Scanner side
  logic        as_q, ds_q, sel_q, bc_q, wr_q, half_q;
  logic [15:0] lo_q;
  logic        sc_q;
  logic [31:0] wd_q;

  assign hit = cpu_req && !resp_q && (cpu_addr[31:16] == A_RO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= R_IDLE; resp_q <= 1'b0; cnt_q <= '0; dir_rd_q <= 1'b1; irq_en_q <= 1'b0;
      ready_q <= 1'b0; done_q <= 1'b0; abort_q <= 1'b0; rdata_q <= '0;
      as_q <= 1'b0; ds_q <= 1'b0; sel_q <= 1'b0; bc_q <= 1'b0; wr_q <= 1'b0; half_q <= 1'b0;
      lo_q <= '0; sc_q <= 1'b0; wd_q <= '0;
    end else begin
      resp_q  <= hit;
      abort_q <= 1'b0;
      sc_q    <= 1'b0;
      // ---------------- processor registers
      if (hit) begin
        unique case (cpu_addr[3:2])
          2'd1: begin
            if (cpu_we) cnt_q <= cpu_wdata[15:0];
            rdata_q <= {16'd0, cnt_q};
          end
          2'd2: begin
            rdata_q <= {27'd0, (st_q != R_IDLE), ready_q, done_q, irq_en_q, dir_rd_q};
            if (cpu_we) begin
              irq_en_q <= cpu_wdata[2];
              if (cpu_wdata[3]) begin
                abort_q <= 1'b1; ready_q <= 1'b0; st_q <= R_IDLE;
              end else if (cpu_wdata[0] && st_q == R_IDLE) begin
                dir_rd_q <= cpu_wdata[1];
                st_q     <= R_INIT;
              end
            end else done_q <= 1'b0;
          end
          default: rdata_q <= '0;
        endcase
      end
      // ---------------- transfer sequencing
      unique case (st_q)
        R_INIT:  if (sa_rdy) st_q <= R_INITW;
        R_INITW: if (!sa_rdy) begin
          st_q    <= R_ACTIVE;
          ready_q <= dir_rd_q;
        end
        R_ACTIVE: if (cnt_q == 0) begin st_q <= R_END; ready_q <= 1'b0; end
        R_END:   if (sa_rdy) st_q <= R_ENDW;
        R_ENDW:  if (!sa_rdy) begin st_q <= R_IDLE; done_q <= 1'b1; end
        default: ;
      endcase
      // ---------------- Scanner bus
      as_q <= sc_as_i;
      ds_q <= sc_ds_i;
      if (sc_as_i && !as_q) begin
        bc_q   <= sc_ad_i[4];
        wr_q   <= sc_ad_i[5];
        sel_q  <= sc_ad_i[4] || (sc_ad_i[3:0] == my_addr);
        half_q <= 1'b0;
      end else if (!sc_as_i) begin
        sel_q <= 1'b0;
      end else if (sel_q && sc_ds_i != ds_q) begin
        half_q <= !half_q;
        if (!bc_q && st_q == R_ACTIVE && cnt_q != 0 && (wr_q == !dir_rd_q)) begin
          if (wr_q && !half_q) lo_q <= sc_ad_i;
          if (half_q) begin
            cnt_q <= cnt_q - 1'b1;
            sc_q  <= 1'b1;
            wd_q  <= {sc_ad_i, lo_q};
          end
        end
      end
    end
  end

  logic rd_active;
  assign rd_active = sel_q && !wr_q && !bc_q && st_q == R_ACTIVE && dir_rd_q && cnt_q != 0;

  always_comb begin
    sc_ad_oe = sel_q && !wr_q;
    if (bc_q) sc_ad_o = half_q ? 16'd0 : (16'(ready_q) << my_addr);
    else if (rd_active) sc_ad_o = half_q ? sa_sdq_i[31:16] : sa_sdq_i[15:0];
    else sc_ad_o = '0;
  end

  assign sa_init_rq = (st_q == R_INIT);
  assign sa_end_rq  = (st_q == R_END);
  assign sa_rd_wr_n = dir_rd_q;
  assign sac_rs     = abort_q;
  assign s_sar      = hit && cpu_we && cpu_addr[3:2] == 2'd0;
  assign sar_ptr    = cpu_wdata[PTR_W-1:0];
  assign sa_sc      = sc_q;
  assign sa_sdq_o   = wd_q;
  assign cpu_rdata  = rdata_q;
  assign cpu_drdy   = resp_q;
  assign irq        = irq_en_q && done_q;
endmodule
