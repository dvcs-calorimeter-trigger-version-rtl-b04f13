// vme_ctrl: VME slave of the VME control board.
//
// The board sits in the VME crate of the data acquisition CPU and links it
// to the trigger box through a ribbon cable. It answers A24 accesses in a
// 64 KiB window whose upper address byte A23..A16 equals BASE_ADDR: D32
// single reads and writes (address modifiers 0x39, 0x3D) and block transfers,
// BLT (0x3B, 0x3F), in which the master keeps AS low, gives the address once
// and strobes DS once per 32-bit word while the slave steps the address by 4.
// Every VME data cycle becomes one request on the local bus to the control
// FPGA (loc_req, answered by loc_ack with loc_rdata), and DTACK is asserted
// once the answer is there. A23..A16 are not sent over the cable.
//
// From the board description: a VME slave in A24 D32 and A24 BLT, whose
// second data path (an external FIFO) is not used. This design's own choices:
// the base address, the window size, ignoring everything but D32 (no DTACK,
// no BERR), the 256-byte BLT boundary not being checked, and the local bus.
//
// Timing: AS and DS are synchronised with two flip-flops; address, AM and
// write data are taken when the synchronised strobes show them stable. DTACK
// falls in the cycle after loc_ack and rises 2-3 cycles after
// both DS are high again. vme_data_oe enables the read data drivers while
// DTACK is low.
module vme_ctrl
  import dvcs_trig_pkg::*;
#(
  parameter logic [7:0] BASE_ADDR = 8'h10
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (active-low strobes)
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // local bus to the control FPGA
  output loc_req_t    loc_req,
  input  logic        loc_ack,
  input  logic [31:0] loc_rdata
);

  localparam logic [5:0] AM_A24_D32_U = 6'h39;
  localparam logic [5:0] AM_A24_D32_S = 6'h3D;
  localparam logic [5:0] AM_A24_BLT_U = 6'h3B;
  localparam logic [5:0] AM_A24_BLT_S = 6'h3F;

  typedef enum logic [2:0] {IDLE, WAIT_DS, WAIT_ACK, DTACK, WAIT_AS_END} vstate_t;
  vstate_t state;

  logic [1:0] as_sync, dsa_sync, dsr_sync;
  logic       as_s, ds_on, ds_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= '0;
      dsa_sync <= '0;
      dsr_sync <= 2'b11;
    end else begin
      as_sync  <= {as_sync[0], ~vme_as_n};
      dsa_sync <= {dsa_sync[0], ~vme_ds_n[0] & ~vme_ds_n[1]};
      dsr_sync <= {dsr_sync[0], vme_ds_n[0] & vme_ds_n[1]};
    end
  end
  assign as_s   = as_sync[1];
  assign ds_on  = dsa_sync[1];
  assign ds_off = dsr_sync[1];

  logic        blt;
  logic        writing;
  logic [15:0] addr;
  logic        am_ok;

  assign am_ok = (vme_am == AM_A24_D32_U) || (vme_am == AM_A24_D32_S) ||
                 (vme_am == AM_A24_BLT_U) || (vme_am == AM_A24_BLT_S);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      blt         <= 1'b0;
      writing     <= 1'b0;
      addr        <= '0;
      loc_req     <= '0;
      vme_data_o  <= '0;
      vme_data_oe <= 1'b0;
      vme_dtack_n <= 1'b1;
    end else begin
      loc_req.valid <= 1'b0;
      unique case (state)
        IDLE: if (as_s) begin
          blt  <= (vme_am == AM_A24_BLT_U) || (vme_am == AM_A24_BLT_S);
          addr <= {vme_addr[15:2], 2'b00};
          if (am_ok && vme_addr[23:16] == BASE_ADDR && !vme_lword_n && !vme_addr[1])
            state <= WAIT_DS;
          else
            state <= WAIT_AS_END;
        end
        WAIT_DS: begin
          if (!as_s) begin
            state <= IDLE;
          end else if (ds_on) begin
            loc_req.valid <= 1'b1;
            loc_req.we    <= ~vme_write_n;
            loc_req.addr  <= addr;
            loc_req.wdata <= vme_data_i;
            writing       <= ~vme_write_n;
            state         <= WAIT_ACK;
          end
        end
        WAIT_ACK: if (loc_ack) begin
          vme_data_o  <= loc_rdata;
          vme_data_oe <= ~writing;
          vme_dtack_n <= 1'b0;
          state       <= DTACK;
        end
        DTACK: if (ds_off) begin
          vme_dtack_n <= 1'b1;
          vme_data_oe <= 1'b0;
          if (blt) begin
            addr  <= addr + 16'd4;
            state <= WAIT_DS;
          end else begin
            state <= WAIT_AS_END;
          end
        end
        WAIT_AS_END: if (!as_s) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // DTACK is only given after a request, and never while AS is high.
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !vme_dtack_n |-> (state == DTACK));

endmodule
