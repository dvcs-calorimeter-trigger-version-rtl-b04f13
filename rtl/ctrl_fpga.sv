// ctrl_fpga: control FPGA of the mother board.
//
// It generates the configuration signals of the daughter boards: the
// integrator gate, whose delay after the level-1 trigger and whose width are
// registers written from VME (gate_gen). It also serves the VME control FPGA
// over the local bus of the ribbon cable: gate registers and counters, and
// the 208 captured channel values in calorimeter order at CHAN_BASE + 4*ch.
// A channel read is turned by cal_chan_map into a data FPGA number and a
// local index, sent over the internal address bus with that FPGA's read
// strobe; the 12-bit answer is returned zero-extended to 32 bits.
//
// From the box description: the control FPGA makes the gate, with
// programmable delay and width, and links the data FPGAs to the VME board by
// internal address/data buses. This design's own choices: the register map
// (dvcs_trig_pkg), the reset values of delay and width, the ready flag, the
// counters and the handshake (one request at a time; the ack comes 1 cycle
// after a register access and 3 cycles after a channel read; unmapped reads
// return 0 and unmapped writes are ignored, both acknowledged).
module ctrl_fpga
  import dvcs_trig_pkg::*;
#(
  parameter int          CNT_BITS  = 16,
  parameter logic [15:0] DEF_DELAY = 16'd0,
  parameter logic [15:0] DEF_WIDTH = 16'd6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     l1_trig,
  output logic     gate,
  // local bus from the VME control FPGA
  input  loc_req_t loc_req,
  output logic     loc_ack,
  output logic [31:0] loc_rdata,
  // internal bus to the data FPGAs
  output logic [6:0] int_addr,
  output logic [N_DATA_FPGA-1:0] int_rd,
  input  adc_t     int_rdata [N_DATA_FPGA],
  input  logic [N_DATA_FPGA-1:0] int_rvalid,
  input  logic     data_captured          // data FPGAs hold a new event
);

  logic [CNT_BITS-1:0] delay_q, width_q;
  logic [15:0] events, dropped;
  logic busy, gate_end, trig_dropped, busy_q, ready;

  gate_gen #(.CNT_BITS(CNT_BITS)) u_gate (
    .clk, .rst_n, .l1_trig, .delay(delay_q), .width(width_q),
    .gate, .busy, .gate_end, .trig_dropped
  );

  // event bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      events  <= '0;
      dropped <= '0;
      busy_q  <= 1'b0;
      ready   <= 1'b0;
    end else begin
      busy_q <= busy;
      if (gate_end)      events  <= events + 1'b1;
      if (trig_dropped)  dropped <= dropped + 1'b1;
      if (busy & ~busy_q)     ready <= 1'b0;
      else if (data_captured) ready <= 1'b1;
    end
  end

  // channel address decoding
  logic [7:0] ch;
  logic       is_chan;
  logic       m_valid;
  logic [1:0] m_fpga;
  logic [6:0] m_local;

  assign ch      = loc_req.addr[9:2];
  assign is_chan = (loc_req.addr[15:10] == CHAN_BASE[15:10]);

  cal_chan_map u_map (
    .ch, .valid(m_valid), .fpga(m_fpga), .local_idx(m_local), .column(),
    .half(), .sub(), .board(), .local_board()
  );

  typedef enum logic [1:0] {IDLE, CH_WAIT} bstate_t;
  bstate_t    bstate;
  logic [1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate    <= IDLE;
      sel       <= '0;
      delay_q   <= CNT_BITS'(DEF_DELAY);
      width_q   <= CNT_BITS'(DEF_WIDTH);
      loc_ack   <= 1'b0;
      loc_rdata <= '0;
      int_addr  <= '0;
      int_rd    <= '0;
    end else begin
      loc_ack <= 1'b0;
      int_rd  <= '0;
      unique case (bstate)
        IDLE: if (loc_req.valid) begin
          if (loc_req.we) begin
            if (loc_req.addr == REG_DELAY) delay_q <= CNT_BITS'(loc_req.wdata);
            if (loc_req.addr == REG_WIDTH) width_q <= CNT_BITS'(loc_req.wdata);
            loc_ack <= 1'b1;
          end else if (is_chan && m_valid) begin
            int_addr       <= m_local;
            int_rd[m_fpga] <= 1'b1;
            sel            <= m_fpga;
            bstate         <= CH_WAIT;
          end else begin
            loc_ack <= 1'b1;
            unique case (loc_req.addr)
              REG_STATUS:  loc_rdata <= {events, 14'd0, busy, ready};
              REG_DELAY:   loc_rdata <= 32'(delay_q);
              REG_WIDTH:   loc_rdata <= 32'(width_q);
              REG_EVENTS:  loc_rdata <= 32'(events);
              REG_DROPPED: loc_rdata <= 32'(dropped);
              default:     loc_rdata <= '0;
            endcase
          end
        end
        CH_WAIT: if (int_rvalid[sel]) begin
          loc_rdata <= 32'(int_rdata[sel]);
          loc_ack   <= 1'b1;
          bstate    <= IDLE;
        end
        default: bstate <= IDLE;
      endcase
    end
  end

  // the local bus carries one request at a time
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    (bstate == CH_WAIT) |-> !loc_req.valid);

endmodule
