// dvcs_trigger_box: digital part of the DVCS calorimeter trigger box.
//
// 52 daughter boards integrate the 208 calorimeter signals during a gate and
// digitise them with 12-bit ADCs. Three data FPGAs on the mother board read
// them (20, 16 and 16 boards) through four shared output-enable lines each;
// the control FPGA produces the gate, with programmable delay and width,
// after each level-1 trigger, and fetches channel values from the data FPGAs
// over an internal bus; the VME control board gives the acquisition CPU A24
// D32 and BLT access to the control FPGA's registers and to the 208 values in
// calorimeter order (base + 0x400 + 4*channel).
//
// Interface: gate goes to every daughter board; oe[f] are OE1..OE4 of the
// boards of data FPGA f; adc_bus[b] is the 12-bit bus of board b, numbered
// 2*column + half (half 1 = H board) over the 26 mezzanine columns. The VME
// pins are plain signals; vme_data_o is driven onto the bus while
// vme_data_oe is high.
//
// The partition into boards and FPGAs and the channel numbering follow the
// trigger box description. The trigger sums that the diagram chains through
// the data FPGAs, the front-panel NIM/ECL inputs and outputs and the unused
// FIFO path of the VME board are not part of this RTL.
module dvcs_trigger_box
  import dvcs_trig_pkg::*;
#(
  parameter logic [7:0] VME_BASE = 8'h10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1_trig,
  // daughter boards
  output logic        gate,
  output logic [CH_PER_BOARD-1:0] oe [N_DATA_FPGA],
  input  adc_t        adc_bus [N_BOARDS],
  // VME
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n
);

  loc_req_t    loc_req;
  logic        loc_ack;
  logic [31:0] loc_rdata;

  logic [6:0]             int_addr;
  logic [N_DATA_FPGA-1:0] int_rd, int_rvalid, captured;
  adc_t                   int_rdata [N_DATA_FPGA];

  vme_ctrl #(.BASE_ADDR(VME_BASE)) u_vme (
    .clk, .rst_n,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n,
    .loc_req, .loc_ack, .loc_rdata
  );

  ctrl_fpga u_ctrl (
    .clk, .rst_n, .l1_trig, .gate,
    .loc_req, .loc_ack, .loc_rdata,
    .int_addr, .int_rd, .int_rdata, .int_rvalid,
    .data_captured(&captured)
  );

  for (genvar f = 0; f < N_DATA_FPGA; f++) begin : g_data
    localparam int NB = 2 * FPGA_NCOLS[f];
    localparam int B0 = 2 * FPGA_COL_BASE[f];
    adc_t bus [NB];
    for (genvar b = 0; b < NB; b++) begin : g_bus
      assign bus[b] = adc_bus[B0 + b];
    end
    data_fpga #(.FPGA_IDX(f)) u_data (
      .clk, .rst_n, .gate, .adc_bus(bus), .oe(oe[f]),
      .int_addr, .int_rd(int_rd[f]), .int_rdata(int_rdata[f]),
      .int_rvalid(int_rvalid[f]), .captured(captured[f])
    );
  end

endmodule
