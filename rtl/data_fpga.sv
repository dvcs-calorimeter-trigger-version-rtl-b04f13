// data_fpga: one of the three data FPGAs of the mother board.
//
// It reads the daughter boards wired to it through an adc_mux_reader and
// answers reads on the internal control bus: the control FPGA puts a local
// channel index (the channel's number minus the FPGA's first channel) on the
// shared address lines and pulses this FPGA's read strobe; the value comes
// back one cycle later with int_rvalid. The local index is decoded into the
// board and ADC that carry it with the numbering of the connector tables:
// inside each group of 16 channels, bit 2 picks the even or odd mezzanine
// column, bit 3 the L or H board and bits 1:0 the ADC. Board b of this FPGA
// is board 2*column + half counted from the FPGA's first column.
//
// That there are three data FPGAs, each with its own digitised inputs and a
// shared internal address/data bus from the control FPGA, follows the block
// diagram of the box; the read protocol is this design's choice. The trigger
// sums the diagram chains from FPGA to FPGA are not built here.
module data_fpga
  import dvcs_trig_pkg::*;
#(
  parameter int FPGA_IDX = 0,
  parameter int N_BRD    = 2 * FPGA_NCOLS[FPGA_IDX]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,
  input  adc_t adc_bus [N_BRD],
  output logic [CH_PER_BOARD-1:0] oe,
  input  logic [6:0] int_addr,      // local channel index
  input  logic       int_rd,        // read strobe of this FPGA
  output adc_t       int_rdata,
  output logic       int_rvalid,
  output logic       captured
);

  localparam int BW = $clog2(N_BRD);

  adc_t vals [N_BRD][CH_PER_BOARD];

  adc_mux_reader #(.N_BRD(N_BRD)) u_reader (
    .clk, .rst_n, .gate, .adc_bus, .oe, .vals, .captured
  );

  logic [4:0] brd;
  logic [1:0] sub;
  assign brd = {int_addr[6:4], int_addr[2], int_addr[3]};
  assign sub = int_addr[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_rdata  <= '0;
      int_rvalid <= 1'b0;
    end else begin
      int_rvalid <= int_rd;
      if (int_rd)
        int_rdata <= (int'(brd) < N_BRD) ? vals[brd[BW-1:0]][sub] : '0;
    end
  end

endmodule
