// dvcs_trig_pkg: sizes, types and the channel numbering shared by the DVCS
// calorimeter trigger box.
//
// The calorimeter has 208 channels read by 52 daughter boards of 4 channels
// each; every daughter board digitises its 4 integrated signals with 12-bit
// ADCs. The boards sit in 26 mezzanine columns, each column holding an H
// (upper) and an L (lower) board. Columns 0-9 feed data FPGA 1 (channels
// 0-79), columns 10-17 data FPGA 2 (channels 80-143) and columns 18-25 data
// FPGA 3 (channels 144-207). All these numbers follow the connector tables of
// the box. The local bus request structure, register map and the reset
// values of the gate registers are this design's own choices.
package dvcs_trig_pkg;

  localparam int ADC_BITS     = 12;
  localparam int CH_PER_BOARD = 4;
  localparam int N_CHANNELS   = 208;
  localparam int N_COLUMNS    = 26;
  localparam int N_BOARDS     = 2 * N_COLUMNS;   // 52 daughter boards
  localparam int N_DATA_FPGA  = 3;

  // Per data FPGA: first mezzanine column, number of columns, first channel.
  localparam int FPGA_COL_BASE [N_DATA_FPGA] = '{0, 10, 18};
  localparam int FPGA_NCOLS    [N_DATA_FPGA] = '{10, 8, 8};
  localparam int FPGA_CH_BASE  [N_DATA_FPGA] = '{0, 80, 144};

  typedef logic [ADC_BITS-1:0] adc_t;
  typedef adc_t board_vals_t [CH_PER_BOARD];

  // Local bus between the VME control FPGA and the control FPGA
  // (the "Addr ctrl" / "Data ctrl" lines of the ribbon cable).
  typedef struct packed {
    logic        valid;   // one-cycle request strobe
    logic        we;      // 1 = write
    logic [15:0] addr;    // byte address inside the 64 KiB window
    logic [31:0] wdata;
  } loc_req_t;

  // Register map of the control FPGA (byte addresses).
  localparam logic [15:0] REG_STATUS   = 16'h0000;  // ro: {dropped, events, .., busy, ready}
  localparam logic [15:0] REG_DELAY    = 16'h0004;  // rw: gate delay in clock cycles
  localparam logic [15:0] REG_WIDTH    = 16'h0008;  // rw: gate width in clock cycles
  localparam logic [15:0] REG_EVENTS   = 16'h000C;  // ro: number of gates produced
  localparam logic [15:0] REG_DROPPED  = 16'h0010;  // ro: triggers ignored while busy
  localparam logic [15:0] CHAN_BASE    = 16'h0400;  // ro: channel c at CHAN_BASE + 4*c

endpackage
