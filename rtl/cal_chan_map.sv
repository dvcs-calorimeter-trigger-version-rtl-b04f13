// cal_chan_map: where a calorimeter channel is wired in the trigger box.
//
// Combinational. The channels are numbered in groups of 16 (one calorimeter
// column of the channel table). Inside a group g, channels 0-3 go to the L
// board of mezzanine column 2g, 4-7 to the L board of column 2g+1, 8-11 to the
// H board of column 2g and 12-15 to the H board of column 2g+1; the two low
// bits pick the ADC of the board. Columns 0-9 belong to data FPGA 0, 10-17 to
// FPGA 1 and 18-25 to FPGA 2, and inside an FPGA a channel is known by its
// local index, its number minus the FPGA's first channel (0, 80 or 144).
// This numbering is read from the connector tables of the box.
//
// Interface: ch in, and out: valid (ch < 208), fpga, local_idx, column,
// half (1 = H, 0 = L), sub (ADC 0-3 of the board), board (2*column + half)
// and local_board (board index within its FPGA).
module cal_chan_map
  import dvcs_trig_pkg::*;
(
  input  logic [7:0] ch,
  output logic       valid,
  output logic [1:0] fpga,
  output logic [6:0] local_idx,
  output logic [4:0] column,
  output logic       half,
  output logic [1:0] sub,
  output logic [5:0] board,
  output logic [4:0] local_board
);

  logic [3:0] group;

  always_comb begin
    valid  = (ch < 8'(N_CHANNELS));
    group  = ch[7:4];
    column = {group, ch[2]};
    half   = ch[3];
    sub    = ch[1:0];
    board  = {column, half};
    if (ch < 8'(FPGA_CH_BASE[1])) begin
      fpga        = 2'd0;
      local_idx   = 7'(ch);
      local_board = 5'(board);
    end else if (ch < 8'(FPGA_CH_BASE[2])) begin
      fpga        = 2'd1;
      local_idx   = 7'(ch - 8'(FPGA_CH_BASE[1]));
      local_board = 5'(board - 6'(2 * FPGA_COL_BASE[1]));
    end else begin
      fpga        = 2'd2;
      local_idx   = 7'(ch - 8'(FPGA_CH_BASE[2]));
      local_board = 5'(board - 6'(2 * FPGA_COL_BASE[2]));
    end
  end

endmodule
