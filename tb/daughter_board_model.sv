// daughter_board_model: behavioural model of one trigger daughter board, for
// simulation only (the real board is analog: impedance adaptation, filter,
// switched integrator and four 12-bit ADCs).
//
// The analog input of each of the 4 channels is given as an integer `amp`,
// the charge it brings per clock cycle in ADC steps (positive or negative
// signals). While the gate is high each integrator adds amp every cycle; while
// it is low the integrator is held at zero. Each ADC converts at every rising
// clock edge, giving offset binary 2048 + integral, clipped to 0..4095 (the
// positive half of the range is 2048 steps). The four ADC outputs share one
// bus: the ADC whose OE is high drives it; with no OE high the bus reads 0.
module daughter_board_model
  import dvcs_trig_pkg::*;
(
  input  logic clk,
  input  logic gate,
  input  logic [CH_PER_BOARD-1:0] oe,
  input  int   amp [CH_PER_BOARD],
  output adc_t bus
);

  int   integ [CH_PER_BOARD];
  adc_t adc   [CH_PER_BOARD];

  initial for (int k = 0; k < CH_PER_BOARD; k++) begin
    integ[k] = 0;
    adc[k]   = 12'd2048;
  end

  always @(posedge clk) begin
    for (int k = 0; k < CH_PER_BOARD; k++) begin
      int code;
      code = 2048 + integ[k];
      if (code < 0)    code = 0;
      if (code > 4095) code = 4095;
      adc[k]   <= adc_t'(code);
      integ[k] <= gate ? integ[k] + amp[k] : 0;
    end
  end

  always_comb begin
    bus = '0;
    for (int k = 0; k < CH_PER_BOARD; k++)
      if (oe[k]) bus = bus | adc[k];
  end

endmodule
