// adc_mux_reader: read-out of the multiplexed ADC outputs of daughter boards.
//
// Each daughter board digitises its 4 channels at every clock edge but brings
// them to the mother board over one shared 12-bit bus, enabled channel by
// channel with OE1..OE4, to save wires. This reader drives OE one-hot and
// rotates it every clock, so that each channel is read once every 4 cycles,
// and keeps the latest sample of each channel in a shadow register. The
// mother board wants only the value at the end of the integrator gate: in the
// first cycle after the gate falls the shadow of every channel is copied to
// the outputs and `captured` pulses. The OE multiplexing, the continuous
// sampling and the capture at the end of the gate come from the board
// description; the round-robin order and the 1-cycle scan step are this
// design's choice. The boards of one reader share the OE lines.
//
// Timing: OE[k] is high in the cycle whose closing edge stores bus[b] as
// channel k of board b. A captured value is the sample of one of the last
// four gate cycles, so the integral must be complete (and converted by the
// ADC) at least 4 cycles before the gate closes.
module adc_mux_reader
  import dvcs_trig_pkg::*;
#(
  parameter int N_BRD = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,                              // integrator gate
  input  adc_t adc_bus [N_BRD],                   // shared bus of each board
  output logic [CH_PER_BOARD-1:0] oe,             // OE1..OE4 (bit 0 = OE1)
  output adc_t vals [N_BRD][CH_PER_BOARD],        // values at the end of the gate
  output logic captured                           // one-cycle pulse, vals updated
);

  logic [1:0] phase;
  logic       gate_q;
  adc_t       shadow [N_BRD][CH_PER_BOARD];

  always_comb begin
    oe        = '0;
    oe[phase] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      gate_q   <= 1'b0;
      captured <= 1'b0;
    end else begin
      phase    <= phase + 1'b1;
      gate_q   <= gate;
      captured <= gate_q & ~gate;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BRD; b++)
        for (int k = 0; k < CH_PER_BOARD; k++) begin
          shadow[b][k] <= '0;
          vals[b][k]   <= '0;
        end
    end else begin
      for (int b = 0; b < N_BRD; b++) begin
        shadow[b][phase] <= adc_bus[b];
        if (gate_q & ~gate)
          for (int k = 0; k < CH_PER_BOARD; k++) vals[b][k] <= shadow[b][k];
      end
    end
  end

  // exactly one ADC of a board drives its bus at a time
  a_oe_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(oe));

endmodule
