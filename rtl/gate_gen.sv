// gate_gen: integrator gate of the daughter boards.
//
// A level-1 trigger starts the gate after a programmable delay and holds it
// for a programmable width, so that the integration window can be placed on
// the arrival time of the calorimeter signal. Both are given in clock cycles.
// That the gate has a programmable delay and width after the level-1 trigger
// is from the trigger box description; everything else is this design's
// choice: the trigger is a level that is synchronised and edge-detected, a
// trigger that arrives while a gate is pending or open is dropped and
// counted, and a width of 0 is taken as 1.
//
// Timing: the trigger is seen 2 cycles after it rises (synchroniser); the gate
// rises delay+1 cycles after that and stays high for max(width,1) cycles.
// gate_end pulses for one cycle in the first cycle the gate is low again.
module gate_gen #(
  parameter int CNT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                l1_trig,       // level-1 trigger, asynchronous
  input  logic [CNT_BITS-1:0] delay,
  input  logic [CNT_BITS-1:0] width,
  output logic                gate,
  output logic                busy,
  output logic                gate_end,      // one cycle after the gate closes
  output logic                trig_dropped   // trigger seen while busy
);

  typedef enum logic [1:0] {IDLE, WAIT, OPEN} state_t;
  state_t state;

  logic [2:0]          sync;
  logic                trig_edge;
  logic [CNT_BITS-1:0] cnt;

  assign trig_edge = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], l1_trig};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      cnt          <= '0;
      gate_end     <= 1'b0;
      trig_dropped <= 1'b0;
    end else begin
      gate_end     <= 1'b0;
      trig_dropped <= trig_edge && (state != IDLE);
      unique case (state)
        IDLE: if (trig_edge) begin
          state <= WAIT;
          cnt   <= delay;
        end
        WAIT: begin
          if (cnt == '0) begin
            state <= OPEN;
            cnt   <= (width == '0) ? CNT_BITS'(0) : width - 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        OPEN: begin
          if (cnt == '0) begin
            state    <= IDLE;
            gate_end <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign gate = (state == OPEN);
  assign busy = (state != IDLE);

endmodule
