// tb_adc_mux_reader: three daughter-board models on one reader.
// Checks that OE is one-hot and steps every cycle, and that after each gate
// the captured value of every channel is 2048 + amplitude * pulse length,
// the integral of a pulse that ends well inside the gate. Positive,
// negative and saturating signals are used, over several events.
module tb_adc_mux_reader;
  import dvcs_trig_pkg::*;
  localparam int NB = 3;
  logic clk = 0, rst_n = 0, gate = 0;
  adc_t bus [NB];
  logic [3:0] oe, oe_prev;
  adc_t vals [NB][4];
  logic captured;
  int   amp [NB][4];
  int   amp_q [NB][4];
  int checks = 0, failures = 0;

  adc_mux_reader #(.N_BRD(NB)) dut (.clk, .rst_n, .gate, .adc_bus(bus), .oe, .vals, .captured);

  for (genvar b = 0; b < NB; b++) begin : g_brd
    daughter_board_model m (.clk, .gate, .oe, .amp(amp[b]), .bus(bus[b]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic event_run(input int width, input int start, input int plen);
    int e, ncap;
    for (int b = 0; b < NB; b++) for (int k = 0; k < 4; k++) begin
      amp_q[b][k] = $urandom_range(0, 400) - 150;
      amp[b][k] = 0;
    end
    amp_q[0][0] = 900;   // saturates at 4095
    amp_q[0][1] = -900;  // saturates at 0
    @(negedge clk) gate = 1;
    for (int t = 0; t < width; t++) begin
      for (int b = 0; b < NB; b++) for (int k = 0; k < 4; k++)
        amp[b][k] = (t >= start && t < start + plen) ? amp_q[b][k] : 0;
      @(negedge clk);
    end
    gate = 0;
    ncap = 0;
    for (int t = 0; t < 4; t++) begin
      @(posedge clk); #1;
      if (captured) begin
        ncap++;
        check(t == 0, $sformatf("captured %0d cycles after gate end", t));
      end
    end
    check(ncap == 1, "one capture per gate");
    for (int b = 0; b < NB; b++) for (int k = 0; k < 4; k++) begin
      e = 2048 + amp_q[b][k] * plen;
      if (e < 0) e = 0;
      if (e > 4095) e = 4095;
      check(int'(vals[b][k]) == e,
            $sformatf("board %0d ch %0d: got %0d expected %0d", b, k, vals[b][k], e));
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    for (int b = 0; b < NB; b++) for (int k = 0; k < 4; k++) amp[b][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    oe_prev = oe;
    for (int i = 0; i < 12; i++) begin
      @(posedge clk); #1;
      check($onehot(oe), "OE one-hot");
      check(oe == {oe_prev[2:0], oe_prev[3]}, "OE steps every cycle");
      oe_prev = oe;
    end
    event_run(12, 1, 4);
    event_run(20, 3, 8);
    event_run(30, 5, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
