// tb_workload_signal_range: the charge range of the integration window,
// run on the whole box at its default size (208 channels).
// One ADC step is 12 pVs and the positive half of the 12-bit range is 2048
// steps, 24 nVs. With a 10 ns clock a signal of amplitude A mV brings
// A * 10 ns per cycle, i.e. A * 10 / 12 steps per cycle at 12 pVs per step.
// Three events are run on every channel:
//  - a typical calorimeter pulse of 12.6 nVs (420 mV for 30 ns,
//    350 steps per cycle for 3 cycles = 1050 steps): code 2048 + 1050;
//  - the same pulse with negative polarity: code 2048 - 1050;
//  - the largest signal, 600 mV, over a whole 60 ns window
//    (500 steps per cycle for 6 cycles = 3000 steps, 36 nVs): this exceeds
//    the 2047 positive steps and the code saturates at 4095.
// The gate is programmed 8 cycles wider than the pulse window so that the
// captured sample holds the whole integral.
module tb_workload_signal_range;
  import dvcs_trig_pkg::*;
  logic clk = 0, rst_n = 0, l1 = 0;
  logic gate;
  logic [3:0] oe [3];
  adc_t bus [N_BOARDS];
  logic as_n = 1, write_n = 1, lword_n = 0;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 6'h39;
  logic [23:1] va = '0;
  logic [31:0] vd_i = '0, vd_o;
  logic vd_oe, dtack_n;
  int amp_brd [N_BOARDS][4];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  localparam int STEP_PVS = 12;     // pVs per ADC step
  localparam int CLK_NS   = 10;

  dvcs_trigger_box dut (.clk, .rst_n, .l1_trig(l1), .gate, .oe, .adc_bus(bus),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_lword_n(lword_n),
    .vme_am(am), .vme_addr(va), .vme_data_i(vd_i), .vme_data_o(vd_o),
    .vme_data_oe(vd_oe), .vme_dtack_n(dtack_n));

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_brd
    localparam int F = (b < 20) ? 0 : (b < 36) ? 1 : 2;
    daughter_board_model m (.clk, .gate, .oe(oe[F]), .amp(amp_brd[b]), .bus(bus[b]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_dtack(input logic lvl, output bit ok);
    int n = 0;
    while (dtack_n != lvl && n < 200) begin #5; n++; end
    ok = (dtack_n == lvl);
  endtask

  task automatic vme_cycle(input logic [23:0] a, input logic [5:0] m, input bit wr,
                           input int nwords, inout logic [31:0] buffer [64],
                           output bit ok);
    bit got;
    ok = 1;
    va = a[23:1]; am = m; write_n = ~wr;
    #30 as_n = 0;
    for (int i = 0; i < nwords; i++) begin
      if (wr) vd_i = buffer[i];
      #20 ds_n = 2'b00;
      wait_dtack(1'b0, got);
      if (!got) begin ok = 0; break; end
      if (!wr) buffer[i] = vd_o;
      #10 ds_n = 2'b11;
      wait_dtack(1'b1, got);
      if (!got) ok = 0;
    end
    ds_n = 2'b11;
    #20 as_n = 1;
    #30;
  endtask

  task automatic wr32(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] b [64];
    bit ok;
    b[0] = d;
    vme_cycle({8'h10, a}, 6'h39, 1, 1, b, ok);
    check(ok, "D32 write acknowledged");
    n_wr++;
  endtask

  task automatic rd32(input logic [15:0] a, output logic [31:0] d);
    logic [31:0] b [64];
    bit ok;
    vme_cycle({8'h10, a}, 6'h39, 0, 1, b, ok);
    check(ok, "D32 read acknowledged");
    d = b[0];
    n_rd++;
  endtask

  // amplitude in mV, duration in ns; returns the expected ADC code
  task automatic pulse_event(input int mv, input int ns, input int exp_code, input string name);
    logic [31:0] b [64];
    bit ok;
    int steps = mv * CLK_NS / STEP_PVS;      // steps per cycle
    int cyc   = ns / CLK_NS;
    wr32(REG_DELAY, 0);
    wr32(REG_WIDTH, 32'(cyc + 8));
    @(negedge clk) l1 = 1;
    while (!gate) @(negedge clk);
    l1 = 0;
    for (int i = 0; i < N_BOARDS; i++) for (int k = 0; k < 4; k++) amp_brd[i][k] = steps;
    repeat (cyc) @(negedge clk);
    for (int i = 0; i < N_BOARDS; i++) for (int k = 0; k < 4; k++) amp_brd[i][k] = 0;
    while (gate) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int blk = 0; blk < 4; blk++) begin
      int nw = (blk < 3) ? 64 : N_CHANNELS - 192;
      vme_cycle({8'h10, CHAN_BASE + 16'(256 * blk)}, 6'h3B, 0, nw, b, ok);
      check(ok, "BLT acknowledged");
      for (int i = 0; i < nw; i++)
        check(b[i] == 32'(exp_code), $sformatf("%s: channel %0d got %0d expected %0d",
                                               name, 64 * blk + i, b[i], exp_code));
    end
    $display("%s: %0d mV x %0d ns = %0d pVs -> code %0d", name, mv, ns, mv * ns, b[0]);
  endtask

  initial begin
    for (int i = 0; i < N_BOARDS; i++) for (int k = 0; k < 4; k++) amp_brd[i][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    pulse_event(420, 30, 2048 + 1050, "typical 12.6 nVs");
    pulse_event(-420, 30, 2048 - 1050, "typical negative");
    pulse_event(600, 60, 4095, "full 60 ns window at 600 mV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
