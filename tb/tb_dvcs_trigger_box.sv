// tb_dvcs_trigger_box: the whole trigger box at its full size, 52 daughter
// board models (208 channels) and a VME master model.
// For each event the gate delay and width are written by D32 cycles and read
// back, a level-1 trigger is given, and every channel gets a pulse of its own
// amplitude while the gate is open (positive and negative, some saturating
// the ADC). A second trigger during the gate must be dropped. After the gate
// the status must show the event, and the 208 values are read by BLT, 64
// words (256 bytes) per block, in calorimeter order, and compared with
// 2048 + amplitude * pulse length, clipped to 12 bits. The gate delay seen on
// the pins is checked in clock cycles. Accesses to another base address must
// get no DTACK. Each mechanism is counted and must have happened.
module tb_dvcs_trigger_box;
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
  int amp_ch [N_CHANNELS];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_blt = 0, n_drop = 0, n_ign = 0, n_evt = 0, n_sat = 0, n_neg = 0;

  dvcs_trigger_box dut (.clk, .rst_n, .l1_trig(l1), .gate, .oe, .adc_bus(bus),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_lword_n(lword_n),
    .vme_am(am), .vme_addr(va), .vme_data_i(vd_i), .vme_data_o(vd_o),
    .vme_data_oe(vd_oe), .vme_dtack_n(dtack_n));

  // board b = 2*column + half; data FPGA f serves columns from 0, 10 and 18
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

  // channel c sits on column 2*(c/16) + (c/4)%2, half (c/8)%2, ADC c%4
  function automatic int board_of(int c);
    return 2 * (2 * (c / 16) + (c / 4) % 2) + (c / 8) % 2;
  endfunction

  task automatic run_event(input int dly, input int wid, input int plen, input int seed);
    logic [31:0] q, b [64];
    bit ok;
    int n, e, evt0, drop0;
    wr32(REG_DELAY, dly);
    wr32(REG_WIDTH, wid);
    rd32(REG_DELAY, q); check(q == 32'(dly), "delay reads back");
    rd32(REG_WIDTH, q); check(q == 32'(wid), "width reads back");
    rd32(REG_EVENTS, q); evt0 = int'(q);
    rd32(REG_DROPPED, q); drop0 = int'(q);
    for (int c = 0; c < N_CHANNELS; c++) begin
      amp_ch[c] = int'($urandom_range(0, 300)) - 100;
      if ((c + seed) % 53 == 0) amp_ch[c] = 400;     // saturates high
      if ((c + seed) % 61 == 0) amp_ch[c] = -400;    // saturates low
    end
    @(negedge clk) l1 = 1;
    n = 0;
    while (!gate && n < 1000) begin @(posedge clk); #1; n++; end
    check(n == dly + 4, $sformatf("gate after %0d cycles, delay %0d", n, dly));
    l1 = 0;
    // pulse from gate cycle 3 for plen cycles; a second trigger meanwhile
    repeat (3) @(negedge clk);
    for (int c = 0; c < N_CHANNELS; c++) amp_brd[board_of(c)][c % 4] = amp_ch[c];
    repeat (2) @(negedge clk);
    l1 = 1;
    repeat (plen - 4) @(negedge clk);
    l1 = 0;
    repeat (2) @(negedge clk);
    for (int c = 0; c < N_CHANNELS; c++) amp_brd[board_of(c)][c % 4] = 0;
    n = 0;
    while (gate && n < 1000) begin @(posedge clk); #1; n++; end
    check(n == wid - 2 - plen, $sformatf("gate open %0d more cycles", n));
    repeat (4) @(posedge clk);
    rd32(REG_STATUS, q);
    check(q[0] == 1'b1 && q[1] == 1'b0, $sformatf("ready after the gate, status %h", q));
    rd32(REG_EVENTS, q);  check(int'(q) == evt0 + 1, "event counted");
    rd32(REG_DROPPED, q); check(int'(q) == drop0 + 1, "trigger during the gate dropped");
    if (int'(q) == drop0 + 1) n_drop++;
    for (int blk = 0; blk < 4; blk++) begin
      int nw = (blk < 3) ? 64 : N_CHANNELS - 192;
      vme_cycle({8'h10, CHAN_BASE + 16'(256 * blk)}, 6'h3B, 0, nw, b, ok);
      check(ok, "BLT acknowledged");
      n_blt++;
      for (int i = 0; i < nw; i++) begin
        int c = 64 * blk + i;
        e = 2048 + amp_ch[c] * plen;
        if (e > 4095) begin e = 4095; n_sat++; end
        if (e < 0) begin e = 0; n_sat++; end
        if (amp_ch[c] < 0) n_neg++;
        check(b[i] == 32'(e), $sformatf("channel %0d: got %0d expected %0d", c, b[i], e));
      end
    end
    n_evt++;
  endtask

  initial begin
    logic [31:0] q, b [64];
    bit ok;
    for (int i = 0; i < N_BOARDS; i++) for (int k = 0; k < 4; k++) amp_brd[i][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    rd32(REG_WIDTH, q); check(q == 6, "width resets to 6");
    rd32(REG_STATUS, q); check(q[0] == 0, "no event after reset");
    run_event(2, 30, 12, 0);
    run_event(7, 24, 9, 5);
    vme_cycle(24'h30_0400, 6'h39, 0, 1, b, ok);
    check(!ok, "other base address gets no DTACK");
    if (!ok) n_ign++;
    check(n_wr > 0 && n_rd > 0, "single writes and reads happened");
    check(n_blt == 8, "block transfers happened");
    check(n_drop == 2, "dropped triggers happened");
    check(n_ign == 1, "ignored access happened");
    check(n_evt == 2, "events read out");
    check(n_sat > 0 && n_neg > 0, "negative and saturating signals happened");
    $display("mechanisms: writes=%0d reads=%0d blt=%0d dropped=%0d ignored=%0d events=%0d saturated=%0d negative=%0d",
             n_wr, n_rd, n_blt, n_drop, n_ign, n_evt, n_sat, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
