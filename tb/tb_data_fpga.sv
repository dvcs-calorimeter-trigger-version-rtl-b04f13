// tb_data_fpga: data FPGA 2 (16 boards, channels 80-143) with board models.
// Each channel gets a different amplitude; after a gate every local index
// 0-63 is read over the internal bus and compared with 2048 + amplitude *
// pulse length of the channel the connector tables put there (local index i
// is channel 80+i; channel c sits on column 2*(c/16) + (c/4)%2, half
// (c/8)%2, ADC c%4). The read answer must come exactly one cycle after the
// strobe; out-of-range indices read 0.
module tb_data_fpga;
  import dvcs_trig_pkg::*;
  localparam int F  = 1;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0, gate = 0;
  adc_t bus [NB];
  logic [3:0] oe;
  logic [6:0] int_addr;
  logic int_rd, int_rvalid, captured;
  adc_t int_rdata;
  int   amp [NB][4];
  int   amp_ch [208];
  int checks = 0, failures = 0;

  data_fpga #(.FPGA_IDX(F)) dut (.clk, .rst_n, .gate, .adc_bus(bus), .oe, .int_addr,
                                 .int_rd, .int_rdata, .int_rvalid, .captured);

  for (genvar b = 0; b < NB; b++) begin : g_brd
    daughter_board_model m (.clk, .gate, .oe, .amp(amp[b]), .bus(bus[b]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input int idx, output int val);
    @(negedge clk) int_addr = 7'(idx); int_rd = 1;
    @(negedge clk) int_rd = 0;
    check(int_rvalid == 1'b1, "answer one cycle after the strobe");
    val = int'(int_rdata);
    @(negedge clk);
    check(int_rvalid == 1'b0, "answer lasts one cycle");
  endtask

  initial begin
    int c, col, h, k, v, e;
    int_rd = 0; int_addr = 0;
    for (int b = 0; b < NB; b++) for (int j = 0; j < 4; j++) amp[b][j] = 0;
    for (int i = 0; i < 208; i++) amp_ch[i] = i - 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) gate = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      c = 80 + i;
      col = 2 * (c / 16) + (c / 4) % 2 - 10;
      h = (c / 8) % 2;
      k = c % 4;
      amp[2 * col + h][k] = amp_ch[c];
    end
    repeat (10) @(negedge clk);
    for (int b = 0; b < NB; b++) for (int j = 0; j < 4; j++) amp[b][j] = 0;
    repeat (8) @(negedge clk);
    gate = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      rd(i, v);
      e = 2048 + amp_ch[80 + i] * 10;
      check(v == e, $sformatf("local %0d: got %0d expected %0d", i, v, e));
    end
    rd(64, v);  check(v == 0, "index 64 reads 0");
    rd(127, v); check(v == 0, "index 127 reads 0");
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
