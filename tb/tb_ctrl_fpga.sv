// tb_ctrl_fpga: control FPGA with three simple data FPGA responders that
// answer a read one cycle after the strobe with (fpga << 8) | local index.
// Checks the reset values and read-back of the gate registers, the gate that
// a trigger then produces (delay and width in cycles), the event and dropped
// trigger counters, the ready flag, and for all 208 channels that a read at
// CHAN_BASE + 4*c reaches the FPGA and local index of the connector tables
// (FPGA 0 for c < 80, 1 for c < 144, else 2; local index c minus 0, 80 or
// 144), with the acknowledge 1 cycle after a register request and 3 cycles
// after a channel request.
module tb_ctrl_fpga;
  import dvcs_trig_pkg::*;
  logic clk = 0, rst_n = 0, l1 = 0, gate;
  loc_req_t req;
  logic ack;
  logic [31:0] rdata;
  logic [6:0] int_addr;
  logic [2:0] int_rd, int_rvalid;
  adc_t int_rdata [3];
  logic captured = 0;
  int checks = 0, failures = 0;

  ctrl_fpga dut (.clk, .rst_n, .l1_trig(l1), .gate, .loc_req(req), .loc_ack(ack),
                 .loc_rdata(rdata), .int_addr, .int_rd, .int_rdata, .int_rvalid,
                 .data_captured(captured));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int f = 0; f < 3; f++) begin
      int_rvalid[f] <= int_rd[f];
      int_rdata[f]  <= int_rd[f] ? adc_t'((f << 8) | int'(int_addr)) : 12'hABC;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lbus(input bit we, input logic [15:0] a, input logic [31:0] d,
                      output logic [31:0] q, output int lat);
    @(negedge clk);
    req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    req.valid = 1'b0;
    lat = 1;
    while (!ack && lat < 50) begin @(negedge clk); lat++; end
    q = rdata;
  endtask

  initial begin
    logic [31:0] q;
    int lat, n, len, f, base;
    req = '0;
    int_rvalid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lbus(0, REG_DELAY, 0, q, lat); check(q == 0, "delay resets to 0");
    check(lat == 1, $sformatf("register latency %0d", lat));
    lbus(0, REG_WIDTH, 0, q, lat); check(q == 6, "width resets to 6");
    lbus(1, REG_DELAY, 32'd5, q, lat); check(lat == 1, "write acknowledged");
    lbus(1, REG_WIDTH, 32'd9, q, lat);
    lbus(0, REG_DELAY, 0, q, lat); check(q == 5, "delay reads back");
    lbus(0, REG_WIDTH, 0, q, lat); check(q == 9, "width reads back");
    lbus(0, 16'h0100, 0, q, lat); check(q == 0 && lat == 1, "unmapped reads 0");
    // a trigger, with a second one during the gate
    @(negedge clk) l1 = 1;
    n = 0;
    while (!gate && n < 100) begin @(posedge clk); #1; n++; end
    check(n == 5 + 4, $sformatf("gate after %0d edges", n));
    @(negedge clk) l1 = 0;
    len = 0;
    while (gate && len < 100) begin
      if (len == 2) l1 = 1;
      if (len == 5) l1 = 0;
      @(posedge clk); #1; len++;
    end
    check(len == 9, $sformatf("gate lasted %0d", len));
    lbus(0, REG_STATUS, 0, q, lat); check(q[0] == 0, "not ready before capture");
    @(negedge clk) captured = 1;
    @(negedge clk) captured = 0;
    lbus(0, REG_STATUS, 0, q, lat);
    check(q[0] == 1 && q[31:16] == 1, $sformatf("status %h", q));
    lbus(0, REG_EVENTS, 0, q, lat); check(q == 1, "one event");
    lbus(0, REG_DROPPED, 0, q, lat); check(q == 1, "one dropped trigger");
    for (int c = 0; c < 208; c++) begin
      lbus(0, CHAN_BASE + 16'(4 * c), 0, q, lat);
      f    = (c < 80) ? 0 : (c < 144) ? 1 : 2;
      base = (f == 0) ? 0 : (f == 1) ? 80 : 144;
      check(q == 32'((f << 8) | (c - base)), $sformatf("channel %0d reads %h", c, q));
      check(lat == 3, $sformatf("channel latency %0d", lat));
    end
    lbus(0, CHAN_BASE + 16'(4 * 208), 0, q, lat); check(q == 0 && lat == 1, "channel 208 reads 0");
    // a new trigger clears ready
    @(negedge clk) l1 = 1;
    repeat (4) @(negedge clk);
    l1 = 0;
    lbus(0, REG_STATUS, 0, q, lat); check(q[0] == 0 && q[1] == 1, "busy, not ready after new trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
