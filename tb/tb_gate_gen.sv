// tb_gate_gen: checks the gate timing for a set of delays and widths.
// After the trigger rises the gate must open delay+4 clock edges later
// (2 synchroniser stages, edge detection, delay+1 waiting cycles) and stay
// open max(width,1) cycles; gate_end follows the closing by one cycle, and a
// trigger during the gate is reported as dropped and starts nothing.
module tb_gate_gen;
  logic clk = 0, rst_n = 0, l1 = 0;
  logic [15:0] delay, width;
  logic gate, busy, gate_end, dropped;
  int checks = 0, failures = 0;

  gate_gen dut (.clk, .rst_n, .l1_trig(l1), .delay, .width, .gate, .busy,
                .gate_end, .trig_dropped(dropped));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int d, input int w, input bit retrig);
    int n, len, drops;
    delay = 16'(d); width = 16'(w);
    @(negedge clk) l1 = 1;
    n = 0;
    while (!gate) begin @(posedge clk); #1; n++; if (n > 1000) break; end
    check(n == d + 4, $sformatf("delay %0d: gate after %0d edges", d, n));
    l1 = 0;
    len = 0; drops = 0;
    while (gate) begin
      if (retrig && len == 0)
        fork begin
          @(negedge clk) ;
          @(negedge clk) l1 = 1;
          @(negedge clk) ;
          @(negedge clk) l1 = 0;
        end join_none
      @(posedge clk); #1; len++;
      if (dropped) drops++;
      if (len > 1000) break;
    end
    check(len == ((w == 0) ? 1 : w),
          $sformatf("width %0d: gate lasted %0d", w, len));
    check(gate_end == 1'b1, "gate_end after closing");
    @(posedge clk); #1;
    check(gate_end == 1'b0 && !busy, "gate_end is one cycle, idle again");
    if (retrig) begin
      for (int i = 0; i < 6; i++) begin @(posedge clk); #1; if (dropped) drops++; end
      check(drops == 1, $sformatf("retrigger dropped once (%0d)", drops));
      check(!gate && !busy, "dropped trigger started no gate");
    end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    delay = 0; width = 6;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!gate && !busy, "idle after reset");
    one(0, 6, 0);
    one(3, 1, 0);
    one(10, 12, 0);
    one(2, 0, 0);
    one(1, 20, 1);
    for (int i = 0; i < 10; i++) one($urandom_range(0, 30), $urandom_range(1, 40), 0);
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
