// tb_cal_chan_map: checks the channel map against the connector tables.
// The expected map is built forward, board by board: mezzanine column j
// carries channels 16*(j/2) + 4*(j%2) + 0..3 on its L board and the same +8
// on its H board; columns 0-9, 10-17 and 18-25 belong to FPGAs 0, 1 and 2,
// whose first channels are 0, 80 and 144. Every channel number 0-255 is then
// put through the module.
module tb_cal_chan_map;
  logic [7:0] ch;
  logic valid, half;
  logic [1:0] fpga, sub;
  logic [6:0] local_idx;
  logic [4:0] column, local_board;
  logic [5:0] board;
  int checks = 0, failures = 0;

  int exp_col [256], exp_half [256], exp_sub [256], exp_fpga [256];
  int seen [256];

  cal_chan_map dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int c, f, base, cb;
    for (int i = 0; i < 256; i++) seen[i] = 0;
    for (int j = 0; j < 26; j++)
      for (int h = 0; h < 2; h++)
        for (int k = 0; k < 4; k++) begin
          c = 16 * (j / 2) + 4 * (j % 2) + 8 * h + k;
          seen[c]++;
          exp_col[c] = j; exp_half[c] = h; exp_sub[c] = k;
          exp_fpga[c] = (j < 10) ? 0 : (j < 18) ? 1 : 2;
        end
    for (int i = 0; i < 208; i++) check(seen[i] == 1, $sformatf("table covers channel %0d once", i));
    for (int i = 0; i < 256; i++) begin
      ch = 8'(i);
      #1;
      check(valid == (i < 208), $sformatf("valid %0d", i));
      if (i < 208) begin
        f    = exp_fpga[i];
        base = (f == 0) ? 0 : (f == 1) ? 80 : 144;
        cb   = (f == 0) ? 0 : (f == 1) ? 10 : 18;
        check(int'(column) == exp_col[i] && int'(half) == exp_half[i] &&
              int'(sub) == exp_sub[i], $sformatf("position of channel %0d", i));
        check(int'(fpga) == f, $sformatf("fpga of channel %0d", i));
        check(int'(local_idx) == i - base, $sformatf("local index of channel %0d", i));
        check(int'(board) == 2 * exp_col[i] + exp_half[i], $sformatf("board of %0d", i));
        check(int'(local_board) == 2 * (exp_col[i] - cb) + exp_half[i],
              $sformatf("local board of %0d", i));
      end
    end
    // spot values printed in the tables
    ch = 8'd11;  #1; check(column == 0 && half == 1 && sub == 3, "channel 11 is 0H");
    ch = 8'd84;  #1; check(fpga == 1 && local_idx == 4, "channel 84 is FPGA2 local 4");
    ch = 8'd207; #1; check(fpga == 2 && local_idx == 63 && column == 25 && half == 1,
                           "channel 207 is FPGA3 local 63 on 25H");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
