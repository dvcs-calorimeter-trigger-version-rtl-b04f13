// tb_vme_ctrl: VME slave against a VME master model and a local bus memory.
// The master model drives AS, DS, AM and the address with set-up delays of a
// few clock periods and waits for DTACK. Checked: D32 writes and reads in
// both A24 data modes, a BLT read and a BLT write of several words with the
// address stepping by 4, the local bus addresses that result, and that
// accesses with a foreign base address, a foreign address modifier or a
// 16-bit width get no DTACK.
module tb_vme_ctrl;
  import dvcs_trig_pkg::*;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, write_n = 1, lword_n = 0;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 6'h39;
  logic [23:1] va = '0;
  logic [31:0] vd_i = '0, vd_o;
  logic oe, dtack_n;
  loc_req_t req;
  logic ack;
  logic [31:0] rdata;
  logic [31:0] mem [16384];
  int checks = 0, failures = 0, nreq = 0;

  vme_ctrl #(.BASE_ADDR(8'h10)) dut (.clk, .rst_n, .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_lword_n(lword_n), .vme_am(am), .vme_addr(va),
    .vme_data_i(vd_i), .vme_data_o(vd_o), .vme_data_oe(oe), .vme_dtack_n(dtack_n),
    .loc_req(req), .loc_ack(ack), .loc_rdata(rdata));

  always #5 clk = ~clk;

  // local bus memory, answering 1 to 4 cycles after the request
  initial begin
    ack = 0; rdata = 0;
    forever begin
      @(posedge clk);
      if (req.valid) begin
        nreq++;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        if (req.we) mem[req.addr[15:2]] <= req.wdata;
        rdata <= mem[req.addr[15:2]];
        ack   <= 1'b1;
        @(posedge clk);
        ack   <= 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_dtack(input logic lvl, output bit ok);
    int n = 0;
    while (dtack_n != lvl && n < 200) begin #5; n++; end
    ok = (dtack_n == lvl);
  endtask

  // block: number of words (1 = single cycle); data in/out through buf
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
      if (!wr) begin
        if (!oe) ok = 0;
        buffer[i] = vd_o;
      end
      #10 ds_n = 2'b11;
      wait_dtack(1'b1, got);
      if (!got) ok = 0;
    end
    ds_n = 2'b11;
    #20 as_n = 1;
    #30;
  endtask

  initial begin
    logic [31:0] b [64];
    bit ok;
    int n0;
    for (int i = 0; i < 16384; i++) mem[i] = 32'hDEAD0000 | i;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // D32 single write then read, both A24 data modifiers
    b[0] = 32'h1234_5678;
    vme_cycle(24'h10_0040, 6'h39, 1, 1, b, ok);
    check(ok, "single write acknowledged");
    check(mem[14'h0010] == 32'h1234_5678, "write reached local address 0x40");
    b[0] = 0;
    vme_cycle(24'h10_0040, 6'h3D, 0, 1, b, ok);
    check(ok && b[0] == 32'h1234_5678, $sformatf("single read %h", b[0]));
    vme_cycle(24'h10_0400, 6'h39, 0, 1, b, ok);
    check(ok && b[0] == (32'hDEAD0000 | 32'h100), "single read of untouched word");
    // BLT read of 32 words
    vme_cycle(24'h10_0800, 6'h3B, 0, 32, b, ok);
    check(ok, "BLT read acknowledged");
    for (int i = 0; i < 32; i++)
      check(b[i] == (32'hDEAD0000 | (32'h200 + i)), $sformatf("BLT word %0d = %h", i, b[i]));
    // BLT write of 8 words, supervisory modifier
    for (int i = 0; i < 8; i++) b[i] = 32'hA5A50000 + i;
    vme_cycle(24'h10_1000, 6'h3F, 1, 8, b, ok);
    check(ok, "BLT write acknowledged");
    for (int i = 0; i < 8; i++)
      check(mem[32'h400 + i] == 32'hA5A50000 + i, $sformatf("BLT write word %0d", i));
    // accesses that must be ignored
    n0 = nreq;
    vme_cycle(24'h20_0040, 6'h39, 0, 1, b, ok);
    check(!ok, "other base address ignored");
    vme_cycle(24'h10_0040, 6'h09, 0, 1, b, ok);
    check(!ok, "A32 modifier ignored");
    lword_n = 1;
    vme_cycle(24'h10_0040, 6'h39, 0, 1, b, ok);
    lword_n = 0;
    check(!ok, "D16 access ignored");
    check(nreq == n0, "ignored accesses made no local request");
    check(dtack_n && !oe, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
