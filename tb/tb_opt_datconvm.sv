// tb_opt_datconvm: command frames of 1..8 words go out as a word stream
// (with back-pressure), the reply stream comes back into the reply frame, a
// silent slave ends in a time-out after tmo*256 cycles, and a zero-length
// command only waits.
module tb_opt_datconvm;
  import opt_plc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;   // 80 MHz
  logic start, rv, txv, txl, txr, rxv, rxl, rxr;
  cmd_t cmd; reply_t rep; data_t txd, rxd;
  int nf, ns;
  int checks = 0, failures = 0;

  opt_datconvm dut (.clk, .rst_n, .start, .cmd, .reply_valid(rv), .reply(rep),
    .tx_valid(txv), .tx_data(txd), .tx_last(txl), .tx_ready(txr),
    .rx_valid(rxv), .rx_data(rxd), .rx_last(rxl), .rx_ready(rxr));
  com_cnt_model #(.DELAY(30), .STALL(1)) slave (.clk, .rst_n, .tx_valid(txv), .tx_data(txd),
    .tx_last(txl), .tx_ready(txr), .rx_valid(rxv), .rx_data(rxd), .rx_last(rxl),
    .rx_ready(rxr), .n_frames(nf), .n_stalls(ns));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic run(input cmd_t c, output reply_t r, output int cycles);
    @(negedge clk);
    cmd = c; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!rv) begin @(negedge clk); cycles++; end
    r = rep;
  endtask

  initial begin
    cmd_t c; reply_t r; int cy;
    start = 0; cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      c = '0;
      c.tmo = 16'd4;
      c.frm.len = 4'($urandom_range(1, MAX_WORDS));
      for (int i = 0; i < MAX_WORDS; i++) c.frm.data[i] = data_t'($urandom);
      if (c.frm.data[0] == 16'hDEAD) c.frm.data[0] = 16'h0;
      run(c, r, cy);
      chk("no time-out", r.timeout, 0);
      chk("reply length", r.frm.len, c.frm.len);
      for (int i = 0; i < c.frm.len; i++) chk("reply word", r.frm.data[i], int'(data_t'(~c.frm.data[i])));
    end
    chk("frames seen by slave", nf, 40);
    checks++; if (ns == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    // silent slave: time-out after tmo*256 cycles from start
    c = '0; c.tmo = 16'd2; c.frm.len = 2; c.frm.data[0] = 16'hDEAD;
    run(c, r, cy);
    chk("time-out flag", r.timeout, 1);
    chk("no words", r.frm.len, 0);
    checks++;
    if (cy < 511 || cy > 515) begin failures++; $display("FAIL time-out after %0d cycles", cy); end
    // tmo 0 counts as 1
    c.tmo = 16'd0;
    run(c, r, cy);
    checks++;
    if (cy < 255 || cy > 259) begin failures++; $display("FAIL tmo=0 time-out after %0d", cy); end
    // zero-length command sends nothing and times out
    c = '0; c.tmo = 16'd1;
    run(c, r, cy);
    chk("zero-length: time-out", r.timeout, 1);
    chk("zero-length: nothing sent", nf, 42);
    // still works afterwards
    c = '0; c.tmo = 16'd8; c.frm.len = 3; c.frm.data[0] = 16'h1234; c.frm.data[1] = 16'h0F0F;
    c.frm.data[2] = 16'hFFFF;
    run(c, r, cy);
    chk("after time-out: len", r.frm.len, 3);
    chk("after time-out: w0", r.frm.data[0], 16'hEDCB);
    chk("after time-out: w2", r.frm.data[2], 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
