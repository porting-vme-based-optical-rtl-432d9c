// tb_opt_mainm: one channel end to end across both clocks: frames written
// into the I/O registers go to the slave model and the complemented words
// come back into RX_DATA; a silent slave gives a time-out; 'active' covers the
// exchange. Requests come from both buses.
module tb_opt_mainm;
  import opt_plc_pkg::*;
  localparam addr_t B = 13'h0100;          // CH1
  logic clk = 0, oclk = 0, rst_n = 0, orst_n = 0;
  always #5 clk = ~clk;
  always #6.25 oclk = ~oclk;
  lbus_req_t p, a;
  data_t pr, ar, txd, rxd;
  logic active, done, txv, txl, txr, rxv, rxl, rxr;
  int nf, ns;
  int checks = 0, failures = 0;

  opt_mainm dut (.clk, .rst_n, .p_req(p), .p_rdata(pr), .a_req(a), .a_rdata(ar), .active, .done,
    .oclk, .orst_n, .tx_valid(txv), .tx_data(txd), .tx_last(txl), .tx_ready(txr),
    .rx_valid(rxv), .rx_data(rxd), .rx_last(rxl), .rx_ready(rxr));
  com_cnt_model #(.DELAY(50)) slave (.clk(oclk), .rst_n(orst_n), .tx_valid(txv), .tx_data(txd),
    .tx_last(txl), .tx_ready(txr), .rx_valid(rxv), .rx_data(rxd), .rx_last(rxl),
    .rx_ready(rxr), .n_frames(nf), .n_stalls(ns));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(bit arm, logic [5:0] off, data_t d);
    @(negedge clk);
    if (arm) a = '{1'b1, 1'b1, B + 13'(off), d}; else p = '{1'b1, 1'b1, B + 13'(off), d};
    @(negedge clk);
    a = '0; p = '0;
  endtask
  task automatic rd(bit arm, logic [5:0] off, output data_t d);
    @(negedge clk);
    if (arm) a = '{1'b1, 1'b0, B + 13'(off), '0}; else p = '{1'b1, 1'b0, B + 13'(off), '0};
    @(negedge clk);
    a = '0; p = '0;
    d = arm ? ar : pr;
  endtask

  initial begin
    data_t d, w [8]; int len, act;
    p = '0; a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1; orst_n = 1;
    for (int k = 0; k < 10; k++) begin
      bit bus;
      bus = k[0];
      len = $urandom_range(1, 8);
      for (int i = 0; i < len; i++) begin
        w[i] = data_t'($urandom);
        if (i == 0 && w[0] == 16'hDEAD) w[0] = 0;
        wr(bus, 6'(IO_TX_DATA + 2*i), w[i]);
      end
      wr(bus, IO_TX_LEN, data_t'(len));
      wr(bus, IO_CTRL, 16'h0001);
      act = 0;
      while (!done) begin @(negedge clk); if (active) act++; end
      checks++; if (act < 40) begin failures++; $display("FAIL active only %0d cycles", act); end
      rd(!bus, IO_STATUS, d); chk("status done, no time-out", d, 16'h0002);
      rd(bus, IO_RX_LEN, d);  chk("rx len", d, len);
      for (int i = 0; i < len; i++) begin
        rd(!bus, 6'(IO_RX_DATA + 2*i), d); chk("rx word", d, int'(data_t'(~w[i])));
      end
    end
    chk("frames at slave", nf, 10);
    // silent slave, time-out 2 x 256 cycles of 80 MHz = 6.4 us
    wr(0, IO_TX_DATA, 16'hDEAD);
    wr(0, IO_TX_LEN, 16'd1);
    wr(0, IO_TIMEOUT, 16'd2);
    wr(0, IO_CTRL, 16'h0001);
    act = 0;
    while (!done) begin @(negedge clk); act++; end
    rd(0, IO_STATUS, d); chk("time-out status", d, 16'h0006);
    checks++;
    if (act < 640 || act > 660) begin failures++; $display("FAIL time-out after %0d clk cycles", act); end
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
