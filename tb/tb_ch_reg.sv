// tb_ch_reg: register read/write from both buses, TX_LEN clamping, the
// command presented to the crossing, start only when idle, status bits
// (busy, done, timeout; write-1-to-clear), reply capture into RX registers,
// and PLC priority on a same-register collision.
module tb_ch_reg;
  import opt_plc_pkg::*;
  localparam addr_t B = 13'h0160;          // CH3 I/O register area
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lbus_req_t p, a;
  data_t pr, ar;
  logic start, busy, done_in, done;
  cmd_t cmd; reply_t reply;
  int n_start = 0;
  int checks = 0, failures = 0;

  ch_reg dut (.clk, .rst_n, .p_req(p), .p_rdata(pr), .a_req(a), .a_rdata(ar),
              .start, .cmd, .busy, .done_in, .reply, .done);

  always @(posedge clk) if (start) n_start++;

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
    data_t d;
    p = '0; a = '0; busy = 0; done_in = 0; reply = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(0, IO_TIMEOUT, d); chk("timeout reset value", d, 128);
    rd(1, IO_STATUS, d);  chk("status after reset", d, 0);
    for (int i = 0; i < 8; i++) wr(i % 2, 6'(IO_TX_DATA + 2*i), data_t'(16'h1000 * i + 16'h0123));
    for (int i = 0; i < 8; i++) begin
      rd(!(i % 2), 6'(IO_TX_DATA + 2*i), d); chk("tx data readback", d, 16'h1000 * i + 16'h0123);
    end
    wr(0, IO_TX_LEN, 16'd20); rd(1, IO_TX_LEN, d); chk("tx len clamped", d, 8);
    wr(1, IO_TX_LEN, 16'd5);  rd(0, IO_TX_LEN, d); chk("tx len", d, 5);
    wr(0, IO_TIMEOUT, 16'd77);
    // command as seen by the crossing
    chk("cmd.len", cmd.frm.len, 5);
    chk("cmd.tmo", cmd.tmo, 77);
    chk("cmd.data[4]", cmd.frm.data[4], 16'h4123);
    // start from the PLC
    wr(0, IO_CTRL, 16'h0001);
    chk("one start pulse", n_start, 1);
    busy = 1;
    rd(1, IO_STATUS, d); chk("busy", d, 16'h0001);
    wr(1, IO_CTRL, 16'h0001);
    chk("no start while busy", n_start, 1);
    wr(0, IO_CTRL, 16'h0000);
    chk("bit0=0 does not start", n_start, 1);
    // reply arrives
    reply = '0;
    reply.frm.len = 3;
    reply.frm.data[0] = 16'hAAAA; reply.frm.data[1] = 16'hBBBB; reply.frm.data[2] = 16'hCCCC;
    @(negedge clk); done_in = 1; busy = 0; @(negedge clk); done_in = 0;
    chk("done output", done, 1);
    rd(0, IO_STATUS, d); chk("status done", d, 16'h0002);
    rd(0, IO_RX_LEN, d); chk("rx len", d, 3);
    rd(1, 6'(IO_RX_DATA + 2), d); chk("rx word 1", d, 16'hBBBB);
    rd(0, 6'(IO_RX_DATA + 4), d); chk("rx word 2", d, 16'hCCCC);
    wr(1, IO_RX_DATA, 16'h1234); rd(0, IO_RX_DATA, d); chk("rx read-only", d, 16'hAAAA);
    wr(1, IO_STATUS, 16'h0002); rd(0, IO_STATUS, d); chk("done cleared", d, 0);
    // time-out reply
    wr(1, IO_CTRL, 16'h0001); chk("second start", n_start, 2);
    reply = '0; reply.timeout = 1;
    @(negedge clk); done_in = 1; @(negedge clk); done_in = 0;
    rd(0, IO_STATUS, d); chk("status timeout+done", d, 16'h0006);
    wr(0, IO_STATUS, 16'h0004); rd(0, IO_STATUS, d); chk("timeout cleared", d, 16'h0002);
    wr(0, IO_CTRL, 16'h0001); rd(0, IO_STATUS, d); chk("start clears done", d, 16'h0000);
    // collision on TX_LEN: PLC wins
    @(negedge clk);
    p = '{1'b1, 1'b1, B + 13'(IO_TX_LEN), 16'd2};
    a = '{1'b1, 1'b1, B + 13'(IO_TX_LEN), 16'd7};
    @(negedge clk); p = '0; a = '0;
    rd(1, IO_TX_LEN, d); chk("collision PLC wins", d, 2);
    rd(0, 6'h2C, d); chk("reserved reads 0", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
