// ch_reg: I/O register area of one optical channel (0x30 bytes, 100 MHz).
//
// Lets a CPU on either local bus run one exchange with the slave board on the
// channel without software on the ARM (a sequence CPU uses it directly):
// fill TX_DATA and TX_LEN, write 1 to CTRL bit 0, wait for STATUS.done (or the
// channel interrupt), read RX_LEN and RX_DATA. Register offsets (bytes):
//   0x00 CTRL     W  bit0 start (ignored while busy)
//   0x02 STATUS   R  bit0 busy, bit1 done, bit2 timeout; write 1 clears bits 2:1
//   0x04 TX_LEN   RW words to send (0..8)
//   0x06 RX_LEN   R  words received
//   0x08-0x16 TX_DATA[0..7] RW     0x18-0x26 RX_DATA[0..7] R
//   0x28 TIMEOUT  RW reply time-out in 256-cycle units of the 80 MHz clock
// Requests must already be qualified for this channel; read data follows one
// clock later. Starting an exchange also clears done and timeout. When both
// buses write one register in the same cycle the PLC value is kept.
//
// That the channel control registers sit in a per-channel I/O register area
// reachable from the PLC bus and the ARM is from the original design, as is the size of
// the area; the register layout is this design's.
module ch_reg
  import opt_plc_pkg::*;
#(
  parameter logic [15:0] TMO_RESET = 16'd128   // 409.6 us at 80 MHz
) (
  input  logic      clk,
  input  logic      rst_n,
  input  lbus_req_t p_req,
  output data_t     p_rdata,
  input  lbus_req_t a_req,
  output data_t     a_rdata,
  // towards opt_datbuffm
  output logic      start,
  output cmd_t      cmd,
  input  logic      busy,
  input  logic      done_in,
  input  reply_t    reply,
  output logic      done        // status.done, interrupt source
);
  logic [5:0] p_off, a_off;
  assign p_off = {iora_offset(p_req.addr)};
  assign a_off = {iora_offset(a_req.addr)};

  logic [3:0]  tx_len;
  data_t       tx_data [MAX_WORDS];
  frame_t      rx;
  logic        timeout;
  data_t       tmo;

  function automatic logic is_wr(logic rw, logic [5:0] off, logic [5:0] o);
    return rw && (off & 6'h3E) == o;
  endfunction

  logic p_go, a_go;
  assign p_go  = is_wr(p_req.req && p_req.we, p_off, IO_CTRL) && p_req.wdata[0];
  assign a_go  = is_wr(a_req.req && a_req.we, a_off, IO_CTRL) && a_req.wdata[0];
  assign start = (p_go || a_go) && !busy;

  always_comb begin
    cmd.tmo     = tmo;
    cmd.frm.len = tx_len;
    for (int i = 0; i < MAX_WORDS; i++) cmd.frm.data[i] = tx_data[i];
  end

  function automatic data_t rd(logic [5:0] off);
    logic [5:0] o;
    o = off & 6'h3E;
    if (o == IO_STATUS)  return {13'd0, timeout, done, busy};
    if (o == IO_TX_LEN)  return data_t'(tx_len);
    if (o == IO_RX_LEN)  return data_t'(rx.len);
    if (o >= IO_TX_DATA && o < IO_RX_DATA) return tx_data[3'((o - IO_TX_DATA) >> 1)];
    if (o >= IO_RX_DATA && o < IO_TIMEOUT) return rx.data[3'((o - IO_RX_DATA) >> 1)];
    if (o == IO_TIMEOUT) return tmo;
    return '0;
  endfunction

  // next values of the RW registers: ARM write first, PLC write second, so
  // the PLC wins a same-register collision
  logic [3:0] tx_len_d;
  data_t      tx_data_d [MAX_WORDS];
  data_t      tmo_d;

  always_comb begin
    tx_len_d = tx_len;
    tmo_d    = tmo;
    for (int i = 0; i < MAX_WORDS; i++) tx_data_d[i] = tx_data[i];
    if (a_req.req && a_req.we) begin
      if ({a_off[5:1], 1'b0} == IO_TX_LEN)
        tx_len_d = (a_req.wdata > 16'(MAX_WORDS)) ? 4'(MAX_WORDS) : a_req.wdata[3:0];
      if ({a_off[5:1], 1'b0} == IO_TIMEOUT) tmo_d = a_req.wdata;
      if (a_off >= IO_TX_DATA && a_off < IO_RX_DATA)
        tx_data_d[3'((a_off - IO_TX_DATA) >> 1)] = a_req.wdata;
    end
    if (p_req.req && p_req.we) begin
      if ({p_off[5:1], 1'b0} == IO_TX_LEN)
        tx_len_d = (p_req.wdata > 16'(MAX_WORDS)) ? 4'(MAX_WORDS) : p_req.wdata[3:0];
      if ({p_off[5:1], 1'b0} == IO_TIMEOUT) tmo_d = p_req.wdata;
      if (p_off >= IO_TX_DATA && p_off < IO_RX_DATA)
        tx_data_d[3'((p_off - IO_TX_DATA) >> 1)] = p_req.wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_len  <= '0;
      for (int i = 0; i < MAX_WORDS; i++) tx_data[i] <= '0;
      tmo     <= TMO_RESET;
      rx      <= '0;
      done    <= 1'b0;
      timeout <= 1'b0;
      p_rdata <= '0;
      a_rdata <= '0;
    end else begin
      tx_len <= tx_len_d;
      tmo    <= tmo_d;
      for (int i = 0; i < MAX_WORDS; i++) tx_data[i] <= tx_data_d[i];
      if (is_wr(p_req.req && p_req.we, p_off, IO_STATUS) && p_req.wdata[1] ||
          is_wr(a_req.req && a_req.we, a_off, IO_STATUS) && a_req.wdata[1]) done <= 1'b0;
      if (is_wr(p_req.req && p_req.we, p_off, IO_STATUS) && p_req.wdata[2] ||
          is_wr(a_req.req && a_req.we, a_off, IO_STATUS) && a_req.wdata[2]) timeout <= 1'b0;
      if (start) begin
        done    <= 1'b0;
        timeout <= 1'b0;
      end
      if (done_in) begin
        rx      <= reply.frm;
        done    <= 1'b1;
        timeout <= reply.timeout;
      end
      if (p_req.req) p_rdata <= rd(p_off);
      if (a_req.req) a_rdata <= rd(a_off);
    end
  end

endmodule
