// opt_mainm: one optical channel of the OPT-PLC logic.
//
// Chains the channel's I/O registers (ch_reg, 100 MHz), the clock-domain
// crossing (opt_datbuffm) and the protocol-side converter (opt_datconvm,
// 80 MHz). The word-stream port at the 80 MHz side goes to the channel's
// OPT-Protocol 2006 controller (com_cnt with its line interface com_if),
// which is outside this block. 'active' is high while an exchange is in
// flight (LED source), 'done' is the channel's interrupt source.
//
// The three-part structure and the clock split follow the block diagram; the
// interfaces between the parts are this design's.
module opt_mainm
  import opt_plc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lbus_req_t p_req,
  output data_t     p_rdata,
  input  lbus_req_t a_req,
  output data_t     a_rdata,
  output logic      active,
  output logic      done,

  input  logic      oclk,
  input  logic      orst_n,
  output logic      tx_valid,
  output data_t     tx_data,
  output logic      tx_last,
  input  logic      tx_ready,
  input  logic      rx_valid,
  input  data_t     rx_data,
  input  logic      rx_last,
  output logic      rx_ready
);
  logic   s_start, s_busy, s_done, d_start, d_rv;
  cmd_t   s_cmd, d_cmd;
  reply_t s_reply, d_reply;

  ch_reg u_ch_reg (
    .clk, .rst_n, .p_req, .p_rdata, .a_req, .a_rdata,
    .start(s_start), .cmd(s_cmd), .busy(s_busy),
    .done_in(s_done), .reply(s_reply), .done
  );

  opt_datbuffm u_buf (
    .clk, .rst_n,
    .s_start, .s_cmd, .s_busy, .s_done, .s_reply,
    .oclk, .orst_n,
    .d_start, .d_cmd, .d_reply_valid(d_rv), .d_reply
  );

  opt_datconvm u_conv (
    .clk(oclk), .rst_n(orst_n),
    .start(d_start), .cmd(d_cmd), .reply_valid(d_rv), .reply(d_reply),
    .tx_valid, .tx_data, .tx_last, .tx_ready,
    .rx_valid, .rx_data, .rx_last, .rx_ready
  );

  assign active = s_busy;
endmodule
