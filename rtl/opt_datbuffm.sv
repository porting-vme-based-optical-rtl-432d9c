// opt_datbuffm: clock-domain crossing between a channel's registers (100 MHz,
// clk) and its protocol controller (80 MHz, oclk).
//
// Carries one command (cmd_t) from clk to oclk and one reply (reply_t) back,
// with a toggle handshake. s_start (clk) stores the command in a holding
// register and flips a request toggle; in oclk the toggle passes two
// flip-flops, its edge gives a one-cycle d_start, and d_cmd is read from the
// holding register, which is stable by then. d_reply_valid stores the reply in
// a second holding register and flips the acknowledge toggle, which returns
// through two flip-flops and gives s_done with s_reply. s_busy is high from
// s_start to s_done; a start while busy is ignored. Latency: d_start follows
// s_start by 3 oclk edges at most; s_done follows d_reply_valid by 3 clk
// edges (plus the phase difference).
//
// That a synchronisation module joins the 80 MHz protocol controllers to the
// 100 MHz buses is from the original design; the toggle handshake is this design's.
module opt_datbuffm
  import opt_plc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_start,
  input  cmd_t   s_cmd,
  output logic   s_busy,
  output logic   s_done,
  output reply_t s_reply,

  input  logic   oclk,
  input  logic   orst_n,
  output logic   d_start,
  output cmd_t   d_cmd,
  input  logic   d_reply_valid,
  input  reply_t d_reply
);
  cmd_t   cmd_hold;      // written in clk, read in oclk
  reply_t rsp_hold;      // written in oclk, read in clk
  logic   ack_tgl;
  logic   req_d1, req_d2, req_d3;

  // ---- clk domain ----
  logic   req_tgl;
  logic   ack_s1, ack_s2, ack_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_hold <= '0;
      req_tgl  <= 1'b0;
      s_busy   <= 1'b0;
      ack_s1 <= 1'b0; ack_s2 <= 1'b0; ack_s3 <= 1'b0;
      s_done   <= 1'b0;
      s_reply  <= '0;
    end else begin
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      ack_s3 <= ack_s2;
      s_done <= 1'b0;
      if (s_start && !s_busy) begin
        cmd_hold <= s_cmd;
        req_tgl  <= ~req_tgl;
        s_busy   <= 1'b1;
      end else if (ack_s2 != ack_s3) begin
        s_reply  <= rsp_hold;
        s_done   <= 1'b1;
        s_busy   <= 1'b0;
      end
    end
  end

  // ---- oclk domain ----

  always_ff @(posedge oclk or negedge orst_n) begin
    if (!orst_n) begin
      req_d1 <= 1'b0; req_d2 <= 1'b0; req_d3 <= 1'b0;
      d_start  <= 1'b0;
      d_cmd    <= '0;
      rsp_hold <= '0;
      ack_tgl  <= 1'b0;
    end else begin
      req_d1  <= req_tgl;
      req_d2  <= req_d1;
      req_d3  <= req_d2;
      d_start <= (req_d2 != req_d3);
      if (req_d2 != req_d3) d_cmd <= cmd_hold;
      if (d_reply_valid) begin
        rsp_hold <= d_reply;
        ack_tgl  <= ~ack_tgl;
      end
    end
  end

endmodule
