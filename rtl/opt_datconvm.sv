// opt_datconvm: protocol-clock side of an optical channel (80 MHz).
//
// Turns a command frame into a word stream for the OPT-Protocol controller
// (com_cnt) and collects the controller's reply stream into a reply frame.
// On start it sends frm.len words (tx_valid/tx_ready, tx_last on the final
// word), then accepts reply words (rx_valid, rx_last) into up to MAX_WORDS
// slots (further words are dropped) until rx_last. A counter started with the
// command ends the exchange if no complete reply arrives within tmo x 256
// cycles (tmo = 0 is taken as 1); the reply then carries timeout = 1 and the
// words received so far. reply_valid is a one-cycle pulse. rx_ready is high
// except while sending, so late words after a time-out are drained.
//
// The block name comes from the block diagram. Its word-stream port towards
// com_cnt is this design's stand-in for the interface of the reused protocol
// controller, which the original design does not describe.
module opt_datconvm
  import opt_plc_pkg::*;
(
  input  logic   clk,          // 80 MHz protocol clock
  input  logic   rst_n,
  input  logic   start,
  input  cmd_t   cmd,
  output logic   reply_valid,
  output reply_t reply,
  // towards com_cnt
  output logic   tx_valid,
  output data_t  tx_data,
  output logic   tx_last,
  input  logic   tx_ready,
  input  logic   rx_valid,
  input  data_t  rx_data,
  input  logic   rx_last,
  output logic   rx_ready
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;
  state_e      st;
  cmd_t        c;
  logic [3:0]  tx_i;
  logic [3:0]  rx_n;
  logic [23:0] tmr;
  logic [23:0] tmr_lim;

  assign tmr_lim  = {(c.tmo == '0) ? 16'd1 : c.tmo, 8'd0};
  assign tx_valid = (st == S_SEND);
  assign tx_data  = c.frm.data[tx_i[2:0]];
  assign tx_last  = (st == S_SEND) && (tx_i + 4'd1 >= c.frm.len);
  assign rx_ready = (st != S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; tx_i <= '0; rx_n <= '0; tmr <= '0;
      reply_valid <= 1'b0; reply <= '0;
    end else begin
      reply_valid <= 1'b0;
      if (st != S_IDLE) tmr <= tmr + 24'd1;
      unique case (st)
        S_IDLE: if (start) begin
          c    <= cmd;
          tx_i <= '0;
          rx_n <= '0;
          tmr  <= '0;
          reply.frm.data <= '0;
          st   <= (cmd.frm.len == '0) ? S_WAIT : S_SEND;
        end
        S_SEND: begin
          if (tx_ready) begin
            tx_i <= tx_i + 4'd1;
            if (tx_last) st <= S_WAIT;
          end
          if (tmr + 24'd1 >= tmr_lim) begin
            reply.timeout <= 1'b1; reply.frm.len <= '0;
            reply_valid <= 1'b1; st <= S_IDLE;
          end
        end
        S_WAIT: begin
          if (rx_valid) begin
            if (rx_n < 4'(MAX_WORDS)) begin
              reply.frm.data[rx_n[2:0]] <= rx_data;
              rx_n <= rx_n + 4'd1;
            end
            if (rx_last) begin
              reply.timeout  <= 1'b0;
              reply.frm.len  <= (rx_n < 4'(MAX_WORDS)) ? rx_n + 4'd1 : rx_n;
              reply_valid    <= 1'b1;
              st             <= S_IDLE;
            end
          end
          if (!(rx_valid && rx_last) && tmr + 24'd1 >= tmr_lim) begin
            reply.timeout <= 1'b1; reply.frm.len <= rx_n;
            reply_valid <= 1'b1; st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
