// com_cnt_model: behavioural stand-in for one channel's OPT-Protocol
// controller and the slave board behind it, for simulation only.
// It accepts a command word stream (tx_*; tx_ready is withheld at random when
// STALL is set), waits DELAY clock cycles (the round trip over the fibre) and
// answers with one reply word per command word, each the bitwise complement of
// the command word, the last marked rx_last. A command whose first word is
// 16'hDEAD gets no reply (a slave that does not answer). rx_ready is honoured.
module com_cnt_model #(
  parameter int unsigned DELAY = 40,
  parameter bit          STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_valid,
  input  logic [15:0] tx_data,
  input  logic        tx_last,
  output logic        tx_ready,
  output logic        rx_valid,
  output logic [15:0] rx_data,
  output logic        rx_last,
  input  logic        rx_ready,
  output int          n_frames,     // command frames received
  output int          n_stalls      // cycles with tx_valid and !tx_ready
);
  logic [15:0] buf_q [16];
  int nw, nwr, ri, wait_c;
  logic replying;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_ready <= 1'b0; rx_valid <= 1'b0; rx_data <= '0; rx_last <= 1'b0;
      nw <= 0; nwr <= 0; ri <= 0; wait_c <= 0; replying <= 1'b0;
      n_frames <= 0; n_stalls <= 0;
    end else begin
      tx_ready <= !replying && (STALL ? ($urandom_range(3) != 0) : 1'b1);
      if (tx_valid && !tx_ready) n_stalls <= n_stalls + 1;
      if (tx_valid && tx_ready) begin
        if (nw < 16) buf_q[nw] <= tx_data;
        nw <= nw + 1;
        if (tx_last) begin
          n_frames <= n_frames + 1;
          if ((nw == 0) ? (tx_data == 16'hDEAD) : (buf_q[0] == 16'hDEAD)) begin
            nw <= 0;                       // silent slave
          end else begin
            replying <= 1'b1;
            tx_ready <= 1'b0;
            wait_c   <= DELAY;
            ri       <= 0;
            nwr      <= (nw + 1 > 16) ? 16 : nw + 1;
          end
        end
      end
      if (replying) begin
        if (wait_c > 0) wait_c <= wait_c - 1;
        else if (!rx_valid || rx_ready) begin
          if (ri == nwr) begin
            rx_valid <= 1'b0; rx_last <= 1'b0; replying <= 1'b0; nw <= 0;
          end else begin
            rx_valid <= 1'b1;
            rx_data  <= ~buf_q[ri];
            rx_last  <= (ri + 1 == nwr);
            ri       <= ri + 1;
          end
        end
      end
    end
  end
endmodule
