// plc_ifm: bridge from the PLC-side Avalon bus (32 MHz) to the plc-local bus
// (100 MHz).
//
// The vendor's PLC-AVALON interface presents each PLC bus access as an Avalon
// memory-mapped read or write with 16-bit data and a halfword address. This
// block holds the Avalon master with waitrequest, passes the access to the
// 100 MHz domain through a request toggle (two-flop synchronizer), issues it as
// one single-cycle plc-local request, takes the read data one clock later and
// returns it through an acknowledge toggle. The Avalon access completes in the
// cycle waitrequest is low, with readdata valid in that cycle. One access is
// in flight at a time; each costs about 3 clk_plc plus 4 clk cycles.
//
// The Avalon-to-plc-local conversion and the 32 MHz / 100 MHz split are from
// the block diagram; the handshake and the Avalon signal subset are this
// design's choices.
module plc_ifm
  import opt_plc_pkg::*;
(
  // Avalon-MM slave, PLC-AVALON I/F clock
  input  logic        aclk,
  input  logic        arst_n,
  input  logic [ADDR_W-2:0] avs_address,     // halfword address
  input  logic        avs_read,
  input  logic        avs_write,
  input  data_t       avs_writedata,
  output data_t       avs_readdata,
  output logic        avs_waitrequest,
  // plc-local bus master, 100 MHz
  input  logic        clk,
  input  logic        rst_n,
  output lbus_req_t   m_req,
  input  data_t       m_rdata
);
  typedef enum logic [1:0] {A_IDLE, A_WAIT, A_DONE} ast_e;
  ast_e      ast;
  lbus_req_t hold;         // written in aclk, read in clk while stable
  data_t     rd_hold;      // written in clk, read in aclk while stable
  logic      req_tgl, ack_tgl;
  logic      ack_1, ack_2, ack_3;
  logic      req_1, req_2, req_3;
  logic      m_req_q;

  // ---- Avalon side ----
  always_ff @(posedge aclk or negedge arst_n) begin
    if (!arst_n) begin
      ast <= A_IDLE; hold <= '0; req_tgl <= 1'b0;
      ack_1 <= 1'b0; ack_2 <= 1'b0; ack_3 <= 1'b0;
      avs_readdata <= '0;
    end else begin
      ack_1 <= ack_tgl; ack_2 <= ack_1; ack_3 <= ack_2;
      unique case (ast)
        A_IDLE: if (avs_read || avs_write) begin
          hold.req   <= 1'b1;
          hold.we    <= avs_write;
          hold.addr  <= {avs_address, 1'b0};
          hold.wdata <= avs_writedata;
          req_tgl    <= ~req_tgl;
          ast        <= A_WAIT;
        end
        A_WAIT: if (ack_2 != ack_3) begin
          avs_readdata <= rd_hold;
          ast          <= A_DONE;
        end
        A_DONE: ast <= A_IDLE;
        default: ast <= A_IDLE;
      endcase
    end
  end
  assign avs_waitrequest = (ast != A_DONE);

  // ---- plc-local side ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_1 <= 1'b0; req_2 <= 1'b0; req_3 <= 1'b0;
      m_req_q <= 1'b0; rd_hold <= '0; ack_tgl <= 1'b0;
    end else begin
      req_1 <= req_tgl; req_2 <= req_1; req_3 <= req_2;
      m_req_q <= (req_2 != req_3);
      if (m_req_q) begin
        rd_hold <= m_rdata;
        ack_tgl <= ~ack_tgl;
      end
    end
  end

  always_comb begin
    m_req     = hold;
    m_req.req = (req_2 != req_3);
  end
endmodule
