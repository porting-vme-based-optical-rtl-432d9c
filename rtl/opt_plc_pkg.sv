// opt_plc_pkg: types, address map and register offsets shared by the OPT-PLC
// programmable-logic blocks.
//
// The module is seen from the PLC bus as a 16-bit register space of byte
// addresses 0x0000-0x11FF (13 bits). The area boundaries follow the module's
// published register map:
//   0x0000 module management information (0x0040 reserved)
//   0x0080 common register area (CRA)
//   0x0100 + 0x30*n   I/O register area of optical channel n (n = 0..4)
//   0x01F0 reserved
//   0x0300 descriptor area (DA), common;  0x0580 + 0x280*n  DA of channel n
// Each DA is 0x280 bytes. Its first four halfwords (lock-flag fields) are
// exclusive-control registers; the rest is descriptor RAM.
//
// The layout inside the CRA and inside an I/O register area, and the frame
// format towards the protocol controller, are this design's own choices.
//
// Local bus convention (plc-local and arm-local alike): a request is one cycle
// with req=1; the addressed slave returns read data one clock later. Every
// access completes; there is no wait state on the local buses.
package opt_plc_pkg;

  localparam int unsigned ADDR_W    = 13;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned N_CH      = 5;    // optical channels
  localparam int unsigned N_DA      = 6;    // common DA + one per channel
  localparam int unsigned MAX_WORDS = 8;    // 16-bit words in one command or reply frame

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;    // byte address, bit 0 ignored
    data_t wdata;
  } lbus_req_t;

  // Command frame (100 MHz -> 80 MHz) and reply frame (80 MHz -> 100 MHz).
  typedef struct packed {
    logic [3:0]                  len;   // number of valid words, 0..MAX_WORDS
    logic [MAX_WORDS-1:0][15:0]  data;
  } frame_t;

  typedef struct packed {
    logic [15:0] tmo;                   // reply time-out, units of 256 protocol-clock cycles
    frame_t      frm;
  } cmd_t;

  typedef struct packed {
    logic   timeout;                    // no complete reply in time
    frame_t frm;
  } reply_t;

  // ---------------- address map ----------------
  localparam addr_t MMIA_BASE = 13'h0000;
  localparam addr_t CRA_BASE  = 13'h0080;
  localparam addr_t IORA_BASE = 13'h0100;
  localparam addr_t IORA_SIZE = 13'h0030;
  localparam addr_t DA_BASE   = 13'h0300;
  localparam addr_t DA_SIZE   = 13'h0280;
  localparam addr_t DA_END    = 13'h1200;   // DA_BASE + 6*DA_SIZE
  localparam addr_t DA_LOCK_END = 13'h0008; // DA offsets below are lock registers

  localparam int unsigned DPRAM_WORDS = (N_DA * 'h280) / 2;   // 1920 halfwords

  typedef enum logic [2:0] {
    RG_NONE  = 3'd0,   // reserved: reads 0, writes ignored
    RG_INFO  = 3'd1,   // MMIA + reserved 0x0040-0x007F (external)
    RG_CRA   = 3'd2,
    RG_IORA  = 3'd3,
    RG_SEM   = 3'd4,
    RG_DPRAM = 3'd5
  } region_e;

  // DA number (0 = common, 1..5 = CH1..CH5) of an address inside 0x0300-0x11FF.
  function automatic logic [2:0] da_index(addr_t a);
    if      (a < 13'h0580) return 3'd0;
    else if (a < 13'h0800) return 3'd1;
    else if (a < 13'h0A80) return 3'd2;
    else if (a < 13'h0D00) return 3'd3;
    else if (a < 13'h0F80) return 3'd4;
    else                   return 3'd5;
  endfunction

  function automatic addr_t da_offset(addr_t a);
    return addr_t'(a - DA_BASE - addr_t'(da_index(a)) * DA_SIZE);
  endfunction

  // Channel number (0..4) of an address inside 0x0100-0x01EF.
  function automatic logic [2:0] iora_ch(addr_t a);
    if      (a < 13'h0130) return 3'd0;
    else if (a < 13'h0160) return 3'd1;
    else if (a < 13'h0190) return 3'd2;
    else if (a < 13'h01C0) return 3'd3;
    else                   return 3'd4;
  endfunction

  function automatic logic [5:0] iora_offset(addr_t a);
    return 6'(a - IORA_BASE - addr_t'(iora_ch(a)) * IORA_SIZE);
  endfunction

  function automatic region_e decode(addr_t a);
    if (a < CRA_BASE)                  return RG_INFO;
    else if (a < IORA_BASE)            return RG_CRA;
    else if (a < 13'h01F0)             return RG_IORA;
    else if (a < DA_BASE)              return RG_NONE;
    else if (a < DA_END) begin
      if (da_offset(a) < DA_LOCK_END)  return RG_SEM;
      else                             return RG_DPRAM;
    end
    else                               return RG_NONE;
  endfunction

  // ---------------- common register area (offsets from 0x0080) ----------------
  localparam logic [6:0] CRA_INT_STAT_PLC = 7'h00;  // R, write 1 clears
  localparam logic [6:0] CRA_INT_MASK_PLC = 7'h02;  // RW, 1 = enabled
  localparam logic [6:0] CRA_INT_STAT_ARM = 7'h04;
  localparam logic [6:0] CRA_INT_MASK_ARM = 7'h06;
  localparam logic [6:0] CRA_RELAY_REQ    = 7'h08;  // bit n: request on DA n. W1 sets
  localparam logic [6:0] CRA_RELAY_REQ_CLR= 7'h0A;  // W1 clears request bit n
  localparam logic [6:0] CRA_RELAY_DONE   = 7'h0C;  // bit n: DA n processed. W1 sets
  localparam logic [6:0] CRA_RELAY_DONE_CLR=7'h0E;  // W1 clears done bit n
  localparam logic [6:0] CRA_SW_STAT      = 7'h10;  // R: {4'b0, rotary[3:0], dip[7:0]}
  localparam logic [6:0] CRA_SW_CHG       = 7'h12;  // R, W1C: switch-change flag (bit 0)
  localparam logic [6:0] CRA_LED_CTRL     = 7'h14;  // RW: [7:0] software LED, [15:8] hw select
  localparam logic [6:0] CRA_WD_ENABLE    = 7'h18;  // RW bit n: watchdog n running
  localparam logic [6:0] CRA_WD_KICK      = 7'h1A;  // W1: restart watchdog n
  localparam logic [6:0] CRA_WD_EXPIRED   = 7'h1C;  // R, W1C: watchdog n expired
  localparam logic [6:0] CRA_WD_PERIOD    = 7'h1E;  // RW: time-out in prescaler ticks

  // Interrupt source bit positions
  localparam int unsigned IRQ_RELAY = 0;   // bits 5:0 relay (done for PLC, request for ARM)
  localparam int unsigned IRQ_CH    = 6;   // bits 10:6 channel transfer finished
  localparam int unsigned IRQ_WD    = 11;  // any watchdog expired
  localparam int unsigned IRQ_SW    = 12;  // switch changed
  localparam int unsigned N_IRQ     = 13;

  // ---------------- I/O register area of one channel (offsets) ----------------
  localparam logic [5:0] IO_CTRL    = 6'h00;  // W: bit0 start. R: 0
  localparam logic [5:0] IO_STATUS  = 6'h02;  // R: bit0 busy, bit1 done, bit2 timeout; W1C bits 2:1
  localparam logic [5:0] IO_TX_LEN  = 6'h04;  // RW: words to send, 1..8
  localparam logic [5:0] IO_RX_LEN  = 6'h06;  // R: words received
  localparam logic [5:0] IO_TX_DATA = 6'h08;  // RW: 8 words, 0x08-0x17
  localparam logic [5:0] IO_RX_DATA = 6'h18;  // R:  8 words, 0x18-0x27
  localparam logic [5:0] IO_TIMEOUT = 6'h28;  // RW: reply time-out in units of 256 cycles of the 80 MHz clock

endpackage
