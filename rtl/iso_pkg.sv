// iso_pkg: constants and types shared by the Isoswitch RTL.
//
// The switch moves 40-bit words. A control "tick" (one arbitration decision)
// lasts 8 word times, so at the nominal 1 Gb/s line rate the bit clock is
// 1 GHz, a word takes 40 ns and a tick 320 ns (3.125 MHz). Four inports and
// four outports, 40-bit words, 8 words per tick and 12-bit expiration fields
// are the prototype's figures. The configuration-table depth, the buffer
// depths and the delay-RAM depth are this design's own choices.
package iso_pkg;

  // Prototype sizes.
  localparam int unsigned N_PORTS        = 4;   // inports = outports
  localparam int unsigned WORD_W         = 40;  // internal word width
  localparam int unsigned WORDS_PER_TICK = 8;   // words moved per arbitration tick
  localparam int unsigned EXP_W          = 12;  // expiration field width (ticks)

  // This design's choices.
  localparam int unsigned CT_AW          = 4;   // 16 bands per cycle
  localparam int unsigned IN_BUF_DEPTH   = 64;  // words per input buffer
  localparam int unsigned DLY_AW         = 10;  // 1024-word delay RAM
  localparam int unsigned IF_BUF_DEPTH   = 64;  // interface card buffers
  localparam int unsigned TX_BURST       = 8;   // words needed before the card transmits

  // Interface-card register map (word addresses on the host bus).
  typedef enum logic [2:0] {
    REG_TXDATA  = 3'd0,  // write: push a word into the transmission buffer
    REG_RXDATA  = 3'd1,  // read: pop a word from the reception buffer
    REG_STATUS  = 3'd2,  // read: event bits (cleared by the read) and levels
    REG_CONTROL = 3'd3,  // read/write: event enables and transmit enable
    REG_BAND    = 3'd4   // read: index of the band now running in the switch
  } if_reg_e;

  // Event bits of the status register and enable bits of the control register.
  localparam int unsigned EV_CYCLE = 0;  // an Isochronet cycle began
  localparam int unsigned EV_BAND  = 1;  // a band began
  localparam int unsigned EV_RX    = 2;  // a word was received
  localparam int unsigned N_EV     = 3;
  localparam int unsigned CTL_IRQ_EN = 3; // control bit: interrupts on (else polling)
  localparam int unsigned CTL_TX_EN  = 4; // control bit: transmitter allowed to send

endpackage
