// signal_detector: event status, control register and interrupt of the
// interface card.
//
// Three events come from the switch side: a cycle began, a band began, a
// word was received. Each enabled event sets its sticky bit in the status
// register; reading the status register (status_rd) clears the bits that
// were read while an event arriving in that same clock is kept. irq is
// raised while interrupts are enabled and any status bit is set; with
// interrupts off the host polls the status register instead.
// Control register bits (iso_pkg): [EV_CYCLE], [EV_BAND], [EV_RX] enable
// the events, [CTL_IRQ_EN] enables the interrupt, [CTL_TX_EN] lets the
// transmitter send. The events, status/control registers, interrupt and
// polling follow the document; the bit layout and clear-on-read are this
// design's choices.
module signal_detector
  import iso_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ev_cycle,
  input  logic            ev_band,
  input  logic            ev_rx,
  input  logic            ctl_we,
  input  logic [4:0]      ctl_wdata,
  input  logic            status_rd,
  output logic [4:0]      control,
  output logic [N_EV-1:0] status,
  output logic            irq
);
  logic [N_EV-1:0] ev;

  always_comb begin
    ev           = '0;
    ev[EV_CYCLE] = ev_cycle;
    ev[EV_BAND]  = ev_band;
    ev[EV_RX]    = ev_rx;
    ev          &= control[N_EV-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      control <= '0;
      status  <= '0;
    end else begin
      if (ctl_we) control <= ctl_wdata;
      status <= (status_rd ? '0 : status) | ev;
    end
  end

  assign irq = control[CTL_IRQ_EN] && (status != '0);
endmodule
