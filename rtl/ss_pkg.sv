// ss_pkg: register maps, bit positions and shared types of the self-secured
// private timer and the self-secured UART.
//
// Both devices split their registers into a secure bank, reachable only by
// accesses whose AXI protection bit AxPROT[1] is 0, and a non-secure bank that
// both worlds reach. The offsets below are byte offsets from each device's
// base address. The timer map follows the default-approach map of the design
// (load, counter, control, status, then the non-secure load and counter); the
// UART map has the seventeen registers of the original Cadence-style UART
// followed by six non-secure copies. Placement of the non-secure control bits
// of the timer is this design's own choice.
package ss_pkg;

  // AXI response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // ---------------- private timer ----------------
  localparam int unsigned TMR_LOAD_S  = 0;
  localparam int unsigned TMR_CNT_S   = 4;
  localparam int unsigned TMR_CTRL    = 8;
  localparam int unsigned TMR_ISR     = 12;
  localparam int unsigned TMR_LOAD_NS = 16;
  localparam int unsigned TMR_CNT_NS  = 20;

  // control register bits
  localparam int unsigned TC_EN       = 0;   // secure timer enable
  localparam int unsigned TC_AR       = 1;   // secure auto-reload
  localparam int unsigned TC_IRQEN    = 2;   // secure interrupt enable
  localparam int unsigned TC_EN_NS    = 3;   // non-secure timer enable
  localparam int unsigned TC_AR_NS    = 4;   // non-secure auto-reload
  localparam int unsigned TC_IRQEN_NS = 5;   // non-secure interrupt enable (secure-only)
  localparam int unsigned TC_PRESC_LO = 8;   // prescaler field, bits 15..8

  // interrupt status bits
  localparam int unsigned TI_S  = 0;
  localparam int unsigned TI_NS = 1;

  // ---------------- UART ----------------
  localparam int unsigned U_CR       = 0;
  localparam int unsigned U_MR       = 4;
  localparam int unsigned U_IER      = 8;
  localparam int unsigned U_IDR      = 12;
  localparam int unsigned U_IMR      = 16;
  localparam int unsigned U_ISR      = 20;
  localparam int unsigned U_BAUDGEN  = 24;
  localparam int unsigned U_RTO      = 28;
  localparam int unsigned U_RTRIG    = 32;
  localparam int unsigned U_MCR      = 36;
  localparam int unsigned U_MSR      = 40;
  localparam int unsigned U_SR       = 44;
  localparam int unsigned U_TXFIFO   = 48;
  localparam int unsigned U_BDIV     = 52;
  localparam int unsigned U_FDEL     = 56;
  localparam int unsigned U_TTRIG    = 60;
  localparam int unsigned U_RXFIFO   = 64;
  localparam int unsigned U_NS_RTRIG = 68;
  localparam int unsigned U_NS_TTRIG = 72;
  localparam int unsigned U_NS_RXFIFO= 76;
  localparam int unsigned U_NS_TXFIFO= 80;
  localparam int unsigned U_NS_ISR   = 84;
  localparam int unsigned U_NS_SR    = 88;

  // control register bits
  localparam int unsigned CR_RXRES  = 0;
  localparam int unsigned CR_TXRES  = 1;
  localparam int unsigned CR_RXEN   = 2;
  localparam int unsigned CR_RXDIS  = 3;
  localparam int unsigned CR_TXEN   = 4;
  localparam int unsigned CR_TXDIS  = 5;
  localparam int unsigned CR_RSTTO  = 6;
  localparam int unsigned CR_STTBRK = 7;
  localparam int unsigned CR_STPBRK = 8;

  // interrupt enable / disable / mask / status bits
  localparam int unsigned IX_RTRIG   = 0;
  localparam int unsigned IX_REMPTY  = 1;
  localparam int unsigned IX_RFULL   = 2;
  localparam int unsigned IX_TEMPTY  = 3;
  localparam int unsigned IX_TFULL   = 4;
  localparam int unsigned IX_ROVR    = 5;
  localparam int unsigned IX_FRAME   = 6;
  localparam int unsigned IX_PARE    = 7;
  localparam int unsigned IX_TIMEOUT = 8;
  localparam int unsigned IX_DMSI    = 9;
  localparam int unsigned IX_TTRIG   = 10;
  localparam int unsigned IX_TNFULL  = 11;
  localparam int unsigned IX_TOVR    = 12;
  localparam int unsigned N_IRQ      = 13;

  // channel status bits
  localparam int unsigned SR_RTRIG   = 0;
  localparam int unsigned SR_REMPTY  = 1;
  localparam int unsigned SR_RFULL   = 2;
  localparam int unsigned SR_TEMPTY  = 3;
  localparam int unsigned SR_TFULL   = 4;
  localparam int unsigned SR_RACTIVE = 10;
  localparam int unsigned SR_TACTIVE = 11;
  localparam int unsigned SR_FDELT   = 12;
  localparam int unsigned SR_TTRIG   = 13;
  localparam int unsigned SR_TNFULL  = 14;

  // channel modes, mode register bits 9..8
  typedef enum logic [1:0] {
    CH_NORMAL   = 2'b00,
    CH_ECHO     = 2'b01,
    CH_LOCAL_LB = 2'b10,
    CH_REMOTE_LB= 2'b11
  } chmode_e;

  // receiver error pulses, one set per security source
  typedef struct packed {
    logic ovr;
    logic frame;
    logic par;
    logic tout;
  } rx_err_t;

  // FIFO and activity status of one bank (secure or non-secure)
  typedef struct packed {
    logic rtrig;    // receive FIFO at/above its trigger level
    logic rempty;
    logic rfull;
    logic tempty;
    logic tfull;
    logic ttrig;    // transmit FIFO at/above its trigger level
    logic tnfull;   // transmit FIFO has one free entry
    logic tovr;     // pulse: write into a full transmit FIFO
    logic ractive;  // receiver busy with a character of this bank
    logic tactive;  // transmitter busy with a character of this bank
  } bank_stat_t;

  // number of data bits selected by mode register bits 2..1
  function automatic logic [3:0] char_bits(input logic [1:0] chrl);
    case (chrl)
      2'b11:   return 4'd6;
      2'b10:   return 4'd7;
      default: return 4'd8;
    endcase
  endfunction

  // parity bit for mode register bits 5..3 (bit 5 set: no parity)
  function automatic logic parity_bit(input logic [1:0] par, input logic ones_odd);
    case (par)
      2'b00:   return !ones_odd;   // 1 when the number of ones is even
      2'b01:   return ones_odd;    // 1 when the number of ones is odd
      2'b10:   return 1'b0;        // forced 0 (space)
      default: return 1'b1;        // forced 1 (mark)
    endcase
  endfunction

endpackage
