// uart_tx: shared transmitter of the self-secured UART.
//
// One transmitter serves both worlds. While idle and enabled it fetches a byte
// from the secure transmit FIFO whenever that FIFO holds data, and from the
// non-secure FIFO only when the secure one is empty, so secure traffic always
// goes first. The fetch is a one-cycle read strobe; the byte arrives with the
// FIFO's `valid` a cycle later and the security of its source is remembered.
// The frame then starts at the next Tx baud tick and each state lasts one bit
// period:
//   IDLE -> START (0) -> DATA (6/7/8 bits, LSB first) -> [PARITY] ->
//   STOP (1 or 2 bits of 1) -> IDLE, or -> BREAK (0) while a break is requested.
// The serial stream goes out on `tx_s` when the byte came from the secure FIFO
// and on `tx_ns` when it came from the non-secure FIFO; the other line stays
// at 1.
//
// Mode register fields used: [2:1] character length (11: 6 bits, 10: 7 bits,
// 0x: 8 bits), [5:3] parity (1xx none; 000 bit set when the count of ones is
// even, 001 set when it is odd, 010 always 0, 011 always 1), [7:6] stop bits
// (00: 1, 01: 1.5, 10: 2). 1.5 stop bits are sent as 2 bit times, since this
// design keeps no half-bit timing. Break can start from idle (no byte pending)
// or right after a frame, and ends at the first Tx baud tick after the request
// is withdrawn. With automatic flow control, `cts_ok` low holds off new
// fetches.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       tx_en,
  input  logic       baud_tx,
  input  logic [9:0] mode,
  input  logic       brk,
  input  logic       cts_ok,
  input  logic       empty_s,
  input  logic       empty_ns,
  output logic       rd_s,
  output logic       rd_ns,
  input  logic       valid_s,
  input  logic       valid_ns,
  input  logic [7:0] dout_s,
  input  logic [7:0] dout_ns,
  output logic       tx_s,
  output logic       tx_ns,
  output logic       active,
  output logic       active_sec
);
  import ss_pkg::*;

  typedef enum logic [2:0] {IDLE, START_BIT, DATA_BIT, PAR_BIT, STOP_BIT, BREAK} tx_state_e;

  tx_state_e  state;
  logic [7:0] data_reg;
  logic [2:0] bit_cnt;
  logic       stop_cnt;
  logic       ones_odd;
  logic       pending, have_data, sec;
  logic       tx;
  logic [3:0] nbits;
  logic       par_en, two_stop;

  assign nbits    = char_bits(mode[2:1]);
  assign par_en   = !mode[5];
  assign two_stop = (mode[7:6] != 2'b00);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state     <= IDLE;
      data_reg  <= '0;
      bit_cnt   <= '0;
      stop_cnt  <= 1'b0;
      ones_odd  <= 1'b0;
      pending   <= 1'b0;
      have_data <= 1'b0;
      sec       <= 1'b1;
      rd_s      <= 1'b0;
      rd_ns     <= 1'b0;
    end else begin
      rd_s  <= 1'b0;
      rd_ns <= 1'b0;
      unique case (state)
        IDLE: begin
          if (!pending && !have_data && tx_en && cts_ok && !brk) begin
            if (!empty_s) begin
              rd_s <= 1'b1; pending <= 1'b1; sec <= 1'b1;
            end else if (!empty_ns) begin
              rd_ns <= 1'b1; pending <= 1'b1; sec <= 1'b0;
            end
          end
          if (valid_s) begin
            data_reg <= dout_s;  have_data <= 1'b1; pending <= 1'b0;
          end else if (valid_ns) begin
            data_reg <= dout_ns; have_data <= 1'b1; pending <= 1'b0;
          end else if (pending && !rd_s && !rd_ns) begin
            pending <= 1'b0;   // read returned nothing: try again
          end
          if (have_data && baud_tx) begin
            state     <= START_BIT;
            have_data <= 1'b0;
            bit_cnt   <= '0;
            ones_odd  <= 1'b0;
          end else if (brk && !have_data && !pending && baud_tx)
            state <= BREAK;
        end
        START_BIT: if (baud_tx) state <= DATA_BIT;
        DATA_BIT: if (baud_tx) begin
          ones_odd <= ones_odd ^ data_reg[bit_cnt];
          if (4'(bit_cnt) == nbits - 1'b1) begin
            state    <= par_en ? PAR_BIT : STOP_BIT;
            stop_cnt <= 1'b0;
          end else
            bit_cnt <= bit_cnt + 1'b1;
        end
        PAR_BIT: if (baud_tx) state <= STOP_BIT;
        STOP_BIT: if (baud_tx) begin
          if (stop_cnt == two_stop)
            state <= brk ? BREAK : IDLE;
          else
            stop_cnt <= 1'b1;
        end
        BREAK: if (baud_tx && !brk) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      IDLE:      tx = 1'b1;
      START_BIT: tx = 1'b0;
      DATA_BIT:  tx = data_reg[bit_cnt];
      PAR_BIT:   tx = parity_bit(mode[4:3], ones_odd);
      STOP_BIT:  tx = 1'b1;
      BREAK:     tx = 1'b0;
      default:   tx = 1'b1;
    endcase
  end

  assign tx_s       = sec ? tx : 1'b1;
  assign tx_ns      = sec ? 1'b1 : tx;
  assign active     = (state != IDLE);
  assign active_sec = sec;

  a_one_fetch: assert property (@(posedge clk) disable iff (!rst_n) !(rd_s && rd_ns));
endmodule
