// uart_rx: shared receiver of the self-secured UART.
//
// One receiver watches both the secure and the non-secure RxD lines at every
// baud sample. A falling edge starts a reception; the receiver waits
// (bdiv+1)/2 samples, to the middle of the start bit, and accepts the start
// bit only if the last three samples were all low. It then restarts the
// receiver baud divider (`rx_resync`) so that every following Rx baud tick
// falls in the middle of a bit, and takes each bit as the 2-of-3 majority of
// the last three samples. After the data bits (6/7/8, LSB first), the parity
// bit if enabled and the stop bits, the byte is written into the receive
// FIFO of the line it came from: `wr_s` for the secure line, `wr_ns` for the
// non-secure line.
//
// Priority: a falling edge on the secure line while a non-secure character is
// being received dumps the non-secure character and restarts on the secure
// one; a secure character is never interrupted. With both lines idle the
// secure line is checked first.
//
// Errors are one-cycle pulses in two sets, `err_s` and `err_ns`, by the
// security of the character: parity (received parity bit differs from the
// one computed as in the transmitter), framing (a stop bit sampled low),
// overflow (the receive FIFO is full and a new falling edge arrives while the
// byte waits for space: the waiting byte is dropped) and timeout (after a
// character has been received, `rto` Rx bit periods pass in idle without a
// new start bit; `rsttout` restarts the count). Characters with parity or
// framing errors are still stored. Routing the timeout by the security of
// the last received character, and storing faulty characters, are this
// design's choices. The baud divider must be at least 3 for the start-bit
// check to see three samples.
module uart_rx (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          rx_en,
  input  logic          baud_sample,
  input  logic          baud_rx,
  output logic          rx_resync,
  input  logic [15:0]   bdiv,
  input  logic [9:0]    mode,
  input  logic          rxd_s,
  input  logic          rxd_ns,
  input  logic [7:0]    rto,
  input  logic          rsttout,
  input  logic          full_s,
  input  logic          full_ns,
  output logic          wr_s,
  output logic          wr_ns,
  output logic [7:0]    wdata,
  output ss_pkg::rx_err_t err_s,
  output ss_pkg::rx_err_t err_ns,
  output logic          active,
  output logic          active_sec
);
  import ss_pkg::*;

  typedef enum logic [2:0] {IDLE, START_BIT, DATA_BIT, PAR_BIT, STOP_BIT, DONE, WAIT_FIFO} rx_state_e;

  rx_state_e   state;
  logic        sec, last_sec, armed;
  logic        prev_s, prev_ns;
  logic [2:0]  hist_s, hist_ns;
  logic [15:0] half_cnt;
  logic [2:0]  bit_cnt;
  logic        stop_cnt, ones_odd, fr_seen;
  logic [7:0]  data_reg, tcnt;
  logic        neg_s, neg_ns;
  logic [2:0]  cur3;
  logic        maj, start_ok, full_sel;
  logic [3:0]  nbits;
  logic        par_en, two_stop;
  rx_err_t     err;

  assign nbits    = char_bits(mode[2:1]);
  assign par_en   = !mode[5];
  assign two_stop = (mode[7:6] == 2'b10);

  assign neg_s  = baud_sample && prev_s  && !rxd_s;
  assign neg_ns = baud_sample && prev_ns && !rxd_ns;

  // the last three samples of the line being received, including this one
  assign cur3     = sec ? {hist_s[1:0], rxd_s} : {hist_ns[1:0], rxd_ns};
  assign maj      = sec ? ((hist_s[0] & hist_s[1]) | (hist_s[0] & hist_s[2]) | (hist_s[1] & hist_s[2]))
                        : ((hist_ns[0] & hist_ns[1]) | (hist_ns[0] & hist_ns[2]) | (hist_ns[1] & hist_ns[2]));
  assign start_ok = (cur3 == 3'b000);
  assign full_sel = sec ? full_s : full_ns;

  assign rx_resync = (state == START_BIT) && baud_sample &&
                     (half_cnt + 1'b1 >= (bdiv + 1'b1) >> 1) && start_ok;

  assign wr_s  = (state == DONE || state == WAIT_FIFO) &&  sec && !full_s;
  assign wr_ns = (state == DONE || state == WAIT_FIFO) && !sec && !full_ns;
  assign wdata = data_reg;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      prev_s  <= 1'b1;
      prev_ns <= 1'b1;
      hist_s  <= '1;
      hist_ns <= '1;
    end else if (baud_sample) begin
      prev_s  <= rxd_s;
      prev_ns <= rxd_ns;
      hist_s  <= {hist_s[1:0], rxd_s};
      hist_ns <= {hist_ns[1:0], rxd_ns};
    end
  end

  // error events of this cycle
  always_comb begin
    err       = '0;
    err.tout  = rx_en && state == IDLE && !(neg_s || neg_ns) && baud_rx && armed &&
                rto != '0 && (tcnt + 1'b1 >= rto);
    err.par   = rx_en && state == PAR_BIT && baud_rx &&
                (maj != parity_bit(mode[4:3], ones_odd));
    err.frame = rx_en && state == STOP_BIT && baud_rx && (stop_cnt == two_stop) &&
                (!maj || fr_seen);   // once per character
    err.ovr   = rx_en && (state == DONE || state == WAIT_FIFO) && full_sel && (neg_s || neg_ns);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state    <= IDLE;
      sec      <= 1'b0;
      last_sec <= 1'b0;
      armed    <= 1'b0;
      half_cnt <= '0;
      bit_cnt  <= '0;
      stop_cnt <= 1'b0;
      fr_seen  <= 1'b0;
      ones_odd <= 1'b0;
      data_reg <= '0;
      tcnt     <= '0;
      err_s    <= '0;
      err_ns   <= '0;
    end else begin
      if (!rx_en) begin
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE: begin
            if (neg_s || neg_ns) begin
              sec      <= neg_s;
              state    <= START_BIT;
              half_cnt <= '0;
              tcnt     <= '0;
            end else if (baud_rx && armed && rto != '0) begin
              if (tcnt + 1'b1 >= rto) begin
                armed    <= 1'b0;
                tcnt     <= '0;
              end else
                tcnt <= tcnt + 1'b1;
            end
          end
          START_BIT: if (baud_sample) begin
            if (half_cnt + 1'b1 >= (bdiv + 1'b1) >> 1) begin
              if (start_ok) begin
                state    <= DATA_BIT;
                bit_cnt  <= '0;
                ones_odd <= 1'b0;
                data_reg <= '0;
              end else
                state <= IDLE;
            end else
              half_cnt <= half_cnt + 1'b1;
          end
          DATA_BIT: if (baud_rx) begin
            data_reg[bit_cnt] <= maj;
            ones_odd          <= ones_odd ^ maj;
            if (4'(bit_cnt) == nbits - 1'b1) begin
              state    <= par_en ? PAR_BIT : STOP_BIT;
              stop_cnt <= 1'b0;
              fr_seen  <= 1'b0;
            end else
              bit_cnt <= bit_cnt + 1'b1;
          end
          PAR_BIT: if (baud_rx) begin
            state <= STOP_BIT;
          end
          STOP_BIT: if (baud_rx) begin
            if (stop_cnt == two_stop)
              state <= DONE;
            else begin
              stop_cnt <= 1'b1;
              fr_seen  <= !maj;
            end
          end
          DONE, WAIT_FIFO: begin
            if (!full_sel) begin
              state    <= IDLE;
              last_sec <= sec;
              armed    <= 1'b1;
              tcnt     <= '0;
            end else if (neg_s || neg_ns) begin
              // a new character starts while this one still waits: drop it
              sec      <= neg_s;
              state    <= START_BIT;
              half_cnt <= '0;
            end else
              state <= WAIT_FIFO;
          end
          default: state <= IDLE;
        endcase
        // a secure start bit pre-empts a non-secure reception
        if (!sec && neg_s && (state == START_BIT || state == DATA_BIT ||
                              state == PAR_BIT || state == STOP_BIT)) begin
          sec      <= 1'b1;
          state    <= START_BIT;
          half_cnt <= '0;
        end
        if (rsttout) tcnt <= '0;
      end
      // errors belong to the character in hand (the last one for a timeout)
      if ((state == IDLE) ? last_sec : sec) begin
        err_s  <= err;
        err_ns <= '0;
      end else begin
        err_s  <= '0;
        err_ns <= err;
      end
    end
  end

  assign active     = (state != IDLE);
  assign active_sec = sec;
endmodule
