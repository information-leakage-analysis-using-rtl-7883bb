// sdc: serial data collection (SDC) state machine.
//
// Collects the characters the device under test (DUT) writes to its UART and
// stores them, in order, in the serial buffer BRAM1. The DUT raises uart_intr
// when a character is on uart_data; SDC writes it to BRAM1 at address
// nbytes mod DEPTH, acknowledges, and counts it. Collection stops (state
// IDLE, done high) when
//   * BRAM1 is full (only when stream is low: the character at the last
//     address was written),
//   * the manager sets cprog_term (it may do so at any time), or
//   * exit_enabled is high (the master has let the DUT run its fixed number
//     of cycles) and no character has arrived for idle_wait cycles. The idle
//     counter restarts at every character, so a DUT that keeps talking keeps
//     collection going.
// With stream high (the configuration for long outputs, where the runtime
// monitor drains BRAM1 while the DUT runs) BRAM1 is a ring: the address
// wraps, and while DEPTH characters are stored but not yet taken by the
// monitor (rd_count) SDC holds off the acknowledge, which stalls the DUT's
// UART instead of losing data.
// A start pulse with clear_mem set instead writes zero to every BRAM1 word
// and returns to IDLE. The stop conditions, the idle counter and the clear
// follow the published SDC flow chart. Own choices: the four-phase UART
// handshake (uart_ack rises with the write and stays high until uart_intr
// falls); honouring cprog_term while waiting, not only after a character;
// counting a uart_intr held high after its acknowledge as idle time, so that
// a stuck interrupt line cannot hang the engine;
// the ring with back-pressure for the stream mode; idle_wait and stream come
// from the master's parameter words.
//
// Timing: one character per handshake, at best one every two cycles. The
// clear takes DEPTH cycles.
module sdc #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,        // pulse: begin clear or collection
  input  logic          clear_mem,    // with start: clear BRAM1
  output logic          done,         // state machine idle
  // DUT UART side
  input  logic          uart_intr,
  input  logic [7:0]    uart_data,
  output logic          uart_ack,
  // control
  input  logic          exit_enabled,
  input  logic          cprog_term,
  input  logic [22:0]   idle_wait,
  input  logic          stream,       // BRAM1 is a ring drained by the monitor
  input  logic [31:0]   rd_count,     // characters the monitor has taken
  // BRAM1 port A
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  // results
  output logic [31:0]   nbytes,       // characters stored
  output logic          full,         // stopped because BRAM1 filled
  output logic          term          // stopped by cprog_term
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_WAIT_UART, S_ACK} state_e;
  state_e        state_q;
  logic [AW-1:0] clr_q;
  logic [22:0]   idle_cnt_q;
  logic          stream_q;
  logic          ring_full;
  logic          last_addr;
  logic          accept;

  assign ring_full = stream_q && (nbytes - rd_count >= 32'(DEPTH));
  assign last_addr = (nbytes[AW-1:0] == AW'(DEPTH - 1));
  assign accept    = (state_q == S_WAIT_UART) && uart_intr && !ring_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      clr_q      <= '0;
      idle_cnt_q <= '0;
      stream_q   <= 1'b0;
      nbytes     <= '0;
      full       <= 1'b0;
      term       <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            clr_q      <= '0;
            idle_cnt_q <= '0;
            full       <= 1'b0;
            term       <= 1'b0;
            if (clear_mem) state_q <= S_CLEAR;
            else begin
              nbytes   <= '0;
              stream_q <= stream;
              state_q  <= S_WAIT_UART;
            end
          end
        end
        S_CLEAR: begin
          clr_q <= clr_q + 1'b1;
          if (clr_q == AW'(DEPTH - 1)) state_q <= S_IDLE;
        end
        S_WAIT_UART: begin
          if (accept) begin
            nbytes     <= nbytes + 1'b1;
            idle_cnt_q <= '0;
            if (!stream_q && last_addr) begin
              full    <= 1'b1;
              state_q <= S_IDLE;
            end else if (cprog_term) begin
              term    <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              state_q <= S_ACK;
            end
          end else if (cprog_term) begin
            term    <= 1'b1;
            state_q <= S_IDLE;
          end else if (uart_intr) begin
            // stalled on a full ring: the DUT is not idle
            idle_cnt_q <= '0;
          end else if (exit_enabled && idle_cnt_q >= idle_wait) begin
            state_q <= S_IDLE;
          end else begin
            idle_cnt_q <= idle_cnt_q + 1'b1;
          end
        end
        S_ACK: begin
          // an interrupt line that stays high brings no new character, so
          // the same stop conditions apply as while waiting
          if (!uart_intr) state_q <= S_WAIT_UART;
          else if (cprog_term) begin
            term    <= 1'b1;
            state_q <= S_IDLE;
          end else if (exit_enabled && idle_cnt_q >= idle_wait) begin
            state_q <= S_IDLE;
          end else begin
            idle_cnt_q <= idle_cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = nbytes[AW-1:0];
    mem_wdata = 8'h00;
    uart_ack  = 1'b0;
    unique case (state_q)
      S_CLEAR: begin
        mem_en   = 1'b1;
        mem_we   = 1'b1;
        mem_addr = clr_q;
      end
      S_WAIT_UART: begin
        if (accept) begin
          mem_en    = 1'b1;
          mem_we    = 1'b1;
          mem_wdata = uart_data;
          uart_ack  = 1'b1;
        end
      end
      S_ACK:   uart_ack = 1'b1;
      default: ;
    endcase
  end

  assign done = (state_q == S_IDLE);

endmodule
