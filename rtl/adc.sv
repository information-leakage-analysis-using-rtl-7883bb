// adc: address data collection (ADC) state machine.
//
// Watches the 32-bit internal address bus of the device under test while it
// runs and writes each new value to the address buffer BRAM2, but only when
// the bus value changes, and counts the changes. BRAM2 is used as a ring:
// when it is full the oldest entries are overwritten, so after a run it holds
// the most recent DEPTH changes (the manager reads the last 50) and wptr
// points one past the newest. The master halts collection after the fixed
// number of run cycles. A start pulse with clear_mem set instead zeroes all
// of BRAM2. The change-only recording, 2048-word buffer, change count and
// halt follow the published engine; the ring organisation and recording the
// first bus value of a run as a change are this design's choices.
//
// Timing: one bus sample per cycle, from the cycle after start up to and
// including the cycle in which halt is high; a change is written in the
// cycle it is seen. The clear takes DEPTH cycles.
module adc #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          clear_mem,
  input  logic          halt,        // pulse: stop collecting
  output logic          done,
  input  logic [31:0]   addr_bus,
  // BRAM2 port A
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  // results
  output logic [31:0]   nchanges,
  output logic [AW-1:0] wptr
);

  typedef enum logic [1:0] {A_IDLE, A_CLEAR, A_RUN} state_e;
  state_e      state_q;
  logic [31:0] last_q;
  logic        first_q;
  logic        change;

  assign change = (state_q == A_RUN) && (first_q || addr_bus != last_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= A_IDLE;
      last_q   <= '0;
      first_q  <= 1'b0;
      nchanges <= '0;
      wptr     <= '0;
    end else begin
      unique case (state_q)
        A_IDLE: begin
          if (start) begin
            wptr <= '0;
            if (clear_mem) state_q <= A_CLEAR;
            else begin
              nchanges <= '0;
              first_q  <= 1'b1;
              state_q  <= A_RUN;
            end
          end
        end
        A_CLEAR: begin
          wptr <= wptr + 1'b1;
          if (wptr == AW'(DEPTH - 1)) state_q <= A_IDLE;
        end
        A_RUN: begin
          if (change) begin
            first_q  <= 1'b0;
            last_q   <= addr_bus;
            wptr     <= wptr + 1'b1;
            nchanges <= nchanges + 1'b1;
          end
          if (halt) state_q <= A_IDLE;
        end
        default: state_q <= A_IDLE;
      endcase
    end
  end

  assign mem_en    = (state_q == A_CLEAR) || change;
  assign mem_we    = mem_en;
  assign mem_addr  = wptr;
  assign mem_wdata = (state_q == A_CLEAR) ? 32'h0 : addr_bus;
  assign done      = (state_q == A_IDLE);

endmodule
