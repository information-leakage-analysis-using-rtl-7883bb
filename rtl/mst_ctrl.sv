// mst_ctrl: master control state machine (Mst) of the fault-emulation engine.
//
// Runs one fault-injection experiment when the manager raises start:
//   CLEAR_START  reset the cycle counter; start the serial collector, the
//                address collector and the runtime monitor in clear mode
//   GET_PARAMS / WAIT_PARAMS
//                take the per-experiment parameters from the manager over a
//                four-phase handshake (params_req, params_valid, params_ack):
//                word 0 = run cycle limit, word 1 = serial idle wait,
//                word 2 = mode (bit 0: stream, BRAM1 drained as a ring by
//                the runtime monitor, for outputs longer than BRAM1)
//   WAIT_CLEAR   hold the DUT in reset until all three report done
//   START_ROCKET release the DUT reset and start all three collecting
//   RUN          count DUT cycles; after cycle_limit cycles halt the address
//                collector
//   WAIT_SERIAL  raise exit_enabled and wait for the serial collector
//   DONE         report done until the manager drops start
// The states and their order follow the published master flow chart. Own
// choices: the second and third parameter words (the serial idle wait,
// which the text calls user-specified, and the stream mode), the handshake
// encoding, starting the runtime monitor only in stream mode, and that the DUT stays out
// of reset after a run until the next experiment clears it.
//
// Timing: RUN lasts exactly cycle_limit cycles (at least one); the DUT is out
// of reset from the cycle after START_ROCKET. cycles counts DUT cycles from
// release until DONE.
module mst_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  // manager
  input  logic        start,
  input  logic        params_valid,
  input  logic [22:0] params_data,
  output logic        params_req,
  output logic        params_ack,
  output logic        done,
  // collectors
  output logic        coll_start,   // pulse to SDC, ADC, RM
  output logic        coll_clear,   // qualifies coll_start: clear memories
  input  logic        sdc_done,
  input  logic        adc_done,
  input  logic        rm_done,
  output logic        adc_halt,
  output logic        exit_enabled,
  // DUT
  output logic        rocket_rst_n,
  // parameters and status
  output logic [22:0] cycle_limit,
  output logic [22:0] idle_wait,
  output logic        stream,
  output logic [31:0] cycles,
  output logic        busy
);

  typedef enum logic [3:0] {
    M_IDLE, M_CLEAR_START, M_GET_PARAMS, M_WAIT_PARAMS, M_WAIT_CLEAR,
    M_START_ROCKET, M_RUN, M_WAIT_SERIAL, M_DONE
  } state_e;

  state_e state_q;
  logic [1:0] pidx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= M_IDLE;
      pidx_q       <= '0;
      cycle_limit  <= '0;
      stream       <= 1'b0;
      idle_wait    <= '0;
      cycles       <= '0;
      rocket_rst_n <= 1'b0;
    end else begin
      unique case (state_q)
        M_IDLE:        if (start) state_q <= M_CLEAR_START;
        M_CLEAR_START: begin
          cycles  <= '0;
          pidx_q  <= '0;
          state_q <= M_GET_PARAMS;
        end
        M_GET_PARAMS: if (params_valid) begin
          unique case (pidx_q)
            2'd0:    cycle_limit <= params_data;
            2'd1:    idle_wait   <= params_data;
            default: stream      <= params_data[0];
          endcase
          state_q <= M_WAIT_PARAMS;
        end
        M_WAIT_PARAMS: if (!params_valid) begin
          pidx_q  <= pidx_q + 1'b1;
          state_q <= (pidx_q == 2'd2) ? M_WAIT_CLEAR : M_GET_PARAMS;
        end
        M_WAIT_CLEAR: begin
          rocket_rst_n <= 1'b0;
          if (sdc_done && adc_done && rm_done) state_q <= M_START_ROCKET;
        end
        M_START_ROCKET: begin
          rocket_rst_n <= 1'b1;
          state_q      <= M_RUN;
        end
        M_RUN: begin
          cycles <= cycles + 1'b1;
          if (cycles + 1 >= 32'(cycle_limit)) state_q <= M_WAIT_SERIAL;
        end
        M_WAIT_SERIAL: begin
          cycles <= cycles + 1'b1;
          if (sdc_done) state_q <= M_DONE;
        end
        M_DONE:  if (!start) state_q <= M_IDLE;
        default: state_q <= M_IDLE;
      endcase
    end
  end

  assign params_req   = (state_q == M_GET_PARAMS);
  assign params_ack   = (state_q == M_WAIT_PARAMS);
  assign coll_start   = (state_q == M_CLEAR_START) || (state_q == M_START_ROCKET);
  assign coll_clear   = (state_q == M_CLEAR_START);
  assign adc_halt     = (state_q == M_RUN) && (cycles + 1 >= 32'(cycle_limit));
  assign exit_enabled = (state_q == M_WAIT_SERIAL);
  assign done         = (state_q == M_DONE);
  assign busy         = (state_q != M_IDLE) && (state_q != M_DONE);

endmodule
