// fe_gpio_if: engine side of the two 32-bit GPIO registers that connect the
// manager program to the fault-emulation engine.
//
// The manager writes gpio_out and reads gpio_in (bit fields in fe_pkg). This
// block
//   * registers gpio_out and decodes it into the control fields;
//   * turns each rising edge of the scan_clk bit into a one-cycle scan_en
//     that shifts the three fault scan chains by one position, and returns
//     the chain outputs on the sdo bits;
//   * serves data readout: with rd_req high the data field names a source
//     (rd_sel_e) and an address; the block reads BRAM1, BRAM2 or a counter,
//     places 16 bits on rd_data and raises rd_ack until rd_req falls. A
//     BRAM1 read waits while the runtime monitor owns BRAM1's read port.
//   * packs the status of the master and runtime monitor into gpio_in
//     (registered).
// The published engine gives the two 32-bit registers, a scan clock driven
// from a GPIO bit and the kinds of data transferred; the bit layout, the
// readout protocol and the edge-to-enable conversion are this design's own.
//
// Timing: control fields act one cycle after gpio_out changes; a readout
// answers two to three cycles after rd_req is seen (longer while the
// runtime monitor is busy); gpio_in lags its sources by one cycle.
module fe_gpio_if
  import fe_pkg::*;
#(
  parameter int unsigned B1_AW = 16,
  parameter int unsigned B2_AW = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      gpio_out,
  output logic [31:0]      gpio_in,
  // decoded control
  output gpio_ctrl_t       ctrl,
  output logic             scan_en,
  input  logic [2:0]       sdo,
  // status from master and runtime monitor
  input  logic             params_req,
  input  logic             params_ack,
  input  logic             done,
  input  logic             rm_valid,
  input  logic [7:0]       rm_char,
  input  logic             rm_busy,
  // BRAM1 port B (when the runtime monitor is idle)
  output logic             b1_en,
  output logic [B1_AW-1:0] b1_addr,
  input  logic [7:0]       b1_data,
  // BRAM2 port B
  output logic             b2_en,
  output logic [B2_AW-1:0] b2_addr,
  input  logic [31:0]      b2_data,
  // counters
  input  logic [31:0]      nserial,
  input  logic [31:0]      nchanges,
  input  logic [B2_AW-1:0] adc_wptr,
  input  logic [31:0]      cycles,
  input  logic [15:0]      status
);

  logic scan_clk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl       <= '0;
      scan_clk_d <= 1'b0;
    end else begin
      ctrl       <= gpio_ctrl_t'(gpio_out);
      scan_clk_d <= ctrl.scan_clk;
    end
  end

  assign scan_en = ctrl.scan_clk && !scan_clk_d;

  // ---------------- readout ----------------
  typedef enum logic [1:0] {D_IDLE, D_READ, D_CAPTURE, D_ACK} rd_state_e;
  rd_state_e   rst_q;
  rd_sel_e     sel;
  logic [15:0] addr;
  logic [15:0] rd_data_q;
  rd_sel_e     sel_q;

  assign sel  = rd_sel_e'(ctrl.data[19:16]);
  assign addr = ctrl.data[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q     <= D_IDLE;
      rd_data_q <= '0;
      sel_q     <= RD_SERIAL;
    end else begin
      unique case (rst_q)
        D_IDLE:    if (ctrl.rd_req) begin
                     sel_q <= sel;
                     rst_q <= D_READ;
                   end
        D_READ:    if (!(sel_q == RD_SERIAL && rm_busy)) rst_q <= D_CAPTURE;
        D_CAPTURE: begin
          unique case (sel_q)
            RD_SERIAL:   rd_data_q <= {8'h00, b1_data};
            RD_ADDR_LO:  rd_data_q <= b2_data[15:0];
            RD_ADDR_HI:  rd_data_q <= b2_data[31:16];
            RD_NSER_LO:  rd_data_q <= nserial[15:0];
            RD_NSER_HI:  rd_data_q <= nserial[31:16];
            RD_NCHG_LO:  rd_data_q <= nchanges[15:0];
            RD_NCHG_HI:  rd_data_q <= nchanges[31:16];
            RD_ADC_WPTR: rd_data_q <= 16'(adc_wptr);
            RD_CYC_LO:   rd_data_q <= cycles[15:0];
            RD_CYC_HI:   rd_data_q <= cycles[31:16];
            RD_STATUS:   rd_data_q <= status;
            default:     rd_data_q <= 16'hDEAD;
          endcase
          rst_q <= D_ACK;
        end
        D_ACK:     if (!ctrl.rd_req) rst_q <= D_IDLE;
        default:   rst_q <= D_IDLE;
      endcase
    end
  end

  assign b1_en   = (rst_q == D_READ) && (sel_q == RD_SERIAL) && !rm_busy;
  assign b1_addr = B1_AW'(addr);
  assign b2_en   = (rst_q == D_READ) && (sel_q == RD_ADDR_LO || sel_q == RD_ADDR_HI);
  assign b2_addr = B2_AW'(addr);

  // ---------------- status register ----------------
  gpio_stat_t stat;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stat <= '0;
    else begin
      stat.rd_data    <= rd_data_q;
      stat.rm_char    <= rm_char;
      stat.sdo        <= sdo;
      stat.rd_ack     <= (rst_q == D_ACK);
      stat.rm_valid   <= rm_valid;
      stat.done       <= done;
      stat.params_ack <= params_ack;
      stat.params_req <= params_req;
    end
  end

  assign gpio_in = 32'(stat);

endmodule
