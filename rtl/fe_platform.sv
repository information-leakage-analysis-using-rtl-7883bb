// fe_platform: fault-emulation (FE) engine around an instrumented processor.
//
// The device under test (DUT, a RISC-V processor netlist in the published
// platform) is not part of this RTL: it connects through the ports below.
// Every one of its N_SITES gate inputs is routed through an FI cell: the DUT
// presents the fault-free value on site_in and uses site_out. The engine
//   * configures the FI cells through three scan chains clocked from the
//     manager's GPIO register (fe_gpio_if, fi_scan_chain);
//   * runs one experiment per manager request (mst_ctrl): clear buffers, take
//     parameters, reset and start the DUT, run a fixed number of cycles,
//     then keep collecting serial output until the DUT goes quiet;
//   * records the DUT's UART characters in BRAM1 (sdc); in stream mode the
//     runtime monitor (rm) hands them to the manager while the DUT runs and
//     BRAM1 becomes a ring, so outputs far longer than BRAM1 pass through;
//   * records every change of the DUT address bus in BRAM2 (adc);
//   * lets the manager read BRAM1, BRAM2 and the counters afterwards.
// Block structure, buffer sizes and state sequences follow the published
// engine; the GPIO bit layout, handshakes and readout protocol are this
// design's own (see fe_pkg).
//
// One clock domain (24 MHz in the published platform); rst_n is the
// engine's reset. The DUT is reset through rocket_rst_n.
module fe_platform
  import fe_pkg::*;
#(
  parameter int unsigned N_SITES  = 85713,   // FI cells, one per gate input
  parameter int unsigned B1_DEPTH = 65536,   // BRAM1: 64 KB of UART characters
  parameter int unsigned B2_DEPTH = 2048     // BRAM2: 32-bit address words
) (
  input  logic               clk,
  input  logic               rst_n,
  // GPIO registers of the manager
  input  logic [31:0]        gpio_out,
  output logic [31:0]        gpio_in,
  // DUT fault sites
  input  logic [N_SITES-1:0] site_in,
  output logic [N_SITES-1:0] site_out,
  // DUT reset, UART and address bus
  output logic               rocket_rst_n,
  input  logic               uart_intr,
  input  logic [7:0]         uart_data,
  output logic               uart_ack,
  input  logic [31:0]        addr_bus
);

  localparam int unsigned B1_AW = $clog2(B1_DEPTH);
  localparam int unsigned B2_AW = $clog2(B2_DEPTH);

  gpio_ctrl_t ctrl;
  logic       scan_en;
  logic [2:0] sdo;

  // master
  logic        params_req, params_ack, mst_done, coll_start, coll_clear;
  logic        sdc_done, adc_done, rm_done, adc_halt, exit_enabled, mst_busy;
  logic [22:0] cycle_limit, idle_wait;
  logic        stream, rm_start;
  logic [31:0] rm_count;
  logic [31:0] cycles;

  // BRAM1
  logic             b1a_en, b1a_we;
  logic [B1_AW-1:0] b1a_addr;
  logic [7:0]       b1a_wdata, b1a_rdata;
  logic             b1b_en;
  logic [B1_AW-1:0] b1b_addr;
  logic [7:0]       b1b_rdata;
  logic             rm_rd_en, ro_b1_en;
  logic [B1_AW-1:0] rm_rd_addr, ro_b1_addr;

  // BRAM2
  logic             b2a_en, b2a_we;
  logic [B2_AW-1:0] b2a_addr;
  logic [31:0]      b2a_wdata, b2a_rdata;
  logic             b2b_en;
  logic [B2_AW-1:0] b2b_addr;
  logic [31:0]      b2b_rdata;

  logic [31:0]      nbytes;
  logic             sdc_full, sdc_term;
  logic [31:0]      nchanges;
  logic [B2_AW-1:0] adc_wptr;
  logic             rm_valid;
  logic [7:0]       rm_char;

  fe_gpio_if #(.B1_AW(B1_AW), .B2_AW(B2_AW)) u_gpio (
    .clk, .rst_n, .gpio_out, .gpio_in,
    .ctrl, .scan_en, .sdo,
    .params_req, .params_ack, .done(mst_done),
    .rm_valid, .rm_char, .rm_busy(!rm_done),
    .b1_en(ro_b1_en), .b1_addr(ro_b1_addr), .b1_data(b1b_rdata),
    .b2_en(b2b_en), .b2_addr(b2b_addr), .b2_data(b2b_rdata),
    .nserial(nbytes), .nchanges, .adc_wptr, .cycles,
    .status({10'd0, !rm_done, mst_busy, rocket_rst_n, exit_enabled, sdc_term, sdc_full})
  );

  fi_scan_chain #(.N_SITES(N_SITES)) u_chain (
    .clk, .rst_n, .scan_en,
    .sdi({ctrl.sdi_active, ctrl.sdi_type1, ctrl.sdi_type0}),
    .sdo, .site_in, .site_out
  );

  mst_ctrl u_mst (
    .clk, .rst_n,
    .start(ctrl.start), .params_valid(ctrl.params_valid),
    .params_data(ctrl.data), .params_req, .params_ack, .done(mst_done),
    .coll_start, .coll_clear, .sdc_done, .adc_done, .rm_done,
    .adc_halt, .exit_enabled, .rocket_rst_n,
    .cycle_limit, .idle_wait, .stream, .cycles, .busy(mst_busy)
  );

  sdc #(.DEPTH(B1_DEPTH)) u_sdc (
    .clk, .rst_n, .start(coll_start), .clear_mem(coll_clear), .done(sdc_done),
    .uart_intr, .uart_data, .uart_ack,
    .exit_enabled, .cprog_term(ctrl.cprog_term), .idle_wait,
    .stream, .rd_count(rm_count),
    .mem_en(b1a_en), .mem_we(b1a_we), .mem_addr(b1a_addr), .mem_wdata(b1a_wdata),
    .nbytes, .full(sdc_full), .term(sdc_term)
  );

  rm #(.DEPTH(B1_DEPTH)) u_rm (
    .clk, .rst_n, .start(rm_start), .clear(coll_clear), .done(rm_done),
    .sdc_nbytes(nbytes), .sdc_done,
    .rd_en(rm_rd_en), .rd_addr(rm_rd_addr), .rd_data(b1b_rdata),
    .rm_valid, .rm_char, .rm_ack(ctrl.rm_ack), .rd_count(rm_count)
  );

  // The runtime monitor clears with the others but streams only in stream
  // mode; otherwise the manager reads BRAM1 after the run.
  assign rm_start = coll_start && (coll_clear || stream);

  // BRAM1 port B belongs to the runtime monitor while it runs.
  assign b1b_en   = rm_done ? ro_b1_en   : rm_rd_en;
  assign b1b_addr = rm_done ? ro_b1_addr : rm_rd_addr;

  fe_bram #(.DEPTH(B1_DEPTH), .WIDTH(8)) u_bram1 (
    .clk,
    .a_en(b1a_en), .a_we(b1a_we), .a_addr(b1a_addr), .a_wdata(b1a_wdata), .a_rdata(b1a_rdata),
    .b_en(b1b_en), .b_addr(b1b_addr), .b_rdata(b1b_rdata)
  );

  adc #(.DEPTH(B2_DEPTH)) u_adc (
    .clk, .rst_n, .start(coll_start), .clear_mem(coll_clear), .halt(adc_halt),
    .done(adc_done), .addr_bus,
    .mem_en(b2a_en), .mem_we(b2a_we), .mem_addr(b2a_addr), .mem_wdata(b2a_wdata),
    .nchanges, .wptr(adc_wptr)
  );

  fe_bram #(.DEPTH(B2_DEPTH), .WIDTH(32)) u_bram2 (
    .clk,
    .a_en(b2a_en), .a_we(b2a_we), .a_addr(b2a_addr), .a_wdata(b2a_wdata), .a_rdata(b2a_rdata),
    .b_en(b2b_en), .b_addr(b2b_addr), .b_rdata(b2b_rdata)
  );

endmodule
