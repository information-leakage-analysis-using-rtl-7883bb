// fe_pkg: types and constants shared by the fault-emulation (FE) engine.
//
// The FE engine sits next to an instrumented processor netlist. Every gate
// input of that netlist carries a fault-injection (FI) cell; three scan chains
// choose a fault type per cell and switch it on. A small set of state machines
// (master control, serial collection, address collection, runtime monitor)
// runs one fault-injection experiment at a time under control of a manager
// program that talks to the engine through one 32-bit output and one 32-bit
// input register (GPIO).
//
// The four fault types come from the description of the FI cell; their 2-bit
// encoding, and every GPIO bit position below, is this design's own choice.
package fe_pkg;

  // Fault type held in the two type scan chains of an FI cell.
  typedef enum logic [1:0] {
    FT_SA0    = 2'b00,  // output stuck at 0
    FT_SA1    = 2'b01,  // output stuck at 1
    FT_DELAY  = 2'b10,  // output is the input delayed by one clock cycle
    FT_INVERT = 2'b11   // output is the inverted input
  } fault_type_e;

  // Width of the data field of the GPIO output register (bits 31:9).
  localparam int unsigned GPIO_DATA_W = 23;

  // Decoded GPIO output register (manager -> engine).
  //   [0] start        begin an experiment, hold until done is seen
  //   [1] params_valid four-phase handshake for the parameter words
  //   [2] scan_clk     every rising edge shifts the three scan chains once
  //   [3] sdi_type0    scan data, fault type bit 0 chain
  //   [4] sdi_type1    scan data, fault type bit 1 chain
  //   [5] sdi_active   scan data, fault_active chain
  //   [6] cprog_term   stop serial collection now
  //   [7] rm_ack       four-phase handshake for runtime monitor characters
  //   [8] rd_req       four-phase handshake for data readout
  //   [31:9] data      parameter word, or readout {sel[3:0], addr[15:0]}
  typedef struct packed {
    logic [GPIO_DATA_W-1:0] data;
    logic rd_req;
    logic rm_ack;
    logic cprog_term;
    logic sdi_active;
    logic sdi_type1;
    logic sdi_type0;
    logic scan_clk;
    logic params_valid;
    logic start;
  } gpio_ctrl_t;

  // GPIO input register (engine -> manager).
  //   [0] params_req  Mst waits for a parameter word
  //   [1] params_ack
  //   [2] done        experiment finished, data can be read
  //   [3] rm_valid    rm_char holds a new UART character
  //   [4] rd_ack      rd_data holds the requested word
  //   [7:5] sdo       scan outputs {active, type1, type0}
  //   [15:8] rm_char
  //   [31:16] rd_data
  typedef struct packed {
    logic [15:0] rd_data;
    logic [7:0]  rm_char;
    logic [2:0]  sdo;
    logic rd_ack;
    logic rm_valid;
    logic done;
    logic params_ack;
    logic params_req;
  } gpio_stat_t;

  // Readout selector, bits [19:16] of the data field during rd_req.
  typedef enum logic [3:0] {
    RD_SERIAL    = 4'd0,  // BRAM1 byte at addr
    RD_ADDR_LO   = 4'd1,  // BRAM2 word at addr, bits 15:0
    RD_ADDR_HI   = 4'd2,  // BRAM2 word at addr, bits 31:16
    RD_NSER_LO   = 4'd3,  // number of serial bytes collected
    RD_NSER_HI   = 4'd4,
    RD_NCHG_LO   = 4'd5,  // number of address bus changes
    RD_NCHG_HI   = 4'd6,
    RD_ADC_WPTR  = 4'd7,  // next BRAM2 write index
    RD_CYC_LO    = 4'd8,  // DUT cycles run in this experiment
    RD_CYC_HI    = 4'd9,
    RD_STATUS    = 4'd10  // {rm_busy, mst_busy, dut_released, exit_enabled, sdc_term, sdc_full}
  } rd_sel_e;

endpackage
