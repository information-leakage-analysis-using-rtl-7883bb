// dut_model: behavioural stand-in for the instrumented processor under test
// (testbench only, not synthesizable hardware of the engine).
//
// After reset it "boots" and prints a short AES-style report on its UART:
//   "Boot OK\r\nkey:<hex>\r\nenc:<hex>\r\nCorrect\r\n"
// where enc is key XOR txt, while its address bus steps through program
// addresses; then, once at least MIN_STEPS cycles have passed since reset
// (the length of the program), it parks the bus on an idle-loop address. Its internal
// signals pass through the engine's fault sites, so injected faults change
// its behaviour the way a faulty netlist would:
//   sites 7:0   UART character bits   (a fault corrupts the output)
//   site  8     UART "character ready" (stuck-at-0: no output at all)
//   sites 40:9  address bus bits       (a fault changes the address trace)
//   site  41    reboot flag, 0 when fault-free (stuck-at-1: endless reboots
//               and output until the serial buffer is full)
//   other sites pass a pseudo-random value and are not used.
// UART handshake: uart_intr (through site 8) stays high until uart_ack,
// then the model waits for uart_ack to fall and GAP idle cycles.
module dut_model #(
  parameter int unsigned N_SITES = 48,
  parameter int unsigned GAP     = 3,
  parameter int unsigned MIN_STEPS = 0
) (
  input  logic               clk,
  input  logic               rst_n,        // DUT reset from the engine
  output logic [N_SITES-1:0] site_in,
  input  logic [N_SITES-1:0] site_out,
  output logic               uart_intr,
  output logic [7:0]         uart_data,
  input  logic               uart_ack,
  output logic [31:0]        addr_bus
);
  localparam logic [31:0] KEY = 32'h0011_2233;
  localparam logic [31:0] TXT = 32'h8EA2_B7CA;

  function automatic string hex32(logic [31:0] v);
    return $sformatf("%08x", v);
  endfunction

  string msg;
  int    idx;
  logic  raw_valid;
  logic [7:0] raw_char;
  logic [29:0] pc;
  logic  running;
  int    gap_cnt;
  logic  waiting_release;
  logic [31:0] noise;
  int    steps;

  initial msg = {"Boot OK\r\nkey:", hex32(KEY), "\r\nenc:", hex32(KEY ^ TXT), "\r\nCorrect\r\n"};

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= 0; raw_valid <= 0; raw_char <= 0; pc <= 30'h0401_C000;
      running <= 1; steps <= 0; gap_cnt <= 5; waiting_release <= 0; noise <= 32'h1;
    end else begin
      noise <= {noise[30:0], noise[31] ^ noise[21] ^ noise[1] ^ noise[0]};
      if (running) begin
        pc    <= pc + 1'b1;
        steps <= steps + 1;
      end
      if (raw_valid) begin
        if (uart_ack) begin raw_valid <= 0; waiting_release <= 1; end
      end else if (waiting_release) begin
        if (!uart_ack) begin waiting_release <= 0; gap_cnt <= GAP; end
      end else if (gap_cnt > 0) begin
        gap_cnt <= gap_cnt - 1;
      end else if (running) begin
        if (idx < msg.len()) begin
          raw_char  <= msg[idx];
          raw_valid <= 1;
          idx       <= idx + 1;
        end else if (site_out[41]) begin
          idx <= 0;                 // faulty reboot flag: start over
        end else if (steps + 1 >= MIN_STEPS) begin
          running <= 0;             // park in the idle loop
        end
      end
    end
  end

  always_comb begin
    site_in = '0;
    for (int i = 42; i < N_SITES; i++) site_in[i] = noise[i % 32];
    site_in[7:0]  = raw_char;
    site_in[8]    = raw_valid;
    site_in[40:9] = running ? {pc, 2'b00} : 32'h1007_FBA0;
    site_in[41]   = 1'b0;
  end

  assign uart_data = site_out[7:0];
  assign uart_intr = site_out[8];
  assign addr_bus  = site_out[40:9];
endmodule
