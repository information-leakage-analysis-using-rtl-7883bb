// tb_fe_platform_full: the engine at its full default size (85713 fault
// sites, 64 KB serial buffer, 2048-word address buffer) taken through two
// complete experiments with the behavioural DUT and manager models:
// a fault-free run (serial data read from BRAM1 afterwards), then one
// scan pulse that moves an invert fault into
// site 0 (UART character bit 0) and a second run whose output must have
// bit 0 of every character flipped (serial data streamed by the runtime
// monitor during the run). Each run clears both buffers in full
// (65536 cycles), so this test is slow compared with tb_fe_platform.
module tb_fe_platform_full;
  localparam int N_SITES = 85713, LIMIT = 400, IDLE = 60;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  logic [N_SITES-1:0] site_in, site_out;
  logic rocket_rst_n, uart_intr, uart_ack;
  logic [7:0] uart_data;
  logic [31:0] addr_bus;
  int checks = 0, failures = 0;
  bit slow = 0;
  int n_scan = 0, n_readout = 0, n_params = 0, n_runs = 0;

  fe_platform dut (.*);
  dut_model #(.N_SITES(N_SITES)) u_model (
    .clk, .rst_n(rocket_rst_n), .site_in, .site_out,
    .uart_intr, .uart_data, .uart_ack, .addr_bus
  );

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "fe_manager.svh"

  string golden = "Boot OK\r\nkey:00112233\r\nenc:8eb395f9\r\nCorrect\r\n";
  byte unsigned q[$];
  int nser, nchg, wptr, cyc;
  logic [15:0] st;

  initial begin
    bit ok;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    ok = (q.size() == golden.len());
    foreach (q[i]) if (i < golden.len() && q[i] != golden[i]) ok = 0;
    check(ok, "fault-free text");
    check(nser == golden.len() && st[1:0] == 2'b00, "fault-free count and exit");
    check(nchg > 1 && wptr == nchg % 2048, $sformatf("address changes %0d wptr %0d", nchg, wptr));
    check(cyc >= LIMIT, "run length");
    scan_shift(3'b111);
    run_experiment(LIMIT, IDLE, 0, 1, q, nser, nchg, st, wptr, cyc);
    ok = (q.size() == golden.len());
    foreach (q[i]) if (i < golden.len() && q[i] != (golden[i] ^ 8'h01)) ok = 0;
    check(ok, "invert fault on site 0");
    check(gpio_in[7:5] == 3'b000, "scan output of the last site fault-free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
