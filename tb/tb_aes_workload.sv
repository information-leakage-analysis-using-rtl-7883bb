// tb_aes_workload: the AES experiment configuration at its full sizes. The
// engine (48 fault sites, default 64 KB serial buffer and 2048-word address
// buffer) runs dut_model with a program long enough to make 52147 address
// changes, with the run window and idle wait of the AES campaign: a cycle
// limit of 2^22 and an idle wait of 2^20 cycles, both given through the
// 23-bit parameter words.
//   run 1, fault-free: the report is read back from BRAM1 after the run;
//          the address-change count must be 52147, and the newest 50
//          entries of the wrapped address ring must be the last program
//          addresses followed by the idle-loop address;
//   run 2, stuck-at-1 on the reboot flag: the model prints its report over
//          and over, the run stops with the buffer full at 65536
//          characters, and all of them are read back and checked.
module tb_aes_workload;
  localparam int N_SITES = 48, LIMIT = 1 << 22, IDLE = 1 << 20;
  localparam int NCHG = 52147, B2 = 2048, B1 = 65536;
  localparam logic [31:0] IDLE_ADDR = 32'h1007_FBA0;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  logic [N_SITES-1:0] site_in, site_out;
  logic rocket_rst_n, uart_intr, uart_ack;
  logic [7:0] uart_data;
  logic [31:0] addr_bus;
  int checks = 0, failures = 0;
  bit slow = 0;
  int n_scan = 0, n_readout = 0, n_params = 0, n_runs = 0;

  fe_platform #(.N_SITES(N_SITES)) dut (.*);
  // one address change per program cycle, plus the first sample and the
  // step to the idle loop
  dut_model #(.N_SITES(N_SITES), .MIN_STEPS(NCHG - 1)) u_model (
    .clk, .rst_n(rocket_rst_n), .site_in, .site_out,
    .uart_intr, .uart_data, .uart_ack, .addr_bus
  );

  always #5 clk = ~clk;
  initial begin
    repeat (14000000) @(posedge clk);
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
    logic [31:0] a [50];
    logic [15:0] lo, hi;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);

    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    ok = (q.size() == golden.len());
    foreach (q[i]) if (i < golden.len() && q[i] != golden[i]) ok = 0;
    check(ok, "fault-free report");
    check(st[1:0] == 2'b00, "idle exit after the window");
    check(cyc >= LIMIT && cyc <= LIMIT + IDLE + 4, $sformatf("run length %0d", cyc));
    check(nchg >= NCHG - 2 && nchg <= NCHG + 2, $sformatf("address changes %0d", nchg));
    check(wptr == nchg % B2, $sformatf("ring write pointer %0d", wptr));
    for (int k = 0; k < 50; k++) begin
      int idx;
      idx = (wptr - 50 + k + B2) % B2;
      read_word(4'd1, 16'(idx), lo);
      read_word(4'd2, 16'(idx), hi);
      a[k] = {hi, lo};
    end
    ok = (a[49] == IDLE_ADDR);
    for (int k = 1; k < 49; k++) if (a[k] != a[k-1] + 4) ok = 0;
    check(ok, $sformatf("last 50 addresses end %h %h", a[48], a[49]));

    place_faults(41, 1, 2'b01);
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    check(nser == B1 && st[0], $sformatf("buffer full at %0d characters", nser));
    ok = (q.size() == B1);
    foreach (q[i]) if (q[i] != golden[i % golden.len()]) ok = 0;
    check(ok, "repeated report read back in full");
    check(nchg > NCHG, $sformatf("endless program: %0d address changes", nchg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
