// tb_mst_ctrl: self-checking test of the master control state machine.
// Behavioural collectors report done a random number of cycles after each
// start. The manager side performs the parameter handshake (cycle limit 37,
// idle wait 5, stream mode on). Checks: the order of clear start, parameter requests, DUT
// reset held until all collectors are done, run start, halt of the address
// collector exactly 37 cycles after the DUT is released, exit_enabled until
// the serial collector finishes, done until start falls, and the latched
// parameters.
module tb_mst_ctrl;
  logic clk = 0, rst_n = 0;
  logic start = 0, params_valid = 0;
  logic [22:0] params_data = '0;
  logic params_req, params_ack, done, coll_start, coll_clear;
  logic sdc_done = 1, adc_done = 1, rm_done = 1;
  logic adc_halt, exit_enabled, rocket_rst_n, busy;
  logic [22:0] cycle_limit, idle_wait;
  logic stream;
  logic [31:0] cycles;
  int checks = 0, failures = 0;
  int n_clear = 0, n_run = 0, n_halt = 0;
  int rel_cycle = -1, halt_cycle = -1, cyc = 0;
  localparam int LIMIT = 37;

  mst_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural collectors
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (coll_start && coll_clear) begin
      n_clear++;
      sdc_done <= 0; adc_done <= 0; rm_done <= 0;
      fork
        begin repeat ($urandom_range(5, 40)) @(posedge clk); sdc_done <= 1; end
        begin repeat ($urandom_range(5, 40)) @(posedge clk); adc_done <= 1; end
        begin repeat ($urandom_range(1, 3)) @(posedge clk); rm_done <= 1; end
      join_none
    end else if (coll_start) begin
      n_run++;
      check(sdc_done && adc_done && rm_done, "run start only after clears");
      sdc_done <= 0;
    end
    if (rocket_rst_n && rel_cycle < 0) rel_cycle = cyc;
    if (adc_halt) begin n_halt++; halt_cycle = cyc; end
  end

  task automatic give_param(input logic [22:0] v);
    while (!params_req) @(negedge clk);
    params_data = v; params_valid = 1;
    while (!params_ack) @(negedge clk);
    params_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!rocket_rst_n && !busy, "idle with DUT in reset");
    start = 1;
    give_param(23'(LIMIT));
    give_param(23'd5);
    give_param(23'd1);
    check(cycle_limit == 23'(LIMIT) && idle_wait == 23'd5 && stream, "parameters latched");
    while (!rocket_rst_n) begin
      @(negedge clk);
    end
    check(sdc_done == 0, "collectors running at release");
    while (!exit_enabled) @(negedge clk);
    check(halt_cycle - rel_cycle + 1 == LIMIT, $sformatf("run length %0d", halt_cycle - rel_cycle + 1));
    repeat (17) begin
      @(negedge clk);
      check(exit_enabled && !done, "waiting for serial");
    end
    sdc_done = 1;
    @(negedge clk); @(negedge clk);
    check(done && !busy, "done");
    check(rocket_rst_n, "DUT left running");
    check(cycles >= LIMIT + 17, $sformatf("cycles %0d", cycles));
    start = 0;
    @(negedge clk); @(negedge clk);
    check(!done, "back to idle");
    check(n_clear == 1 && n_run == 1 && n_halt == 1, "one clear, one run, one halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
