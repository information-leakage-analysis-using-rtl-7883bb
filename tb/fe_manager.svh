// fe_manager.svh: testbench model of the fault-injection manager program.
// Included inside a testbench module that declares clk, gpio_out, gpio_in,
// N_SITES and the check counters. Drives the GPIO registers exactly as the
// manager software would: scan-chain loading, the parameter handshake, the
// runtime-monitor character stream, early termination and data readout.

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", what); end
endtask

// one scan-clock cycle with {active, type1, type0} on the scan inputs
task automatic scan_shift(input logic [2:0] d);
  @(negedge clk);
  gpio_out[5:3] = {d[2], d[1], d[0]};
  gpio_out[2] = 1'b1;
  repeat (2) @(negedge clk);
  gpio_out[2] = 1'b0;
  repeat (2) @(negedge clk);
  n_scan++;
endtask

// Load the whole chain: k adjacent faults of type t starting at site s,
// every other cell fault-free. The bit shifted in at step j ends at site
// N_SITES-1-j.
task automatic place_faults(input int s, input int k, input logic [1:0] t);
  for (int j = 0; j < N_SITES; j++) begin
    int p;
    p = N_SITES - 1 - j;
    scan_shift((p >= s && p < s + k) ? {1'b1, t} : 3'b000);
  end
endtask

task automatic read_word(input logic [3:0] sel, input logic [15:0] addr, output logic [15:0] data);
  @(negedge clk);
  gpio_out[31:9] = {3'd0, sel, addr};
  gpio_out[8] = 1'b1;
  while (!gpio_in[4]) @(negedge clk);
  data = gpio_in[31:16];
  gpio_out[8] = 1'b0;
  while (gpio_in[4]) @(negedge clk);
  n_readout++;
endtask

task automatic read32(input logic [3:0] sel_lo, input logic [15:0] addr, output logic [31:0] v);
  logic [15:0] lo, hi;
  read_word(sel_lo, addr, lo);
  read_word(sel_lo + 4'd1, addr, hi);
  v = {hi, lo};
endtask

task automatic give_param(input logic [22:0] v);
  while (!gpio_in[0]) @(negedge clk);
  gpio_out[31:9] = v;
  gpio_out[1] = 1'b1;
  while (!gpio_in[1]) @(negedge clk);
  gpio_out[1] = 1'b0;
  while (gpio_in[1]) @(negedge clk);
  n_params++;
endtask

// take one character from the runtime monitor, if one is offered; a slow
// manager waits a while before acknowledging
task automatic take_char(ref byte unsigned q[$]);
  if (gpio_in[3]) begin
    q.push_back(gpio_in[15:8]);
    if (slow) repeat ($urandom_range(4, 20)) @(negedge clk);
    gpio_out[7] = 1'b1;
    while (gpio_in[3]) @(negedge clk);
    gpio_out[7] = 1'b0;
  end
endtask

// Run one experiment. stream selects the streaming configuration (the
// characters arrive through the runtime monitor while the DUT runs);
// otherwise they are read from BRAM1 after the run. term_after > 0 raises
// cprog_term once that many characters have been streamed. Returns the
// characters and counters.
task automatic run_experiment(input int limit, input int idle, input int term_after,
                              input bit stream,
                              output byte unsigned q[$], output int nser,
                              output int nchg, output logic [15:0] status,
                              output int wptr, output int cyc);
  logic [31:0] v;
  logic [15:0] w;
  q = {};
  @(negedge clk);
  gpio_out[0] = 1'b1;
  give_param(23'(limit));
  give_param(23'(idle));
  give_param(23'(stream));
  while (!gpio_in[2]) begin
    @(negedge clk);
    take_char(q);
    if (term_after > 0 && q.size() >= term_after) gpio_out[6] = 1'b1;
  end
  read32(4'd3, 16'd0, v); nser = int'(v);
  if (stream) begin
    while (q.size() < nser) begin
      @(negedge clk);
      take_char(q);
    end
  end else begin
    for (int i = 0; i < nser; i++) begin
      read_word(4'd0, 16'(i), w);
      q.push_back(w[7:0]);
    end
  end
  read32(4'd5, 16'd0, v); nchg = int'(v);
  read_word(4'd7, 16'd0, w); wptr = int'(w);
  read32(4'd8, 16'd0, v); cyc = int'(v);
  read_word(4'd10, 16'd0, status);
  @(negedge clk);
  gpio_out[0] = 1'b0;
  gpio_out[6] = 1'b0;
  repeat (4) @(negedge clk);
  check(!gpio_in[2], "done released");
  n_runs++;
endtask
