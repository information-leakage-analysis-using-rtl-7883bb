// tb_fe_platform: end-to-end test of the fault-emulation engine with a
// behavioural DUT (dut_model) and a model of the manager (fe_manager.svh).
// Experiments 2, 5 and 6 (and 4b) use the stream mode, in which characters
// reach the manager through the runtime monitor during the run; the others
// read BRAM1 after the run.
// Reduced sizes: 48 fault sites, 256-byte serial buffer, 64-word address
// ring. Seven experiments, each checked against values worked out in the
// testbench (the expected UART text, and an address-bus monitor that
// records every change during the run window):
//   1 fault-free           text correct, address trace and count correct,
//                          address ring wrapped, idle-wait exit
//   2 invert, site 0       every character has bit 0 flipped
//   3 stuck-at-0, site 8   no output (the DUT waits forever)
//   4 stuck-at-1, site 41  endless reboots until the serial buffer is full;
//                          repeated in stream mode with a slow manager: the
//                          serial ring wraps, back-pressure stalls the DUT
//                          and no character is lost
//   5 delay, site 11       output correct, address trace differs
//   6 fault-free, manager stops early via cprog_term
//   7 five adjacent stuck-at-0 faults, sites 0..4: characters masked
// It also reads stored characters back from BRAM1 and compares them with
// the streamed ones, and counts each mechanism, failing if one never occurs.
module tb_fe_platform;
  localparam int N_SITES = 48, B1 = 256, B2 = 64, LIMIT = 400, IDLE = 60;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  logic [N_SITES-1:0] site_in, site_out;
  logic rocket_rst_n, uart_intr, uart_ack;
  logic [7:0] uart_data;
  logic [31:0] addr_bus;
  int checks = 0, failures = 0;
  int n_scan = 0, n_readout = 0, n_params = 0, n_runs = 0;
  bit slow = 0;
  int n_ring = 0, n_stall = 0, n_stream = 0, n_post = 0;
  int n_idle_exit = 0, n_full = 0, n_term = 0, n_wrap = 0, n_sa0 = 0, n_sa1 = 0, n_delay = 0, n_inv = 0;

  fe_platform #(.N_SITES(N_SITES), .B1_DEPTH(B1), .B2_DEPTH(B2)) dut (.*);
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

  // back-pressure: DUT offering a character while the ring is full
  always @(posedge clk) if (dut.u_sdc.ring_full && uart_intr) n_stall++;
  always @(posedge clk) if (dut.u_rm.rm_valid) n_stream++;

  // independent address-bus monitor over the run window
  logic [31:0] hist [$];
  int run_cnt = 0;
  logic prev_rst = 0;
  always @(negedge clk) begin
    if (rocket_rst_n && !prev_rst) begin hist = {}; run_cnt = 0; end
    prev_rst = rocket_rst_n;
    if (rocket_rst_n && run_cnt < LIMIT) begin
      if (hist.size() == 0 || hist[hist.size()-1] != addr_bus) hist.push_back(addr_bus);
      run_cnt++;
    end
  end

  `include "fe_manager.svh"

  string golden = "Boot OK\r\nkey:00112233\r\nenc:8eb395f9\r\nCorrect\r\n";
  byte unsigned q[$];
  int nser, nchg, wptr, cyc;
  logic [15:0] st;
  logic [31:0] ff_last [$];
  int ff_nchg;

  function automatic bit text_is(byte unsigned got[$], byte unsigned mask_and, byte unsigned mask_xor);
    if (got.size() != golden.len()) return 0;
    foreach (got[i]) if (got[i] != ((golden[i] & mask_and) ^ mask_xor)) return 0;
    return 1;
  endfunction

  task automatic check_trace(output bit same_as_model);
    logic [31:0] a;
    logic [15:0] lo, hi;
    same_as_model = (nchg == hist.size());
    for (int k = 1; k <= 8; k++) begin
      read_word(4'd1, 16'((wptr - k) & (B2 - 1)), lo);
      read_word(4'd2, 16'((wptr - k) & (B2 - 1)), hi);
      a = {hi, lo};
      if (a != hist[hist.size() - k]) same_as_model = 0;
    end
  endtask

  initial begin
    bit ok;
    logic [15:0] w;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);

    // 1: fault-free
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    check(text_is(q, 8'hFF, 8'h00), "fault-free text");
    check(nser == golden.len(), $sformatf("nser %0d", nser));
    check(st[1:0] == 2'b00, "no full, no term");
    check(cyc >= LIMIT && cyc <= LIMIT + IDLE + 4, $sformatf("cycles %0d", cyc));
    check_trace(ok);
    check(ok, $sformatf("address trace nchg %0d model %0d", nchg, hist.size()));
    check(nchg > B2, "address ring wrapped");
    if (nchg > B2) n_wrap++;
    if (st[1:0] == 2'b00) n_idle_exit++;
    ff_nchg = nchg;
    ff_last = hist;
    n_post++;

    // 2: invert on character bit 0
    place_faults(0, 1, 2'b11);
    run_experiment(LIMIT, IDLE, 0, 1, q, nser, nchg, st, wptr, cyc);
    check(text_is(q, 8'hFF, 8'h01), "inverted bit 0");
    if (text_is(q, 8'hFF, 8'h01)) n_inv++;

    // 3: stuck-at-0 on character-ready
    place_faults(8, 1, 2'b00);
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    check(nser == 0 && q.size() == 0, $sformatf("no output, got %0d", nser));
    if (nser == 0) n_sa0++;

    // 4: stuck-at-1 on the reboot flag
    place_faults(41, 1, 2'b01);
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    check(st[0] && nser == B1 && q.size() == B1, $sformatf("buffer full nser %0d st %h", nser, st));
    ok = 1;
    foreach (q[i]) if (q[i] != golden[i % golden.len()]) ok = 0;
    check(ok, "repeated boot text");
    if (st[0]) begin n_full++; n_sa1++; end

    // 4b: same fault in stream mode with a slow manager: the ring wraps
    //     several times, the DUT is stalled by back-pressure, nothing lost
    slow = 1;
    run_experiment(LIMIT, IDLE, 3 * B1, 1, q, nser, nchg, st, wptr, cyc);
    slow = 0;
    ok = (q.size() == nser) && (nser >= 3 * B1);
    foreach (q[i]) if (q[i] != golden[i % golden.len()]) ok = 0;
    check(ok, $sformatf("stream ring: %0d characters in order", nser));
    check(st[1] && !st[0], "stream run ended by the manager, not by a full buffer");
    if (nser > B1) n_ring++;

    // 5: delay fault on address bit 2
    place_faults(11, 1, 2'b10);
    run_experiment(LIMIT, IDLE, 0, 1, q, nser, nchg, st, wptr, cyc);
    check(text_is(q, 8'hFF, 8'h00), "delay: output still correct");
    check_trace(ok);
    check(ok, "delay: engine trace equals monitor");
    check(hist != ff_last, "delay: trace differs from fault-free");
    if (hist != ff_last) n_delay++;

    // 6: fault-free, early termination by the manager
    place_faults(0, 0, 2'b00);
    run_experiment(LIMIT, IDLE, 10, 1, q, nser, nchg, st, wptr, cyc);
    check(st[1] && nser >= 10 && nser <= 12, $sformatf("terminated nser %0d st %h", nser, st));
    check(q.size() == nser, "all stored characters streamed");
    if (st[1]) n_term++;

    // 7: five simultaneous stuck-at-0 faults on character bits 0..4
    place_faults(0, 5, 2'b00);
    run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
    check(text_is(q, 8'hE0, 8'h00), "five stuck-at-0 faults");

    check(n_scan > 0 && n_readout > 0 && n_params == 3 * n_runs, "scan, readout, parameters");
    check(n_idle_exit > 0, "idle-wait exit seen");
    check(n_full > 0, "buffer-full exit seen");
    check(n_term > 0, "manager termination seen");
    check(n_wrap > 0, "address ring wrap seen");
    check(n_ring > 0 && n_stall > 0, "serial ring wrap and back-pressure seen");
    check(n_stream > 0 && n_post > 0, "streamed and post-run serial transfer seen");
    check(n_sa0 > 0 && n_sa1 > 0 && n_delay > 0 && n_inv > 0, "all four fault types seen");
    $display("stream: ring=%0d stall_cycles=%0d streamed_cycles=%0d post=%0d", n_ring, n_stall, n_stream, n_post);
    $display("mechanisms: scan=%0d readout=%0d params=%0d runs=%0d idle=%0d full=%0d term=%0d wrap=%0d sa0=%0d sa1=%0d delay=%0d inv=%0d",
             n_scan, n_readout, n_params, n_runs, n_idle_exit, n_full, n_term, n_wrap, n_sa0, n_sa1, n_delay, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
