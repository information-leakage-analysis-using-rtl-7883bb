// tb_twister_workload: the pseudo-random-generator workload at its full
// output length. The engine (80 fault sites, default 64 KB serial buffer and
// 2048-word address buffer) runs twister_model, which prints one million
// MT19937 bits as 281264 UART characters, in stream mode:
//   run 1, fault-free: the manager compares the stream with its own MT19937
//          reference (first number checked against the published reference
//          value 0xd091bb5c for seed 5489) and stops the run with cprog_term
//          after 35000 matching characters, as a manager does to cut
//          fault-free experiments short;
//   run 2, stuck-at-0 on bit 0 of the generated number: the output stays
//          well formed but is wrong, so the manager lets it run to the end.
//          All 281264 characters must pass through the 64 KB ring in order,
//          every number must equal the reference with bit 0 cleared, and the
//          run must end on the idle exit.
module tb_twister_workload;
  localparam int N_SITES = 80, NWORDS = 31250, LIMIT = 4000, IDLE = 500;
  localparam int TOTAL = 14 + 9 * NWORDS;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  logic [N_SITES-1:0] site_in, site_out;
  logic rocket_rst_n, uart_intr, uart_ack;
  logic [7:0] uart_data;
  logic [31:0] addr_bus;
  int checks = 0, failures = 0;
  int n_scan = 0, n_readout = 0, n_params = 0, n_runs = 0;
  bit slow = 0;

  fe_platform #(.N_SITES(N_SITES)) dut (.*);
  twister_model #(.N_SITES(N_SITES), .NWORDS(NWORDS)) u_model (
    .clk, .rst_n(rocket_rst_n), .site_in, .site_out,
    .uart_intr, .uart_data, .uart_ack, .addr_bus
  );

  always #5 clk = ~clk;
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "fe_manager.svh"

  // independent MT19937 reference
  logic [31:0] rmt [624];
  int rmti;
  function automatic void ref_seed(logic [31:0] s);
    rmt[0] = s;
    for (int i = 1; i < 624; i++) rmt[i] = 32'd1812433253 * (rmt[i-1] ^ (rmt[i-1] >> 30)) + 32'(i);
    rmti = 624;
  endfunction
  function automatic logic [31:0] ref_next();
    logic [31:0] y;
    if (rmti >= 624) begin
      for (int k = 0; k < 624; k++) begin
        y = {rmt[k][31], rmt[(k + 1) % 624][30:0]};
        rmt[k] = rmt[(k + 397) % 624] ^ {1'b0, y[31:1]} ^ (y[0] ? 32'h9908_b0df : 32'h0);
      end
      rmti = 0;
    end
    y = rmt[rmti++];
    y = y ^ (y >> 11);
    y = y ^ ((y << 7) & 32'h9d2c_5680);
    y = y ^ ((y << 15) & 32'hefc6_0000);
    y = y ^ (y >> 18);
    return y;
  endfunction

  byte unsigned golden[$];
  logic [31:0] ref_words[$];

  task automatic build_golden();
    string boot = "Boot . . .OK\r\n";
    string h;
    ref_seed(32'd5489);
    golden = {};
    foreach (boot[i]) golden.push_back(boot[i]);
    for (int w = 0; w < NWORDS; w++) begin
      logic [31:0] v;
      v = ref_next();
      ref_words.push_back(v);
      h = $sformatf("%08x\n", v);
      foreach (h[i]) golden.push_back(h[i]);
    end
  endtask

  // one streaming experiment; stop early once `stop_after` characters match
  task automatic run_stream(input int stop_after, output byte unsigned q[$],
                            output int nser, output logic [15:0] status, output bit matched);
    logic [31:0] v;
    q = {};
    matched = 1;
    @(negedge clk);
    gpio_out[0] = 1'b1;
    give_param(23'(LIMIT));
    give_param(23'(IDLE));
    give_param(23'd1);
    while (!gpio_in[2]) begin
      @(negedge clk);
      if (gpio_in[3]) begin
        int n;
        n = q.size();
        take_char(q);
        if (n >= golden.size() || q[n] != golden[n]) matched = 0;
        if (matched && q.size() >= stop_after) gpio_out[6] = 1'b1;
      end
    end
    read32(4'd3, 16'd0, v); nser = int'(v);
    while (q.size() < nser) begin
      @(negedge clk);
      take_char(q);
    end
    read_word(4'd10, 16'd0, status);
    @(negedge clk);
    gpio_out[0] = 1'b0;
    gpio_out[6] = 1'b0;
    repeat (4) @(negedge clk);
    n_runs++;
  endtask

  initial begin
    byte unsigned q[$];
    int nser, bad_form, bad_val, differ;
    logic [15:0] st;
    bit matched;
    build_golden();
    check(ref_words[0] == 32'hd091_bb5c, $sformatf("reference MT19937 first output %h", ref_words[0]));
    check(golden.size() == TOTAL && TOTAL == 281264, $sformatf("golden length %0d", golden.size()));
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);

    // run 1: fault-free, terminated early after 35000 matching characters
    run_stream(35000, q, nser, st, matched);
    check(matched && st[1], "fault-free stream matches and is terminated early");
    // the collector runs ahead of the manager by up to one buffer of characters
    check(nser >= 35000 && nser < 35000 + 65536 + 4 && q.size() == nser, $sformatf("early stop at %0d", nser));
    check(q.size() <= golden.size() && q == golden[0:q.size()-1], "every collected character matches the reference");

    // run 2: stuck-at-0 on bit 0 of the generated number
    place_faults(0, 1, 2'b00);
    run_stream(35000, q, nser, st, matched);
    check(!matched, "faulty stream differs from the reference");
    check(nser == TOTAL && q.size() == TOTAL, $sformatf("full-length faulty stream %0d", nser));
    check(st[1:0] == 2'b00, "ended on the idle exit");
    bad_form = 0; bad_val = 0; differ = 0;
    for (int w = 0; w < NWORDS && q.size() == TOTAL; w++) begin
      string s;
      logic [31:0] v;
      int base;
      base = 14 + 9 * w;
      s = "";
      for (int k = 0; k < 8; k++) begin
        byte unsigned c;
        c = q[base + k];
        if (!((c >= "0" && c <= "9") || (c >= "a" && c <= "f"))) bad_form++;
        s = {s, string'(c)};
      end
      if (q[base + 8] != 8'h0a) bad_form++;
      v = s.atohex();
      if (v != (ref_words[w] & ~32'h1)) bad_val++;
      if (v != ref_words[w]) differ++;
    end
    check(bad_form == 0, $sformatf("well-formed output (%0d bad characters)", bad_form));
    check(bad_val == 0, $sformatf("every number is the reference with bit 0 stuck at 0 (%0d wrong)", bad_val));
    check(differ > NWORDS / 4, $sformatf("%0d of %0d numbers changed", differ, NWORDS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
