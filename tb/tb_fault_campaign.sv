// tb_fault_campaign: the manager's campaign loop on a small engine (48 fault
// sites, 256-byte serial buffer, 64-word address buffer) with dut_model.
// Outer loop: the four fault types; middle loop: 1 to 5 adjacent faults;
// inner loop: the group of faults is scanned in once at sites 0..k-1 and
// then moved up by one site with a single scan-clock pulse before each
// further experiment, until it reaches the last site. That is
// 4 * (48+47+46+45+44) = 920 experiments. Each outcome is predicted from
// the model's site map and checked:
//   faults only on UART character bits (sites 7:0): the report with those
//     bits forced low, forced high, inverted, or, for a delay, taken from
//     the previous character (the collector takes a character in the first
//     cycle its "ready" is seen, when the delayed bits still hold the old
//     value);
//   faults only on address bits or unused sites: the exact fault-free
//     report (faults stay at their own sites);
//   stuck-at-0 on the "character ready" site: no output;
//   stuck-at-1 on the reboot flag: output until the buffer is full.
// Other windows are only classified. Every class must occur, and the scan
// pulse count must match one full load per group plus one pulse per move.
module tb_fault_campaign;
  localparam int N_SITES = 48, LIMIT = 400, IDLE = 60, B1 = 256;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  logic [N_SITES-1:0] site_in, site_out;
  logic rocket_rst_n, uart_intr, uart_ack;
  logic [7:0] uart_data;
  logic [31:0] addr_bus;
  int checks = 0, failures = 0;
  bit slow = 0;
  int n_scan = 0, n_readout = 0, n_params = 0, n_runs = 0;

  fe_platform #(.N_SITES(N_SITES), .B1_DEPTH(B1), .B2_DEPTH(64)) dut (.*);
  dut_model #(.N_SITES(N_SITES)) u_model (
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

  string golden = "Boot OK\r\nkey:00112233\r\nenc:8eb395f9\r\nCorrect\r\n";

  function automatic bit text_is(byte unsigned q[$], logic [7:0] mask, logic [1:0] t);
    if (q.size() != golden.len()) return 0;
    foreach (q[i]) begin
      logic [7:0] e;
      case (t)
        2'b00:   e = golden[i] & ~mask;
        2'b01:   e = golden[i] | mask;
        2'b11:   e = golden[i] ^ mask;
        default: e = (golden[i] & ~mask) | ((i == 0 ? 8'h00 : golden[i-1]) & mask);
      endcase
      if (q[i] != e) return 0;
    end
    return 1;
  endfunction

  initial begin
    byte unsigned q[$];
    int nser, nchg, wptr, cyc;
    logic [15:0] st;
    int n_exp, n_pred, expect_scan;
    int n_correct, n_corrupt, n_none, n_full;
    n_exp = 0; n_pred = 0; expect_scan = 0;
    n_correct = 0; n_corrupt = 0; n_none = 0; n_full = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);

    for (int t = 0; t < 4; t++) begin
      for (int k = 1; k <= 5; k++) begin
        for (int s = 0; s + k <= N_SITES; s++) begin
          int hi;
          hi = s + k - 1;
          if (s == 0) begin
            place_faults(0, k, 2'(t));
            expect_scan += N_SITES;
          end else begin
            scan_shift(3'b000);
            expect_scan++;
          end
          run_experiment(LIMIT, IDLE, 0, 0, q, nser, nchg, st, wptr, cyc);
          n_exp++;
          // classify
          if (nser == 0) n_none++;
          else if (st[0]) n_full++;
          else if (text_is(q, 8'h00, 2'b00)) n_correct++;
          else n_corrupt++;
          // predict
          if (hi <= 7) begin
            logic [7:0] mask;
            mask = '0;
            for (int b = s; b <= hi; b++) mask[b] = 1'b1;
            check(text_is(q, mask, 2'(t)), $sformatf("type %0d x%0d at %0d: character bits", t, k, s));
            n_pred++;
          end else if (s >= 9 && hi != 41) begin
            if (!(s <= 41 && hi >= 41)) begin
              check(text_is(q, 8'h00, 2'b00) && st[1:0] == 2'b00,
                    $sformatf("type %0d x%0d at %0d: report unchanged", t, k, s));
              n_pred++;
            end
          end
          if (t == 0 && s <= 8 && hi >= 8) begin
            check(nser == 0, $sformatf("ready stuck at 0, x%0d at %0d: no output", k, s));
            n_pred++;
          end
          if (t == 1 && s <= 41 && hi >= 41 && s > 8) begin
            check(nser == B1 && st[0], $sformatf("reboot flag stuck at 1, x%0d at %0d: buffer full", k, s));
            n_pred++;
          end
        end
      end
    end
    check(n_exp == 920, $sformatf("%0d experiments", n_exp));
    check(n_scan == expect_scan, $sformatf("%0d scan pulses, expected %0d", n_scan, expect_scan));
    check(n_params == 3 * n_runs, "three parameter words per experiment");
    check(n_correct > 0 && n_corrupt > 0 && n_none > 0 && n_full > 0,
          $sformatf("classes: correct %0d corrupt %0d none %0d full %0d", n_correct, n_corrupt, n_none, n_full));
    $display("campaign: %0d experiments, %0d predicted; correct %0d corrupt %0d none %0d full %0d",
             n_exp, n_pred, n_correct, n_corrupt, n_none, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
