// tb_fi_scan_chain: self-checking test of the three-chain fault array.
// Uses 37 sites in segments of 8 so that the chain crosses segment
// boundaries and a partial last segment. Scans in a run of K active
// stuck-at-1 cells followed by fault-free cells, then walks the pattern one
// site per scan pulse (as the manager does between experiments) and checks,
// at each step, that exactly the expected sites are faulty and that the
// scan outputs match.
module tb_fi_scan_chain;
  localparam int N = 37, SEG = 8, K = 3;
  logic clk = 0, rst_n = 0, scan_en = 0;
  logic [2:0] sdi = '0, sdo;
  logic [N-1:0] site_in = '0, site_out;
  int checks = 0, failures = 0;

  fi_scan_chain #(.N_SITES(N), .SEG(SEG)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] model [N];

  task automatic shift(input logic [2:0] d);
    @(negedge clk);
    sdi = d; scan_en = 1;
    @(negedge clk);
    scan_en = 0;
    for (int i = N-1; i > 0; i--) model[i] = model[i-1];
    model[0] = d;
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // K faults of type SA1 (active=1, type=01) enter first
    for (int k = 0; k < K; k++) shift(3'b101);
    for (int step = 0; step < N + K + 2; step++) begin
      for (int v = 0; v < 2; v++) begin
        @(negedge clk);
        site_in = v ? '0 : N'({$urandom(), $urandom()});
        #1;
        for (int i = 0; i < N; i++) begin
          logic expv;
          expv = model[i][2] ? 1'b1 : site_in[i];
          checks++;
          if (site_out[i] !== expv) begin
            failures++;
            $display("step %0d site %0d out %b exp %b", step, i, site_out[i], expv);
          end
        end
      end
      checks++;
      if (sdo !== model[N-1]) failures++;
      shift(3'b000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
