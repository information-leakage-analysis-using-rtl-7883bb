// tb_fi_cell: self-checking test of a row of FI cells.
// Scans random fault configurations into a 5-cell row, drives random site
// values and compares every output with a reference model of the four fault
// types and the bypass, including the one-cycle delay fault. Also checks that
// the scan output is the configuration of the last cell.
module tb_fi_cell;
  import fe_pkg::*;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, scan_en = 0;
  logic [2:0] sdi = '0, sdo;
  logic [W-1:0] site_in = '0, site_out;
  int checks = 0, failures = 0;

  fi_cell #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] cfg [W];      // reference copy of each cell's {active,t1,t0}
  logic [W-1:0] prev_in;
  int counts[4];

  function automatic logic ref_bit(logic [2:0] c, logic in, logic prev);
    if (!c[2]) return in;
    case (c[1:0])
      2'b00: return 1'b0;
      2'b01: return 1'b1;
      2'b10: return prev;
      default: return ~in;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < W; i++) cfg[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      // shift one new configuration in
      @(negedge clk);
      sdi = 3'($urandom);
      scan_en = 1;
      @(negedge clk);
      scan_en = 0;
      for (int i = W-1; i > 0; i--) cfg[i] = cfg[i-1];
      cfg[0] = sdi;
      checks++;
      if (sdo !== cfg[W-1]) begin
        failures++;
        $display("sdo mismatch %b vs %b", sdo, cfg[W-1]);
      end
      // exercise the sites for a few cycles
      for (int k = 0; k < 4; k++) begin
        prev_in = site_in;
        @(negedge clk);            // delay register samples previous value
        site_in = W'($urandom);
        #1;
        for (int i = 0; i < W; i++) begin
          checks++;
          if (cfg[i][2]) counts[cfg[i][1:0]]++;
          if (site_out[i] !== ref_bit(cfg[i], site_in[i], prev_in[i])) begin
            failures++;
            $display("cell %0d cfg %b in %b prev %b out %b", i, cfg[i], site_in[i], prev_in[i], site_out[i]);
          end
        end
      end
    end
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (counts[t] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
