// tb_fe_bram: self-checking test of the two-port block RAM in the BRAM2
// shape (2048 x 32). Writes random words through port A, then reads them
// back through port B and port A with the one-cycle read latency, and checks
// a read of port B in the same cycle as a write of another address.
module tb_fe_bram;
  localparam int DEPTH = 2048, WIDTH = 32, AW = 11;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [WIDTH-1:0] a_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  fe_bram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int ra, rb, wa;
      ra = $urandom_range(DEPTH-1); rb = $urandom_range(DEPTH-1);
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = AW'(ra);
      b_en = 1; b_addr = AW'(rb);
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata !== model[ra]) failures++;
      if (b_rdata !== model[rb]) failures++;
      // write one address while port B reads another
      wa = (rb + 1) % DEPTH;
      a_en = 1; a_we = 1; a_addr = AW'(wa); a_wdata = $urandom; model[wa] = a_wdata;
      b_en = 1; b_addr = AW'(rb);
      @(negedge clk);
      a_en = 0; a_we = 0; b_en = 0;
      checks++;
      if (b_rdata !== model[rb]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
