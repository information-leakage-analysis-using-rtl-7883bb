// tb_adc: self-checking test of the address data collection state machine
// with a 16-word ring. Drives an address bus that holds some values for
// several cycles and changes at random points, checks the change count, that
// BRAM2 holds the last 16 changes in ring order with wptr one past the
// newest, that halt stops collection, and that clear zeroes the buffer.
module tb_adc;
  localparam int DEPTH = 16, AW = 4;
  logic clk = 0, rst_n = 0;
  logic start = 0, clear_mem = 0, halt = 0, done;
  logic [31:0] addr_bus = 32'h8000_0000;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr, wptr;
  logic [31:0] mem_wdata, nchanges;
  int checks = 0, failures = 0;
  logic [31:0] mem [DEPTH];
  logic [31:0] hist [$];

  adc #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'hFFFF_FFFF;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; clear_mem = 1;
    @(negedge clk); start = 0; clear_mem = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < DEPTH; i++) check(mem[i] == 0, "cleared");
    // run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    hist.push_back(addr_bus);           // first sample counts as a change
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a;
      a = ($urandom_range(2) == 0) ? addr_bus : addr_bus + 32'(4 * $urandom_range(1, 3));
      if ($urandom_range(9) == 0) a = $urandom;
      if (a != addr_bus) hist.push_back(a);
      addr_bus = a;
      @(negedge clk);
    end
    halt = 1;
    @(negedge clk); halt = 0;
    addr_bus = addr_bus + 4;            // must not be recorded
    repeat (3) @(negedge clk);
    check(done, "halted");
    check(nchanges == hist.size(), $sformatf("nchanges %0d exp %0d", nchanges, hist.size()));
    check(wptr == AW'(hist.size()), "wptr");
    for (int k = 1; k <= DEPTH; k++)
      check(mem[AW'(int'(wptr) - k)] == hist[hist.size() - k], $sformatf("last-%0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
