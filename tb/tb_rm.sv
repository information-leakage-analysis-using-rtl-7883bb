// tb_rm: self-checking test of the runtime monitor. A behavioural writer
// fills a 32-entry buffer model at random times (as the serial collector
// would), a slow, randomly delayed manager acknowledges each character. The
// test checks that every character arrives once and in order, that the
// monitor stays busy until the writer is done and all characters are
// delivered, and that clear finishes in two cycles.
module tb_rm;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0, rst_n = 0;
  logic start = 0, clear = 0, done;
  logic [31:0] sdc_nbytes = '0;
  logic [31:0] rd_count;
  logic sdc_done = 1;
  logic rd_en;
  logic [AW-1:0] rd_addr;
  logic [7:0] rd_data;
  logic rm_valid;
  logic [7:0] rm_char;
  logic rm_ack = 0;
  int checks = 0, failures = 0;
  logic [7:0] mem [DEPTH];
  int got = 0;
  localparam int NCH = 25;

  rm #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

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

  // manager
  initial begin
    forever begin
      @(negedge clk);
      if (rm_valid && !rm_ack) begin
        check(rm_char == 8'(8'h30 + got), $sformatf("char %0d = %h", got, rm_char));
        got++;
        repeat ($urandom_range(0, 6)) @(negedge clk);
        rm_ack = 1;
        while (rm_valid) @(negedge clk);
        rm_ack = 0;
      end
    end
  end

  initial begin
    int t;
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'h30 + 8'(i);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; clear = 1;
    @(negedge clk); start = 0; clear = 0;
    t = 0;
    while (!done) begin @(negedge clk); t++; end
    check(t == 1, $sformatf("clear %0d cycles", t));
    @(negedge clk); start = 1; sdc_done = 0;
    @(negedge clk); start = 0;
    for (int i = 0; i < NCH; i++) begin
      repeat ($urandom_range(0, 8)) @(negedge clk);
      sdc_nbytes = sdc_nbytes + 1;
    end
    check(!done, "busy while writer runs");
    sdc_done = 1;
    while (!done) @(negedge clk);
    check(got == NCH, $sformatf("delivered %0d", got));
    check(rd_count == NCH, "rd_count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
