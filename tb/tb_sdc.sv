// tb_sdc: self-checking test of the serial data collection state machine
// with a 64-entry buffer and a behavioural UART source.
// Cases: (1) clear writes zero everywhere and takes DEPTH cycles;
// (2) a short message is stored in order, and after exit_enabled the
//     collector stops exactly idle_wait+1 cycles after the last character
//     (and keeps collecting while idle shorter than that);
// (3) a talkative source fills the buffer and sets full;
// (4) cprog_term stops collection and sets term;
// (5) stream mode: ring wrap and back-pressure;
// (6) an interrupt line stuck high cannot hang the collector.
module tb_sdc;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  logic start = 0, clear_mem = 0, done;
  logic uart_intr = 0, uart_ack;
  logic [7:0] uart_data = '0;
  logic exit_enabled = 0, cprog_term = 0;
  logic [22:0] idle_wait = 23'd20;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_wdata;
  logic [31:0] nbytes;
  logic stream = 0;
  logic [31:0] rd_count = '0;
  logic full, term;
  int checks = 0, failures = 0;
  logic [7:0] mem [DEPTH];

  sdc #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_start(input logic clr);
    @(negedge clk); start = 1; clear_mem = clr;
    @(negedge clk); start = 0; clear_mem = 0;
  endtask

  // four-phase UART send
  task automatic send(input logic [7:0] c);
    @(negedge clk); uart_data = c; uart_intr = 1;
    #1;
    while (!uart_ack) begin @(negedge clk); #1; end
    @(negedge clk); uart_intr = 0;
    @(negedge clk);
  endtask

  int t0, t1;
  string msg = "Boot OK";
  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'hA5;
    repeat (2) @(posedge clk); rst_n = 1;
    // (1) clear
    pulse_start(1);
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    check(t0 == DEPTH, $sformatf("clear took %0d cycles", t0));
    for (int i = 0; i < DEPTH; i++) check(mem[i] == 0, "cleared");
    // (2) message and idle stop
    pulse_start(0);
    check(!done, "running");
    foreach (msg[i]) send(msg[i]);
    exit_enabled = 1;
    repeat (10) @(negedge clk);
    check(!done, "still waiting before idle_wait");
    send(8'h21);
    t1 = 0;
    while (!done) begin @(negedge clk); t1++; end
    check(t1 >= 20 && t1 <= 23, $sformatf("idle stop after %0d cycles", t1));
    check(nbytes == 8, $sformatf("nbytes %0d", nbytes));
    for (int i = 0; i < 7; i++) check(mem[i] == msg[i], "stored char");
    check(mem[7] == 8'h21, "stored last char");
    check(!full && !term, "flags clear");
    // (3) fill the buffer
    pulse_start(0);
    for (int i = 0; i < DEPTH + 5 && !done; i++) send(8'(i + 1));
    check(done && full, "stopped full");
    check(nbytes == DEPTH, $sformatf("full nbytes %0d", nbytes));
    check(mem[DEPTH-1] == 8'(DEPTH), "last entry");
    // (4) cprog_term
    exit_enabled = 0;
    pulse_start(0);
    send(8'h78);
    repeat (50) @(negedge clk);
    check(!done, "no exit before exit_enabled");
    cprog_term = 1;
    @(negedge clk); @(negedge clk);
    check(done && term, "terminated by manager");
    cprog_term = 0;
    // (5) stream mode: the ring wraps, and with DEPTH unread characters
    //     the collector holds off the acknowledge until the reader moves
    stream = 1; rd_count = 0;
    pulse_start(0);
    for (int i = 0; i < DEPTH; i++) send(8'(i * 3));
    @(negedge clk); uart_data = 8'hEE; uart_intr = 1;
    repeat (10) begin
      @(negedge clk); #1;
      check(!uart_ack, "held off while the ring is full");
    end
    rd_count = 5;
    #1;
    while (!uart_ack) begin @(negedge clk); #1; end
    @(negedge clk); uart_intr = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) send(8'(100 + i));
    check(nbytes == DEPTH + 5, $sformatf("stream nbytes %0d", nbytes));
    check(mem[0] == 8'hEE && mem[4] == 8'(103) && mem[5] == 8'(15), "ring contents");
    check(!done && !full, "stream does not stop at DEPTH");
    cprog_term = 1;
    @(negedge clk); @(negedge clk);
    cprog_term = 0;
    // (6) an interrupt line stuck high: one character is taken, then the
    //     held line counts as idle time and the idle exit still ends the run
    stream = 0; exit_enabled = 0;
    pulse_start(0);
    uart_data = 8'h5A; uart_intr = 1;
    repeat (40) @(negedge clk);
    check(!done && nbytes == 1, "stuck interrupt: one character, still collecting");
    exit_enabled = 1;
    repeat (25) @(negedge clk);
    check(done && nbytes == 1 && !full && !term, "stuck interrupt ends on the idle exit");
    uart_intr = 0; exit_enabled = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
