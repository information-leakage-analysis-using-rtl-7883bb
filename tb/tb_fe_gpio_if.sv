// tb_fe_gpio_if: self-checking test of the GPIO register interface.
// Checks: decoded control fields; one scan_en pulse per rising edge of the
// scan_clk bit (none while it stays high); status packing into gpio_in; and
// the readout handshake for BRAM1, BRAM2 and counters, including a BRAM1
// read delayed while the runtime monitor owns the port.
module tb_fe_gpio_if;
  import fe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] gpio_out = '0, gpio_in;
  gpio_ctrl_t ctrl;
  logic scan_en;
  logic [2:0] sdo = 3'b101;
  logic params_req = 0, params_ack = 0, done = 0, rm_valid = 0, rm_busy = 0;
  logic [7:0] rm_char = 8'h5A;
  logic b1_en, b2_en;
  logic [15:0] b1_addr;
  logic [10:0] b2_addr;
  logic [7:0] b1_data;
  logic [31:0] b2_data;
  logic [31:0] nserial = 32'h0001_1234, nchanges = 32'h0000_CBB3, cycles = 32'h0040_0007;
  logic [10:0] adc_wptr = 11'd1234;
  logic [15:0] status = 16'h0013;
  int checks = 0, failures = 0, npulse = 0;

  fe_gpio_if dut (.*);

  always #5 clk = ~clk;
  // behavioural BRAMs: data is a function of the address
  always @(posedge clk) begin
    if (b1_en) b1_data <= b1_addr[7:0] ^ 8'h3C;
    if (b2_en) b2_data <= {5'd0, b2_addr, 5'd1, b2_addr} ^ 32'h1007_0000;
    if (scan_en) npulse++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read(input rd_sel_e sel, input logic [15:0] addr, output logic [15:0] data);
    @(negedge clk);
    gpio_out[31:9] = {3'd0, 4'(sel), addr};
    gpio_out[8] = 1;
    while (!gpio_in[4]) @(negedge clk);
    data = gpio_in[31:16];
    gpio_out[8] = 0;
    while (gpio_in[4]) @(negedge clk);
  endtask

  initial begin
    logic [15:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    // control decode
    @(negedge clk); gpio_out = {23'h12345, 1'b0, 1'b1, 1'b1, 3'b110, 1'b0, 1'b1, 1'b1};
    @(negedge clk); @(negedge clk);
    check(ctrl.start && ctrl.params_valid && ctrl.sdi_active && ctrl.sdi_type1 && !ctrl.sdi_type0
          && ctrl.cprog_term && ctrl.rm_ack && !ctrl.rd_req && ctrl.data == 23'h12345, "decode");
    gpio_out = '0;
    // scan clock edges
    npulse = 0;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); gpio_out[2] = 1;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      gpio_out[2] = 0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(npulse == 7, $sformatf("scan pulses %0d", npulse));
    // status
    params_req = 1; done = 1; rm_valid = 1;
    repeat (2) @(negedge clk);
    check(gpio_in[0] && !gpio_in[1] && gpio_in[2] && gpio_in[3] && gpio_in[7:5] == 3'b101
          && gpio_in[15:8] == 8'h5A, "status packing");
    params_req = 0; done = 0; rm_valid = 0;
    // readout
    read(RD_SERIAL, 16'h0105, d);   check(d == 16'h0039, $sformatf("serial %h", d));
    read(RD_ADDR_LO, 16'd700, d);   check(d == 16'(({5'd0, 11'd700, 5'd1, 11'd700} ^ 32'h1007_0000)), "addr lo");
    read(RD_ADDR_HI, 16'd700, d);   check(d == 16'(({5'd0, 11'd700, 5'd1, 11'd700} ^ 32'h1007_0000) >> 16), "addr hi");
    read(RD_NSER_LO, 0, d);         check(d == 16'h1234, "nser lo");
    read(RD_NSER_HI, 0, d);         check(d == 16'h0001, "nser hi");
    read(RD_NCHG_LO, 0, d);         check(d == 16'hCBB3, "nchg lo");
    read(RD_ADC_WPTR, 0, d);        check(d == 16'd1234, "wptr");
    read(RD_CYC_HI, 0, d);          check(d == 16'h0040, "cycles hi");
    read(RD_STATUS, 0, d);          check(d == 16'h0013, "status");
    // BRAM1 read held off by the runtime monitor
    rm_busy = 1;
    fork
      begin repeat (30) @(negedge clk); check(!gpio_in[4], "held while monitor busy"); rm_busy = 0; end
      read(RD_SERIAL, 16'h00FF, d);
    join
    check(d == 16'h00C3, "serial after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
