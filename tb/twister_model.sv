// twister_model: behavioural stand-in for the instrumented processor running
// a Mersenne Twister (MT19937) program (testbench only).
//
// After reset it prints a 14-character boot line, then NWORDS pseudo-random
// 32-bit numbers, each as 8 lower-case hex digits and a newline. With the
// default 31250 numbers that is one million bits and 14 + 31250*9 = 281264
// UART characters. Its signals pass through the engine's fault sites:
//   sites 31:0  the generated number before hex encoding (a fault here gives
//               well-formed but incorrect output)
//   site  32    UART "character ready"
//   sites 40:33 UART character bits
//   sites 72:41 address bus
//   other sites pass a constant 0 and are not used.
// UART handshake as in dut_model: ready stays high until uart_ack, then the
// model waits for uart_ack to fall and GAP idle cycles.
module twister_model #(
  parameter int unsigned N_SITES = 80,
  parameter int unsigned NWORDS  = 31250,
  parameter int unsigned GAP     = 1,
  parameter logic [31:0] SEED    = 32'd5489
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [N_SITES-1:0] site_in,
  input  logic [N_SITES-1:0] site_out,
  output logic               uart_intr,
  output logic [7:0]         uart_data,
  input  logic               uart_ack,
  output logic [31:0]        addr_bus
);
  // ---------------- MT19937 ----------------
  logic [31:0] mt [624];
  int          mti;

  function automatic void mt_seed(logic [31:0] s);
    mt[0] = s;
    for (int i = 1; i < 624; i++) mt[i] = 32'd1812433253 * (mt[i-1] ^ (mt[i-1] >> 30)) + 32'(i);
    mti = 624;
  endfunction

  function automatic logic [31:0] mt_next();
    logic [31:0] y;
    if (mti >= 624) begin
      for (int i = 0; i < 624; i++) begin
        y = (mt[i] & 32'h8000_0000) | (mt[(i + 1) % 624] & 32'h7fff_ffff);
        mt[i] = mt[(i + 397) % 624] ^ (y >> 1) ^ (y[0] ? 32'h9908_b0df : 32'h0);
      end
      mti = 0;
    end
    y = mt[mti];
    mti++;
    y ^= (y >> 11);
    y ^= (y << 7) & 32'h9d2c_5680;
    y ^= (y << 15) & 32'hefc6_0000;
    y ^= (y >> 18);
    return y;
  endfunction

  function automatic logic [7:0] hexc(logic [3:0] v);
    return (v < 10) ? 8'h30 + 8'(v) : 8'h57 + 8'(v);
  endfunction

  string boot = "Boot . . .OK\r\n";
  logic [31:0] word_q;
  int   nword, pos;          // pos: -1 = boot line, 0..8 within a number
  int   bidx;
  logic raw_valid, waiting_release, running;
  logic [7:0] raw_char;
  int   gap_cnt;
  logic [29:0] pc;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mt_seed(SEED);
      word_q <= '0; nword <= 0; pos <= -1; bidx <= 0;
      raw_valid <= 0; waiting_release <= 0; running <= 1; gap_cnt <= 4;
      raw_char <= 0; pc <= 30'h0400_0000;
    end else begin
      if (running) pc <= pc + 1'b1;
      if (raw_valid) begin
        if (uart_ack) begin raw_valid <= 0; waiting_release <= 1; end
      end else if (waiting_release) begin
        if (!uart_ack) begin waiting_release <= 0; gap_cnt <= GAP; end
      end else if (gap_cnt > 0) begin
        gap_cnt <= gap_cnt - 1;
      end else if (running) begin
        if (pos < 0) begin
          raw_char  <= boot[bidx];
          raw_valid <= 1;
          if (bidx == boot.len() - 1) begin
            pos    <= 0;
            word_q <= mt_next();
          end
          bidx <= bidx + 1;
        end else if (pos < 8) begin
          // hex digit of the number as seen through the fault sites
          raw_char  <= hexc(site_out[31 - 4 * pos -: 4]);
          raw_valid <= 1;
          pos       <= pos + 1;
        end else begin
          raw_char  <= 8'h0a;
          raw_valid <= 1;
          nword     <= nword + 1;
          if (nword + 1 == NWORDS) running <= 0;
          else begin
            pos    <= 0;
            word_q <= mt_next();
          end
        end
      end
    end
  end

  always_comb begin
    site_in        = '0;
    site_in[31:0]  = word_q;
    site_in[32]    = raw_valid;
    site_in[40:33] = raw_char;
    site_in[72:41] = running ? {pc, 2'b00} : 32'h1007_E830;
  end

  assign uart_intr = site_out[32];
  assign uart_data = site_out[40:33];
  assign addr_bus  = site_out[72:41];
endmodule
