// fe_bram: block RAM of the fault-emulation engine, one write/read port (A)
// and one read-only port (B).
//
// Used twice: as the serial buffer BRAM1 (64 KB of UART characters; the
// serial collector writes port A, the runtime monitor and data readout read
// port B) and as the address buffer BRAM2 (2048 words of 32 bits; the address
// collector writes port A, readout reads port B). Sizes follow the published
// engine; the port arrangement is this design's choice.
//
// Timing: both ports are synchronous. A write on port A takes effect at the
// clock edge; a read on either port returns data one cycle after its enable.
// Contents are not reset; the collectors clear them with explicit writes.
module fe_bram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A: write, or read when a_we is low
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: read only
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
