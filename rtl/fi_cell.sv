// fi_cell: fault-injection (saboteur) circuits for a row of WIDTH gate inputs.
//
// One FI circuit is placed in series with every gate input of the
// instrumented netlist. Each holds three scan flip-flops, one in each of the
// three scan chains: two choose the fault type and the third is fault_active.
// With fault_active low the circuit is a fault-free bypass
// (site_out = site_in). With it high the output is stuck at 0, stuck at 1,
// the input delayed by one clock cycle, or the inverted input. That structure
// follows the published FI circuit. This module writes WIDTH such circuits
// as bit vectors (bit i is one circuit) so that rows of thousands of cells
// stay cheap to elaborate; WIDTH = 1 is a single circuit.
//
// Own choices: the type encoding (fe_pkg::fault_type_e); shifting the chains
// with a one-cycle enable pulse on the system clock rather than with a
// separate scan clock; reset clears all scan bits (fault-free).
//
// Chain order: sdi enters bit 0, bit i feeds bit i+1, bit WIDTH-1 drives sdo.
// One scan_en pulse moves every chain by one position. site_in -> site_out
// is combinational except for the delay fault, which inserts one register.
module fi_cell
  import fe_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic [2:0]       sdi,       // {active, type1, type0}
  output logic [2:0]       sdo,
  input  logic [WIDTH-1:0] site_in,
  output logic [WIDTH-1:0] site_out
);

  logic [WIDTH-1:0] type0_q, type1_q, active_q;
  logic [WIDTH-1:0] delay_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      type0_q  <= '0;
      type1_q  <= '0;
      active_q <= '0;
    end else if (scan_en) begin
      // shift towards the MSB: {q, sdi} truncated to its WIDTH low bits
      type0_q  <= WIDTH'({type0_q,  sdi[0]});
      type1_q  <= WIDTH'({type1_q,  sdi[1]});
      active_q <= WIDTH'({active_q, sdi[2]});
    end
  end

  always_ff @(posedge clk) delay_q <= site_in;

  // Per-bit selection, written with masks: SA0 -> 0, SA1 -> 1,
  // DELAY -> previous input, INVERT -> ~input.
  logic [WIDTH-1:0] faulty;
  assign faulty = (~type1_q &  type0_q)              // SA1
                | ( type1_q & ~type0_q & delay_q)    // DELAY
                | ( type1_q &  type0_q & ~site_in);  // INVERT (SA0 gives 0)

  assign site_out = (active_q & faulty) | (~active_q & site_in);

  assign sdo = {active_q[WIDTH-1], type1_q[WIDTH-1], type0_q[WIDTH-1]};

endmodule
