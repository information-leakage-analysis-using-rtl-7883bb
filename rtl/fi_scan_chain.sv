// fi_scan_chain: all fault sites of the instrumented netlist, linked into
// three scan chains (fault type bit 0, fault type bit 1, fault_active).
//
// The sites are cut into segments of SEG cells (fi_cell rows); the scan
// outputs of segment s feed the scan inputs of segment s+1, so the whole
// array forms three chains of N_SITES bits each. Site i sits at chain
// position i: after scanning a pattern in, one more scan_en pulse moves the
// fault to the next site, and k adjacent active cells model k simultaneous
// faults of one type. site_in[i] / site_out[i] are the fault-free and the
// possibly faulty value of gate input i. The last segment holds the
// remaining cells; the scan outputs come from the cell of site N_SITES-1.
//
// N_SITES defaults to the 85713 fault insertion points of the instrumented
// processor. Segmenting is this design's own choice and invisible outside.
module fi_scan_chain #(
  parameter int unsigned N_SITES = 85713,
  parameter int unsigned SEG     = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scan_en,
  input  logic [2:0]         sdi,       // {active, type1, type0}
  output logic [2:0]         sdo,
  input  logic [N_SITES-1:0] site_in,
  output logic [N_SITES-1:0] site_out
);

  localparam int unsigned NSEG  = (N_SITES + SEG - 1) / SEG;
  localparam int unsigned LASTW = N_SITES - (NSEG - 1) * SEG;  // cells used in last segment

  logic [2:0] link [NSEG+1];

  assign link[0] = sdi;

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    if (s < NSEG - 1) begin : g_full
      fi_cell #(.WIDTH(SEG)) u_row (
        .clk, .rst_n, .scan_en,
        .sdi      (link[s]),
        .sdo      (link[s+1]),
        .site_in  (site_in[s*SEG +: SEG]),
        .site_out (site_out[s*SEG +: SEG])
      );
    end else begin : g_last
      fi_cell #(.WIDTH(LASTW)) u_row (
        .clk, .rst_n, .scan_en,
        .sdi      (link[s]),
        .sdo      (link[s+1]),
        .site_in  (site_in[s*SEG +: LASTW]),
        .site_out (site_out[s*SEG +: LASTW])
      );
    end
  end

  assign sdo = link[NSEG];

endmodule
