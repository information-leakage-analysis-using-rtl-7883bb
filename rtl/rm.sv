// rm: runtime monitor (RM).
//
// While an experiment runs, hands every character the serial collector has
// stored in BRAM1 to the manager as soon as it is there, so the manager can
// judge the output on the fly (for example stop a fault-free run early) and
// the serial transfer overlaps execution. It reads BRAM1 through its second
// port, so BRAM1 acts as an elastic buffer when the manager is slow to
// respond; in stream mode BRAM1 is a ring and rd_count tells the serial
// collector how much of it is free. Characters are read at address
// rd_count mod DEPTH. The RM finishes when the serial collector has stopped and every
// stored character has been handed over. This follows the published RM
// description; its states and the four-phase rm_valid/rm_ack handshake are
// this design's choices. A start pulse with clear set only rewinds the read
// pointer (done again the next cycle).
//
// Timing: BRAM1 read latency is one cycle; a character costs at least four
// cycles plus the manager's response time.
module rm #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          clear,
  output logic          done,
  // serial collector status
  input  logic [31:0]   sdc_nbytes,
  input  logic          sdc_done,
  // BRAM1 port B
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [7:0]    rd_data,
  // manager side
  output logic          rm_valid,
  output logic [7:0]    rm_char,
  input  logic          rm_ack,
  output logic [31:0]   rd_count      // characters handed over so far
);

  typedef enum logic [2:0] {R_IDLE, R_CLEAR, R_WAIT, R_READ, R_PRESENT, R_RELEASE} state_e;
  state_e      state_q;
  logic [31:0] ptr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE;
      ptr_q   <= '0;
      rm_char <= '0;
    end else begin
      unique case (state_q)
        R_IDLE:    if (start) begin
                     ptr_q   <= '0;
                     state_q <= clear ? R_CLEAR : R_WAIT;
                   end
        R_CLEAR:   state_q <= R_IDLE;
        R_WAIT:    if (ptr_q != sdc_nbytes) state_q <= R_READ;
                   else if (sdc_done)      state_q <= R_IDLE;
        R_READ:    begin
                     rm_char <= rd_data;
                     state_q <= R_PRESENT;
                   end
        R_PRESENT: if (rm_ack) state_q <= R_RELEASE;
        R_RELEASE: if (!rm_ack) begin
                     ptr_q   <= ptr_q + 1'b1;
                     state_q <= R_WAIT;
                   end
        default:   state_q <= R_IDLE;
      endcase
    end
  end

  assign rd_en    = (state_q == R_WAIT) && (ptr_q != sdc_nbytes);
  assign rd_addr  = ptr_q[AW-1:0];
  assign rm_valid = (state_q == R_PRESENT);
  assign done     = (state_q == R_IDLE);
  assign rd_count = ptr_q;

endmodule
