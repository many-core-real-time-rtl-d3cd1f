// Configuration registers of the I/O-Ring behind an AMBA APB slave.
//
// N_SUB multiplexers each take an 8-bit field of the 32-bit configuration
// registers, four per register: the field of subordinate port s sits in
// register s/4, bits [8*(s%4)+7 : 8*(s%4)]. The field names the manager
// port (NPRC-CC) that subordinate port s is linked to; a value of N_MGR or
// more leaves the port unlinked, and all fields reset to 8'hFF. Register r
// lives at byte address 4*r. Processors reconfigure the ring at run-time
// with plain memory writes. 32-bit registers with 8-bit fields and the APB
// interface follow the architecture; the field meaning, the reset value and
// the address map are this design's choices.
// Timing: APB without wait states (PREADY is always high); a write in the
// access phase takes effect at the end of that cycle. Accesses beyond the
// last register answer PSLVERR and change nothing.
module io_ring_cfg #(
  parameter int unsigned N_SUB = 28,
  parameter int unsigned N_REG = (N_SUB + 3) / 4
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic [11:0] paddr,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic [7:0]  sel [N_SUB]
);
  logic [31:0] regs [N_REG];

  wire [9:0] ridx   = paddr[11:2];
  wire       in_rng = (ridx < 10'(N_REG));

  assign pready  = 1'b1;
  assign pslverr = psel && penable && !in_rng;
  assign prdata  = in_rng ? regs[ridx[$clog2(N_REG+1)-1:0]] : 32'h0;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      for (int r = 0; r < N_REG; r++) regs[r] <= '1;
    end else if (psel && penable && pwrite && in_rng) begin
      regs[ridx[$clog2(N_REG+1)-1:0]] <= pwdata;
    end
  end

  always_comb begin
    for (int s = 0; s < N_SUB; s++) sel[s] = regs[s/4][8*(s%4) +: 8];
  end
endmodule
