// Shadow buffer: a small synchronous FIFO of I/O operations.
//
// The P-space fetcher writes the decomposed operations of the next periodic
// request here ahead of its start time; the scheduler reads them out when
// the request's time slot begins. Head of queue is visible combinationally
// on `rd_data` while `rd_valid` is high; a pop and a push may happen in the
// same cycle. Depth is a parameter; writes to a full FIFO are ignored (the
// fetcher never issues them).
module shadow_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             rd_valid,
  input  logic             rd_pop,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;

  assign full     = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp];

  wire do_wr = wr_en && !full;
  wire do_rd = rd_pop && rd_valid;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else if (clear) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end
endmodule
