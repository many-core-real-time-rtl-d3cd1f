// Sporadic I/O pool of the S-space: priority queue, arbiter and fetcher.
//
// An NPRC-CC has two of these, one for hard and one for soft real-time
// sporadic requests. The loader pushes requests into the priority queue
// (prio_queue); the arbiter (pool_arbiter) continuously finds the
// highest-priority entry; the fetcher copies that entry into the `Next`
// shadow register, refreshed every cycle so that a more urgent arrival
// replaces a waiting one. When the scheduler takes the Next request
// (`take`), the fetcher removes that entry from the chain; Next is then
// invalid for one cycle while the chain closes the gap.
// Timing: a request pushed at edge t is visible in Next (if it is the most
// urgent) after edge t+1.
module io_pool
  import nprc_pkg::*;
#(
  parameter int unsigned DEPTH = 50
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push_valid,
  output logic      push_ready,
  input  spor_req_t push_data,
  output logic      next_valid,
  output spor_req_t next_req,
  input  logic      take,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  spor_req_t        chain [DEPTH];
  logic [DEPTH-1:0] valid_bank;
  logic             any;
  logic [IW-1:0]    best_idx, next_idx;

  prio_queue #(.DEPTH(DEPTH), .IW(IW)) u_queue (
    .clk, .rst_n,
    .push_valid, .push_ready, .push_data,
    .rm_en  (take && next_valid),
    .rm_idx (next_idx),
    .chain, .valid_bank, .count
  );

  pool_arbiter #(.DEPTH(DEPTH), .IW(IW)) u_arb (
    .chain, .valid_bank, .any, .best_idx
  );

  // Fetcher: map the winner into the Next shadow register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_valid <= 1'b0;
      next_req   <= '0;
      next_idx   <= '0;
    end else if (take && next_valid) begin
      next_valid <= 1'b0;
    end else begin
      next_valid <= any;
      next_req   <= chain[best_idx];
      next_idx   <= best_idx;
    end
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> next_valid);
endmodule
