// Priority queue storage of a sporadic I/O pool: a register chain with
// random-access removal.
//
// Unlike a FIFO, any entry can leave the queue. The chain holds the queued
// requests in arrival order in slots 0..count-1. The loader pushes at the
// tail; the pool's fetcher removes the entry at `rm_idx`, and every entry
// behind it moves one slot forward in the same cycle, so the chain stays
// dense and arrival order is kept. The priority fields of all slots form the
// register bank read in parallel by the arbiter (`prio_bank`, `valid_bank`).
// A push and a removal may happen in the same cycle. `push_ready` is low
// when all DEPTH slots are in use.
module prio_queue
  import nprc_pkg::*;
#(
  parameter int unsigned DEPTH = 50,
  parameter int unsigned IW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push_valid,
  output logic                   push_ready,
  input  spor_req_t              push_data,
  input  logic                   rm_en,
  input  logic [IW-1:0]          rm_idx,
  output spor_req_t              chain      [DEPTH],
  output logic [DEPTH-1:0]       valid_bank,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  wire do_push = push_valid && push_ready;
  wire do_rm   = rm_en && (CW'(rm_idx) < count);

  assign push_ready = (count < CW'(DEPTH));

  always_comb begin
    for (int i = 0; i < DEPTH; i++) valid_bank[i] = (CW'(i) < count);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) chain[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (do_rm && i >= int'(rm_idx) && i < DEPTH - 1) chain[i] <= chain[i+1];
      end
      if (do_push) chain[do_rm ? count - 1'b1 : count] <= push_data;
      count <= count + CW'(do_push) - CW'(do_rm);
    end
  end
endmodule
