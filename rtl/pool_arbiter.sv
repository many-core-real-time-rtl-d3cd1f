// Arbiter of a sporadic I/O pool.
//
// Looks at the priority register bank of every occupied queue slot at once
// and names the slot holding the highest priority (larger value = more
// urgent). Among equal priorities the slot nearest the head, i.e. the
// oldest request, wins. Purely combinational: a comparison tree of depth
// log2(DEPTH). `any` is low when the queue is empty.
module pool_arbiter
  import nprc_pkg::*;
#(
  parameter int unsigned DEPTH = 50,
  parameter int unsigned IW    = $clog2(DEPTH)
) (
  input  spor_req_t        chain [DEPTH],
  input  logic [DEPTH-1:0] valid_bank,
  output logic             any,
  output logic [IW-1:0]    best_idx
);
  localparam int unsigned LEAVES = 1 << $clog2(DEPTH);

  typedef struct packed {
    logic              v;
    logic [PRIO_W-1:0] p;
    logic [IW-1:0]     idx;
  } cand_t;

  cand_t node [2*LEAVES];

  function automatic cand_t pick(input cand_t a, input cand_t b);
    // a holds the older slots, so it wins ties
    if (!b.v)            return a;
    if (!a.v)            return b;
    return (b.p > a.p) ? b : a;
  endfunction

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      if (i < DEPTH) begin
        node[LEAVES + i].v   = valid_bank[i];
        node[LEAVES + i].p   = chain[i].prio;
        node[LEAVES + i].idx = IW'(i);
      end else begin
        node[LEAVES + i] = '0;
      end
    end
    node[0] = '0;
    for (int n = LEAVES - 1; n >= 1; n--) node[n] = pick(node[2*n], node[2*n+1]);
    any      = node[1].v;
    best_idx = node[1].idx;
  end
endmodule
