// mpc_omb: Outstanding Miss Buffer of the cache.
//
// A small CAM of DEPTH entries, each a 32-bit address plus a valid bit,
// holding the addresses that missed the cache and still wait for the
// routing table. It lets the cache keep searching (hit under miss, miss
// under miss) instead of blocking on every miss.
//  - Push: a miss writes its address into the lowest free slot (the slot
//    number is returned so the miss can be matched with its answer later).
//  - Request: each valid entry is offered once to the lookup side
//    (req_valid/req_ready); the lowest unrequested valid slot goes first.
//    Entries cleared before they were offered are never looked up.
//  - Search-and-clear: an update result is searched associatively against
//    all valid entries with its don't-care bits masked (srch_care=0), so a
//    prefix clears every pending address it covers; the matching slots are
//    reported and their valid bits cleared.
// Push and search-and-clear must not be requested in the same cycle (the
// cache gives the miss write priority). Everything acts at the clock edge;
// srch_hit, free_cnt and full are combinational from the current state.
// The CAM organisation and the masked search follow the architecture; the
// per-entry request flag and slot numbering are this design's choices.
module mpc_omb #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned AW    = 32,
  localparam int unsigned SW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // push a miss
  input  logic             push,
  input  logic [AW-1:0]    push_addr,
  output logic [SW-1:0]    push_slot,
  output logic             full,
  output logic [CW-1:0]    free_cnt,
  // lookup requests
  output logic             req_valid,
  input  logic             req_ready,
  output logic [AW-1:0]    req_addr,
  output logic [SW-1:0]    req_slot,
  // associative search and clear
  input  logic             srch,
  input  logic [AW-1:0]    srch_key,
  input  logic [AW-1:0]    srch_care,
  output logic [DEPTH-1:0] srch_hit
);
  logic [AW-1:0]    addr  [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] sent;

  always_comb begin
    push_slot = '0;
    full      = 1'b1;
    free_cnt  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        push_slot = SW'(i);
        full      = 1'b0;
        free_cnt  = free_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    req_valid = 1'b0;
    req_slot  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && !sent[i]) begin
        req_valid = 1'b1;
        req_slot  = SW'(i);
      end
    end
    req_addr = addr[req_slot];
  end

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++)
      srch_hit[i] = valid[i] && (((addr[i] ^ srch_key) & srch_care) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      sent  <= '0;
    end else begin
      if (req_valid && req_ready) sent[req_slot] <= 1'b1;
      if (srch) valid <= valid & ~srch_hit;
      if (push && !full) begin
        valid[push_slot] <= 1'b1;
        sent[push_slot]  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) addr[push_slot] <= push_addr;
  end

  a_no_push_and_search: assert property (@(posedge clk) disable iff (!rst_n) !(push && srch));
  a_no_push_when_full:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
endmodule
