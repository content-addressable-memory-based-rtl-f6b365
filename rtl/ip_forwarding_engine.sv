// ip_forwarding_engine: IPv4 forwarding mechanism made of a Multizone
// Pipelined Cache in front of an HLPM lookup table.
//
// Every destination address goes to the cache (mpc_cache). Hits are answered
// three cycles later. A miss is parked in the cache's outstanding miss
// buffer and sent to the lookup table (hlpm_lut), a pipelined TCAM that finds
// the longest matching prefix in hardware. The table's answer is turned
// into a cache update: a prefix of 16 bits or fewer (it ended in the first
// TCAM stage) is cached as a prefix in the prefix zone, a longer one as the
// full 32-bit address in the full-address zone. The routing table must be
// prepared by short prefix expansion (every prefix of 16 bits or fewer is a
// leaf), which the table writer does before writing entries through tbl_*.
//
// Between the two, this design adds a request credit counter and a small
// answer FIFO: the lookup table has no backpressure, so a miss is only sent
// when the FIFO is sure to have room for its answer.
//
// Ports: lk_* address in (valid/ready), res_* answers in order (hit source,
// next hop, OMB slot of a miss), rsv_* slots of pending misses resolved by a
// table answer, tbl_* routing-table writes, plus event strobes for
// statistics. Latency: hit in 3 cycles; a miss is resolved on rsv_* at the
// earliest 3 + 1 + (lookup-table latency 2 + 4 + 1) + 2 cycles after entry.
module ip_forwarding_engine
  import fwd_pkg::*;
#(
  parameter int unsigned CACHE_FZ_ENTRIES = 512,
  parameter int unsigned CACHE_PZ_ENTRIES = 512,
  parameter int unsigned OMB_DEPTH        = 10,
  parameter int unsigned UPD_FIFO_DEPTH   = 4,
  parameter int unsigned LUT_ENTRIES      = 18432,
  parameter int unsigned RQ_DEPTH         = 8,
  localparam int unsigned SW  = (OMB_DEPTH > 1) ? $clog2(OMB_DEPTH) : 1,
  localparam int unsigned LIW = $clog2(LUT_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // destination addresses
  input  logic                 lk_valid,
  output logic                 lk_ready,
  input  logic [IP_W-1:0]      lk_addr,
  // answers, in order
  output logic                 res_valid,
  output logic [IP_W-1:0]      res_addr,
  output hit_src_t             res_src,
  output logic [NH_W-1:0]      res_nexthop,
  output logic [SW-1:0]        res_slot,
  output logic                 res_cam1_hit,
  // pending misses resolved
  output logic                 rsv_valid,
  output logic [OMB_DEPTH-1:0] rsv_slots,
  output logic                 rsv_found,
  output logic [NH_W-1:0]      rsv_nexthop,
  // routing table writes
  input  logic                 tbl_wr,
  input  logic [LIW-1:0]       tbl_index,
  input  logic                 tbl_valid,
  input  logic [IP_W-1:0]      tbl_prefix,
  input  logic [5:0]           tbl_plen,
  input  logic [NH_W-1:0]      tbl_nexthop,
  // events
  output logic                 squash_evt,
  output logic                 lut_search_evt,
  output logic                 lut_short_evt,     // LPM found in the first TCAM stage
  output logic                 lut_second_evt     // Length Column decided
);
  // ---------------- cache ----------------
  logic            mreq_valid, mreq_ready;
  logic [IP_W-1:0] mreq_addr;
  logic            upd_valid, upd_ready;
  route_update_t   upd;

  mpc_cache #(
    .FZ_ENTRIES(CACHE_FZ_ENTRIES), .PZ_ENTRIES(CACHE_PZ_ENTRIES),
    .OMB_DEPTH(OMB_DEPTH), .UPD_FIFO_DEPTH(UPD_FIFO_DEPTH)
  ) u_mpc (
    .clk, .rst_n,
    .lk_valid, .lk_ready, .lk_addr,
    .res_valid, .res_addr, .res_src, .res_nexthop, .res_slot, .res_cam1_hit,
    .mreq_valid, .mreq_ready, .mreq_addr,
    .upd_valid, .upd_ready, .upd,
    .rsv_valid, .rsv_slots, .rsv_found, .rsv_nexthop,
    .squash_evt
  );

  // ---------------- lookup table ----------------
  logic             l_valid, l_found, l_second;
  logic [IP_W-1:0]  l_addr, l_care;
  logic [LIW-1:0]   l_index;
  logic [NH_W-1:0]  l_nh;
  logic [1:0]       l_stage;

  // Credits: searches in the table plus answers in the FIFO stay below its depth.
  logic [$clog2(RQ_DEPTH+1)-1:0] outstanding;
  logic                          issue, aq_pop;
  assign mreq_ready = (outstanding < ($clog2(RQ_DEPTH+1))'(RQ_DEPTH));
  assign issue      = mreq_valid && mreq_ready;

  hlpm_lut #(.ENTRIES(LUT_ENTRIES), .ADDR_W(IP_W), .FIRST_W(17), .NSTAGES(2),
             .LEN_W(4), .NH_W(NH_W)) u_lut (
    .clk, .rst_n,
    .lk_valid        (issue),
    .lk_addr         (mreq_addr),
    .res_valid       (l_valid),
    .res_addr        (l_addr),
    .res_found       (l_found),
    .res_index       (l_index),
    .res_nexthop     (l_nh),
    .res_care        (l_care),
    .res_end_stage   (l_stage),
    .res_second_level(l_second),
    .wr_en           (tbl_wr),
    .wr_index        (tbl_index),
    .wr_valid        (tbl_valid),
    .wr_prefix       (tbl_prefix),
    .wr_plen         (tbl_plen),
    .wr_nexthop      (tbl_nexthop)
  );

  // Table answer -> cache update: short prefixes ended in stage 0.
  route_update_t l_upd;
  always_comb begin
    l_upd.found     = l_found;
    l_upd.is_prefix = l_found && (l_stage == 2'd0);
    l_upd.addr      = l_addr;
    l_upd.care      = l_care[IP_W-1 -: HALF_W];
    l_upd.nexthop   = l_nh;
  end

  logic aq_in_ready;
  logic [$clog2(RQ_DEPTH+1)-1:0] aq_count;
  sync_fifo #(.W($bits(route_update_t)), .DEPTH(RQ_DEPTH)) u_answer_q (
    .clk, .rst_n,
    .in_valid (l_valid),
    .in_ready (aq_in_ready),
    .in_data  (l_upd),
    .out_valid(upd_valid),
    .out_ready(upd_ready),
    .out_data (upd),
    .count    (aq_count)
  );
  assign aq_pop = upd_valid && upd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else        outstanding <= outstanding + issue - aq_pop;
  end

  assign lut_search_evt = l_valid;
  assign lut_short_evt  = l_valid && l_found && (l_stage == 2'd0);
  assign lut_second_evt = l_valid && l_second;

  a_answer_room: assert property (@(posedge clk) disable iff (!rst_n) l_valid |-> aq_in_ready);
  a_credit: assert property (@(posedge clk) disable iff (!rst_n)
    32'(aq_count) <= 32'(outstanding));
endmodule
