// mpc_cache: Multizone Pipelined Cache (MPC) for IPv4 next-hop lookup.
//
// The cache has two zones. The full-address zone caches whole 32-bit
// addresses whose longest matching prefix is longer than 16 bits; each of its
// entries is split into CAM1 (upper 16 bits) and CAM2 (lower 16 bits). The
// prefix zone is a 16-bit TCAM caching prefixes of 16 bits or fewer. With a
// routing table prepared by short prefix expansion an address can hit only
// one zone, and an address whose upper half hits CAM1 can never be covered
// by a cached short prefix. A Next Hop Array row is kept per entry.
//
// Pipeline (one new address per cycle):
//   S1  search CAM1 with addr[31:16]
//   S2  if CAM1 hit: search CAM2 with addr[15:0], only in the CAM1 rows that
//       hit; otherwise search the prefix zone with addr[31:16]
//   S3  hit: read the next hop. Miss: compare with the Pending Update
//       Register (PUR); if it covers the address, answer from the PUR,
//       otherwise park the address in the Outstanding Miss Buffer (OMB) and
//       answer "miss" with the OMB slot number.
// Misses go from the OMB to the routing table (mreq_*), one per entry.
// Table answers (upd_*) wait in a FIFO and move one at a time into the PUR.
// The PUR content is searched in the OMB (masked by the prefix's don't-care
// bits); all covered pending misses are cleared and reported on rsv_*. An
// answer that clears nothing is a duplicate and is dropped. Otherwise the
// update takes one S1 slot and writes CAM1, then CAM2 or the prefix zone,
// then the NHA, in the same stages a lookup reads them, so a lookup sees
// either all old or all new data; the PUR is emptied when the NHA is
// written. Misses writing the OMB have priority over the PUR search.
//
// When a miss reaches S3 with the OMB full, that lookup and the younger
// lookups behind it are squashed and replayed, in order, once the OMB has a
// free slot; new addresses are held off (lk_ready low) until the replays are
// back in the pipeline. Updates are never squashed, so a full OMB cannot
// block the update that frees it. This squash-and-replay is this design's
// way of realising the architecture's "the cache blocks while the OMB is
// full". Also this design's choices: FIFO replacement within each zone, the
// FIFO depth, the resolve port and the handshakes.
//
// Timing: an address accepted in cycle t is answered on res_* in cycle t+3
// (unless squashed); answers come out in acceptance order.
module mpc_cache
  import fwd_pkg::*;
#(
  parameter int unsigned FZ_ENTRIES     = 512,
  parameter int unsigned PZ_ENTRIES     = 512,
  parameter int unsigned OMB_DEPTH      = 10,
  parameter int unsigned UPD_FIFO_DEPTH = 4,
  localparam int unsigned SW   = (OMB_DEPTH > 1) ? $clog2(OMB_DEPTH) : 1,
  localparam int unsigned NHA_N = FZ_ENTRIES + PZ_ENTRIES,
  localparam int unsigned NIW  = $clog2(NHA_N),
  localparam int unsigned FIW  = $clog2(FZ_ENTRIES),
  localparam int unsigned PIW  = $clog2(PZ_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // address lookups
  input  logic                 lk_valid,
  output logic                 lk_ready,
  input  logic [IP_W-1:0]      lk_addr,
  // answers
  output logic                 res_valid,
  output logic [IP_W-1:0]      res_addr,
  output hit_src_t             res_src,
  output logic [NH_W-1:0]      res_nexthop,
  output logic [SW-1:0]        res_slot,
  output logic                 res_cam1_hit,   // the prefix zone was not searched
  // misses to the routing table
  output logic                 mreq_valid,
  input  logic                 mreq_ready,
  output logic [IP_W-1:0]      mreq_addr,
  // routing table answers
  input  logic                 upd_valid,
  output logic                 upd_ready,
  input  route_update_t        upd,
  // pending misses resolved by an answer
  output logic                 rsv_valid,
  output logic [OMB_DEPTH-1:0] rsv_slots,
  output logic                 rsv_found,
  output logic [NH_W-1:0]      rsv_nexthop,
  // events
  output logic                 squash_evt
);
  // ---------------- pipeline registers ----------------
  logic                  s1_v, s1_upd;
  logic [IP_W-1:0]       s1_addr;
  logic                  s2_v, s2_upd;
  logic [IP_W-1:0]       s2_addr;
  logic [FZ_ENTRIES-1:0] s2_m1;
  logic                  s3_v, s3_upd, s3_hit, s3_cam1;
  hit_src_t              s3_src;
  logic [NIW-1:0]        s3_idx;
  logic [IP_W-1:0]       s3_addr;

  // ---------------- pending update register ----------------
  typedef enum logic [1:0] {P_IDLE, P_SEARCH, P_ENTER, P_PIPE} pur_state_t;
  pur_state_t    pur_st;
  route_update_t pur;
  logic [NIW-1:0] pur_row;   // victim row (NHA numbering)
  logic [FIW-1:0] fz_ptr;    // FIFO replacement pointers
  logic [PIW-1:0] pz_ptr;
  logic [IP_W-1:0] pur_mask;
  assign pur_mask = (pur.found && pur.is_prefix) ? {pur.care, {HALF_W{1'b0}}} : '1;

  // ---------------- result FIFO ----------------
  logic          fq_valid, fq_pop;
  route_update_t fq_data;
  logic [$clog2(UPD_FIFO_DEPTH+1)-1:0] fq_count;

  sync_fifo #(.W($bits(route_update_t)), .DEPTH(UPD_FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (upd_valid),
    .in_ready (upd_ready),
    .in_data  (upd),
    .out_valid(fq_valid),
    .out_ready(fq_pop),
    .out_data (fq_data),
    .count    (fq_count)
  );

  // ---------------- S1: CAM1 ----------------
  logic [FZ_ENTRIES-1:0] m1;
  logic                  upd_full1;
  assign upd_full1 = s1_v && s1_upd && !pur.is_prefix;

  mpc_cam #(.N(FZ_ENTRIES), .W(HALF_W), .TERNARY(1'b0)) u_cam1 (
    .clk, .rst_n,
    .key     (s1_addr[IP_W-1 -: HALF_W]),
    .en      ({FZ_ENTRIES{s1_v && !s1_upd}}),
    .match   (m1),
    .wr_en   (upd_full1),
    .wr_idx  (FIW'(pur_row)),
    .wr_value(pur.addr[IP_W-1 -: HALF_W]),
    .wr_care ({HALF_W{1'b1}})
  );

  // ---------------- S2: CAM2 or prefix zone ----------------
  logic [FZ_ENTRIES-1:0] m2;
  logic [PZ_ENTRIES-1:0] mp;
  logic                  s2_lk, s2_cam1;
  assign s2_lk   = s2_v && !s2_upd;
  assign s2_cam1 = |s2_m1;

  mpc_cam #(.N(FZ_ENTRIES), .W(HALF_W), .TERNARY(1'b0)) u_cam2 (
    .clk, .rst_n,
    .key     (s2_addr[HALF_W-1:0]),
    .en      (s2_m1 & {FZ_ENTRIES{s2_lk}}),
    .match   (m2),
    .wr_en   (s2_v && s2_upd && !pur.is_prefix),
    .wr_idx  (FIW'(pur_row)),
    .wr_value(pur.addr[HALF_W-1:0]),
    .wr_care ({HALF_W{1'b1}})
  );

  mpc_cam #(.N(PZ_ENTRIES), .W(HALF_W), .TERNARY(1'b1)) u_pzone (
    .clk, .rst_n,
    .key     (s2_addr[IP_W-1 -: HALF_W]),
    .en      ({PZ_ENTRIES{s2_lk && !s2_cam1}}),
    .match   (mp),
    .wr_en   (s2_v && s2_upd && pur.is_prefix),
    .wr_idx  (PIW'(pur_row - NIW'(FZ_ENTRIES))),
    .wr_value(pur.addr[IP_W-1 -: HALF_W]),
    .wr_care (pur.care)
  );

  logic           s2_hit;
  logic [NIW-1:0] s2_idx;
  always_comb begin
    s2_hit = 1'b0;
    s2_idx = '0;
    if (s2_cam1) begin
      for (int i = FZ_ENTRIES - 1; i >= 0; i--)
        if (m2[i]) begin s2_hit = 1'b1; s2_idx = NIW'(i); end
    end else begin
      for (int i = PZ_ENTRIES - 1; i >= 0; i--)
        if (mp[i]) begin s2_hit = 1'b1; s2_idx = NIW'(FZ_ENTRIES + i); end
    end
  end

  // ---------------- S3: NHA, compare with PUR, push to OMB ----------------
  logic [NH_W-1:0] nha_rd;
  logic            s3_lk, pur_cover, omb_full, omb_push, squash;
  logic [SW-1:0]   omb_slot;
  logic [$clog2(OMB_DEPTH+1)-1:0] omb_free;
  logic            sb_en;
  logic [OMB_DEPTH-1:0] sb_hit;

  mpc_nha #(.N(NHA_N), .NH_W(NH_W)) u_nha (
    .clk,
    .rd_idx (s3_idx),
    .rd_data(nha_rd),
    .wr_en  (s3_v && s3_upd),
    .wr_idx (pur_row),
    .wr_data(pur.nexthop)
  );

  assign s3_lk     = s3_v && !s3_upd;
  assign pur_cover = (pur_st != P_IDLE) && pur.found && (((s3_addr ^ pur.addr) & pur_mask) == '0);
  assign omb_push  = s3_lk && !s3_hit && !pur_cover && !omb_full;
  assign squash    = s3_lk && !s3_hit && !pur_cover && omb_full;
  assign sb_en     = (pur_st == P_SEARCH) && !omb_push;

  mpc_omb #(.DEPTH(OMB_DEPTH), .AW(IP_W)) u_omb (
    .clk, .rst_n,
    .push     (omb_push),
    .push_addr(s3_addr),
    .push_slot(omb_slot),
    .full     (omb_full),
    .free_cnt (omb_free),
    .req_valid(mreq_valid),
    .req_ready(mreq_ready),
    .req_addr (mreq_addr),
    .req_slot (),
    .srch     (sb_en),
    .srch_key (pur.addr),
    .srch_care(pur_mask),
    .srch_hit (sb_hit)
  );

  always_comb begin
    res_valid    = s3_lk && !squash;
    res_addr     = s3_addr;
    res_cam1_hit = s3_cam1;
    res_slot     = omb_slot;
    res_nexthop  = '0;
    res_src      = SRC_MISS;
    if (s3_hit) begin
      res_src     = s3_src;
      res_nexthop = nha_rd;
    end else if (pur_cover) begin
      res_src     = SRC_PUR;
      res_nexthop = pur.nexthop;
    end
  end

  assign rsv_valid   = sb_en && (|sb_hit);
  assign rsv_slots   = sb_hit;
  assign rsv_found   = pur.found;
  assign rsv_nexthop = pur.nexthop;
  assign squash_evt  = squash;

  // ---------------- replay queue ----------------
  logic [IP_W-1:0] rq [3];
  logic [1:0]      rq_cnt;
  logic [IP_W-1:0] rq_n [3];
  logic [1:0]      rq_cnt_n;
  logic            take_upd, take_rq, take_new;

  assign take_upd = (pur_st == P_ENTER);
  assign take_rq  = !take_upd && !squash && (rq_cnt != 0) && !omb_full;
  assign take_new = !take_upd && !squash && (rq_cnt == 0) && lk_valid;
  assign lk_ready = !take_upd && !squash && (rq_cnt == 0);

  always_comb begin
    logic [IP_W-1:0] sq [3];
    int unsigned k;
    k = 0;
    for (int unsigned i = 0; i < 3; i++) sq[i] = '0;
    if (squash) begin
      sq[k] = s3_addr; k++;
      if (s2_lk) begin sq[k] = s2_addr; k++; end
      if (s1_v && !s1_upd) begin sq[k] = s1_addr; k++; end
    end
    for (int unsigned i = 0; i < 3; i++) rq_n[i] = rq[i];
    rq_cnt_n = rq_cnt;
    if (squash) begin
      // squashed lookups are older than anything still queued
      for (int unsigned i = 0; i < 3; i++)
        rq_n[i] = (i < k) ? sq[i] : rq[i - k];
      rq_cnt_n = rq_cnt + 2'(k);
    end else if (take_rq) begin
      rq_n[0]  = rq[1];
      rq_n[1]  = rq[2];
      rq_n[2]  = '0;
      rq_cnt_n = rq_cnt - 1'b1;
    end
  end

  // ---------------- pipeline advance ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
      s1_upd <= 1'b0; s2_upd <= 1'b0; s3_upd <= 1'b0;
      rq_cnt <= '0;
    end else begin
      s1_v   <= take_upd || take_rq || take_new;
      s1_upd <= take_upd;
      // a squash removes every lookup in flight; updates keep going
      s2_v   <= s1_v && (!squash || s1_upd);
      s2_upd <= s1_upd;
      s3_v   <= s2_v && (!squash || s2_upd);
      s3_upd <= s2_upd;
      rq_cnt <= rq_cnt_n;
    end
  end

  always_ff @(posedge clk) begin
    s1_addr <= take_rq ? rq[0] : lk_addr;
    s2_addr <= s1_addr;
    s2_m1   <= m1;
    s3_addr <= s2_addr;
    s3_hit  <= s2_hit;
    s3_idx  <= s2_idx;
    s3_cam1 <= s2_cam1;
    s3_src  <= s2_cam1 ? SRC_FULL : SRC_PREFIX;
    for (int unsigned i = 0; i < 3; i++) rq[i] <= rq_n[i];
  end

  // ---------------- PUR control ----------------
  assign fq_pop = (pur_st == P_IDLE) && fq_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pur_st  <= P_IDLE;
      pur     <= '0;
      pur_row <= '0;
      fz_ptr  <= '0;
      pz_ptr  <= '0;
    end else begin
      unique case (pur_st)
        P_IDLE: if (fq_valid) begin
          pur    <= fq_data;
          pur_st <= P_SEARCH;
        end
        P_SEARCH: if (sb_en) begin
          if ((|sb_hit) && pur.found) begin
            pur_st <= P_ENTER;
            if (pur.is_prefix) begin
              pur_row <= NIW'(FZ_ENTRIES) + NIW'(pz_ptr);
              pz_ptr  <= (pz_ptr == PIW'(PZ_ENTRIES - 1)) ? '0 : pz_ptr + 1'b1;
            end else begin
              pur_row <= NIW'(fz_ptr);
              fz_ptr  <= (fz_ptr == FIW'(FZ_ENTRIES - 1)) ? '0 : fz_ptr + 1'b1;
            end
          end else begin
            pur_st <= P_IDLE;   // nothing pending for it: duplicate or no route
            pur    <= '0;
          end
        end
        P_ENTER: pur_st <= P_PIPE;
        P_PIPE: if (s3_v && s3_upd) begin
          pur_st <= P_IDLE;
          pur    <= '0;
        end
        default: pur_st <= P_IDLE;
      endcase
    end
  end

  // The replay queue never holds more than the three pipeline slots.
  a_rq_bound: assert property (@(posedge clk) disable iff (!rst_n)
    squash |-> (32'(rq_cnt) + 32'(s2_lk) + 32'(s1_v && !s1_upd) <= 2));
  // An update in S1 only while the PUR holds it.
  a_upd_pur: assert property (@(posedge clk) disable iff (!rst_n)
    (s1_v && s1_upd) |-> (pur_st == P_PIPE));
endmodule
