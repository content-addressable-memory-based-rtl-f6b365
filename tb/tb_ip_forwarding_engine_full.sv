// tb_ip_forwarding_engine_full: the forwarding engine at its default size.
//
// Same checks as tb_ip_forwarding_engine (in-order answers, three-cycle hit
// latency, correct next hop for every hit, every miss resolved exactly once
// with the right next hop or "no route"), but with the default parameters:
// a 1K-entry cache (512 + 512), a 10-entry outstanding miss buffer and an
// 18432-entry lookup table. Routes are written at indices spread over the
// whole table, including the last one. The run is short, so only the
// mechanisms that a short run reaches at this size are required (hits in
// both zones, misses, hit under miss, short-prefix and Length Column
// answers); the others are counted and reported.
module tb_ip_forwarding_engine_full;
  import fwd_pkg::*;
  localparam int FZ = 512, PZ = 512, OMB = 10, LUTN = 18432, NLOOK = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic lk_valid = 0, lk_ready;
  logic [31:0] lk_addr = 0;
  logic res_valid, res_cam1_hit, rsv_valid, rsv_found;
  logic [31:0] res_addr;
  hit_src_t res_src;
  logic [7:0] res_nexthop, rsv_nexthop;
  logic [3:0] res_slot;
  logic [OMB-1:0] rsv_slots;
  logic tbl_wr = 0, tbl_valid = 0;
  logic [14:0] tbl_index = 0;
  logic [5:0] tbl_plen = 0;
  logic [31:0] tbl_prefix = 0;
  logic [7:0] tbl_nexthop = 0;
  logic squash_evt, lut_search_evt, lut_short_evt, lut_second_evt;

  ip_forwarding_engine dut (.*);

  // ---------------- reference table ----------------
  int nt = 0;
  logic [31:0] rp [LUTN]; int rl [LUTN]; logic [7:0] rn [LUTN];
  function automatic logic [31:0] m32(int len);
    return (len == 0) ? 32'h0 : ~(32'hffff_ffff >> len);
  endfunction
  function automatic int lpm(logic [31:0] a);  // -1: no route
    int best = -1;
    for (int i = 0; i < nt; i++)
      if (((a ^ rp[i]) & m32(rl[i])) == 0 && (best < 0 || rl[i] > rl[best])) best = i;
    return best;
  endfunction

  task automatic add_route(logic [31:0] p, int len, logic [7:0] nh);
    tbl_wr <= 1; tbl_index <= 15'((nt * 2897 + 18431) % LUTN); tbl_valid <= 1; tbl_prefix <= p; tbl_plen <= 6'(len);
    tbl_nexthop <= nh;
    rp[nt] = p & m32(len); rl[nt] = len; rn[nt] = nh; nt++;
    @(posedge clk); #1;
  endtask

  // Short roots: 12-bit tops 0x100..; long roots: 0x800...; no route: 0xF00...
  logic [31:0] pool [64];
  initial begin
    logic [31:0] a;
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 6; k++)   // short prefixes, 12..16 bits, disjoint
      add_route({12'h100 + 12'(k), 20'h0}, 12 + (k % 5), 8'(10 + k));
    for (int k = 0; k < 4; k++) begin  // nested long prefixes under four roots
      logic [31:0] r;
      r = {12'h800 + 12'(k), 20'($urandom)};
      add_route(r, 17, 8'(40 + k));
      add_route(r, 20, 8'(50 + k));
      add_route(r ^ 32'h0000_1000, 20, 8'(60 + k));   // same length, sibling
      add_route(r, 24, 8'(70 + k));
      add_route(r ^ 32'h0000_0100, 24, 8'(80 + k));
      add_route(r, 28, 8'(90 + k));
    end
    tbl_wr <= 0;
    // address pool with locality
    for (int k = 0; k < 64; k++) begin
      n = $urandom_range(0, 9);
      if (n < 4)      a = {12'h100 + 12'($urandom_range(0, 5)), 20'($urandom)};
      else if (n < 9) a = rp[6 + 6 * $urandom_range(0, 3)] ^ 32'($urandom_range(0, 255));
      else            a = {12'hF00, 20'($urandom)};
      pool[k] = a;
    end
  end

  // ---------------- stimulus ----------------
  int sent = 0;
  initial begin
    wait (rst_n);
    repeat (80) @(posedge clk);
    #1;
    while (sent < NLOOK) begin
      lk_valid <= ($urandom_range(0, 3) != 0);
      lk_addr  <= pool[($urandom_range(0, 3) == 0) ? $urandom_range(0, 63) : $urandom_range(0, 15)];
      @(posedge clk); #1;
    end
    lk_valid <= 0;
  end

  // ---------------- checking (at negedge, all signals settled) ----------------
  logic [31:0] q_addr [$]; int q_cyc [$]; int q_sq [$];
  logic [31:0] pend_addr [OMB]; bit pend [OMB];
  int n_full = 0, n_pfx = 0, n_pur = 0, n_miss = 0, n_hum = 0, n_mum = 0, n_sq = 0;
  int n_dup = 0, n_rsv = 0, n_noroute = 0, n_short = 0, n_second = 0, n_wrap = 0;
  int n_out = 0, n_cover = 0;

  initial for (int s = 0; s < OMB; s++) pend[s] = 0;

  always @(negedge clk) if (rst_n) begin
    int pending_now;
    pending_now = 0;
    for (int s = 0; s < OMB; s++) pending_now += int'(pend[s]);
    if (squash_evt) n_sq++;
    if (lut_short_evt) n_short++;
    if (lut_second_evt) n_second++;
    if (dut.u_mpc.pur_st == 2'd1 && dut.u_mpc.sb_en && !(|dut.u_mpc.sb_hit)) n_dup++;
    if (dut.u_mpc.pur_st == 2'd1 && dut.u_mpc.sb_en && (|dut.u_mpc.sb_hit) &&
        dut.u_mpc.fz_ptr == 9'(FZ - 1) && !dut.u_mpc.pur.is_prefix) n_wrap++;
    if (lk_valid && lk_ready) begin
      q_addr.push_back(lk_addr); q_cyc.push_back(cyc); q_sq.push_back(n_sq);
      sent++;
    end
    if (res_valid) begin
      logic [31:0] ea; int ec, es, r;
      n_out++;
      ea = q_addr.pop_front(); ec = q_cyc.pop_front(); es = q_sq.pop_front();
      r = lpm(res_addr);
      checks++;
      if (res_addr !== ea) begin
        failures++; $display("FAIL order: got %h expected %h", res_addr, ea);
      end
      if (es == n_sq) begin
        checks++;
        if (cyc - ec != 3) begin failures++; $display("FAIL latency %0d", cyc - ec); end
      end
      if (res_src != SRC_MISS) begin
        checks++;
        if (r < 0 || res_nexthop !== rn[r]) begin
          failures++;
          $display("FAIL hit %h src=%0d nh=%0d expected %0d", res_addr, res_src, res_nexthop,
                   (r < 0) ? -1 : int'(rn[r]));
        end
        if (res_src == SRC_FULL) n_full++;
        if (res_src == SRC_PREFIX) n_pfx++;
        // a cached prefix answering an address that differs below the prefix
        if (res_src == SRC_PREFIX && r >= 0 && ((res_addr & ~m32(rl[r])) >> 16) != 0) n_cover++;
        if (res_src == SRC_PUR) n_pur++;
        if (pending_now > 0) n_hum++;
      end else begin
        n_miss++;
        if (pending_now > 0) n_mum++;
        checks++;
        if (pend[res_slot]) begin failures++; $display("FAIL slot %0d reused", res_slot); end
        pend[res_slot] = 1; pend_addr[res_slot] = res_addr;
      end
    end
    if (rsv_valid) begin
      n_rsv++;
      for (int s = 0; s < OMB; s++) if (rsv_slots[s]) begin
        int r;
        checks++;
        r = (pend[s] || (res_valid && res_src == SRC_MISS && res_slot == 4'(s))) ? lpm(pend_addr[s]) : -2;
        if (r == -2) begin failures++; $display("FAIL resolve of empty slot %0d", s); end
        else if (r < 0) begin
          if (rsv_found) begin failures++; $display("FAIL resolve found for no-route %h", pend_addr[s]); end
          n_noroute++;
        end else if (!rsv_found || rsv_nexthop !== rn[r]) begin
          failures++; $display("FAIL resolve %h nh=%0d expected %0d", pend_addr[s], rsv_nexthop, rn[r]);
        end
        pend[s] = 0;
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (sent == NLOOK);
    repeat (200) @(posedge clk);
    checks++;
    if (q_addr.size() != 0) begin failures++; $display("FAIL %0d answers missing", q_addr.size()); end
    for (int s = 0; s < OMB; s++) begin
      checks++;
      if (pend[s]) begin failures++; $display("FAIL slot %0d never resolved", s); end
    end
    $display("events: prefix hits covering other addresses=%0d", n_cover);
    $display("events: full=%0d prefix=%0d pur=%0d miss=%0d hit-under-miss=%0d miss-under-miss=%0d",
             n_full, n_pfx, n_pur, n_miss, n_hum, n_mum);
    $display("events: squash=%0d dup-dropped=%0d resolves=%0d no-route=%0d wrap=%0d lut-short=%0d lut-second=%0d",
             n_sq, n_dup, n_rsv, n_noroute, n_wrap, n_short, n_second);
    $display("CPO = %0d cycles / %0d answers", cyc, n_out);
    if (n_full == 0) begin failures++; $display("FAIL no full-zone hit"); end
    if (n_pfx == 0) begin failures++; $display("FAIL no prefix-zone hit"); end
    if (n_cover == 0) begin failures++; $display("FAIL no prefix hit covering another address"); end
    if (n_miss == 0) begin failures++; $display("FAIL no miss"); end
    if (n_hum == 0) begin failures++; $display("FAIL no hit under miss"); end
    if (n_short == 0) begin failures++; $display("FAIL no short-prefix LUT answer"); end
    if (n_second == 0) begin failures++; $display("FAIL no Length Column decision"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
