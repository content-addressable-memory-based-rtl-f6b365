// tb_hlpm_lut: self-checking test of the HLPM lookup table.
//
// Two instances: the IPv4 split (17 + 15 bits, 4-bit Length Column) and the
// IPv6 split (four 32-bit stages, 5-bit Length Column), both with few
// entries. Random prefixes, including nested ones and prefixes ending in the
// same stage, are written at random indices. Addresses are drawn around the
// stored prefixes and looked up one per cycle; every answer is compared with
// a longest-match search over the written table done in the testbench
// (longest length wins, lowest index on equal length). Checked: found, next
// hop, index, ending stage, whether the Length Column had to decide, and the
// fixed latency: the answer is registered NSTAGES + LEN_W + 1 clock edges
// after the edge that samples the search (measured here one edge later, at
// the edge that samples the answer). Short IPv4 prefixes are kept at 14 bits
// or fewer so that their saturated length codes stay exact.
module tb_hlpm_lut;
  localparam int N4 = 64;
  localparam int N6 = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUTs ----------------
  logic         lk4_v, lk6_v;
  logic [31:0]  lk4_a;
  logic [127:0] lk6_a;
  logic         r4_v, r4_f, r4_sec, r6_v, r6_f, r6_sec;
  logic [31:0]  r4_a, r4_c;
  logic [127:0] r6_a, r6_c;
  logic [5:0]   r4_i;
  logic [4:0]   r6_i;
  logic [7:0]   r4_nh, r6_nh;
  logic [1:0]   r4_s;
  logic [2:0]   r6_s;
  logic         w4, w6, w4_v, w6_v;
  logic [5:0]   w4_i;
  logic [4:0]   w6_i;
  logic [31:0]  w4_p;
  logic [127:0] w6_p;
  logic [5:0]   w4_l;
  logic [7:0]   w6_l;
  logic [7:0]   w4_nh, w6_nh;

  hlpm_lut #(.ENTRIES(N4), .ADDR_W(32), .FIRST_W(17), .NSTAGES(2), .LEN_W(4)) dut4 (
    .clk, .rst_n, .lk_valid(lk4_v), .lk_addr(lk4_a),
    .res_valid(r4_v), .res_addr(r4_a), .res_found(r4_f), .res_index(r4_i),
    .res_nexthop(r4_nh), .res_care(r4_c), .res_end_stage(r4_s), .res_second_level(r4_sec),
    .wr_en(w4), .wr_index(w4_i), .wr_valid(w4_v), .wr_prefix(w4_p), .wr_plen(w4_l), .wr_nexthop(w4_nh));

  hlpm_lut #(.ENTRIES(N6), .ADDR_W(128), .FIRST_W(32), .NSTAGES(4), .LEN_W(5)) dut6 (
    .clk, .rst_n, .lk_valid(lk6_v), .lk_addr(lk6_a),
    .res_valid(r6_v), .res_addr(r6_a), .res_found(r6_f), .res_index(r6_i),
    .res_nexthop(r6_nh), .res_care(r6_c), .res_end_stage(r6_s), .res_second_level(r6_sec),
    .wr_en(w6), .wr_index(w6_i), .wr_valid(w6_v), .wr_prefix(w6_p), .wr_plen(w6_l), .wr_nexthop(w6_nh));

  // ---------------- reference tables ----------------
  logic         t4_v [N4];  logic [31:0]  t4_p [N4]; int t4_l [N4]; logic [7:0] t4_nh [N4];
  logic         t6_v [N6];  logic [127:0] t6_p [N6]; int t6_l [N6]; logic [7:0] t6_nh [N6];

  function automatic logic [127:0] mask(int aw, int len);
    logic [127:0] m = '0;
    for (int b = 0; b < aw; b++) if (b < len) m[aw-1-b] = 1'b1;
    return m;
  endfunction
  function automatic int end_stage(int len, int first_w, int rest_w, int nst);
    for (int s = 0; s < nst - 1; s++)
      if (len < first_w + s * rest_w) return s;
    return nst - 1;
  endfunction

  typedef struct { bit found; int idx; int stage; bit second; logic [7:0] nh; } ref_t;

  function automatic ref_t ref4(logic [31:0] a);
    ref_t r; int best = -1; int deep = -1; int cnt = 0;
    r = '{0, 0, 0, 0, 0};
    for (int i = 0; i < N4; i++)
      if (t4_v[i] && (((a ^ t4_p[i]) & mask(32, t4_l[i])) == 0)) begin
        int s = end_stage(t4_l[i], 17, 15, 2);
        if (s > deep) begin deep = s; cnt = 0; end
        if (s == deep) cnt++;
        if (best < 0 || t4_l[i] > t4_l[best]) best = i;
      end
    if (best >= 0) begin
      r.found = 1; r.idx = best; r.stage = deep; r.second = (cnt > 1); r.nh = t4_nh[best];
    end
    return r;
  endfunction
  function automatic ref_t ref6(logic [127:0] a);
    ref_t r; int best = -1; int deep = -1; int cnt = 0;
    r = '{0, 0, 0, 0, 0};
    for (int i = 0; i < N6; i++)
      if (t6_v[i] && (((a ^ t6_p[i]) & mask(128, t6_l[i])) == 0)) begin
        int s = end_stage(t6_l[i], 32, 32, 4);
        if (s > deep) begin deep = s; cnt = 0; end
        if (s == deep) cnt++;
        if (best < 0 || t6_l[i] > t6_l[best]) best = i;
      end
    if (best >= 0) begin
      r.found = 1; r.idx = best; r.stage = deep; r.second = (cnt > 1); r.nh = t6_nh[best];
    end
    return r;
  endfunction

  // ---------------- expected-answer queues ----------------
  ref_t q4 [$]; int q4_t [$]; ref_t q6 [$]; int q6_t [$];
  int seen_second4 = 0, seen_short4 = 0, seen_second6 = 0, seen_deep6 = 0;

  always @(posedge clk) if (rst_n) begin
    if (r4_v) begin
      ref_t e; int t;
      e = q4.pop_front(); t = q4_t.pop_front();
      checks++;
      if (r4_f !== e.found || (e.found && (r4_nh !== e.nh || r4_i !== 6'(e.idx) ||
          32'(r4_s) != e.stage || r4_sec !== e.second)) || (cyc - t) != 2 + 4 + 1) begin
        failures++;
        $display("FAIL v4 addr=%h found=%0d/%0d nh=%0d/%0d idx=%0d/%0d st=%0d/%0d sec=%0d/%0d lat=%0d",
          r4_a, r4_f, e.found, r4_nh, e.nh, r4_i, e.idx, r4_s, e.stage, r4_sec, e.second, cyc - t);
      end
      if (e.found && e.second) seen_second4++;
      if (e.found && e.stage == 0) seen_short4++;
    end
    if (r6_v) begin
      ref_t e; int t;
      e = q6.pop_front(); t = q6_t.pop_front();
      checks++;
      if (r6_f !== e.found || (e.found && (r6_nh !== e.nh || r6_i !== 5'(e.idx) ||
          32'(r6_s) != e.stage || r6_sec !== e.second)) || (cyc - t) != 4 + 5 + 1) begin
        failures++;
        $display("FAIL v6 found=%0d/%0d nh=%0d/%0d idx=%0d/%0d st=%0d/%0d sec=%0d/%0d lat=%0d",
          r6_f, e.found, r6_nh, e.nh, r6_i, e.idx, r6_s, e.stage, r6_sec, e.second, cyc - t);
      end
      if (e.found && e.second) seen_second6++;
      if (e.found && e.stage == 3) seen_deep6++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic put4(int i, logic [31:0] p, int len, logic [7:0] nh);
    w4 <= 1; w4_i <= 6'(i); w4_v <= 1; w4_p <= p; w4_l <= 6'(len); w4_nh <= nh;
    t4_v[i] = 1; t4_p[i] = p & mask(32, len); t4_l[i] = len; t4_nh[i] = nh;
    @(posedge clk); #1;
  endtask
  task automatic put6(int i, logic [127:0] p, int len, logic [7:0] nh);
    w6 <= 1; w6_i <= 5'(i); w6_v <= 1; w6_p <= p; w6_l <= 8'(len); w6_nh <= nh;
    t6_v[i] = 1; t6_p[i] = p & mask(128, len); t6_l[i] = len; t6_nh[i] = nh;
    @(posedge clk); #1;
  endtask

  logic [31:0]  base4 [4];
  logic [127:0] base6 [3];

  initial begin
    lk4_v = 0; lk6_v = 0; w4 = 0; w6 = 0; lk4_a = 0; lk6_a = 0;
    w4_i = 0; w4_v = 0; w4_p = 0; w4_l = 0; w4_nh = 0;
    w6_i = 0; w6_v = 0; w6_p = 0; w6_l = 0; w6_nh = 0;
    for (int i = 0; i < N4; i++) t4_v[i] = 0;
    for (int i = 0; i < N6; i++) t6_v[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    // IPv4: nested families around a few bases, placed at scattered indices
    for (int b = 0; b < 4; b++) base4[b] = $urandom;
    for (int i = 0; i < N4; i++) begin
      int idx, len, r;
      idx = (i * 37) % N4;
      r = $urandom_range(0, 9);
      if (i % 8 == 7) continue;  // leave a few holes
      if (r < 3) len = $urandom_range(1, 14);
      else if (r < 4) len = 16;
      else len = $urandom_range(17, 32);
      put4(idx, base4[$urandom_range(0, 3)] ^ (32'($urandom_range(0, 3)) << (32 - len)),
           len, 8'($urandom));
    end
    w4 <= 0;
    // IPv6: nested prefixes with ends in every stage
    for (int b = 0; b < 3; b++) base6[b] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < N6 - 2; i++) begin
      int len;
      len = $urandom_range(1, 127);
      if (len == 32 || len == 64 || len == 96) len++;
      put6((i * 7) % N6, base6[$urandom_range(0, 2)] ^ (128'($urandom_range(0, 1)) << (128 - len)),
           len, 8'($urandom));
    end
    w4 <= 0; w6 <= 0;
    // searches, one per cycle, both tables
    for (int k = 0; k < 600; k++) begin
      logic [31:0]  a4;
      logic [127:0] a6;
      a4 = base4[$urandom_range(0, 3)] ^ ($urandom >> $urandom_range(0, 31));
      if (k % 10 == 0) a4 = $urandom;
      a6 = base6[$urandom_range(0, 2)] ^ ({$urandom, $urandom, $urandom, $urandom} >> $urandom_range(0, 127));
      lk4_v <= 1; lk4_a <= a4; lk6_v <= 1; lk6_a <= a6;
      q4.push_back(ref4(a4)); q4_t.push_back(cyc);
      q6.push_back(ref6(a6)); q6_t.push_back(cyc);
      @(posedge clk); #1;
    end
    lk4_v <= 0; lk6_v <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (q4.size() != 0 || q6.size() != 0) begin failures++; $display("FAIL answers missing"); end
    checks++;
    if (seen_second4 == 0 || seen_short4 == 0 || seen_second6 == 0 || seen_deep6 == 0) begin
      failures++;
      $display("FAIL coverage second4=%0d short4=%0d second6=%0d deep6=%0d",
               seen_second4, seen_short4, seen_second6, seen_deep6);
    end
    $display("coverage: v4 second-level=%0d short=%0d  v6 second-level=%0d last-stage=%0d",
             seen_second4, seen_short4, seen_second6, seen_deep6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
