// tb_rt_cache: end-to-end test of the reduced-tag cache at its default size
// (16 KB, 4 ways, 4-word lines, 6 TagL bits, 2 LCB bits).
//
// The cache reads lines from rt_lower_mem. Every response is checked three
// ways: the word against the memory content function, the hit flag, action
// and way against a behavioural reference model of the whole replacement
// scheme kept in this file, and the latency (1 cycle for a hit, 3 + LAT for
// a miss). Three phases:
//   1. the 16-access example trace of the masked-FIFO discussion (one set,
//      TagH 0x0200..0x0204 in 16-bit terms); only the repeated lines hit;
//   2. many localities on one set: fills all LoB entries, then the LoMB,
//      then LoMB replacement, and repeats one locality until it is promoted
//      into the LoB by a swap;
//   3. a long pseudo-random trace over a small address pool.
// Each mechanism (every policy action, masked-FIFO override of plain FIFO,
// a TagL match rejected by the LoB, invalidation after a swap) is counted
// and must occur at least once.
module tb_rt_cache;
  import rt_pkg::*;

  localparam int unsigned LAT     = 3;
  localparam int unsigned WAYS    = 4;
  localparam int unsigned SETS    = 256;
  localparam int unsigned LOB_N   = 4;
  localparam int unsigned LOMB_N  = 2;
  localparam int unsigned THRESH  = 2;
  localparam int unsigned CNT_MAX = 15;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         cpu_req_valid = 1'b0;
  logic         cpu_req_ready;
  logic [31:0]  cpu_req_addr = '0;
  logic         cpu_resp_valid;
  logic [31:0]  cpu_resp_data;
  logic         cpu_resp_hit;
  logic         mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0]  mem_req_addr;
  logic [127:0] mem_resp_data;
  logic         evt_valid;
  logic [2:0]   evt_action;
  logic [1:0]   evt_way;
  int unsigned  mem_requests;

  always #5 clk = ~clk;

  rt_cache dut (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_addr,
    .cpu_resp_valid, .cpu_resp_data, .cpu_resp_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_resp_valid, .mem_resp_data,
    .evt_valid, .evt_action, .evt_way
  );

  rt_lower_mem #(.LINE_WORDS(4), .LAT(LAT)) u_mem (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .n_requests(mem_requests)
  );

  int checks = 0, failures = 0;
  int act_count [N_ACTIONS];
  int n_override = 0, n_reject = 0, n_inval = 0, n_hits = 0, n_access = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ reference model
  bit          mv   [WAYS][SETS];
  bit [5:0]    mtl  [WAYS][SETS];
  bit [1:0]    mlcb [WAYS][SETS];
  bit          lobv [WAYS][LOB_N];
  bit [13:0]   lobt [WAYS][LOB_N];
  int          lobc [WAYS][LOB_N];
  bit          lombv[WAYS][LOMB_N];
  bit [13:0]   lombt[WAYS][LOMB_N];
  int          lombc[WAYS][LOMB_N];
  int          last [SETS];

  task automatic model_reset();
    foreach (mv[w, s]) begin mv[w][s] = 0; mtl[w][s] = 0; mlcb[w][s] = 0; end
    foreach (lobv[w, e]) begin lobv[w][e] = 0; lobt[w][e] = 0; lobc[w][e] = 0; end
    foreach (lombv[w, e]) begin lombv[w][e] = 0; lombt[w][e] = 0; lombc[w][e] = 0; end
    foreach (last[s]) last[s] = WAYS - 1;
  endtask

  task automatic model_access(input logic [31:0] a, output bit hit, output int act, output int way);
    bit [13:0] th;
    bit [5:0]  tl;
    int        idx, w, e, m;
    bit [3:0]  empty, ahit, aempty, mask;
    int        ahit_idx [WAYS];
    int        aempty_idx [WAYS];
    bit        lt, lb, lmh, lme;
    int        lmi, lmc, lme_i, vict, minc;
    th  = a[31:18];
    tl  = a[17:12];
    idx = int'(a[11:4]);
    hit = 0; way = 0; act = ACT_HIT;
    for (int k = 0; k < WAYS; k++) begin
      bit k_lt, k_lb;
      k_lt = mv[k][idx] && (mtl[k][idx] == tl);
      k_lb = lobv[k][mlcb[k][idx]] && (lobt[k][mlcb[k][idx]] == th);
      if (k_lt && k_lb) begin hit = 1; way = k; end
      if (k_lt && !k_lb) n_reject++;
    end
    if (hit) return;
    for (int k = 0; k < WAYS; k++) begin
      empty[k] = !mv[k][idx];
      ahit[k] = 0; aempty[k] = 0; ahit_idx[k] = 0; aempty_idx[k] = 0;
      for (int j = LOB_N - 1; j >= 0; j--) begin
        if (lobv[k][j] && lobt[k][j] == th) begin ahit[k] = 1; ahit_idx[k] = j; end
        if (!lobv[k][j]) begin aempty[k] = 1; aempty_idx[k] = j; end
      end
    end
    if (empty != 0)       mask = ((empty & ahit) != 0) ? (empty & ahit) : empty;
    else if (ahit != 0)   mask = ahit;
    else if (aempty != 0) mask = aempty;
    else                  mask = 4'hF;
    w = (last[idx] + 1) % WAYS;
    for (int k = WAYS; k >= 1; k--)
      if (mask[(last[idx] + k) % WAYS]) w = (last[idx] + k) % WAYS;
    if (w != (last[idx] + 1) % WAYS) n_override++;
    way = w;
    lt = mv[w][idx] && (mtl[w][idx] == tl);
    // LoMB lookup in the selected way
    lmh = 0; lmi = 0; lmc = 0; lme = 0; lme_i = 0;
    for (int j = LOMB_N - 1; j >= 0; j--) begin
      if (lombv[w][j] && lombt[w][j] == th) begin lmh = 1; lmi = j; lmc = lombc[w][j]; end
      if (!lombv[w][j]) begin lme = 1; lme_i = j; end
    end
    vict = -1;
    for (int j = LOMB_N - 1; j >= 0; j--) if (lombc[w][j] <= 1) vict = j;
    if (vict < 0) begin
      minc = 1 << 30;
      for (int j = 0; j < LOMB_N; j++) if (lombc[w][j] < minc) begin minc = lombc[w][j]; vict = j; end
    end
    if (ahit[w]) begin
      act = ACT_FILL_LOB;
      if (lobc[w][ahit_idx[w]] < CNT_MAX) lobc[w][ahit_idx[w]]++;
      mv[w][idx] = 1; mtl[w][idx] = tl; mlcb[w][idx] = 2'(ahit_idx[w]);
    end else if (lmh && (lmc + 1 > THRESH)) begin
      act = ACT_SWAP_FILL;
      e = mlcb[w][idx];
      lombt[w][lmi] = lobt[w][e]; lombv[w][lmi] = lobv[w][e]; lombc[w][lmi] = 0;
      lobt[w][e] = th; lobv[w][e] = 1; lobc[w][e] = 0;
      for (int s = 0; s < SETS; s++)
        if (s != idx && mv[w][s] && mlcb[w][s] == 2'(e)) begin mv[w][s] = 0; n_inval++; end
      mv[w][idx] = 1; mtl[w][idx] = tl;
    end else if (lmh) begin
      act = ACT_LOMB_COUNT;
      if (lombc[w][lmi] < CNT_MAX) lombc[w][lmi]++;
    end else if (aempty[w]) begin
      act = ACT_NEW_LOB;
      m = aempty_idx[w];
      lobt[w][m] = th; lobv[w][m] = 1; lobc[w][m] = 0;
      mv[w][idx] = 1; mtl[w][idx] = tl; mlcb[w][idx] = 2'(m);
    end else if (lme) begin
      act = ACT_NEW_LOMB;
      lombt[w][lme_i] = th; lombv[w][lme_i] = 1; lombc[w][lme_i] = 0;
    end else begin
      act = ACT_REPLACE_LOMB;
      lombt[w][vict] = th; lombv[w][vict] = 1; lombc[w][vict] = 0;
    end
    if (act == ACT_FILL_LOB || act == ACT_SWAP_FILL || act == ACT_NEW_LOB) last[idx] = w;
    if (lt) ; // a TagL match in the victim way is still a miss here
  endtask

  // ------------------------------------------------ driver
  task automatic access(input logic [31:0] a, output bit got_hit);
    int  lat;
    bit  exp_hit;
    int  exp_act, exp_way;
    do @(negedge clk); while (!cpu_req_ready);
    cpu_req_valid = 1'b1;
    cpu_req_addr  = a;
    @(posedge clk);
    @(negedge clk);
    cpu_req_valid = 1'b0;
    lat = 1;
    while (!cpu_resp_valid && lat < 100) begin @(negedge clk); lat++; end
    model_access(a, exp_hit, exp_act, exp_way);
    n_access++;
    got_hit = cpu_resp_hit;
    if (cpu_resp_hit) n_hits++;
    act_count[evt_action]++;
    check(cpu_resp_valid, $sformatf("no response for %h", a));
    check(cpu_resp_data == rt_tb_pkg::mem_word(a),
          $sformatf("data %h for %h, want %h", cpu_resp_data, a, rt_tb_pkg::mem_word(a)));
    check(cpu_resp_hit == exp_hit, $sformatf("hit %0d for %h, model %0d", cpu_resp_hit, a, exp_hit));
    check(int'(evt_action) == exp_act, $sformatf("action %0d for %h, model %0d", evt_action, a, exp_act));
    check(int'(evt_way) == exp_way, $sformatf("way %0d for %h, model %0d", evt_way, a, exp_way));
    check(lat == (cpu_resp_hit ? 1 : 3 + LAT), $sformatf("latency %0d for %h (hit %0d)", lat, a, cpu_resp_hit));
  endtask

  // The example trace of the masked-FIFO discussion (16 KB, 4-way, set 0xeb).
  logic [31:0] trace_ex [16] = '{
    32'h02000eb0, 32'h02010eb4, 32'h02001eb0, 32'h02011eb4,
    32'h02020eb0, 32'h02020eb4, 32'h02041eb0, 32'h02041eb4,
    32'h02002eb0, 32'h02012eb4, 32'h02003eb0, 32'h02013eb4,
    32'h02022eb0, 32'h02022eb4, 32'h02043eb0, 32'h02043eb4 };
  bit trace_hit [16] = '{0,0,0,0, 0,1,0,1, 0,0,0,0, 0,1,0,1};

  initial begin
    bit h;
    logic [31:0] a;
    foreach (act_count[i]) act_count[i] = 0;
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: example trace.
    for (int i = 0; i < 16; i++) begin
      access(trace_ex[i], h);
      check(h == trace_hit[i], $sformatf("example trace access %0d hit %0d", i + 1, h));
    end

    // Phase 2: 20 localities on set 0x40, then promote one from the LoMB.
    for (int t = 1; t <= 20; t++) access({14'(t + 100), 6'd5, 8'h40, 4'h0}, h);
    for (int r = 0; r < 6; r++) begin
      access({14'd300, 6'd9, 8'h41, 4'h0}, h);
      access({14'd300, 6'd9, 8'h41, 4'h4}, h);
    end
    for (int t = 1; t <= 8; t++) access({14'(t + 100), 6'd5, 8'h40, 4'h8}, h);

    // Phase 3: pseudo-random trace over a small pool.
    for (int n = 0; n < 20000; n++) begin
      a = {14'($urandom_range(0, 23)), 6'($urandom_range(0, 3)), 8'($urandom_range(0, 5)),
           2'($urandom_range(0, 3)), 2'b00};
      access(a, h);
    end

    $display("accesses=%0d hits=%0d mem_requests=%0d", n_access, n_hits, mem_requests);
    for (int i = 0; i < N_ACTIONS; i++) begin
      $display("action %s: %0d", rt_action_e'(i), act_count[i]);
      check(act_count[i] > 0, $sformatf("action %s never happened", rt_action_e'(i)));
    end
    $display("masked FIFO overrides=%0d TagL matches rejected by LoB=%0d lines invalidated=%0d",
             n_override, n_reject, n_inval);
    check(n_override > 0, "masked FIFO never overrode plain FIFO");
    check(n_reject > 0, "no TagL match was rejected by the LoB");
    check(n_inval > 0, "no line was invalidated by a swap");
    check(mem_requests == n_access - n_hits, "memory requests differ from misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
