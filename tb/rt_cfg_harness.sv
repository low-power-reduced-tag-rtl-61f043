// rt_cfg_harness: runs one configuration of the reduced-tag cache on a
// synthetic program-like address trace and checks it against a behavioural
// model of the whole replacement scheme. Used by tb_rt_cache_configs.
//
// The trace mixes sequential instruction fetches inside loops of several
// code regions, and strided data accesses to three distant arrays (static
// data, heap, stack), so that a few localities (TagH values) alternate, as
// in embedded programs. Every response is checked for its data word, its
// hit flag and its policy action and way against the model. A conventional
// full-tag FIFO cache of the same geometry runs beside it in the model to
// report the full-tag hit count for comparison. Reports through its ports
// when done.
module rt_cfg_harness #(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned TAGL_W      = 6,
  parameter int unsigned N_ACCESS    = 20000,
  parameter int unsigned SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   full_tag_hits
);
  import rt_pkg::*;

  localparam int unsigned SETS    = CACHE_BYTES / (WAYS * 16);
  localparam int unsigned INDEX_W = $clog2(SETS);
  localparam int unsigned TAGH_W  = 32 - 4 - INDEX_W - TAGL_W;
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LOB_N   = 4;
  localparam int unsigned LOMB_N  = 2;
  localparam int unsigned THRESH  = 2;
  localparam int unsigned CNT_MAX = 15;
  localparam int unsigned LAT     = 2;

  logic         cpu_req_valid, cpu_req_ready, cpu_resp_valid, cpu_resp_hit;
  logic [31:0]  cpu_req_addr, cpu_resp_data;
  logic         mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0]  mem_req_addr;
  logic [127:0] mem_resp_data;
  logic         evt_valid;
  logic [2:0]   evt_action;
  logic [WAY_W-1:0] evt_way;
  int unsigned  mem_requests;

  rt_cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .TAGL_W(TAGL_W)) dut (
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

  // ------------------------------------------------ reduced-tag model
  bit               mv   [WAYS][SETS];
  bit [TAGL_W-1:0]  mtl  [WAYS][SETS];
  bit [1:0]         mlcb [WAYS][SETS];
  bit               lobv [WAYS][LOB_N];
  bit [TAGH_W-1:0]  lobt [WAYS][LOB_N];
  int               lobc [WAYS][LOB_N];
  bit               lombv[WAYS][LOMB_N];
  bit [TAGH_W-1:0]  lombt[WAYS][LOMB_N];
  int               lombc[WAYS][LOMB_N];
  int               last [SETS];
  // full-tag FIFO reference
  bit               fv   [WAYS][SETS];
  bit [31:0]        ft   [WAYS][SETS];
  int               flast[SETS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0dB %0d-way TagL %0d] %s", CACHE_BYTES, WAYS, TAGL_W, what);
    end
  endtask

  task automatic full_tag_access(input logic [31:0] a);
    int idx;
    bit h;
    idx = int'(a[4 +: INDEX_W]);
    h = 0;
    for (int k = 0; k < WAYS; k++) if (fv[k][idx] && ft[k][idx] == (a >> (4 + INDEX_W))) h = 1;
    if (h) full_tag_hits++;
    else begin
      flast[idx] = (flast[idx] + 1) % WAYS;
      fv[flast[idx]][idx] = 1;
      ft[flast[idx]][idx] = a >> (4 + INDEX_W);
    end
  endtask

  task automatic model_access(input logic [31:0] a, output bit hit, output int act, output int way);
    bit [TAGH_W-1:0] th;
    bit [TAGL_W-1:0] tl;
    int              idx, w, e, m, lmi, lmc, lme_i, vict, minc;
    bit [WAYS-1:0]   empty, ahit, aempty, mask;
    int              ahit_idx [WAYS];
    int              aempty_idx [WAYS];
    bit              lmh, lme;
    th  = a[31 -: TAGH_W];
    tl  = a[4 + INDEX_W +: TAGL_W];
    idx = int'(a[4 +: INDEX_W]);
    hit = 0; way = 0; act = ACT_HIT;
    for (int k = 0; k < WAYS; k++)
      if (mv[k][idx] && mtl[k][idx] == tl && lobv[k][mlcb[k][idx]] && lobt[k][mlcb[k][idx]] == th) begin
        hit = 1; way = k;
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
    else                  mask = '1;
    w = (last[idx] + 1) % WAYS;
    for (int k = WAYS; k >= 1; k--)
      if (mask[(last[idx] + k) % WAYS]) w = (last[idx] + k) % WAYS;
    way = w;
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
      for (int s = 0; s < SETS; s++) if (mlcb[w][s] == 2'(e)) mv[w][s] = 0;
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
  endtask

  // ------------------------------------------------ synthetic trace
  logic [31:0] pc, region_base;
  int unsigned loop_start, loop_len, data_ptr [3];
  logic [31:0] data_base [3] = '{32'h0210_0000, 32'h0800_4000, 32'h7FFF_0000};
  logic [31:0] code_base [6] = '{32'h0200_0000, 32'h0201_8000, 32'h0203_0000,
                                 32'h0208_4000, 32'h0210_8000, 32'h0240_0000};

  function automatic logic [31:0] next_addr();
    int unsigned r;
    r = $urandom_range(0, 999);
    if (r < 600) begin
      // instruction fetch
      pc = pc + 4;
      if (pc >= region_base + loop_start + loop_len) pc = region_base + loop_start;
      if ($urandom_range(0, 399) == 0) begin
        region_base = code_base[$urandom_range(0, 5)];
        loop_start  = 4 * $urandom_range(0, 1023);
        loop_len    = 4 * $urandom_range(16, 256);
        pc          = region_base + loop_start;
      end
      return pc;
    end else begin
      int k;
      k = (r < 850) ? 0 : (r < 950 ? 1 : 2);
      data_ptr[k] = (data_ptr[k] + 4 * $urandom_range(0, 3)) % 4096;
      return data_base[k] + data_ptr[k];
    end
  endfunction

  initial begin
    bit h, exp_hit;
    int exp_act, exp_way, lat;
    logic [31:0] a;
    done = 0; checks = 0; failures = 0; hits = 0; full_tag_hits = 0;
    cpu_req_valid = 0; cpu_req_addr = '0;
    foreach (mv[w, s]) begin mv[w][s] = 0; mtl[w][s] = 0; mlcb[w][s] = 0; fv[w][s] = 0; ft[w][s] = 0; end
    foreach (lobv[w, e]) begin lobv[w][e] = 0; lobt[w][e] = 0; lobc[w][e] = 0; end
    foreach (lombv[w, e]) begin lombv[w][e] = 0; lombt[w][e] = 0; lombc[w][e] = 0; end
    foreach (last[s]) begin last[s] = WAYS - 1; flast[s] = WAYS - 1; end
    void'($urandom(SEED));
    region_base = code_base[0]; loop_start = 0; loop_len = 256; pc = region_base;
    foreach (data_ptr[k]) data_ptr[k] = 0;
    @(posedge rst_n);
    for (int n = 0; n < N_ACCESS; n++) begin
      a = next_addr();
      do @(negedge clk); while (!cpu_req_ready);
      cpu_req_valid = 1; cpu_req_addr = a;
      @(posedge clk);
      @(negedge clk);
      cpu_req_valid = 0;
      lat = 1;
      while (!cpu_resp_valid && lat < 100) begin @(negedge clk); lat++; end
      model_access(a, exp_hit, exp_act, exp_way);
      full_tag_access(a);
      if (cpu_resp_hit) hits++;
      check(cpu_resp_valid && cpu_resp_data == rt_tb_pkg::mem_word(a), $sformatf("data for %h", a));
      check(cpu_resp_hit == exp_hit, $sformatf("hit %0d for %h, model %0d", cpu_resp_hit, a, exp_hit));
      check(int'(evt_action) == exp_act && int'(evt_way) == exp_way,
            $sformatf("action/way %0d/%0d for %h, model %0d/%0d", evt_action, evt_way, a, exp_act, exp_way));
      check(lat == (cpu_resp_hit ? 1 : 3 + LAT), $sformatf("latency %0d", lat));
    end
    done = 1;
  end
endmodule
