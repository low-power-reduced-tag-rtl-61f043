// tb_rt_cache_locality: the two-locality example used to size the Locality
// Buffer, run on a small direct-mapped reduced-tag cache.
//
// Configuration (from the example): 32-bit addresses with a 24-bit tag
// split into 20 TagH and 4 TagL bits, a 4-bit index and 16-byte lines, so
// the cache is 16 sets x 16 bytes x 1 way = 256 bytes, with 2 LCB bits
// (4 LoB entries). Two memory regions (TagH 0x02021 and 0x0201b) are used
// alternately. The first access to each region is a cold miss that puts its
// TagH into a new LoB entry; all later accesses to either region must hit,
// because both TagH values stay in the LoB at once. The six-access trace
// is run once, then the two regions are alternated for more rounds over
// further lines, which must each miss once and then hit.
//
// Each response is checked for data (against the memory content function),
// hit flag, policy action and latency (1 cycle for a hit, 3 + LAT for a
// miss). Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_rt_cache_locality;
  import rt_pkg::*;

  localparam int unsigned LAT = 3;

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
  logic [0:0]   evt_way;
  int unsigned  mem_requests;

  always #5 clk = ~clk;

  rt_cache #(.CACHE_BYTES(256), .WAYS(1), .TAGL_W(4), .LCB_W(2)) dut (
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
  int n_access = 0, n_hits = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // One read; checks data, hit flag, action and latency.
  task automatic access(input logic [31:0] a, input bit exp_hit, input rt_action_e exp_act);
    int lat;
    do @(negedge clk); while (!cpu_req_ready);
    cpu_req_valid = 1'b1;
    cpu_req_addr  = a;
    @(posedge clk);
    @(negedge clk);
    cpu_req_valid = 1'b0;
    lat = 1;
    while (!cpu_resp_valid && lat < 100) begin @(negedge clk); lat++; end
    n_access++;
    if (cpu_resp_hit) n_hits++;
    check(cpu_resp_valid, $sformatf("no response for %h", a));
    check(cpu_resp_data == rt_tb_pkg::mem_word(a),
          $sformatf("data %h for %h, want %h", cpu_resp_data, a, rt_tb_pkg::mem_word(a)));
    check(cpu_resp_hit == exp_hit, $sformatf("hit %0d for %h, want %0d", cpu_resp_hit, a, exp_hit));
    check(rt_action_e'(evt_action) == exp_act,
          $sformatf("action %s for %h, want %s", rt_action_e'(evt_action), a, exp_act));
    check(lat == (exp_hit ? 1 : 3 + LAT), $sformatf("latency %0d for %h", lat, a));
  endtask

  // The six-access example: regions 0x02021 (line 0x02021d4x) and 0x0201b
  // (line 0x0201bd6x), same TagL 0xd, indices 4 and 6.
  logic [31:0] trace [6] = '{
    32'h02021d40, 32'h02021d48, 32'h0201bd68,
    32'h0201bd60, 32'h02021d44, 32'h0201bd64 };
  bit trace_hit [6] = '{0, 1, 0, 1, 1, 1};

  initial begin
    logic [31:0] a, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 6; i++)
      access(trace[i], trace_hit[i], trace_hit[i] ? ACT_HIT : ACT_NEW_LOB);

    // Alternate the two regions over further lines (other TagL / index
    // values). First touch of a line: TagL miss with a LoB entry holding the
    // TagH, so the line is filled pointing at that entry. Then hits.
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 2; k++) begin
        a = {20'h02021, 4'(r), 4'(8 + k), 4'h0};
        b = {20'h0201b, 4'(r), 4'(10 + k), 4'h0};
        access(a, 1'b0, ACT_FILL_LOB);
        access(b, 1'b0, ACT_FILL_LOB);
        access(a | 32'h4, 1'b1, ACT_HIT);
        access(b | 32'h8, 1'b1, ACT_HIT);
      end
    end
    // The original example lines are still cached: their sets were not used.
    for (int i = 0; i < 6; i++) access(trace[i], 1'b1, ACT_HIT);

    $display("accesses=%0d hits=%0d mem_requests=%0d", n_access, n_hits, mem_requests);
    check(mem_requests == n_access - n_hits, "memory requests differ from misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
