// tb_rt_cache_configs: the reduced-tag cache in the sizes and associativities
// of the evaluation (8, 16 and 32 KB; 1, 2, 4 and 8 ways; several TagL
// widths), each on the same synthetic program-like trace and each checked
// access by access against the behavioural model (rt_cfg_harness). Prints
// the hit ratio of each configuration next to that of a full-tag FIFO cache
// of the same geometry, and checks the trend the evaluation rests on: with
// 8 TagL bits a 16 KB 4-way cache hits at least as often as with 1 bit.
module tb_rt_cache_configs;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [N];
  int   chk [N], fl [N], hit [N], fth [N];
  string name [N] = '{"8KB 1-way TagL 4", "8KB 2-way TagL 5", "8KB 8-way TagL 6",
                      "16KB 2-way TagL 4", "16KB 8-way TagL 6", "32KB 4-way TagL 3",
                      "16KB 4-way TagL 1", "16KB 4-way TagL 8", "32KB 1-way TagL 2"};
  localparam int unsigned NA = 6000;

  rt_cfg_harness #(.CACHE_BYTES(8192),  .WAYS(1), .TAGL_W(4), .N_ACCESS(NA)) h0 (clk, rst_n, done[0], chk[0], fl[0], hit[0], fth[0]);
  rt_cfg_harness #(.CACHE_BYTES(8192),  .WAYS(2), .TAGL_W(5), .N_ACCESS(NA)) h1 (clk, rst_n, done[1], chk[1], fl[1], hit[1], fth[1]);
  rt_cfg_harness #(.CACHE_BYTES(8192),  .WAYS(8), .TAGL_W(6), .N_ACCESS(NA)) h2 (clk, rst_n, done[2], chk[2], fl[2], hit[2], fth[2]);
  rt_cfg_harness #(.CACHE_BYTES(16384), .WAYS(2), .TAGL_W(4), .N_ACCESS(NA)) h3 (clk, rst_n, done[3], chk[3], fl[3], hit[3], fth[3]);
  rt_cfg_harness #(.CACHE_BYTES(16384), .WAYS(8), .TAGL_W(6), .N_ACCESS(NA)) h4 (clk, rst_n, done[4], chk[4], fl[4], hit[4], fth[4]);
  rt_cfg_harness #(.CACHE_BYTES(32768), .WAYS(4), .TAGL_W(3), .N_ACCESS(NA)) h5 (clk, rst_n, done[5], chk[5], fl[5], hit[5], fth[5]);
  rt_cfg_harness #(.CACHE_BYTES(16384), .WAYS(4), .TAGL_W(1), .N_ACCESS(NA)) h6 (clk, rst_n, done[6], chk[6], fl[6], hit[6], fth[6]);
  rt_cfg_harness #(.CACHE_BYTES(16384), .WAYS(4), .TAGL_W(8), .N_ACCESS(NA)) h7 (clk, rst_n, done[7], chk[7], fl[7], hit[7], fth[7]);
  rt_cfg_harness #(.CACHE_BYTES(32768), .WAYS(1), .TAGL_W(2), .N_ACCESS(NA)) h8 (clk, rst_n, done[8], chk[8], fl[8], hit[8], fth[8]);

  initial begin
    int checks, failures;
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < N; i++) if (!done[i]) all_done = 0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      $display("%-20s reduced-tag hits %0d/%0d (%.2f%%)  full-tag FIFO hits %0d (%.2f%%)  checks %0d failures %0d",
               name[i], hit[i], NA, 100.0 * hit[i] / NA, fth[i], 100.0 * fth[i] / NA, chk[i], fl[i]);
      checks += chk[i]; failures += fl[i];
    end
    checks++;
    if (hit[7] < hit[6]) begin failures++; $display("FAIL: 8 TagL bits hit less often than 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
