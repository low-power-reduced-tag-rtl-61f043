// tb_rt_masked_fifo: test of masked-FIFO way selection for four ways and
// 8 sets. Starts with the worked example (last replaced way 1, mask 1101:
// way 2 is skipped and way 3 chosen) and the plain FIFO rotation, then
// applies random masks and updates against a model that keeps the last
// replaced way of every set and searches upward from its successor.
module tb_rt_masked_fifo;
  logic       clk = 0, rst_n = 0;
  logic [2:0] index, upd_index;
  logic [3:0] fifo_mask, last_way, sel_onehot;
  logic [1:0] sel_way, upd_way;
  logic       upd_en;
  int checks = 0, failures = 0;
  int model_last [8];

  always #5 clk = ~clk;

  rt_masked_fifo #(.WAYS(4), .SETS(8)) dut (.*);

  function automatic int pick(int last, logic [3:0] m);
    for (int k = 1; k <= 4; k++)
      if (m[(last + k) % 4]) return (last + k) % 4;
    return (last + 1) % 4;
  endfunction

  task automatic chk(input string what);
    #1;
    checks += 3;
    if (sel_way !== 2'(pick(model_last[index], fifo_mask))) begin
      failures++; $display("FAIL %s: set %0d last %0d mask %b sel %0d", what, index, model_last[index], fifo_mask, sel_way);
    end
    if (sel_onehot !== (4'b1 << sel_way)) failures++;
    if (last_way !== (4'b1 << model_last[index])) begin failures++; $display("FAIL last_way %b", last_way); end
  endtask

  initial begin
    upd_en = 0; upd_index = 0; upd_way = 0; index = 0; fifo_mask = 4'b1111;
    foreach (model_last[s]) model_last[s] = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // After reset the first victim of every set is way 1 (index 0).
    @(negedge clk); index = 3'd2; fifo_mask = 4'b1111; chk("reset");
    checks++; if (sel_way !== 2'd0) failures++;
    // Record way 1 as last replaced in set 2, then the example mask 1101.
    upd_en = 1; upd_index = 3'd2; upd_way = 2'd0;
    @(negedge clk); upd_en = 0; model_last[2] = 0;
    fifo_mask = 4'b1101; chk("example");
    checks++; if (sel_way !== 2'd2) begin failures++; $display("FAIL example picks %0d", sel_way); end
    // Plain FIFO: 0100 -> 1000 with a full mask.
    upd_en = 1; upd_way = 2'd2;
    @(negedge clk); upd_en = 0; model_last[2] = 2;
    fifo_mask = 4'b1111; chk("rotate");
    checks++; if (sel_onehot !== 4'b1000) failures++;
    // Random.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      upd_en = 0;
      index = 3'($urandom_range(0, 7));
      fifo_mask = 4'($urandom_range(0, 15));
      chk("random");
      if ($urandom_range(0, 1)) begin
        upd_en = 1; upd_index = index; upd_way = sel_way;
        @(posedge clk); #1 upd_en = 0;
        model_last[upd_index] = int'(upd_way);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
